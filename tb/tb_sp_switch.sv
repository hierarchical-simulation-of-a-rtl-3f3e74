// tb_sp_switch: self-checking test of one superpipelined switch.
//
// The switch sits at (1,1) of a 4x4 coordinate space. A sender model on each
// of the five inputs sends packets of 1 to 3 flits to random destinations,
// honouring flit credits; a receiver model on each output checks that every
// packet leaves by the output that XY routing gives for its destination, with
// its phits intact and not interleaved with another packet, and returns
// credits after a delay; a receiver never holds more than BUF unreturned
// flits. Directed cases check the fall-through latency (head
// sampled at edge t is on the output after t+6, i.e. 7 cycles from the
// cycle it was driven to the cycle the next switch sees it) and that four
// inputs fighting for one output are served in turn. Contention and credit
// stalls must both occur; the empty flag must be low under traffic and high
// after the drain.
`timescale 1ns/1ps
module tb_sp_switch;
  import sp_pkg::*;

  localparam int unsigned N = NPORTS;
  localparam int unsigned BUF = 4;
  localparam int unsigned SX = 1, SY = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  phit_t link_in [N];
  logic  credit_out [N];
  phit_t link_out [N];
  logic  credit_in [N];
  logic [N-1:0] out_busy;
  logic empty;
  int n_not_empty = 0;

  sp_switch #(.BUF_FLITS(BUF), .MY_X(COORD_W'(SX)), .MY_Y(COORD_W'(SY))) dut (
    .clk(clk), .rst_n(rst_n), .link_in(link_in), .credit_out(credit_out),
    .link_out(link_out), .credit_in(credit_in), .out_busy(out_busy), .empty(empty));
  always @(posedge clk) if (rst_n && !empty) n_not_empty++;

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic int exp_out(input int dx, input int dy);
    if (dx > int'(SX)) return 2;
    if (dx < int'(SX)) return 4;
    if (dy > int'(SY)) return 3;
    if (dy < int'(SY)) return 1;
    return 0;
  endfunction

  function automatic logic [PHIT_W-1:0] payload(input int id, input int k);
    return 16'(id * 2654435761 + k * 40503) ^ 16'(k << 12);
  endfunction

  // Senders.
  phit_t tx_q [N][$];
  int tx_cred [N], tx_phase [N];
  int next_id = 1;
  // Expected packets per output, in the order their heads must appear
  // is not fixed, so keep a set: id -> (output, length, send cycle).
  int pk_out [int], pk_len [int], pk_tx [int];
  int pend_id [N][$];
  // Receivers.
  int rx_id [N], rx_k [N], rx_due [N][$], rx_ph [N];
  int drain_delay = 2;
  int n_sent = 0, n_recv = 0, last_lat = -1;
  int n_contend = 0, n_stall = 0;

  for (genvar go = 0; go < N; go++) begin : g_probe
    always @(posedge clk) if (rst_n) begin
      if (dut.g_out[go].u_ctl.u_arb.start && $countones(dut.g_out[go].u_ctl.u_arb.req) > 1) n_contend++;
      if (dut.g_out[go].u_ctl.gnt_valid && dut.g_out[go].u_ctl.phase == 0 &&
          dut.g_out[go].u_ctl.credits == 0 && dut.g_out[go].u_ctl.in_valid[dut.g_out[go].u_ctl.gnt_idx])
        n_stall++;
    end
  end

  task automatic queue_packet(input int in_port, input int dx, input int dy, input int nflits);
    int id;
    hdr_t h;
    id = next_id++;
    h = '{src_y: COORD_W'(in_port), src_x: '0, dst_y: COORD_W'(dy), dst_x: COORD_W'(dx)};
    pk_out[id] = exp_out(dx, dy);
    pk_len[id] = nflits;
    pend_id[in_port].push_back(id);
    for (int k = 0; k < nflits * PHITS_PER_FLIT; k++) begin
      phit_t p;
      p.valid = 1'b1;
      p.head = (k == 0);
      p.tail = (k == nflits * PHITS_PER_FLIT - 1);
      p.data = (k == 0) ? PHIT_W'(h) : (k == 1) ? 16'(id) : payload(id, k);
      tx_q[in_port].push_back(p);
    end
    n_sent++;
  endtask

  task automatic step(input int rate);
    for (int o = 0; o < int'(N); o++) begin
      phit_t p;
      p = link_out[o];
      if (p.valid) begin
        rx_ph[o]++;
        if (rx_ph[o] % PHITS_PER_FLIT == 0) rx_due[o].push_back(cyc + drain_delay);
        if (p.head) begin
          check(rx_k[o] == 0, "head inside a packet");
          rx_k[o] = 1;
        end else if (rx_k[o] == 1) begin
          rx_id[o] = int'(p.data);
          check(pk_out.exists(rx_id[o]) && pk_out[rx_id[o]] == o,
                $sformatf("packet %0d on output %0d", rx_id[o], o));
          if (pk_tx.exists(rx_id[o])) last_lat = cyc - 1 - pk_tx[rx_id[o]];
          rx_k[o] = 2;
        end else begin
          check(p.data == payload(rx_id[o], rx_k[o]), "payload phit");
          rx_k[o]++;
        end
        if (p.tail) begin
          check(pk_len.exists(rx_id[o]) && rx_k[o] == pk_len[rx_id[o]] * PHITS_PER_FLIT, "packet length");
          pk_out.delete(rx_id[o]);
          rx_k[o] = 0;
          n_recv++;
        end
      end
      check(rx_due[o].size() <= int'(BUF), $sformatf("output %0d: more flits in flight than the receiver holds", o));
      credit_in[o] = 1'b0;
      if (rx_due[o].size() > 0 && rx_due[o][0] <= cyc) begin
        credit_in[o] = 1'b1;
        void'(rx_due[o].pop_front());
      end
    end
    for (int i = 0; i < int'(N); i++) begin
      if (credit_out[i]) tx_cred[i]++;
      link_in[i] = PHIT_IDLE;
      if (tx_q[i].size() > 0 && $urandom_range(0, 99) < rate &&
          (tx_phase[i] != 0 || tx_cred[i] > 0)) begin
        phit_t q;
        q = tx_q[i].pop_front();
        if (tx_phase[i] == 0) tx_cred[i]--;
        tx_phase[i] = (tx_phase[i] + 1) % PHITS_PER_FLIT;
        if (q.head) pk_tx[pend_id[i].pop_front()] = cyc;
        link_in[i] = q;
      end
    end
  endtask

  task automatic run(input int cycles, input int rate);
    for (int c = 0; c < cycles; c++) begin
      step(rate);
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) begin
      link_in[i] = PHIT_IDLE; credit_in[i] = 1'b0;
      tx_cred[i] = BUF; tx_phase[i] = 0; rx_k[i] = 0; rx_ph[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Fall-through latency, one packet per input, one at a time.
    for (int i = 0; i < int'(N); i++) begin
      queue_packet(i, (i * 3) % 4, (i + 2) % 4, 2);
      run(40, 100);
      check(last_lat == 7, $sformatf("fall-through latency %0d cycles, expected 7", last_lat));
    end

    // Four inputs to the local output at once: served one after the other.
    for (int i = 1; i < int'(N); i++) queue_packet(i, SX, SY, 3);
    run(200, 100);
    check(n_recv == n_sent, "contended packets all delivered");

    // Random traffic with fast and then slow receivers.
    for (int round = 0; round < 2; round++) begin
      drain_delay = (round == 0) ? 1 : 40;
      for (int c = 0; c < 4000; c++) begin
        for (int i = 0; i < int'(N); i++)
          if (tx_q[i].size() < 30 && $urandom_range(0, 99) < 4)
            queue_packet(i, int'($urandom_range(0, 3)), int'($urandom_range(0, 3)),
                         1 + int'($urandom_range(0, 2)));
        run(1, 85);
      end
    end
    drain_delay = 1;
    for (int c = 0; c < 20000 && n_recv != n_sent; c++) run(1, 100);
    run(20, 100);
    check(n_recv == n_sent, $sformatf("all packets delivered (%0d of %0d)", n_recv, n_sent));
    check(pk_out.num() == 0, "no packet outstanding");
    check(empty, "switch empty after the drain");
    check(n_not_empty > 1000, "switch reported busy while traffic ran");
    $display("sent=%0d received=%0d contended=%0d credit_stalls=%0d", n_sent, n_recv, n_contend, n_stall);
    check(n_contend > 0, "contention happened");
    check(n_stall > 0, "credit stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
