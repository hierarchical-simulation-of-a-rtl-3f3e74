// tb_sp_mesh: end-to-end test of the 4x4 mesh at its default size.
//
// Sixteen node models inject packets through the local ports, honouring the
// injection credits, and drain their ejection links, giving credits back after
// a delay. Each packet is 1 flit (a request) or 9 flits (a header flit plus a
// 64-byte cache line); phit 1 carries its length and a sequence number and
// every payload phit is a known function of (source, sequence, index).
//
// Phases:
//   1. a single packet from node 0 to node 15 on an empty network: its head
//      must take 7 cycles per switch crossed (7 x 7 = 49);
//   2. every node sends one packet to each of its neighbours at once;
//   3. random uniform traffic, with slow-draining nodes for a while so that
//      back-pressure reaches into the mesh;
//   4. drain, then check that every packet arrived once, intact, at its
//      destination, its phits contiguous on the ejection link, and that
//      net_empty is high again.
// The test counts the mechanisms of the switch and fails if one never
// happened: arbitration with several contenders, an arbitration started in
// the cycle the previous packet's tail left, a flit held for lack of a
// credit inside the mesh, a node held at injection for lack of a credit, and
// multi-hop cut-through (a packet whose head left before its tail entered).
`timescale 1ns/1ps
module tb_sp_mesh;
  import sp_pkg::*;

  localparam int unsigned MX = 4, MY = 4, NN = MX * MY;
  localparam int unsigned BUF = 4;   // default buffer depth, flits

  logic clk = 1'b0, rst_n = 1'b0;
  phit_t local_in  [NN];
  logic  local_credit_out [NN];
  phit_t local_out [NN];
  logic  local_credit_in  [NN];
  logic [NPORTS-1:0] out_busy [NN];
  logic net_empty;
  int n_not_empty = 0;

  sp_mesh dut (
    .clk(clk), .rst_n(rst_n),
    .local_in(local_in), .local_credit_out(local_credit_out),
    .local_out(local_out), .local_credit_in(local_credit_in),
    .out_busy(out_busy), .net_empty(net_empty));
  always @(posedge clk) if (rst_n && !net_empty) n_not_empty++;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
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

  function automatic logic [PHIT_W-1:0] payload(input int src, input int seq, input int k);
    return 16'((src * 40503 + seq * 977 + k * 2654435761) ^ (k << 11) ^ (src << 4));
  endfunction

  // ---------------- mechanism counters (probing the switches) ----------
  int n_contend = 0, n_credit_stall = 0, n_back_to_back = 0;
  for (genvar gy = 0; gy < MY; gy++) begin : g_py
    for (genvar gx = 0; gx < MX; gx++) begin : g_px
      for (genvar go = 0; go < NPORTS; go++) begin : g_po
        always @(posedge clk) if (rst_n) begin
          if (dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.u_arb.start &&
              $countones(dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.u_arb.req) > 1)
            n_contend++;
          // A new arbitration started in the cycle the previous tail left.
          if (dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.u_arb.start &&
              dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.u_arb.release_i)
            n_back_to_back++;
          if (go != 0 &&
              dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.gnt_valid &&
              dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.phase == 0 &&
              dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.credits == 0 &&
              dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.in_valid[
                dut.g_y[gy].g_x[gx].u_sw.g_out[go].u_ctl.gnt_idx])
            n_credit_stall++;
        end
      end
    end
  end

  // ---------------- node models ----------------------------------------
  // Injection side.
  phit_t tx_q   [NN][$];     // phits of packets waiting to be sent
  int    tx_cred[NN];
  int    tx_phase[NN];
  int    tx_seq [NN];
  int    n_inj_stall = 0;
  // Ejection side.
  int    rx_src [NN], rx_seq[NN], rx_len[NN], rx_k[NN];
  int    rx_due [NN][$];     // cycles at which credits are given back
  int    rx_phits[NN];
  int    drain_delay = 2;
  // Scoreboard.
  int    sb_dst [int];
  int    sb_len [int];
  int    sb_tx  [int];       // cycle the head was driven
  int    sb_tail_tx [int];   // cycle the tail was driven (-1 until then)
  int    sb_got [int];
  int    last_latency = -1;
  int    n_sent = 0, n_recv = 0, n_cut_through = 0, n_multi_hop = 0;

  task automatic make_packet(input int src, input int dst, input int nflits);
    int seq, key;
    hdr_t h;
    seq = tx_seq[src]++;
    key = src * 65536 + seq;
    h.dst_x = COORD_W'(dst % MX);
    h.dst_y = COORD_W'(dst / MX);
    h.src_x = COORD_W'(src % MX);
    h.src_y = COORD_W'(src / MX);
    sb_dst[key] = dst;
    sb_len[key] = nflits;
    sb_tail_tx[key] = -1;
    for (int k = 0; k < nflits * PHITS_PER_FLIT; k++) begin
      phit_t p;
      p.valid = 1'b1;
      p.head  = (k == 0);
      p.tail  = (k == nflits * PHITS_PER_FLIT - 1);
      if (k == 0)      p.data = PHIT_W'(h);
      else if (k == 1) p.data = {4'(nflits), 12'(seq)};
      else             p.data = payload(src, seq, k);
      tx_q[src].push_back(p);
    end
    n_sent++;
  endtask

  // One cycle of every node: called between edges.
  task automatic step_nodes(input int inj_rate_pct);
    for (int n = 0; n < int'(NN); n++) begin
      // --- receive
      phit_t p;
      p = local_out[n];
      if (p.valid) begin
        rx_phits[n]++;
        if (rx_phits[n] % PHITS_PER_FLIT == 0)
          rx_due[n].push_back(cyc + drain_delay + int'($urandom_range(0, 1)));
        if (p.head) begin
          hdr_t h;
          h = hdr_t'(p.data);
          check(rx_k[n] == 0, $sformatf("node %0d: head inside a packet", n));
          check(int'(h.dst_x) == n % MX && int'(h.dst_y) == n / MX,
                $sformatf("node %0d: packet for (%0d,%0d)", n, h.dst_x, h.dst_y));
          rx_src[n] = int'(h.src_y) * MX + int'(h.src_x);
          rx_k[n] = 1;
        end else begin
          check(rx_k[n] > 0, $sformatf("node %0d: body phit without head", n));
          if (rx_k[n] == 1) begin
            int key;
            rx_len[n] = int'(p.data[15:12]);
            rx_seq[n] = int'(p.data[11:0]);
            key = rx_src[n] * 65536 + rx_seq[n];
            check(sb_dst.exists(key) && sb_dst[key] == n && !sb_got.exists(key),
                  $sformatf("node %0d: unknown or repeated packet %0d/%0d", n, rx_src[n], rx_seq[n]));
            if (sb_dst.exists(key)) begin
              int dx, dy;
              sb_got[key] = 1;
              last_latency = cyc - 1 - sb_tx[key];
              dx = (rx_src[n] % MX) - (n % MX);
              dy = (rx_src[n] / MX) - (n / MX);
              if (dx < 0) dx = -dx;
              if (dy < 0) dy = -dy;
              if (dx + dy >= 2) n_multi_hop++;
              // The head reached its destination before the tail left its source.
              if (sb_len[key] > 1 && sb_tail_tx[key] < 0) n_cut_through++;
            end
          end else begin
            check(p.data == payload(rx_src[n], rx_seq[n], rx_k[n]),
                  $sformatf("node %0d: payload phit %0d of %0d/%0d", n, rx_k[n], rx_src[n], rx_seq[n]));
          end
          rx_k[n]++;
          if (p.tail) begin
            check(rx_k[n] == rx_len[n] * PHITS_PER_FLIT,
                  $sformatf("node %0d: packet length %0d phits, expected %0d", n, rx_k[n], rx_len[n] * 4));
            rx_k[n] = 0;
            n_recv++;
          end
        end
      end
      check(rx_due[n].size() <= int'(BUF), $sformatf("node %0d: more flits in flight than its buffer holds", n));
      local_credit_in[n] = 1'b0;
      if (rx_due[n].size() > 0 && rx_due[n][0] <= cyc) begin
        local_credit_in[n] = 1'b1;
        void'(rx_due[n].pop_front());
      end
      // --- inject
      if (local_credit_out[n]) tx_cred[n]++;
      local_in[n] = PHIT_IDLE;
      if (tx_q[n].size() > 0 && $urandom_range(0, 99) < inj_rate_pct) begin
        if (tx_phase[n] != 0 || tx_cred[n] > 0) begin
          phit_t q;
          q = tx_q[n].pop_front();
          if (tx_phase[n] == 0) tx_cred[n]--;
          tx_phase[n] = (tx_phase[n] + 1) % PHITS_PER_FLIT;
          if (q.head) sb_tx[n * 65536 + tx_seq_of(q, n)] = cyc;
          if (q.tail) sb_tail_tx[n * 65536 + tx_seq_of(q, n)] = cyc;
          local_in[n] = q;
          cur_seq[n] = cur_seq_next(q, n);
        end else begin
          n_inj_stall++;
        end
      end
    end
  endtask

  // Sequence number of the packet whose phits a node is sending.
  int cur_seq [NN];
  int pend_seq [NN][$];
  function automatic int tx_seq_of(input phit_t q, input int n);
    return q.head ? pend_seq[n][0] : cur_seq[n];
  endfunction
  function automatic int cur_seq_next(input phit_t q, input int n);
    int s;
    s = q.head ? pend_seq[n].pop_front() : cur_seq[n];
    return s;
  endfunction

  task automatic queue_packet(input int src, input int dst, input int nflits);
    pend_seq[src].push_back(tx_seq[src]);
    make_packet(src, dst, nflits);
  endtask

  task automatic run(input int cycles, input int rate);
    for (int c = 0; c < cycles; c++) begin
      step_nodes(rate);
      @(negedge clk);
      cyc++;
    end
  endtask

  function automatic bit all_idle();
    for (int n = 0; n < int'(NN); n++)
      if (tx_q[n].size() > 0 || rx_k[n] != 0) return 0;
    return (n_recv == n_sent);
  endfunction

  initial begin
    for (int n = 0; n < int'(NN); n++) begin
      local_in[n] = PHIT_IDLE;
      local_credit_in[n] = 1'b0;
      tx_cred[n] = BUF; tx_phase[n] = 0; tx_seq[n] = 0;
      rx_k[n] = 0; rx_phits[n] = 0; cur_seq[n] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    check(net_empty, "network empty after reset");
    // Phase 1: fall-through latency across the mesh.
    queue_packet(0, 15, 1);
    run(80, 100);
    check(n_recv == 1, "single packet delivered");
    check(last_latency == 7 * 7,
          $sformatf("0 -> 15 head latency %0d cycles, expected 49 (7 switches x 7)", last_latency));
    queue_packet(5, 6, 9);
    run(120, 100);
    check(last_latency == 7 * 2,
          $sformatf("5 -> 6 head latency %0d cycles, expected 14", last_latency));

    // Phase 2: every node to each neighbour.
    for (int n = 0; n < int'(NN); n++) begin
      int x, y;
      x = n % MX; y = n / MX;
      if (x + 1 < int'(MX)) queue_packet(n, n + 1, 9);
      if (x > 0)            queue_packet(n, n - 1, 1);
      if (y + 1 < int'(MY)) queue_packet(n, n + MX, 9);
      if (y > 0)            queue_packet(n, n - MX, 1);
    end
    run(600, 100);
    check(all_idle(), "neighbour exchange complete");

    // Phase 3: random traffic, then slow drains.
    for (int round = 0; round < 2; round++) begin
      drain_delay = (round == 0) ? 2 : 20;
      for (int c = 0; c < 3000; c++) begin
        for (int n = 0; n < int'(NN); n++)
          if (tx_q[n].size() < 40 && $urandom_range(0, 99) < 3)
            queue_packet(n, int'($urandom_range(0, NN - 1)), ($urandom_range(0, 1) == 1) ? 9 : 1);
        run(1, 90);
      end
    end

    // Phase 4: drain.
    drain_delay = 1;
    for (int c = 0; c < 40000 && !all_idle(); c++) run(1, 100);
    run(50, 100);
    check(all_idle(), $sformatf("all packets delivered (%0d of %0d)", n_recv, n_sent));
    check(sb_got.num() == n_sent, "every packet received exactly once");
    check(net_empty, "network empty after the drain");
    check(n_not_empty > 1000, "network reported non-empty under traffic");

    $display("packets sent=%0d received=%0d", n_sent, n_recv);
    $display("mechanisms: contended_arbitrations=%0d back_to_back_arbitrations=%0d in_mesh_credit_stalls=%0d injection_credit_stalls=%0d cut_through=%0d multi_hop=%0d",
             n_contend, n_back_to_back, n_credit_stall, n_inj_stall, n_cut_through, n_multi_hop);
    check(n_contend > 0, "arbitration with several contenders happened");
    check(n_back_to_back > 0, "arbitration started on a release happened");
    check(n_credit_stall > 0, "credit stall inside the mesh happened");
    check(n_inj_stall > 0, "injection credit stall happened");
    check(n_cut_through > 0, "cut-through (head out before tail in) happened");
    check(n_multi_hop > 0, "multi-hop packets happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
