// tb_sp_output_ctrl: self-checking test of one output port's control.
//
// Modelled inputs hold packets of 1 to 3 flits whose phits become available
// at random times; a modelled receiver returns flit credits after a random
// delay. The test checks, cycle by cycle, that send is raised exactly when
// the granted input has a phit and either the phit is inside a flit or a
// credit is held; that credits never go below zero or above the reset value;
// that the output is held for one whole packet and released on its tail; and
// that credit stalls (a flit waiting for a credit) actually happen.
`timescale 1ns/1ps
module tb_sp_output_ctrl;
  import sp_pkg::*;

  localparam int unsigned N = NPORTS;
  localparam int unsigned CREDITS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, in_valid, in_tail;
  logic credit_in, send, busy;
  logic [$clog2(N)-1:0] sel;

  int checks = 0, failures = 0;

  sp_output_ctrl #(.N(N), .CREDITS(CREDITS)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .in_valid(in_valid), .in_tail(in_tail),
    .credit_in(credit_in), .send(send), .sel(sel), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #600000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Per input: phits left in the current packet, phits available now,
  // and the phit index inside the packet.
  int left  [N];
  int avail [N];
  int idx   [N];
  int credits = CREDITS;
  int phase = 0;
  int ret_q[$];        // cycles at which credits come back
  int packets = 0, stalls = 0, owner = -1;

  initial begin
    req = '0; in_valid = '0; in_tail = '0; credit_in = 1'b0;
    for (int i = 0; i < int'(N); i++) begin left[i] = 0; avail[i] = 0; idx[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      bit exp_send;
      // Inputs' state for this cycle.
      for (int i = 0; i < int'(N); i++) begin
        if (left[i] == 0 && $urandom_range(0, 15) == 0) begin
          left[i] = PHITS_PER_FLIT * (1 + int'($urandom_range(0, 2)));
          idx[i] = 0;
          avail[i] = 0;
        end
        if (left[i] > avail[i] && $urandom_range(0, 2) != 0) avail[i]++;
        in_valid[i] = (avail[i] > 0);
        in_tail[i]  = (avail[i] > 0) && (left[i] == 1);
        req[i]      = (avail[i] > 0) && (idx[i] == 0) && (owner != i);
      end
      credit_in = (ret_q.size() > 0 && ret_q[0] <= cyc);
      if (credit_in) void'(ret_q.pop_front());
      #1;
      // Expected send.
      if (busy) begin
        if (owner < 0) owner = int'(sel);
        check(int'(sel) == owner, "grant holds for the whole packet");
        exp_send = in_valid[sel] && (phase != 0 || credits > 0);
        if (in_valid[sel] && phase == 0 && credits == 0) stalls++;
      end else begin
        exp_send = 1'b0;
      end
      check(send == exp_send, $sformatf("send=%0d expected %0d (phase %0d credits %0d)",
                                        send, exp_send, phase, credits));
      if (send) begin
        int s;
        s = int'(sel);
        if (phase == 0) begin
          credits--;
          ret_q.push_back(cyc + 3 + int'($urandom_range(0, 12)));
        end
        phase = (phase + 1) % PHITS_PER_FLIT;
        avail[s]--;
        left[s]--;
        idx[s]++;
        if (left[s] == 0) begin
          packets++;
          owner = -2;   // released this edge
          idx[s] = 0;
        end
      end
      if (credit_in) credits++;
      check(credits >= 0 && credits <= CREDITS, "credits in range");
      @(negedge clk);
      if (owner == -2) begin
        owner = -1;
      end
    end
    check(packets > 300, $sformatf("packets sent (%0d)", packets));
    check(stalls > 20, $sformatf("credit stalls happened (%0d)", stalls));
    $display("packets=%0d credit_stalls=%0d", packets, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
