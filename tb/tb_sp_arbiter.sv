// tb_sp_arbiter: self-checking test of the four-cycle round-robin arbiter.
//
// Random requesters raise requests and hold them until granted; a granted
// requester keeps the output for a random number of cycles and then releases
// it. A reference model checks that every grant goes to the first requester
// at or after the round-robin pointer among the requests sampled when the
// arbitration started, and that the grant appears exactly four edges after
// the sampling edge (that edge and three more, ARB_CYCLES in all). Contention (two or more requests in one sample)
// must occur.
`timescale 1ns/1ps
module tb_sp_arbiter;
  import sp_pkg::*;

  localparam int unsigned N = NPORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req;
  logic release_i;
  logic gnt_valid;
  logic [$clog2(N)-1:0] gnt_idx;

  int checks = 0, failures = 0;

  sp_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .release_i(release_i),
                           .gnt_valid(gnt_valid), .gnt_idx(gnt_idx));

  always #5 clk = ~clk;

  initial begin
    #400000;
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

  int ptr = 0;
  int grants = 0, contended = 0;
  int hold = 0;
  // Model of the arbitration in flight: sample cycle and expected winner.
  int pending_cycle = -1;
  int pending_win = -1;
  bit busy_m = 0;
  int cyc = 0;

  function automatic int pick(input logic [N-1:0] r, input int p);
    for (int k = 0; k < int'(N); k++)
      if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    req = '0;
    release_i = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (cyc = 0; cyc < 20000; cyc++) begin
      // Checks of the state after the last edge.
      if (pending_cycle >= 0 && cyc == pending_cycle + ARB_CYCLES - 1) begin
        check(gnt_valid && int'(gnt_idx) == pending_win,
              $sformatf("grant to %0d ARB_CYCLES=%0d stages after sample (got v=%0d idx=%0d)",
                        pending_win, ARB_CYCLES, gnt_valid, gnt_idx));
        grants++;
        req[pending_win] = 1'b0;   // granted: request drops
        ptr = (pending_win + 1) % N;
        pending_cycle = -1;
        busy_m = 1;
        hold = int'($urandom_range(0, 6));
      end else if (pending_cycle >= 0) begin
        check(!gnt_valid, "no grant while arbitrating");
      end
      release_i = 1'b0;
      if (busy_m) begin
        if (hold == 0) begin
          release_i = 1'b1;
          busy_m = 0;
        end else hold--;
      end
      // New requests appear and are held; the owner that releases now may
      // request again at once and must then get the lowest priority.
      for (int i = 0; i < int'(N); i++)
        if ($urandom_range(0, 7) == 0 && !(busy_m && int'(gnt_idx) == i)) req[i] = 1'b1;
      // Will the arbiter sample at the coming edge?
      if (pending_cycle < 0 && !busy_m && (req != '0)) begin
        // free, or released now with requests pending
        pending_cycle = cyc + 1;
        pending_win = pick(req, ptr);
        if ($countones(req) > 1) contended++;
      end
      @(negedge clk);
    end
    check(grants > 500, $sformatf("enough grants (%0d)", grants));
    check(contended > 50, $sformatf("contention happened (%0d)", contended));
    $display("grants=%0d contended=%0d", grants, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
