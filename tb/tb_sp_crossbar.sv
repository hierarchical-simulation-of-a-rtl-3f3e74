// tb_sp_crossbar: self-checking test of the phit crossbar and its link
// transmit registers.
//
// Random phits are offered on every input and random (send, sel) pairs on
// every output. One edge later each output must show the selected input's
// phit with valid set, or an idle phit when it did not send.
`timescale 1ns/1ps
module tb_sp_crossbar;
  import sp_pkg::*;

  localparam int unsigned N = NPORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  phit_t in [N];
  logic [N-1:0] send;
  logic [$clog2(N)-1:0] sel [N];
  phit_t out [N];

  int checks = 0, failures = 0;

  sp_crossbar #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in(in), .send(send), .sel(sel), .out(out));

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  phit_t exp [N];

  initial begin
    send = '0;
    for (int i = 0; i < int'(N); i++) begin in[i] = PHIT_IDLE; sel[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int o = 0; o < int'(N); o++) check(out[o] == PHIT_IDLE, "idle after reset");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int i = 0; i < int'(N); i++) begin
        in[i].valid = 1'($urandom);
        in[i].head  = 1'($urandom);
        in[i].tail  = 1'($urandom);
        in[i].data  = 16'($urandom);
      end
      for (int o = 0; o < int'(N); o++) begin
        send[o] = 1'($urandom);
        sel[o]  = 3'($urandom_range(0, N - 1));
        if (send[o]) begin
          exp[o] = in[sel[o]];
          exp[o].valid = 1'b1;
        end else begin
          exp[o] = PHIT_IDLE;
        end
      end
      @(negedge clk);
      for (int o = 0; o < int'(N); o++)
        check(out[o] == exp[o], $sformatf("output %0d", o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
