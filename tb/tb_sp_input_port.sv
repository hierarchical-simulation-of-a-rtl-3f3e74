// tb_sp_input_port: self-checking test of one switch input port.
//
// A credit-respecting sender pushes random packets (1 to 3 flits, random idle
// gaps) into the port while a random consumer pops the buffer front. A queue
// model checks every popped phit and its framing, the one-hot route request
// of every head phit against an independent XY routing rule, one credit per
// drained flit, the empty flag, and the two-cycle receive-to-front latency on an empty port.
`timescale 1ns/1ps
module tb_sp_input_port;
  import sp_pkg::*;

  localparam int unsigned BUF_FLITS = 4;
  localparam logic [COORD_W-1:0] MX = 4'd1, MY = 4'd2;

  logic clk = 1'b0, rst_n = 1'b0;
  phit_t link_in;
  logic credit_out, pop, empty;
  phit_t front;
  logic [NPORTS-1:0] req;

  int checks = 0, failures = 0;

  sp_input_port #(.BUF_FLITS(BUF_FLITS), .MY_X(MX), .MY_Y(MY)) dut (
    .clk(clk), .rst_n(rst_n), .link_in(link_in), .credit_out(credit_out),
    .front(front), .req(req), .pop(pop), .empty(empty));

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  function automatic int exp_port(input logic [PHIT_W-1:0] d);
    int dx, dy;
    dx = int'(d[3:0]);
    dy = int'(d[7:4]);
    if (dx > int'(MX)) return 2;
    if (dx < int'(MX)) return 4;
    if (dy > int'(MY)) return 3;
    if (dy < int'(MY)) return 1;
    return 0;
  endfunction

  phit_t exp_q[$];
  int credits = BUF_FLITS;
  int credits_seen = 0, flits_popped = 0, popped_phits = 0;
  int sent_flits = 0;

  // Pending packet being sent.
  phit_t pkt[$];

  task automatic make_packet();
    int nflits;
    logic [PHIT_W-1:0] hd;
    nflits = 1 + int'($urandom_range(0, 2));
    hd = {8'($urandom), 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3))};
    for (int k = 0; k < nflits * PHITS_PER_FLIT; k++) begin
      phit_t p;
      p.valid = 1'b1;
      p.head  = (k == 0);
      p.tail  = (k == nflits * PHITS_PER_FLIT - 1);
      p.data  = (k == 0) ? hd : 16'($urandom);
      pkt.push_back(p);
    end
  endtask

  bit link_in_prev = 0;  // a phit was driven in the previous cycle
  int phase_out = 0;  // phit index within the flit being sent
  int gap;

  initial begin
    link_in = PHIT_IDLE;
    pop     = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Latency on an empty port: phit driven before edge t, front after t+1.
    @(negedge clk);
    link_in = '{valid: 1'b1, head: 1'b1, tail: 1'b0, data: 16'h0033};
    @(posedge clk); #1 link_in = PHIT_IDLE;
    check(front.valid == 1'b0, "front must not be valid one edge after arrival");
    @(posedge clk); #1;
    check(front.valid == 1'b1 && front.head && front.data == 16'h0033,
          "front valid two edges after arrival");
    check(req == NPORTS'(1) << exp_port(16'h0033), "route of latency probe");
    // Finish that flit (3 more phits) and drain it.
    for (int k = 1; k < 4; k++) begin
      @(negedge clk);
      link_in = '{valid: 1'b1, head: 1'b0, tail: (k == 3), data: 16'(k)};
    end
    @(negedge clk) link_in = PHIT_IDLE;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      check(front.valid, "probe flit present");
      pop = 1'b1;
      @(negedge clk);
    end
    pop = 1'b0;
    check(credit_out == 1'b1, "credit pulse the edge after the fourth pop");
    @(negedge clk);
    check(credit_out == 1'b0, "credit pulse lasts one cycle");
    check(!front.valid, "port empty after probe");

    // Random traffic.
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // Check the front and the request, then decide on pop.
      if (front.valid) begin
        check(exp_q.size() > 0, "front valid with model empty");
        if (exp_q.size() > 0) begin
          check(front.head == exp_q[0].head && front.tail == exp_q[0].tail &&
                front.data == exp_q[0].data, "front phit matches model");
          if (front.head)
            check(req == NPORTS'(1) << exp_port(front.data), "head request one-hot route");
          else
            check(req == '0, "no request for non-head phit");
        end
      end else begin
        check(req == '0, "no request when empty");
      end
      // Empty exactly when the model holds nothing and nothing was just sent.
      check(empty == (exp_q.size() == 0 && !link_in_prev), "empty flag");
      pop = front.valid && ($urandom_range(0, 3) != 0);
      if (pop) begin
        void'(exp_q.pop_front());
        popped_phits++;
        if (popped_phits % 4 == 0) flits_popped++;
      end
      // Credit returned at the previous edge.
      if (credit_out) begin
        credits++;
        credits_seen++;
      end
      // Sender.
      link_in = PHIT_IDLE;
      if (pkt.size() == 0 && $urandom_range(0, 3) == 0) make_packet();
      if (pkt.size() > 0 && $urandom_range(0, 4) != 0) begin
        if (phase_out != 0 || credits > 0) begin
          if (phase_out == 0) begin
            credits--;
            sent_flits++;
          end
          link_in = pkt.pop_front();
          exp_q.push_back(link_in);
          phase_out = (phase_out + 1) % 4;
        end
      end
      link_in_prev = link_in.valid;
      @(negedge clk);
    end
    pop = 1'b0;
    link_in = PHIT_IDLE;
    repeat (4) @(negedge clk);
    check(sent_flits > 100, "enough traffic");
    check(empty == (exp_q.size() == 0), "empty flag at end");
    check(credits_seen == flits_popped || credits_seen == flits_popped - 1,
          $sformatf("credits %0d vs flits drained %0d", credits_seen, flits_popped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
