// sp_switch: superpipelined five-port switch for a 2D mesh.
//
// The switch trades width for clock rate: its core runs at the link clock
// and moves one 16-bit phit per cycle instead of one 64-bit flit per
// four link cycles. That lets it start on a packet as soon as the first phit
// arrives and overlap crossbar traversal with link transmission. The head
// phit of a packet goes through
//   2 cycles  synchronize and move to core  (sp_input_port: receive register,
//                                            buffer write, route)
//   4 cycles  arbitration                    (sp_arbiter in sp_output_ctrl)
//   1 cycle   crossbar and link transmit     (sp_crossbar)
// so without contention a head phit sampled at edge t is sampled by the next
// switch at edge t+7: 17.5 ns at a 400 MHz link clock. The other phits of the
// packet follow one per cycle.
//
// `empty` is high when no phit is held in any receive register, buffer or
// transmit register of the switch.
//
// Ports are numbered by sp_pkg::port_e (local, north, east, south, west).
// Each port has a phit link and a credit line in each direction; a credit
// pulse returns one flit slot of the receiving input buffer.
//
// From the switch description: the phit width, the flit of four phits, the
// pipeline of synchronize/move, four-cycle arbitration and overlapped
// crossbar/link transmission, and the 17.5 ns fall-through latency. This
// design's own choices: the exact split of the 7 cycles, five ports with XY
// routing, wormhole-style holding of an output for a whole packet, credit flow
// control and the buffer depth.
module sp_switch
  import sp_pkg::*;
#(
  parameter int unsigned        BUF_FLITS = 4,
  parameter logic [COORD_W-1:0] MY_X      = '0,
  parameter logic [COORD_W-1:0] MY_Y      = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phit_t  link_in    [NPORTS],
  output logic   credit_out [NPORTS],
  output phit_t  link_out   [NPORTS],
  input  logic   credit_in  [NPORTS],
  output logic [NPORTS-1:0] out_busy,  // output o is held by a packet
  output logic   empty                 // no phit anywhere in the switch
);

  localparam int unsigned N  = NPORTS;
  localparam int unsigned IW = $clog2(N);

  phit_t         front [N];
  logic [N-1:0]  req   [N];   // req[i][o]: input i wants output o
  logic [N-1:0]  req_t [N];   // req_t[o][i]: the same, per output
  logic [N-1:0]  pop;
  logic [N-1:0]  in_valid, in_tail, in_empty, out_idle;
  logic [N-1:0]  send;
  logic [IW-1:0] sel [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    sp_input_port #(.BUF_FLITS(BUF_FLITS), .MY_X(MY_X), .MY_Y(MY_Y)) u_in (
      .clk        (clk),
      .rst_n      (rst_n),
      .link_in    (link_in[i]),
      .credit_out (credit_out[i]),
      .front      (front[i]),
      .req        (req[i]),
      .pop        (pop[i]),
      .empty      (in_empty[i])
    );
    assign in_valid[i] = front[i].valid;
    assign in_tail[i]  = front[i].tail;
    assign out_idle[i] = !link_out[i].valid;
  end

  always_comb begin
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++)
        req_t[o][i] = req[i][o];
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < N; o++)
      if (send[o]) pop[sel[o]] = 1'b1;
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    sp_output_ctrl #(.N(N), .CREDITS(BUF_FLITS)) u_ctl (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (req_t[o]),
      .in_valid  (in_valid),
      .in_tail   (in_tail),
      .credit_in (credit_in[o]),
      .send      (send[o]),
      .sel       (sel[o]),
      .busy      (out_busy[o])
    );
  end

  sp_crossbar #(.N(N)) u_xbar (
    .clk   (clk),
    .rst_n (rst_n),
    .in    (front),
    .send  (send),
    .sel   (sel),
    .out   (link_out)
  );

  assign empty = (&in_empty) && (&out_idle);

  // No input is ever popped by two outputs in the same cycle.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          assert (!(send[a] && send[b] && sel[a] == sel[b]))
            else $error("sp_switch: two outputs read input %0d", sel[a]);
  end

endmodule
