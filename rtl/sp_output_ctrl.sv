// sp_output_ctrl: control of one output port of the superpipelined switch.
//
// Holds the port's four-cycle arbiter (sp_arbiter) and the flit credits for
// the input buffer at the far end of the link. Once an input has been
// granted, its phits are sent one per cycle, as soon as each is at the front
// of that input's buffer, so a packet streams through the switch in cut-through
// fashion without waiting for whole flits. Flow control is kept per flit: the
// first phit of a flit is only sent when a credit (one free flit slot
// downstream) is held, and that credit is spent then; the three phits that
// follow need none. A credit pulse from downstream gives one credit back. When
// the tail phit is sent the output is released for the next arbitration.
//
// Interface: req is the column of input requests for this output, in_valid
// and in_tail the buffer-front flags of every input; send says that the
// phit of input sel is taken this cycle (it is loaded into the transmit
// register at the next edge and popped from its buffer).
//
// From the switch description: flits as the unit of flow control and
// arbitration, phits as the unit that moves. This design's own choices:
// credit-based flow control and its reset value CREDITS.
module sp_output_ctrl
  import sp_pkg::*;
#(
  parameter int unsigned N       = NPORTS,
  parameter int unsigned CREDITS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         in_valid,
  input  logic [N-1:0]         in_tail,
  input  logic                 credit_in,
  output logic                 send,
  output logic [$clog2(N)-1:0] sel,
  output logic                 busy       // output granted to a packet
);

  localparam int unsigned CW = $clog2(CREDITS + 1);

  logic          gnt_valid;
  logic [$clog2(N)-1:0] gnt_idx;
  logic          release_w;
  logic [CW-1:0] credits;
  logic [$clog2(PHITS_PER_FLIT)-1:0] phase;
  logic          take_credit;

  sp_arbiter #(.N(N)) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (req),
    .release_i (release_w),
    .gnt_valid (gnt_valid),
    .gnt_idx   (gnt_idx)
  );

  assign sel         = gnt_idx;
  assign busy        = gnt_valid;
  assign send        = gnt_valid && in_valid[gnt_idx] && (phase != '0 || credits != '0);
  assign take_credit = send && (phase == '0);
  assign release_w   = send && in_tail[gnt_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credits <= CW'(CREDITS);
      phase   <= '0;
    end else begin
      credits <= credits - CW'(take_credit) + CW'(credit_in);
      if (send) phase <= phase + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   credit_in && !take_credit |-> credits != CW'(CREDITS))
    else $error("sp_output_ctrl: more credits returned than issued");

endmodule
