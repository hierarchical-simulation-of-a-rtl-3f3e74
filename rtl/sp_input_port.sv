// sp_input_port: one input port of the superpipelined switch.
//
// Phits are processed one at a time as they arrive instead of waiting for a
// whole flit to be assembled, which is what lets the switch start arbitration
// early. The "synchronize and move to core" part of the pipeline is two
// register stages: a receive register that samples the link, then a write
// into the phit buffer. The phit at the front of the buffer is offered to the
// crossbar; when it is a head phit its route is worked out (dimension-order
// x-then-y) and a one-hot request goes to the output port it needs. The
// request is derived from the buffer front alone, so it stays up until the
// head phit leaves and needs no state of its own.
//
// Flow control is by flit credits. The upstream sender starts a flit only when
// it holds a credit, i.e. a free flit slot in this buffer; when the last phit of
// a flit leaves the buffer this port returns one credit (a one-cycle pulse,
// registered) to the sender.
//
// `empty` tells that the port holds no phit at all, which lets a system
// model skip network cycles while nothing is in flight.
//
// Timing: a phit on link_in at edge t is in the receive register after t and
// at the buffer front after t+1 (when the buffer was empty); req is valid in
// the cycle after t+1.
//
// From the switch description: 16-bit phits, four per flit, phit-level
// processing, synchronization and move as the first pipeline step. This
// design's own choices: credit flow control, buffer depth BUF_FLITS, the split
// into exactly two register stages, and XY routing.
module sp_input_port
  import sp_pkg::*;
#(
  parameter int unsigned          BUF_FLITS = 4,
  parameter logic [COORD_W-1:0]   MY_X      = '0,
  parameter logic [COORD_W-1:0]   MY_Y      = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  phit_t             link_in,    // phit from the upstream link
  output logic              credit_out, // one flit slot freed, to upstream
  output phit_t             front,      // buffer front (valid = not empty)
  output logic [NPORTS-1:0] req,        // one-hot output request for a head phit
  input  logic              pop,        // front phit taken by the crossbar
  output logic              empty       // no phit in the receive register or buffer
);

  localparam int unsigned DEPTH = BUF_FLITS * PHITS_PER_FLIT;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [PHIT_W-1:0] data;
  } entry_t;

  phit_t  rx_q;
  entry_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic [$clog2(PHITS_PER_FLIT)-1:0] pop_phase;
  logic wr_en, rd_en;

  // Stage 1: receive register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_q <= PHIT_IDLE;
    else        rx_q <= link_in;
  end

  // Stage 2: phit buffer.
  assign wr_en = rx_q.valid;
  assign rd_en = pop && (count != 0);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= '{head: rx_q.head, tail: rx_q.tail, data: rx_q.data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      pop_phase  <= '0;
      credit_out <= 1'b0;
    end else begin
      if (wr_en) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (rd_en) begin
        rd_ptr    <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
        pop_phase <= pop_phase + 1'b1;
      end
      count      <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
      credit_out <= rd_en && (pop_phase == $bits(pop_phase)'(PHITS_PER_FLIT-1));
    end
  end

  always_comb begin
    entry_t e;
    e           = mem[rd_ptr];
    front.valid = (count != 0);
    front.head  = e.head;
    front.tail  = e.tail;
    front.data  = e.data;
  end

  assign empty = !rx_q.valid && (count == 0);

  // Route computation for the head phit at the front.
  always_comb begin
    req = '0;
    if (front.valid && front.head)
      req[route_xy(MY_X, MY_Y, hdr_t'(front.data))] = 1'b1;
  end

  // The upstream sender may never write more phits than the credits allow.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (count != (AW+1)'(DEPTH) || rd_en))
    else $error("sp_input_port: phit buffer overflow");
  // Packets are whole flits: a tail leaves as the fourth phit of a flit.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_en && front.tail |-> pop_phase == $bits(pop_phase)'(PHITS_PER_FLIT-1))
    else $error("sp_input_port: tail phit not on a flit boundary");

endmodule
