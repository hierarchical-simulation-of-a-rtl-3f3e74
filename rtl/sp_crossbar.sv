// sp_crossbar: phit-wide crossbar feeding the link transmit registers.
//
// Each output picks the buffer-front phit of the input it has granted and
// loads it straight into its link transmit register, so crossing the
// crossbar and starting transmission on the link are one and the same
// pipeline step: a flit no longer has to be serialized after the crossbar.
// The datapath is one phit (16 bits) wide, a quarter of a flit.
//
// Interface: in[i] is the buffer front of input i; for every output o,
// send[o] and sel[o] come from that output's control. out[o] is the
// registered link output: a phit taken at edge e is on the link after e,
// with valid low in cycles where nothing was sent.
//
// From the switch description: narrow datapath, crossbar and link
// transmission overlapped in one step. This design's own choice: a plain
// multiplexer per output with its output register.
module sp_crossbar
  import sp_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  phit_t                in   [N],
  input  logic [N-1:0]         send,
  input  logic [$clog2(N)-1:0] sel  [N],
  output phit_t                out  [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N; o++) out[o] <= PHIT_IDLE;
    end else begin
      for (int o = 0; o < N; o++) begin
        if (send[o]) begin
          out[o]       <= in[sel[o]];
          out[o].valid <= 1'b1;
        end else begin
          out[o]       <= PHIT_IDLE;
        end
      end
    end
  end

endmodule
