// sp_arbiter: round-robin arbiter of one output port, four cycles deep.
//
// The switch core runs four times faster than a flit-wide core would, but
// arbitration itself is not made faster, so it takes four core cycles. Here
// those four cycles are four register stages of one round-robin decision:
//   1. sample the request vector (only when the output is free),
//   2. rotate it so the input after the last winner is at position 0,
//   3. find the first requesting position (priority encode),
//   4. rotate back to an input number and register the grant.
// The grant then holds the output for the whole packet, until `release`
// (the tail phit has been sent). A release with other requests pending starts
// the next arbitration in the same edge. Requests that arrive while an
// arbitration is in progress wait for the next one; requesters must hold
// their request until granted.
//
// Timing: requests present in the cycle before edge e give a grant
// (gnt_valid, gnt_idx) visible after edge e+3.
//
// From the switch description: arbitration per output taking four core
// cycles. This design's own choices: round-robin fairness and the split of
// the decision into the four stages above.
module sp_arbiter
  import sp_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 release_i, // tail phit of the granted packet sent
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);

  localparam int unsigned IW = $clog2(N);

  typedef enum logic [2:0] {S_IDLE, S_ROT, S_PICK, S_GNT, S_BUSY} state_e;

  state_e         state;
  logic [N-1:0]   req_q, rot_q;
  logic [IW-1:0]  sel_q, ptr;
  logic           found_q;
  logic [N-1:0]   rot_d;
  logic [IW-1:0]  sel_d;
  logic           found_d;
  logic [IW-1:0]  win_d;
  logic           start;

  function automatic logic [IW-1:0] mod_add(input logic [IW-1:0] a, input logic [IW-1:0] b);
    logic [IW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (IW+1)'(N)) s = s - (IW+1)'(N);
    return s[IW-1:0];
  endfunction

  always_comb begin
    for (int k = 0; k < N; k++) rot_d[k] = req_q[mod_add(IW'(k), ptr)];
  end

  always_comb begin
    sel_d   = '0;
    found_d = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (rot_q[k]) begin
        sel_d   = IW'(k);
        found_d = 1'b1;
      end
    end
  end

  assign win_d = mod_add(sel_q, ptr);
  assign start = (|req) && ((state == S_IDLE) || (state == S_BUSY && release_i));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      req_q   <= '0;
      rot_q   <= '0;
      sel_q   <= '0;
      found_q <= 1'b0;
      ptr     <= '0;
      gnt_idx <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin req_q <= req; state <= S_ROT; end
        S_ROT:  begin rot_q <= rot_d; state <= S_PICK; end
        S_PICK: begin sel_q <= sel_d; found_q <= found_d; state <= S_GNT; end
        S_GNT: begin
          if (found_q) begin
            gnt_idx <= win_d;
            ptr     <= mod_add(win_d, IW'(1));
            state   <= S_BUSY;
          end else begin
            state   <= S_IDLE;
          end
        end
        S_BUSY: begin
          if (start) begin req_q <= req; state <= S_ROT; end
          else if (release_i) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign gnt_valid = (state == S_BUSY);

  // A release only ends a grant that exists.
  assert property (@(posedge clk) disable iff (!rst_n) release_i |-> gnt_valid)
    else $error("sp_arbiter: release without grant");

endmodule
