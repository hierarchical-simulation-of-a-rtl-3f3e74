// sp_mesh: interconnection network of a 16-node CC-NUMA multiprocessor.
//
// A 4x4 mesh of superpipelined switches (sp_switch). Node n = y*MESH_X + x
// attaches to the local port of switch (x, y) through its network
// interface, which lies outside this module: the local_* ports carry, per
// node, the injection link with its returned credits and the ejection link
// with the credits the node gives back as it drains its receive buffer.
// Neighbouring switches are joined east-west and north-south by one phit link
// and one credit line in each direction. Ports on the edge of the mesh are
// left idle; XY routing never sends a packet to them.
//
// net_empty is high when no phit is anywhere inside the network, so that a
// system-level simulation driving the mesh can skip cycles in which the
// network has nothing to do.
//
// A packet injected at node s for node d crosses h = |dx|+|dy| links; without
// contention its head phit, sampled by the first switch at edge t, is in
// node d's ejection register after edge t + 7*h + 6, the tail following
// 4*flits-1 cycles later.
//
// From the system description: 16 nodes on a 4x4 mesh, one switch per node,
// the whole network described in RTL. This design's own choices: node
// numbering, XY routing and the local-port signalling.
module sp_mesh
  import sp_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUF_FLITS = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  phit_t local_in         [MESH_X*MESH_Y], // injection, from node
  output logic  local_credit_out [MESH_X*MESH_Y], // injection credits, to node
  output phit_t local_out        [MESH_X*MESH_Y], // ejection, to node
  input  logic  local_credit_in  [MESH_X*MESH_Y], // ejection credits, from node
  output logic [NPORTS-1:0] out_busy [MESH_X*MESH_Y], // per switch, per output
  output logic  net_empty                          // no packet inside the network
);

  localparam int unsigned NN = MESH_X * MESH_Y;

  phit_t sw_in   [NN][NPORTS];
  phit_t sw_out  [NN][NPORTS];
  logic  sw_cin  [NN][NPORTS];
  logic  sw_cout [NN][NPORTS];
  logic [NN-1:0] sw_empty;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;

      sp_switch #(
        .BUF_FLITS (BUF_FLITS),
        .MY_X      (COORD_W'(x)),
        .MY_Y      (COORD_W'(y))
      ) u_sw (
        .clk        (clk),
        .rst_n      (rst_n),
        .link_in    (sw_in[n]),
        .credit_out (sw_cout[n]),
        .link_out   (sw_out[n]),
        .credit_in  (sw_cin[n]),
        .out_busy   (out_busy[n]),
        .empty      (sw_empty[n])
      );

      // Local port.
      assign sw_in[n][P_LOCAL]  = local_in[n];
      assign local_credit_out[n] = sw_cout[n][P_LOCAL];
      assign local_out[n]        = sw_out[n][P_LOCAL];
      assign sw_cin[n][P_LOCAL] = local_credit_in[n];

      // East neighbour (x+1) or edge.
      if (x + 1 < MESH_X) begin : g_e
        assign sw_in[n][P_EAST]  = sw_out[n+1][P_WEST];
        assign sw_cin[n][P_EAST] = sw_cout[n+1][P_WEST];
      end else begin : g_e_edge
        assign sw_in[n][P_EAST]  = PHIT_IDLE;
        assign sw_cin[n][P_EAST] = 1'b0;
      end

      // West neighbour (x-1) or edge.
      if (x > 0) begin : g_w
        assign sw_in[n][P_WEST]  = sw_out[n-1][P_EAST];
        assign sw_cin[n][P_WEST] = sw_cout[n-1][P_EAST];
      end else begin : g_w_edge
        assign sw_in[n][P_WEST]  = PHIT_IDLE;
        assign sw_cin[n][P_WEST] = 1'b0;
      end

      // South neighbour (y+1) or edge.
      if (y + 1 < MESH_Y) begin : g_s
        assign sw_in[n][P_SOUTH]  = sw_out[n+MESH_X][P_NORTH];
        assign sw_cin[n][P_SOUTH] = sw_cout[n+MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign sw_in[n][P_SOUTH]  = PHIT_IDLE;
        assign sw_cin[n][P_SOUTH] = 1'b0;
      end

      // North neighbour (y-1) or edge.
      if (y > 0) begin : g_n
        assign sw_in[n][P_NORTH]  = sw_out[n-MESH_X][P_SOUTH];
        assign sw_cin[n][P_NORTH] = sw_cout[n-MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign sw_in[n][P_NORTH]  = PHIT_IDLE;
        assign sw_cin[n][P_NORTH] = 1'b0;
      end
    end
  end

  assign net_empty = &sw_empty;

endmodule
