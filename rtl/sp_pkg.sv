// sp_pkg: types and constants shared by the superpipelined mesh switch.
//
// The network moves packets made of whole flits. A flit is 64 bits and
// crosses every link and every switch datapath as four 16-bit phits, one per
// clock; link and switch core run on the same clock. The phit width, the flit
// size and the four-cycle arbitration follow the switch description; the
// framing sideband bits, the head-phit layout, the port numbering and the
// buffer depth are choices of this design.
//
// Link framing: every phit carries valid, head (first phit of a packet) and
// tail (last phit of a packet). Packets are a whole number of flits, so a tail
// is always the fourth phit of a flit. The head phit holds the destination and
// source coordinates (hdr_t); the remaining phits are payload.
package sp_pkg;

  localparam int unsigned PHIT_W         = 16;  // link and core datapath width
  localparam int unsigned PHITS_PER_FLIT = 4;   // 64-bit flit = 4 phits
  localparam int unsigned FLIT_W         = PHIT_W * PHITS_PER_FLIT;
  localparam int unsigned ARB_CYCLES     = 4;   // arbitration latency, core cycles
  localparam int unsigned NPORTS         = 5;   // local + four mesh directions
  localparam int unsigned PORT_W         = 3;
  localparam int unsigned COORD_W        = 4;   // head-phit coordinate field

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards y-1
    P_EAST  = 3'd2,   // towards x+1
    P_SOUTH = 3'd3,   // towards y+1
    P_WEST  = 3'd4    // towards x-1
  } port_e;

  // One phit on a link, with its framing.
  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    logic [PHIT_W-1:0] data;
  } phit_t;

  // Layout of the data field of a head phit.
  typedef struct packed {
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
  } hdr_t;

  localparam phit_t PHIT_IDLE = '{valid: 1'b0, head: 1'b0, tail: 1'b0, data: '0};

  // Dimension-order routing: correct x first, then y, then eject.
  function automatic port_e route_xy(input logic [COORD_W-1:0] my_x,
                                     input logic [COORD_W-1:0] my_y,
                                     input hdr_t               hdr);
    if      (hdr.dst_x > my_x) return P_EAST;
    else if (hdr.dst_x < my_x) return P_WEST;
    else if (hdr.dst_y > my_y) return P_SOUTH;
    else if (hdr.dst_y < my_y) return P_NORTH;
    else                       return P_LOCAL;
  endfunction

endpackage
