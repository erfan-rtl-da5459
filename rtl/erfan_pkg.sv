// erfan_pkg: types and constants shared by the ERFAN 3-D deflection network.
//
// A packet is one 128-bit flit: a 48-bit header and an 80-bit payload, with
// the fields (most significant first) V, TV, D-Add, T-Add, HC and payload,
// as in the packet format the routing scheme is defined on. The split of
// each 18-bit address into three 6-bit coordinates (z, y, x) is this
// design's own choice. Ports are numbered N, E, S, W, Up, Down; north is
// the neighbour with the smaller y, east the one with the larger x, up the
// one with the larger z. Nodes of a layer are indexed y*X + x.
package erfan_pkg;

  localparam int CW      = 6;   // bits per coordinate
  localparam int HCW     = 10;  // hop-count field
  localparam int PAYW    = 80;  // payload
  localparam int NPORT   = 6;   // network ports of a switch
  localparam int LOADW   = 3;   // traffic-load value exchanged with neighbours

  typedef logic [CW-1:0] coord_t;

  typedef struct packed {
    coord_t z;
    coord_t y;
    coord_t x;
  } addr_t;

  typedef struct packed {
    logic            v;        // valid
    logic            tv;       // temporary address valid
    addr_t           dadd;     // destination
    addr_t           tadd;     // intermediate node (same layer)
    logic [HCW-1:0]  hc;       // hops travelled so far
    logic [PAYW-1:0] payload;
  } pkt_t;

  typedef enum logic [2:0] {
    P_N = 3'd0,
    P_E = 3'd1,
    P_S = 3'd2,
    P_W = 3'd3,
    P_U = 3'd4,
    P_D = 3'd5
  } port_e;

  // Port that faces port p on the neighbouring switch.
  function automatic logic [2:0] opposite(input logic [2:0] p);
    case (p)
      3'd0: return 3'd2;
      3'd1: return 3'd3;
      3'd2: return 3'd0;
      3'd3: return 3'd1;
      3'd4: return 3'd5;
      default: return 3'd4;
    endcase
  endfunction

endpackage
