// erfan_noc: an X x Y x Z 3-D mesh network-on-chip of ERFAN switches.
//
// Each switch links to up to four neighbours in its layer and, through
// TSVs, to the switches directly above and below. Switches are bufferless:
// a packet moves one hop per cycle, is deflected when it loses its
// preferred port, and always leaves a switch in the cycle after it
// arrived. Packets first change layer, then travel within the destination
// layer along routing-table shortest paths; a broken TSV is bypassed by
// heading for the nearest node of the layer with a healthy TSV (T-Add, TV).
//
// Coordinates: node (x, y, z) is at index [z][y][x] of every per-node port;
// its layer index is y*X + x. Local ports per node: inj_valid / inj_pkt
// with inj_accept in the same cycle (the node keeps offering the packet
// until accepted), and ej_valid / ej_pkt, one packet per cycle, which the
// node must take. Only D-Add and payload of an injected packet are used.
//
// Fault reports come from a fault-recognition mechanism outside this
// design. One report per cycle for a horizontal link (hf_*: layer, node,
// direction N/E/S/W, faulty or healed) is written into the horizontal fault
// tables of every switch of that layer, for both ends of the link. One
// report per cycle for a TSV (vf_*: the lower layer z and node) updates
// the Up entry in layer z and the Down entry in layer z+1. Reports should
// be given while the links concerned carry no packet. DYNAMIC selects
// ERFAN-Dy (1, load-aware) or ERFAN-Sp (0). The event outputs count, per
// cycle, deflections, intermediate-node selections, arrivals at an
// intermediate node and detours round a broken link, over the whole network.
module erfan_noc
  import erfan_pkg::*;
#(
  parameter int X       = 7,
  parameter int Y       = 7,
  parameter int Z       = 7,
  parameter int HW      = 5,
  parameter bit DYNAMIC = 1'b1,
  parameter bit LOW_HC_FIRST = 1'b1,
  localparam int M      = X * Y,
  localparam int IW     = (M > 1) ? $clog2(M) : 1,
  localparam int ZW     = (Z > 1) ? $clog2(Z) : 1,
  localparam int EW     = $clog2(X * Y * Z * (NPORT + 1) + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inj_valid  [Z][Y][X],
  input  pkt_t          inj_pkt    [Z][Y][X],
  output logic          inj_accept [Z][Y][X],
  output logic          ej_valid   [Z][Y][X],
  output pkt_t          ej_pkt     [Z][Y][X],
  input  logic          hf_valid,
  input  logic [ZW-1:0] hf_z,
  input  logic [IW-1:0] hf_node,
  input  logic [1:0]    hf_dir,
  input  logic          hf_faulty,
  input  logic          vf_valid,
  input  logic [ZW-1:0] vf_z,
  input  logic [IW-1:0] vf_node,
  input  logic          vf_faulty,
  output logic          ready,
  output logic [EW-1:0] ev_deflect,
  output logic [EW-1:0] ev_set_tv,
  output logic [EW-1:0] ev_clr_tv,
  output logic [EW-1:0] ev_detour
);

  localparam int NC = NPORT + 1;

  pkt_t                 opkt  [Z][Y][X][NPORT];
  pkt_t                 ipkt  [Z][Y][X][NPORT];
  logic [M-1:0][HW-1:0] mv    [Z][Y][X];
  logic [M-1:0][HW-1:0] nmv   [Z][Y][X][4];
  logic [LOADW-1:0]     ld    [Z][Y][X];
  logic [3:0][LOADW-1:0] nld  [Z][Y][X];
  logic                 rdy   [Z][Y][X];
  logic [NC-1:0]        e_df  [Z][Y][X];
  logic [NC-1:0]        e_st  [Z][Y][X];
  logic [NC-1:0]        e_ct  [Z][Y][X];
  logic [NC-1:0]        e_dt  [Z][Y][X];

  for (genvar z = 0; z < Z; z++) begin : g_z
    // TSV report for this layer: Up entry if the TSV starts here, Down entry if it ends here.
    logic vf_here, vf_dn;
    assign vf_here = vf_valid && (int'(vf_z) == z) && (z < Z - 1);
    assign vf_dn   = vf_valid && (int'(vf_z) + 1 == z);
    for (genvar y = 0; y < Y; y++) begin : g_y
      for (genvar x = 0; x < X; x++) begin : g_x
        // incoming links: each is the facing output register of the neighbour
        if (y > 0)     begin : g_n assign ipkt[z][y][x][P_N] = opkt[z][y-1][x][P_S]; assign nmv[z][y][x][0] = mv[z][y-1][x]; assign nld[z][y][x][0] = ld[z][y-1][x]; end
        else           begin : g_nb assign ipkt[z][y][x][P_N] = '0; assign nmv[z][y][x][0] = '1; assign nld[z][y][x][0] = '0; end
        if (x < X - 1) begin : g_e assign ipkt[z][y][x][P_E] = opkt[z][y][x+1][P_W]; assign nmv[z][y][x][1] = mv[z][y][x+1]; assign nld[z][y][x][1] = ld[z][y][x+1]; end
        else           begin : g_eb assign ipkt[z][y][x][P_E] = '0; assign nmv[z][y][x][1] = '1; assign nld[z][y][x][1] = '0; end
        if (y < Y - 1) begin : g_s assign ipkt[z][y][x][P_S] = opkt[z][y+1][x][P_N]; assign nmv[z][y][x][2] = mv[z][y+1][x]; assign nld[z][y][x][2] = ld[z][y+1][x]; end
        else           begin : g_sb assign ipkt[z][y][x][P_S] = '0; assign nmv[z][y][x][2] = '1; assign nld[z][y][x][2] = '0; end
        if (x > 0)     begin : g_w assign ipkt[z][y][x][P_W] = opkt[z][y][x-1][P_E]; assign nmv[z][y][x][3] = mv[z][y][x-1]; assign nld[z][y][x][3] = ld[z][y][x-1]; end
        else           begin : g_wb assign ipkt[z][y][x][P_W] = '0; assign nmv[z][y][x][3] = '1; assign nld[z][y][x][3] = '0; end
        if (z < Z - 1) begin : g_u assign ipkt[z][y][x][P_U] = opkt[z+1][y][x][P_D]; end
        else           begin : g_ub assign ipkt[z][y][x][P_U] = '0; end
        if (z > 0)     begin : g_d assign ipkt[z][y][x][P_D] = opkt[z-1][y][x][P_U]; end
        else           begin : g_db assign ipkt[z][y][x][P_D] = '0; end

        erfan_router #(.X(X), .Y(Y), .Z(Z), .HW(HW), .DYNAMIC(DYNAMIC), .LOW_HC_FIRST(LOW_HC_FIRST)) u_sw (
          .clk, .rst_n,
          .cur('{z: coord_t'(z), y: coord_t'(y), x: coord_t'(x)}),
          .in_pkt(ipkt[z][y][x]), .out_pkt(opkt[z][y][x]),
          .nbr_mv(nmv[z][y][x]), .mv(mv[z][y][x]),
          .nbr_load(nld[z][y][x]), .load(ld[z][y][x]),
          .hf_valid(hf_valid && int'(hf_z) == z), .hf_node, .hf_dir, .hf_faulty,
          .vf_valid(vf_here || vf_dn), .vf_node, .vf_dir(vf_dn), .vf_faulty,
          .inj_valid(inj_valid[z][y][x]), .inj_pkt(inj_pkt[z][y][x]),
          .inj_accept(inj_accept[z][y][x]),
          .ej_valid(ej_valid[z][y][x]), .ej_pkt(ej_pkt[z][y][x]),
          .ready(rdy[z][y][x]),
          .ev_deflect(e_df[z][y][x]), .ev_set_tv(e_st[z][y][x]), .ev_clr_tv(e_ct[z][y][x]),
          .ev_detour(e_dt[z][y][x])
        );
      end
    end
  end

  always_comb begin
    ready      = 1'b1;
    ev_deflect = '0;
    ev_set_tv  = '0;
    ev_clr_tv  = '0;
    ev_detour  = '0;
    for (int z = 0; z < Z; z++)
      for (int y = 0; y < Y; y++)
        for (int x = 0; x < X; x++) begin
          ready      = ready && rdy[z][y][x];
          ev_deflect = ev_deflect + EW'($countones(e_df[z][y][x]));
          ev_set_tv  = ev_set_tv  + EW'($countones(e_st[z][y][x]));
          ev_clr_tv  = ev_clr_tv  + EW'($countones(e_ct[z][y][x]));
          ev_detour  = ev_detour  + EW'($countones(e_dt[z][y][x]));
        end
  end

endmodule
