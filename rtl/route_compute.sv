// route_compute: the per-packet routing decision of one switch (Algorithm I).
//
// For one packet it works out the header to forward and a cost for every
// network port; the port allocator then gives each packet the cheapest
// free port. Steps, in the order of the algorithm:
//   1. Temporary address. If TV is set and T-Add is the current switch, the
//      packet has reached its intermediate node: TV is cleared and the
//      horizontal target becomes the destination again. If TV is set and
//      T-Add is elsewhere in this layer, the horizontal target is T-Add.
//      A packet whose T-Add lies in another layer (it was deflected up or
//      down) drops TV, a choice of this design.
//   2. Layers first. If the destination layer differs, the preferred port
//      is Up or Down (cost 0). If that TSV is broken (TSV fault table), the
//      nearest node with a healthy TSV in that direction becomes T-Add, TV
//      is set, and the packet heads for it through the layer.
//   3. Within the layer, port d costs the routing-table entry
//      [target][d], the hop count to the target through d. In the dynamic
//      variant (DYNAMIC = 1, ERFAN-Dy) the traffic load of the neighbour
//      behind d is appended as a lower-order tie-breaker, so among equally
//      short ports the least loaded wins; in the shortest-path variant
//      (DYNAMIC = 0, ERFAN-Sp) it is left out and ties go to the lower port
//      number.
//   4. At the destination the packet asks for the local (eject) port.
// A vertical port that does not lead to the destination layer costs the
// all-ones value: it is used only for deflection. Broken or missing ports
// are masked by the allocator, not here. Purely combinational.
module route_compute
  import erfan_pkg::*;
#(
  parameter int X       = 7,
  parameter int Y       = 7,
  parameter int HW      = 5,
  parameter bit DYNAMIC = 1'b1,
  localparam int M      = X * Y,
  localparam int IW     = (M > 1) ? $clog2(M) : 1,
  localparam int KW     = HW + LOADW            // cost width
) (
  input  pkt_t                   pkt,
  input  addr_t                  cur,
  input  logic [3:0][HW-1:0]     tbl_row,       // table row of `target`, read by the caller
  output logic [IW-1:0]          target,        // node whose table row is needed
  input  logic [1:0]             tsv_ok,        // own Up/Down TSV present and healthy
  input  logic                   up_found,
  input  coord_t                 up_x,
  input  coord_t                 up_y,
  input  logic                   dn_found,
  input  coord_t                 dn_x,
  input  coord_t                 dn_y,
  input  logic [3:0][LOADW-1:0]  nbr_load,
  output pkt_t                   pkt_out,       // header after T-Add / TV update
  output logic                   want_eject,
  output logic [NPORT-1:0][KW-1:0] cost
);

  localparam logic [KW-1:0] WORST = '1;

  logic   use_t;
  coord_t hx, hy;
  logic   go_up, go_dn, vert_ok;

  always_comb begin
    pkt_out = pkt;
    // step 1: temporary address
    if (pkt.tv && pkt.tadd.z != cur.z) pkt_out.tv = 1'b0;
    else if (pkt.tv && pkt.tadd == cur) pkt_out.tv = 1'b0;
    go_up   = pkt.dadd.z > cur.z;
    go_dn   = pkt.dadd.z < cur.z;
    vert_ok = (go_up && tsv_ok[0]) || (go_dn && tsv_ok[1]);
    // step 2: blocked TSV -> pick an intermediate node (only when not already heading to one)
    if ((go_up || go_dn) && !vert_ok && !pkt_out.tv) begin
      if (go_up && up_found) begin
        pkt_out.tv   = 1'b1;
        pkt_out.tadd = '{z: cur.z, y: up_y, x: up_x};
      end else if (go_dn && dn_found) begin
        pkt_out.tv   = 1'b1;
        pkt_out.tadd = '{z: cur.z, y: dn_y, x: dn_x};
      end
    end
    use_t = pkt_out.tv;
    hx = use_t ? pkt_out.tadd.x : pkt.dadd.x;
    hy = use_t ? pkt_out.tadd.y : pkt.dadd.y;
    if (int'(hx) >= X) hx = coord_t'(X - 1);
    if (int'(hy) >= Y) hy = coord_t'(Y - 1);
    target = IW'(int'(hy) * X + int'(hx));

    want_eject = (pkt.dadd == cur);

    // step 3: horizontal costs from the routing table
    for (int d = 0; d < 4; d++) begin
      if (tbl_row[d] == '1) cost[d] = WORST;
      else cost[d] = {tbl_row[d], (DYNAMIC ? nbr_load[d] : LOADW'(0))};
    end
    cost[P_U] = WORST;
    cost[P_D] = WORST;
    if (vert_ok && !use_t) begin
      if (go_up) cost[P_U] = '0;
      else       cost[P_D] = '0;
    end
  end

endmodule
