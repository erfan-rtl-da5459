// erfan_router: one bufferless ERFAN switch of the 3-D mesh.
//
// Six network ports (N, E, S, W, Up, Down) plus a local port. Every cycle
// the packets that arrived on the links (at most six) and one packet
// offered by the local node are routed together:
//   * route_compute (one per candidate) applies the routing algorithm:
//     T-Add / TV handling, vertical-first routing, TSV fault avoidance via
//     an intermediate node, and per-port costs from the layer routing table;
//   * port_allocator grants ports in hop-count priority order; losers are
//     deflected to the next best free port, a packet for this node is
//     ejected (one per cycle), and the local packet is accepted only if a
//     port is left over (`inj_accept`, same cycle as `inj_valid`);
//   * granted packets are written to the output link registers with HC
//     incremented, so a hop takes one cycle and no packet is ever stored.
// The switch holds the layer routing table, the layer horizontal fault
// table (m x 4) and the layer TSV fault table (m x 2). The routing table is
// recomputed over the switch's healthy links only, so it routes round
// broken links (see routing_table). Its own usable
// ports are those that exist and are not marked broken.
//
// Traffic load: the switch exports `load`, the number of packets it
// handled in the previous cycle, to its neighbours; ERFAN-Dy uses the
// neighbours' values to break ties between equally short ports. Using the
// packet count of the neighbouring switch is how this design reads "the
// number of packets handled by neighboring switches"; there are no input
// buffers to count credits of.
//
// Interface timing: in_pkt are the neighbours' output registers; out_pkt,
// ej_valid / ej_pkt and load are registered. Injection waits for the
// routing table to settle after reset (`ready`). Coordinates are ports,
// not parameters, so all switches share one module.
module erfan_router
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
  localparam int NC     = NPORT + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  addr_t                 cur,
  // links
  input  pkt_t                  in_pkt  [NPORT],
  output pkt_t                  out_pkt [NPORT],
  // routing-table exchange and traffic load with the four layer neighbours
  input  logic [M-1:0][HW-1:0]  nbr_mv  [4],
  output logic [M-1:0][HW-1:0]  mv,
  input  logic [3:0][LOADW-1:0] nbr_load,
  output logic [LOADW-1:0]      load,
  // fault reports for this layer (from the fault-recognition mechanism)
  input  logic                  hf_valid,
  input  logic [IW-1:0]         hf_node,
  input  logic [1:0]            hf_dir,
  input  logic                  hf_faulty,
  input  logic                  vf_valid,
  input  logic [IW-1:0]         vf_node,
  input  logic                  vf_dir,      // 0 = up, 1 = down
  input  logic                  vf_faulty,
  // local node
  input  logic                  inj_valid,
  input  pkt_t                  inj_pkt,
  output logic                  inj_accept,
  output logic                  ej_valid,
  output pkt_t                  ej_pkt,
  output logic                  ready,
  // event strobes for monitoring
  output logic [NC-1:0]         ev_deflect,
  output logic [NC-1:0]         ev_set_tv,
  output logic [NC-1:0]         ev_clr_tv,
  output logic [NC-1:0]         ev_detour     // routed on a detour round a broken link
);

  localparam int KW = HW + LOADW;

  logic [IW-1:0] self_idx;
  logic [NPORT-1:0] present, usable;
  assign self_idx = IW'(int'(cur.y) * X + int'(cur.x));
  assign present[P_N] = cur.y != 0;
  assign present[P_E] = int'(cur.x) < X - 1;
  assign present[P_S] = int'(cur.y) < Y - 1;
  assign present[P_W] = cur.x != 0;
  assign present[P_U] = int'(cur.z) < Z - 1;
  assign present[P_D] = cur.z != 0;

  // ---------------- tables ----------------
  logic [M-1:0][3:0] hfault;
  logic [M-1:0][1:0] vfault;
  logic [IW-1:0]     rd_node [NC];
  logic [3:0][HW-1:0] rd_hops [NC];

  routing_table #(.X(X), .Y(Y), .HW(HW), .NRD(NC)) u_rt (
    .clk, .rst_n, .self_idx, .link_ok(usable[3:0]), .nbr_mv, .mv,
    .rd_node, .rd_hops, .ready
  );

  fault_table #(.X(X), .Y(Y), .ND(4), .MIRROR(1'b1)) u_hft (
    .clk, .rst_n, .rep_valid(hf_valid), .rep_node(hf_node), .rep_dir(hf_dir),
    .rep_faulty(hf_faulty), .fault(hfault)
  );

  fault_table #(.X(X), .Y(Y), .ND(2), .MIRROR(1'b0)) u_vft (
    .clk, .rst_n, .rep_valid(vf_valid), .rep_node(vf_node), .rep_dir(vf_dir),
    .rep_faulty(vf_faulty), .fault(vfault)
  );

  assign usable = present & ~{vfault[self_idx], hfault[self_idx]};

  // ---------------- intermediate nodes ----------------
  logic [M-1:0] up_ok, dn_ok;
  always_comb
    for (int p = 0; p < M; p++) begin
      up_ok[p] = !vfault[p][0];
      dn_ok[p] = !vfault[p][1];
    end

  logic   up_found, dn_found;
  coord_t up_x, up_y, dn_x, dn_y;

  inter_node_select #(.X(X), .Y(Y), .HW(HW)) u_isel_up (
    .hops(mv), .healthy(up_ok), .self_idx, .found(up_found), .node_x(up_x), .node_y(up_y)
  );
  inter_node_select #(.X(X), .Y(Y), .HW(HW)) u_isel_dn (
    .hops(mv), .healthy(dn_ok), .self_idx, .found(dn_found), .node_x(dn_x), .node_y(dn_y)
  );

  // ---------------- per-candidate routing ----------------
  pkt_t cand [NC];
  pkt_t cand_upd [NC];
  logic [NC-1:0] cvalid, want_ej;
  logic [NC-1:0][HCW-1:0] chc;
  logic [NC-1:0][NPORT-1:0][KW-1:0] ccost;

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      cand[i]   = in_pkt[i];
      cvalid[i] = in_pkt[i].v;
    end
    cand[NPORT]    = inj_pkt;
    cand[NPORT].v  = 1'b1;
    cand[NPORT].tv = 1'b0;
    cand[NPORT].hc = '0;
    cvalid[NPORT]  = inj_valid && ready;
    for (int i = 0; i < NC; i++) chc[i] = cand[i].hc;
  end

  for (genvar i = 0; i < NC; i++) begin : g_rc
    route_compute #(.X(X), .Y(Y), .HW(HW), .DYNAMIC(DYNAMIC)) u_rc (
      .pkt(cand[i]), .cur, .tbl_row(rd_hops[i]), .target(rd_node[i]),
      .tsv_ok(usable[P_D:P_U]),
      .up_found, .up_x, .up_y, .dn_found, .dn_x, .dn_y,
      .nbr_load, .pkt_out(cand_upd[i]), .want_eject(want_ej[i]), .cost(ccost[i])
    );
    assign ev_set_tv[i] = cvalid[i] && !cand[i].tv && cand_upd[i].tv;
    assign ev_clr_tv[i] = cvalid[i] && cand[i].tv && !cand_upd[i].tv;
  end

  // ---------------- allocation ----------------
  logic [NC-1:0] granted, ejected, deflected;
  logic [NC-1:0][2:0] psel;

  port_allocator #(.NC(NC), .NP(NPORT), .KW(KW), .HCW(HCW), .LOW_HC_FIRST(LOW_HC_FIRST)) u_alloc (
    .valid(cvalid), .hc(chc), .want_eject(want_ej), .cost(ccost), .usable,
    .granted, .ejected, .port_sel(psel), .deflected
  );

  assign inj_accept = cvalid[NPORT] && granted[NPORT];
  assign ev_deflect = deflected & granted;

  // A packet detours round a fault when the shortest usable route to its
  // in-layer target is longer than the fault-free (Manhattan) distance.
  logic [HW-1:0] min_use [NC];
  int unsigned   mdist   [NC];
  always_comb
    for (int i = 0; i < NC; i++) begin
      min_use[i] = '1;
      for (int d = 0; d < 4; d++)
        if (usable[d] && rd_hops[i][d] < min_use[i]) min_use[i] = rd_hops[i][d];
      mdist[i] = ((int'(rd_node[i]) % X > int'(cur.x)) ? int'(rd_node[i]) % X - int'(cur.x)
                                                      : int'(cur.x) - int'(rd_node[i]) % X) +
                 ((int'(rd_node[i]) / X > int'(cur.y)) ? int'(rd_node[i]) / X - int'(cur.y)
                                                      : int'(cur.y) - int'(rd_node[i]) / X);
      ev_detour[i] = cvalid[i] && granted[i] && !ejected[i] && rd_node[i] != self_idx &&
                     (int'(min_use[i]) > int'(mdist[i]) + 1);
    end

  // ---------------- output registers ----------------
  logic [LOADW:0] nhandled;
  always_comb begin
    nhandled = '0;
    for (int i = 0; i < NC; i++) if (cvalid[i] && granted[i]) nhandled++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) out_pkt[p] <= '0;
      ej_valid <= 1'b0;
      ej_pkt   <= '0;
      load     <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++) out_pkt[p] <= '0;
      ej_valid <= 1'b0;
      for (int i = 0; i < NC; i++) begin
        if (cvalid[i] && granted[i]) begin
          if (ejected[i]) begin
            ej_valid <= 1'b1;
            ej_pkt   <= cand_upd[i];
          end else begin
            out_pkt[psel[i]]    <= cand_upd[i];
            out_pkt[psel[i]].hc <= (&cand_upd[i].hc) ? cand_upd[i].hc : cand_upd[i].hc + 1'b1;
          end
        end
      end
      load <= (nhandled > (1 << LOADW) - 1) ? '1 : LOADW'(nhandled);
    end
  end

  // Every packet that arrived on a link must leave in the same cycle.
  for (genvar i = 0; i < NPORT; i++) begin : g_chk
    a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) cvalid[i] |-> granted[i])
      else $error("erfan_router: packet on input %0d could not be routed", i);
  end

endmodule
