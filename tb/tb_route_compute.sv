// tb_route_compute: the routing decision for random packets in a 4 x 4 x 4
// network, for both the load-aware (ERFAN-Dy) and the shortest-path
// (ERFAN-Sp) variant.
//
// The testbench plays the routing table: for the node the block asks for
// it returns 1 + the Manhattan distance from each neighbour (no-route code
// at borders). For every random packet (current node, destination, TV and
// T-Add, healthy TSVs, intermediate candidates, neighbour loads) it
// compares the forwarded header, the eject request, the table row asked
// for and all six port costs with a reference written from the rules:
// TV is cleared at the intermediate node or in another layer, a blocked
// TSV picks the intermediate node in the needed direction, the vertical
// port costs 0 when usable, and within the layer the cost is the hop
// count with the neighbour load below it only in the load-aware variant.
// Directed cases follow the three-layer example: a blocked Up TSV sends
// the packet towards the intermediate node, which it leaves upwards.
module tb_route_compute;
  import erfan_pkg::*;
  localparam int X = 4, Y = 4, HW = 5, IW = 4, KW = HW + LOADW;
  localparam logic [HW-1:0] INF = '1;

  pkt_t pkt, out_dy, out_sp;
  addr_t cur;
  logic [3:0][HW-1:0] row_dy, row_sp;
  logic [IW-1:0] tg_dy, tg_sp;
  logic [1:0] tsv_ok;
  logic upf, dnf;
  coord_t ux, uy, dx, dy;
  logic [3:0][LOADW-1:0] nl;
  logic ej_dy, ej_sp;
  logic [NPORT-1:0][KW-1:0] c_dy, c_sp;

  route_compute #(.X(X), .Y(Y), .HW(HW), .DYNAMIC(1'b1)) dut_dy (
    .pkt, .cur, .tbl_row(row_dy), .target(tg_dy), .tsv_ok, .up_found(upf), .up_x(ux), .up_y(uy),
    .dn_found(dnf), .dn_x(dx), .dn_y(dy), .nbr_load(nl), .pkt_out(out_dy), .want_eject(ej_dy), .cost(c_dy));
  route_compute #(.X(X), .Y(Y), .HW(HW), .DYNAMIC(1'b0)) dut_sp (
    .pkt, .cur, .tbl_row(row_sp), .target(tg_sp), .tsv_ok, .up_found(upf), .up_x(ux), .up_y(uy),
    .dn_found(dnf), .dn_x(dx), .dn_y(dy), .nbr_load(nl), .pkt_out(out_sp), .want_eject(ej_sp), .cost(c_sp));

  function automatic int absd(int a, int b); return a > b ? a - b : b - a; endfunction
  function automatic logic [3:0][HW-1:0] table_row(addr_t c, int p);
    logic [3:0][HW-1:0] r;
    for (int d = 0; d < 4; d++) begin
      int nx = c.x, ny = c.y;
      case (d) 0: ny--; 1: nx++; 2: ny++; default: nx--; endcase
      if (nx < 0 || nx >= X || ny < 0 || ny >= Y) r[d] = INF;
      else r[d] = HW'(1 + absd(nx, p % X) + absd(ny, p / X));
    end
    return r;
  endfunction

  always_comb row_dy = table_row(cur, int'(tg_dy));
  always_comb row_sp = table_row(cur, int'(tg_sp));

  int checks = 0, failures = 0;
  int n_settv = 0, n_clrtv = 0, n_vert = 0, n_eject = 0;

  task automatic check_one(string tag);
    pkt_t e;
    logic gu, gd, vok;
    int tx, ty;
    logic [3:0][HW-1:0] r;
    logic [NPORT-1:0][KW-1:0] edy, esp;
    e = pkt;
    if (pkt.tv && (pkt.tadd.z != cur.z || pkt.tadd == cur)) e.tv = 0;
    gu = pkt.dadd.z > cur.z; gd = pkt.dadd.z < cur.z;
    vok = (gu && tsv_ok[0]) || (gd && tsv_ok[1]);
    if ((gu || gd) && !vok && !e.tv) begin
      if (gu && upf) begin e.tv = 1; e.tadd = '{z: cur.z, y: uy, x: ux}; end
      else if (gd && dnf) begin e.tv = 1; e.tadd = '{z: cur.z, y: dy, x: dx}; end
    end
    tx = e.tv ? e.tadd.x : pkt.dadd.x;
    ty = e.tv ? e.tadd.y : pkt.dadd.y;
    r = table_row(cur, ty * X + tx);
    for (int d = 0; d < 4; d++) begin
      edy[d] = (r[d] == INF) ? '1 : {r[d], nl[d]};
      esp[d] = (r[d] == INF) ? '1 : {r[d], 3'b000};
    end
    edy[4] = '1; edy[5] = '1;
    if (vok && !e.tv) begin
      if (gu) edy[4] = '0; else edy[5] = '0;
    end
    esp[4] = edy[4]; esp[5] = edy[5];
    checks += 8;
    if (out_dy != e || out_sp != e) begin failures++; $display("FAIL %s header", tag); end
    if (ej_dy != (pkt.dadd == cur) || ej_sp != ej_dy) begin failures++; $display("FAIL %s eject", tag); end
    if (int'(tg_dy) != ty * X + tx || tg_sp != tg_dy) begin failures++; $display("FAIL %s target %0d", tag, tg_dy); end
    if (c_dy != edy) begin failures++; $display("FAIL %s cost dy %h exp %h", tag, c_dy, edy); end
    if (c_sp != esp) begin failures++; $display("FAIL %s cost sp %h exp %h", tag, c_sp, esp); end
    if (!pkt.tv && e.tv) n_settv++;
    if (pkt.tv && !e.tv) n_clrtv++;
    if (vok && !e.tv) n_vert++;
    if (pkt.dadd == cur) n_eject++;
    // cheapest port must be the one the rules name
    checks += 3;
    if (vok && !e.tv && !(gu ? c_dy[4] == 0 : c_dy[5] == 0)) begin failures++; $display("FAIL %s vertical", tag); end
  endtask

  function automatic addr_t rnd_addr();
    return '{z: coord_t'($urandom % 4), y: coord_t'($urandom % Y), x: coord_t'($urandom % X)};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: example of the three-layer network, source layer 0, Up TSV at A=(1,1,1) broken,
    // nearest healthy node C=(2,1) in layer 1, destination in layer 2
    pkt = '0; pkt.v = 1; pkt.dadd = '{z: 2, y: 0, x: 2}; pkt.payload = 80'h1234;
    cur = '{z: 1, y: 1, x: 1}; tsv_ok = 2'b10; upf = 1; ux = 2; uy = 1; dnf = 0; dx = 0; dy = 0; nl = '0;
    #1;
    check_one("A");
    checks++;
    if (!out_dy.tv || out_dy.tadd != '{z: 1, y: 1, x: 2} || c_dy[P_E][KW-1:LOADW] != 1) begin
      failures++; $display("FAIL example at A");
    end
    pkt = out_dy; cur = '{z: 1, y: 1, x: 2}; tsv_ok = 2'b11;
    #1;
    check_one("C");
    checks++;
    if (out_dy.tv || c_dy[P_U] != 0) begin failures++; $display("FAIL example at C"); end
    // random
    for (int t = 0; t < 20000; t++) begin
      pkt = '0;
      pkt.v = 1;
      pkt.dadd = rnd_addr();
      cur = rnd_addr();
      if (t % 4 == 0) pkt.dadd = cur;
      if (t % 3 == 0) pkt.dadd.z = cur.z;
      pkt.tv = 1'($urandom);
      pkt.tadd = rnd_addr();
      if (t % 2 == 0) pkt.tadd.z = cur.z;
      if (t % 5 == 0) pkt.tadd = cur;
      pkt.hc = 10'($urandom);
      pkt.payload = {$urandom, $urandom, 16'($urandom)};
      tsv_ok = 2'($urandom);
      upf = 1'($urandom); dnf = 1'($urandom);
      ux = coord_t'($urandom % X); uy = coord_t'($urandom % Y);
      dx = coord_t'($urandom % X); dy = coord_t'($urandom % Y);
      for (int d = 0; d < 4; d++) nl[d] = LOADW'($urandom);
      #1;
      check_one("rnd");
    end
    checks++;
    if (n_settv == 0 || n_clrtv == 0 || n_vert == 0 || n_eject == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d %0d", n_settv, n_clrtv, n_vert, n_eject);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
