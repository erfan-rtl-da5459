// tb_routing_table: a 3 x 3 layer of routing tables wired as a mesh.
//
// After reset the nine tables exchange minimum-hop vectors until `ready`.
// At that point every entry [p][d] of every node must equal 1 + the
// Manhattan distance from the neighbour behind d to p, or the no-route code
// where d leads off the layer, which is the 3 x 3 example table of the
// design. Spot checks reproduce two of its rows, (5,2) = (1,-1,3,3) and
// (1,0) = (-1,3,3,1). It also checks that `ready` rises exactly X+Y+1
// cycles after reset and that the tables are already correct then.
// Finally it breaks two links and checks that every table is rebuilt to
// the shortest distances over the links that remain.
module tb_routing_table;
  localparam int X = 3, Y = 3, M = 9, HW = 5, IW = 4;
  localparam logic [HW-1:0] INF = '1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [M-1:0][HW-1:0] mv [M];
  logic [M-1:0][HW-1:0] nmv [M][4];
  logic [3:0] pres [M];
  logic [3:0] cut [M];
  logic [IW-1:0] rd_node [M][1];
  logic [3:0][HW-1:0] rd_hops [M][1];
  logic rdy [M];

  int checks = 0, failures = 0;

  for (genvar n = 0; n < M; n++) begin : g
    localparam int x = n % X, y = n / X;
    assign pres[n] = {x > 0, y < Y - 1, x < X - 1, y > 0};
    assign nmv[n][0] = (y > 0)     ? mv[n-X] : '1;
    assign nmv[n][1] = (x < X - 1) ? mv[n+1] : '1;
    assign nmv[n][2] = (y < Y - 1) ? mv[n+X] : '1;
    assign nmv[n][3] = (x > 0)     ? mv[n-1] : '1;
    routing_table #(.X(X), .Y(Y), .HW(HW), .NRD(1)) dut (
      .clk, .rst_n, .self_idx(IW'(n)), .link_ok(pres[n] & ~cut[n]), .nbr_mv(nmv[n]),
      .mv(mv[n]), .rd_node(rd_node[n]), .rd_hops(rd_hops[n]), .ready(rdy[n]));
  end

  function automatic int absd(int a, int b); return a > b ? a - b : b - a; endfunction

  // expected entry: hops from node s to node p leaving through d
  function automatic int expect_hops(int s, int p, int d);
    int sx = s % X, sy = s / X, nx, ny;
    nx = sx; ny = sy;
    case (d) 0: ny--; 1: nx++; 2: ny++; default: nx--; endcase
    if (nx < 0 || nx >= X || ny < 0 || ny >= Y) return -1;
    return 1 + absd(nx, p % X) + absd(ny, p / X);
  endfunction

  task automatic check_entry(int s, int p, int d, int exp_v);
    logic [HW-1:0] got;
    rd_node[s][0] = IW'(p);
    #1;
    got = rd_hops[s][0][d];
    checks++;
    if ((exp_v < 0 && got != INF) || (exp_v >= 0 && got != HW'(exp_v))) begin
      failures++;
      $display("FAIL node %0d dest %0d dir %0d: got %0d expected %0d", s, p, d, got, exp_v);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    foreach (rd_node[i]) rd_node[i][0] = '0;
    foreach (cut[i]) cut[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    c0 = cyc;
    // not ready one cycle before the settle time
    repeat (X + Y) @(posedge clk);
    #1;
    checks++;
    if (rdy[0]) begin failures++; $display("FAIL ready too early"); end
    @(posedge clk); #1;
    checks++;
    if (!rdy[0] || cyc - c0 != X + Y + 1) begin
      failures++; $display("FAIL ready at cycle %0d", cyc - c0);
    end
    for (int s = 0; s < M; s++)
      for (int p = 0; p < M; p++)
        for (int d = 0; d < 4; d++)
          check_entry(s, p, d, expect_hops(s, p, d));
    // rows of the example table
    check_entry(5, 2, 0, 1); check_entry(5, 2, 1, -1);
    check_entry(5, 2, 2, 3); check_entry(5, 2, 3, 3);
    check_entry(1, 0, 0, -1); check_entry(1, 0, 1, 3);
    check_entry(1, 0, 2, 3); check_entry(1, 0, 3, 1);
    // minimum-hop vector of the centre node is the Manhattan distance
    for (int p = 0; p < M; p++) begin
      checks++;
      if (mv[4][p] != HW'(absd(1, p % X) + absd(1, p / X))) begin
        failures++; $display("FAIL mv[4][%0d] = %0d", p, mv[4][p]);
      end
    end
    // reconfiguration: break the links 1-4 and 4-5, then compare with a
    // shortest-path search over the remaining links
    cut[1][2] = 1; cut[4][0] = 1; cut[4][1] = 1; cut[5][3] = 1;
    repeat (4 * M) @(posedge clk);
    #1;
    begin
      automatic int dd [M][M];
      for (int a = 0; a < M; a++) for (int b = 0; b < M; b++) dd[a][b] = (a == b) ? 0 : 99;
      for (int a = 0; a < M; a++)
        for (int d = 0; d < 4; d++)
          if (pres[a][d] && !cut[a][d]) begin
            automatic int b = (d == 0) ? a - X : (d == 1) ? a + 1 : (d == 2) ? a + X : a - 1;
            dd[a][b] = 1;
          end
      for (int k = 0; k < M; k++) for (int a = 0; a < M; a++) for (int b = 0; b < M; b++)
        if (dd[a][k] + dd[k][b] < dd[a][b]) dd[a][b] = dd[a][k] + dd[k][b];
      for (int s = 0; s < M; s++)
        for (int p = 0; p < M; p++)
          for (int d = 0; d < 4; d++) begin
            automatic int b = (d == 0) ? s - X : (d == 1) ? s + 1 : (d == 2) ? s + X : s - 1;
            check_entry(s, p, d, (pres[s][d] && !cut[s][d]) ? 1 + dd[b][p] : -1);
          end
      // the example entry (5,2) loses nothing, (4,1) must now go round
      check_entry(4, 1, 3, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
