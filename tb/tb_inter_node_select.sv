// tb_inter_node_select: random layers of 5 x 4 nodes.
//
// Each trial draws random hop distances, a random set of healthy TSVs and a
// random current node, and compares the selection with a reference search
// written as a linear scan here: nearest healthy node other than the
// current one, lowest index on a tie, `found` low when there is none.
module tb_inter_node_select;
  localparam int X = 5, Y = 4, M = 20, HW = 5, IW = 5;

  logic [M-1:0][HW-1:0] hops;
  logic [M-1:0] healthy;
  logic [IW-1:0] self_idx;
  logic found;
  logic [5:0] nx, ny;

  inter_node_select #(.X(X), .Y(Y), .HW(HW)) dut (
    .hops, .healthy, .self_idx, .found, .node_x(nx), .node_y(ny));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best, bi, s;
      s = $urandom % M;
      for (int p = 0; p < M; p++) begin
        hops[p] = HW'($urandom % 8);
        healthy[p] = (t % 5 == 0) ? 1'b0 : 1'($urandom % 3 != 0);
      end
      if (t % 7 == 0) healthy[s] = 1'b1;
      self_idx = IW'(s);
      #1;
      best = 1000; bi = -1;
      for (int p = 0; p < M; p++)
        if (healthy[p] && p != s && int'(hops[p]) < best) begin best = hops[p]; bi = p; end
      checks++;
      if (bi < 0) begin
        if (found) begin failures++; $display("FAIL found with no candidate"); end
      end else if (!found || int'(nx) != bi % X || int'(ny) != bi / X) begin
        failures++;
        $display("FAIL trial %0d: got %0d (%0d,%0d) exp node %0d", t, found, nx, ny, bi);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
