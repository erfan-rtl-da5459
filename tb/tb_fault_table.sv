// tb_fault_table: fault reports into a 4 x 3 horizontal table (with the
// bidirectional mirror) and a TSV table (without it).
//
// A reference model in the testbench applies the same reports; after each
// report the whole table is compared with it. Reports cover every node and
// direction, border links (no mirror partner), healing a link, and
// out-of-range nodes, which must be ignored.
module tb_fault_table;
  localparam int X = 4, Y = 3, M = 12, IW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic h_v, h_f, v_v, v_f;
  logic [IW-1:0] h_n, v_n;
  logic [1:0] h_d;
  logic [0:0] v_d;
  logic [M-1:0][3:0] hft;
  logic [M-1:0][1:0] vft;
  logic [3:0] href [M];
  logic [1:0] vref [M];

  fault_table #(.X(X), .Y(Y), .ND(4), .MIRROR(1'b1)) dut_h (
    .clk, .rst_n, .rep_valid(h_v), .rep_node(h_n), .rep_dir(h_d), .rep_faulty(h_f), .fault(hft));
  fault_table #(.X(X), .Y(Y), .ND(2), .MIRROR(1'b0)) dut_v (
    .clk, .rst_n, .rep_valid(v_v), .rep_node(v_n), .rep_dir(v_d), .rep_faulty(v_f), .fault(vft));

  int checks = 0, failures = 0;

  task automatic model_h(int n, int d, logic f);
    int x = n % X, y = n / X;
    if (n >= M) return;
    href[n][d] = f;
    case (d)
      0: if (y > 0)     href[n-X][2] = f;
      1: if (x < X - 1) href[n+1][3] = f;
      2: if (y < Y - 1) href[n+X][0] = f;
      3: if (x > 0)     href[n-1][1] = f;
    endcase
  endtask

  task automatic report(int n, int d, logic f, int vn, int vd, logic vf);
    h_v = 1; h_n = IW'(n); h_d = 2'(d); h_f = f;
    v_v = 1; v_n = IW'(vn); v_d = 1'(vd); v_f = vf;
    @(posedge clk); #1;
    h_v = 0; v_v = 0;
    model_h(n, d, f);
    if (vn < M) vref[vn][vd] = vf;
    for (int p = 0; p < M; p++) begin
      checks += 2;
      if (hft[p] != href[p]) begin failures++; $display("FAIL h[%0d]=%b exp %b", p, hft[p], href[p]); end
      if (vft[p] != vref[p]) begin failures++; $display("FAIL v[%0d]=%b exp %b", p, vft[p], vref[p]); end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h_v = 0; v_v = 0; h_n = 0; v_n = 0; h_d = 0; v_d = 0; h_f = 0; v_f = 0;
    foreach (href[i]) begin href[i] = '0; vref[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // one report on every link end, set then healed
    for (int n = 0; n < M; n++)
      for (int d = 0; d < 4; d++) report(n, d, 1'b1, n, d % 2, 1'b1);
    for (int n = 0; n < M; n += 3)
      for (int d = 0; d < 4; d++) report(n, d, 1'b0, n, d % 2, 1'b0);
    // ignored: node out of range
    report(13, 1, 1'b0, 14, 0, 1'b0);
    // random traffic of reports
    for (int k = 0; k < 200; k++)
      report($urandom % M, $urandom % 4, 1'($urandom), $urandom % M, $urandom % 2, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
