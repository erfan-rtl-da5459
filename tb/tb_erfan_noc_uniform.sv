// tb_erfan_noc_uniform: the 4 x 4 x 4 network under uniform random traffic
// at an injection rate of 0.1 packets per node and cycle, with about 10 %
// of the horizontal links (10 of 96) and of the TSVs (5 of 48) broken,
// using the shortest-path routing (ERFAN-Sp). All checks are in
// noc_traffic; the summary line reports the mean latency.
module tb_erfan_noc_uniform;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done;
  int c, f;

  noc_traffic #(.X(4), .Y(4), .Z(4), .DYNAMIC(1'b0), .NPKT(20), .RATE(10), .NHF(10), .NVF(5), .REQUIRE_EVENTS(1'b0)) u_sp (
    .clk, .done, .checks(c), .failures(f));

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end

  initial begin
    @(posedge clk);  // let the harness clear done first
    wait (done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
