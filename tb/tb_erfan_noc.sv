// tb_erfan_noc: end-to-end test of the 3-D mesh, 3 x 3 x 3 (the size of the
// worked routing example), under uniform random traffic with horizontal
// and TSV faults, using the load-aware routing (ERFAN-Dy). All checks are
// in noc_traffic.
module tb_erfan_noc;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done_dy;
  int c_dy, f_dy;

  noc_traffic #(.X(3), .Y(3), .Z(3), .DYNAMIC(1'b1), .NPKT(40), .RATE(60), .NHF(4), .NVF(3)) u_dy (
    .clk, .done(done_dy), .checks(c_dy), .failures(f_dy));

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_dy, f_dy + 1);
    $finish;
  end

  initial begin
    @(posedge clk);  // let the harness clear done first
    wait (done_dy);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_dy, f_dy);
    $finish;
  end
endmodule
