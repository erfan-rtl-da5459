// fault_table: a layer-wide link fault table held in every switch.
//
// M entries (one per node of the layer) of ND bits, one per link of that
// node; a 1 marks a broken link. With ND = 4 it is the horizontal fault
// table (N, E, S, W), with ND = 2 the TSV fault table (Up, Down). Both
// tables and their sizes follow the fault table description; how they are
// written is this design's choice, since the fault-recognition mechanism
// that feeds them is outside the design.
//
// Update: one report per cycle (rep_valid, rep_node, rep_dir, rep_faulty)
// sets or clears one bit; the table is dynamic, so a link can also heal.
// Horizontal links are bidirectional, so with MIRROR = 1 the report also
// writes the matching entry of the neighbour on the other end (E of node p
// is W of node p+1, S of node p is N of node p+X). TSV reports are mirrored
// by the network into the adjacent layer instead. Written entries are
// visible on `fault` in the next cycle. Reset clears the table (no faults).
module fault_table #(
  parameter int X      = 7,
  parameter int Y      = 7,
  parameter int ND     = 4,
  parameter bit MIRROR = 1'b1,
  localparam int M     = X * Y,
  localparam int IW    = (M > 1) ? $clog2(M) : 1,
  localparam int DW    = (ND > 1) ? $clog2(ND) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rep_valid,
  input  logic [IW-1:0]        rep_node,
  input  logic [DW-1:0]        rep_dir,
  input  logic                 rep_faulty,
  output logic [M-1:0][ND-1:0] fault
);

  int unsigned rx, ry, mate;
  logic        mate_ok;
  logic [DW-1:0] mate_dir;

  // Neighbour on the far end of the reported horizontal link.
  always_comb begin
    rx = int'(rep_node) % X;
    ry = int'(rep_node) / X;
    mate = 0;
    mate_ok = 1'b0;
    mate_dir = '0;
    if (MIRROR && ND == 4 && int'(rep_node) < M) begin
      case (int'(rep_dir))
        0: begin mate_ok = (ry > 0);     mate = int'(rep_node) - X; mate_dir = DW'(2); end
        1: begin mate_ok = (rx < X - 1); mate = int'(rep_node) + 1; mate_dir = DW'(3); end
        2: begin mate_ok = (ry < Y - 1); mate = int'(rep_node) + X; mate_dir = DW'(0); end
        default: begin mate_ok = (rx > 0); mate = int'(rep_node) - 1; mate_dir = DW'(1); end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault <= '0;
    end else if (rep_valid && int'(rep_node) < M && int'(rep_dir) < ND) begin
      fault[rep_node][rep_dir] <= rep_faulty;
      if (mate_ok) fault[mate][mate_dir] <= rep_faulty;
    end
  end

endmodule
