// inter_node_select: chooses the intermediate node for a blocked TSV.
//
// When the vertical link a packet needs is broken, the packet is first sent
// to the node of the same layer whose link in that vertical direction is
// healthy and which is nearest to the current switch. This block searches
// the whole layer: among nodes whose `healthy` bit is set, other than the
// current one, it returns the one with the smallest distance `hops` (the
// switch's minimum-hop vector from its routing table). Equal distances go
// to the lowest node index, which is this design's choice. `found` is low
// when no node of the layer has a healthy link in that direction.
// Purely combinational; one instance per vertical direction serves all
// packets of a switch in a cycle.
module inter_node_select #(
  parameter int X  = 7,
  parameter int Y  = 7,
  parameter int HW = 5,
  localparam int M = X * Y,
  localparam int IW = (M > 1) ? $clog2(M) : 1
) (
  input  logic [M-1:0][HW-1:0] hops,
  input  logic [M-1:0]         healthy,
  input  logic [IW-1:0]        self_idx,
  output logic                 found,
  output logic [5:0]           node_x,
  output logic [5:0]           node_y
);

  logic [HW-1:0] best;

  always_comb begin
    found  = 1'b0;
    best   = '1;
    node_x = '0;
    node_y = '0;
    for (int y = 0; y < Y; y++) begin
      for (int x = 0; x < X; x++) begin
        if (healthy[y*X+x] && IW'(y*X+x) != self_idx &&
            (!found || hops[y*X+x] < best)) begin
          found  = 1'b1;
          best   = hops[y*X+x];
          node_x = 6'(x);
          node_y = 6'(y);
        end
      end
    end
  end

endmodule
