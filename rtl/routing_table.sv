// routing_table: the per-switch layer hop-count table (n^2 x 4 entries).
//
// Entry [p][d] holds the number of hops from this switch to node p of the
// same layer when the packet leaves through horizontal port d (N, E, S, W).
// A direction with no neighbour (a layer border) holds the all-ones code,
// which stands for the "-1 / no route" value of the table.
//
// The table is filled by the distance-vector recurrence
//     H[p][d] = 1 + min_k H_nbr(d)[p][k]
// where H_nbr(d) is the table of the neighbour behind port d, and a
// switch's distance to itself is 0. Each switch exports its own
// minimum-hop vector mv[p] = min_d H[p][d] (0 for itself) to its four
// neighbours, and every cycle recomputes all entries from the vectors it
// receives, so after reset the tables settle one hop of distance per cycle.
// `ready` rises X+Y+1 cycles after reset, when every entry of a fault-free
// X x Y layer has settled. The recurrence and the table contents follow
// the routing table description; computing it in hardware, one step per
// cycle, is this design's choice. So is the treatment of broken links: a
// direction whose link is broken (link_ok low) is treated like a border,
// so the table is reconfigured around faults and holds true shortest
// distances over the healthy links. With a table that ignores faults, a
// packet can bounce for ever between two switches that each see the other
// as the next hop on a shortest path past a broken link. After a fault
// report the entries settle again within a few cycles per hop of the
// longest detour; a node cut off from the switch counts up to just below
// the no-route code.
//
// Read ports: NRD independent, combinational row reads (rd_node -> four
// hop counts).
module routing_table #(
  parameter int X   = 7,
  parameter int Y   = 7,
  parameter int HW  = 5,                  // hop-count width; all ones = no route
  parameter int NRD = 7,
  localparam int M  = X * Y,
  localparam int IW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IW-1:0]           self_idx,     // this switch's node index in its layer
  input  logic [3:0]              link_ok,      // N, E, S, W neighbour exists and link healthy
  input  logic [M-1:0][HW-1:0]    nbr_mv [4],   // neighbours' minimum-hop vectors
  output logic [M-1:0][HW-1:0]    mv,           // own minimum-hop vector
  input  logic [IW-1:0]           rd_node [NRD],
  output logic [3:0][HW-1:0]      rd_hops [NRD],
  output logic                    ready
);

  localparam logic [HW-1:0] INF = '1;
  localparam int SETTLE = X + Y + 1;

  logic [3:0][HW-1:0] tbl [M];
  logic [$clog2(SETTLE+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < M; p++) tbl[p] <= {4{INF}};
      cnt   <= '0;
      ready <= 1'b0;
    end else begin
      for (int p = 0; p < M; p++) begin
        for (int d = 0; d < 4; d++) begin
          if (!link_ok[d] || nbr_mv[d][p] == INF)
            tbl[p][d] <= INF;
          else if (nbr_mv[d][p] == INF - 1'b1)
            tbl[p][d] <= INF - 1'b1;            // saturate below the no-route code
          else
            tbl[p][d] <= nbr_mv[d][p] + 1'b1;
        end
      end
      if (!ready) begin
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(SETTLE - 1)) ready <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < M; p++) begin
      if (IW'(p) == self_idx) mv[p] = '0;
      else begin
        mv[p] = INF;
        for (int d = 0; d < 4; d++)
          if (tbl[p][d] < mv[p]) mv[p] = tbl[p][d];
      end
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_hops[r] = (int'(rd_node[r]) < M) ? tbl[rd_node[r]] : {4{INF}};
    end
  end

endmodule
