// port_allocator: priority allocation of output ports in a bufferless switch.
//
// NC candidates compete for NP network output ports and one local eject
// port in the same cycle: NC-1 packets that arrived on the network links
// and, as the last candidate, the packet offered by the local node.
// Candidates are served one after another in priority order; each takes
// the eject port if it wants it and it is still free, otherwise the free,
// usable port of lowest cost. A packet that loses its preferred port is
// thereby deflected to the next best free one; no packet ever waits.
//
// Priority comes from the hop-count field. The text gives it both ways:
// HC "records the number of hops the packet has been routed" and "a flit
// that passes lower hops has higher priority (i.e. less HC)". With
// LOW_HC_FIRST = 1 (default) the smaller HC wins, as that sentence says;
// with 0 the older packet wins. Equal HC goes to the lower input index.
// The local candidate always comes last, so injection can only use a port
// that traffic in flight leaves free (this design's choice). Because every
// switch has as many usable output links as input links, every network
// packet is always granted. Purely combinational.
module port_allocator #(
  parameter int NC  = 7,
  parameter int NP  = 6,
  parameter int KW  = 8,
  parameter int HCW = 10,
  parameter bit LOW_HC_FIRST = 1'b1,
  localparam int PW = $clog2(NP)
) (
  input  logic [NC-1:0]               valid,
  input  logic [NC-1:0][HCW-1:0]      hc,
  input  logic [NC-1:0]               want_eject,
  input  logic [NC-1:0][NP-1:0][KW-1:0] cost,
  input  logic [NP-1:0]               usable,
  output logic [NC-1:0]               granted,   // got a network port or the eject port
  output logic [NC-1:0]               ejected,
  output logic [NC-1:0][PW-1:0]       port_sel,  // network port, when granted and not ejected
  output logic [NC-1:0]               deflected  // granted a port other than its cheapest usable one
);

  int unsigned rank [NC];

  function automatic logic beats(input int j, input int i);
    if (j == NC - 1) return 1'b0;
    if (i == NC - 1) return 1'b1;
    if (hc[j] != hc[i]) return LOW_HC_FIRST ? (hc[j] < hc[i]) : (hc[j] > hc[i]);
    return j < i;
  endfunction

  always_comb begin
    for (int i = 0; i < NC; i++) begin
      rank[i] = 0;
      for (int j = 0; j < NC; j++)
        if (j != i && valid[j] && beats(j, i)) rank[i]++;
    end
  end

  // Candidate served at each step of the priority order.
  localparam int CIW = $clog2(NC);
  logic [CIW-1:0] order [NC];
  logic [NC-1:0]  order_v;

  always_comb begin
    for (int r = 0; r < NC; r++) begin
      order[r]   = '0;
      order_v[r] = 1'b0;
      for (int i = 0; i < NC; i++)
        if (valid[i] && rank[i] == r) begin
          order[r]   = CIW'(i);
          order_v[r] = 1'b1;
        end
    end
  end

  logic [NP-1:0] taken;
  logic          ej_taken;
  logic          got;
  logic [KW-1:0] bestc, ideal;
  logic [PW-1:0] bestp;
  logic [CIW-1:0] c;
  logic [NP-1:0][KW-1:0] cc;

  always_comb begin
    taken     = '0;
    ej_taken  = 1'b0;
    granted   = '0;
    ejected   = '0;
    port_sel  = '0;
    deflected = '0;
    got       = 1'b0;
    bestc     = '1;
    bestp     = '0;
    ideal     = '1;
    c         = '0;
    cc        = '0;
    for (int r = 0; r < NC; r++) begin
      if (order_v[r]) begin
        c  = order[r];
        cc = cost[c];
        if (want_eject[c] && !ej_taken) begin
          ej_taken   = 1'b1;
          granted[c] = 1'b1;
          ejected[c] = 1'b1;
        end else begin
          got   = 1'b0;
          bestc = '1;
          bestp = '0;
          ideal = '1;
          for (int p = 0; p < NP; p++) begin
            if (usable[p] && cc[p] < ideal) ideal = cc[p];
            if (usable[p] && !taken[p] && (!got || cc[p] < bestc)) begin
              got   = 1'b1;
              bestc = cc[p];
              bestp = PW'(p);
            end
          end
          if (got) begin
            taken[bestp] = 1'b1;
            granted[c]   = 1'b1;
            port_sel[c]  = bestp;
            deflected[c] = want_eject[c] || (bestc != ideal);
          end
        end
      end
    end
  end

endmodule
