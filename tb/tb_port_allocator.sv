// tb_port_allocator: random contention among seven candidates for six
// ports and the eject port, with both priority orders.
//
// Each trial draws the candidates (at most as many network packets as
// usable ports, as in a switch), their hop counts, eject requests and port
// costs. A reference in the testbench sorts the candidates by priority
// (hop count, then input index, the local packet last) and lets each take
// the eject port or its cheapest free usable port; the block's grants,
// ports, eject flags and deflection flags must match it exactly. It also
// checks the rules on their own: every network packet is granted, no port
// is given twice, and only usable ports are used.
module tb_port_allocator;
  localparam int NC = 7, NP = 6, KW = 8, HCW = 10;

  logic [NC-1:0] valid, wej;
  logic [NC-1:0][HCW-1:0] hc;
  logic [NC-1:0][NP-1:0][KW-1:0] cost;
  logic [NP-1:0] usable;
  logic [NC-1:0] g [2], e [2], dfl [2];
  logic [NC-1:0][2:0] ps [2];

  port_allocator #(.NC(NC), .NP(NP), .KW(KW), .HCW(HCW), .LOW_HC_FIRST(1'b1)) dut_lo (
    .valid, .hc, .want_eject(wej), .cost, .usable, .granted(g[0]), .ejected(e[0]), .port_sel(ps[0]), .deflected(dfl[0]));
  port_allocator #(.NC(NC), .NP(NP), .KW(KW), .HCW(HCW), .LOW_HC_FIRST(1'b0)) dut_hi (
    .valid, .hc, .want_eject(wej), .cost, .usable, .granted(g[1]), .ejected(e[1]), .port_sel(ps[1]), .deflected(dfl[1]));

  int checks = 0, failures = 0, n_defl = 0, n_ej_lost = 0, n_inj_block = 0;

  task automatic reference(int lo, output logic [NC-1:0] rg, output logic [NC-1:0] re,
                           output logic [NC-1:0][2:0] rp, output logic [NC-1:0] rd);
    int order [NC];
    int n = 0;
    logic [NP-1:0] tk = '0;
    logic ejt = 0;
    rg = '0; re = '0; rp = '0; rd = '0;
    for (int i = 0; i < NC - 1; i++) if (valid[i]) begin order[n] = i; n++; end
    // insertion sort by priority
    for (int a = 1; a < n; a++)
      for (int b = a; b > 0; b--) begin
        int p = order[b-1], q = order[b];
        logic swap = lo ? (hc[q] < hc[p]) : (hc[q] > hc[p]);
        if (swap) begin order[b-1] = q; order[b] = p; end
      end
    if (valid[NC-1]) begin order[n] = NC - 1; n++; end
    for (int k = 0; k < n; k++) begin
      int i = order[k], bp = -1, ideal = 1 << KW;
      if (wej[i] && !ejt) begin ejt = 1; rg[i] = 1; re[i] = 1; continue; end
      for (int p = 0; p < NP; p++) begin
        if (usable[p] && int'(cost[i][p]) < ideal) ideal = cost[i][p];
        if (usable[p] && !tk[p] && (bp < 0 || cost[i][p] < cost[i][bp])) bp = p;
      end
      if (bp >= 0) begin
        tk[bp] = 1; rg[i] = 1; rp[i] = 3'(bp);
        rd[i] = wej[i] || (int'(cost[i][bp]) != ideal);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int nu, nv;
      usable = 6'($urandom);
      if (t % 3 == 0) usable = '1;
      nu = $countones(usable);
      valid = '0; nv = 0;
      for (int i = 0; i < NC - 1; i++)
        if (nv < nu && ($urandom % 4 != 0)) begin valid[i] = 1; nv++; end
      valid[NC-1] = 1'($urandom);
      for (int i = 0; i < NC; i++) begin
        hc[i] = HCW'($urandom % 6);
        wej[i] = ($urandom % 5 == 0);
        for (int p = 0; p < NP; p++) cost[i][p] = KW'($urandom % 12);
      end
      #1;
      for (int m = 0; m < 2; m++) begin
        logic [NC-1:0] rg, re, rd;
        logic [NC-1:0][2:0] rp;
        logic [NP-1:0] used;
        used = '0;
        reference(m == 0, rg, re, rp, rd);
        checks++;
        if (g[m] != rg || e[m] != re || dfl[m] != rd) begin
          failures++;
          $display("FAIL t=%0d m=%0d g=%b/%b e=%b/%b d=%b/%b", t, m, g[m], rg, e[m], re, dfl[m], rd);
        end
        for (int i = 0; i < NC; i++)
          if (g[m][i] && !e[m][i]) begin
            checks++;
            if (ps[m][i] != rp[i] || !usable[ps[m][i]] || used[ps[m][i]]) begin
              failures++; $display("FAIL t=%0d port of %0d", t, i);
            end
            used[ps[m][i]] = 1;
          end
        for (int i = 0; i < NC - 1; i++) begin
          checks++;
          if (valid[i] && !g[m][i]) begin failures++; $display("FAIL t=%0d network packet %0d dropped", t, i); end
        end
        if (m == 0) begin
          n_defl += $countones(dfl[0]);
          for (int i = 0; i < NC; i++) if (valid[i] && wej[i] && !e[0][i]) n_ej_lost++;
          if (valid[NC-1] && !g[0][NC-1]) n_inj_block++;
        end
      end
    end
    checks++;
    if (n_defl == 0 || n_ej_lost == 0 || n_inj_block == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", n_defl, n_ej_lost, n_inj_block);
    end
    $display("deflections=%0d lost_ejects=%0d blocked_injections=%0d", n_defl, n_ej_lost, n_inj_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
