// tb_erfan_router: one switch at the centre (1,1,1) of a 3 x 3 x 3 network.
//
// The testbench stands in for the neighbours: it feeds the four layer
// neighbours' minimum-hop vectors (Manhattan distances) and loads, drives
// the six input links and the local port, and writes fault reports. Each
// case sets one cycle of inputs and checks the registered outputs one
// cycle later against hand-worked results:
//   vertical-first forwarding and HC increment, ejection, priority by HC
//   with deflection of the loser, a broken Up TSV sending the packet to the
//   nearest node with a healthy one (T-Add / TV set), a broken east link
//   with the tie among the remaining shortest ports broken by the lowest
//   neighbour load, a full switch blocking injection, the exported load,
//   and injection held off until the routing table has settled.
module tb_erfan_router;
  import erfan_pkg::*;
  localparam int X = 3, Y = 3, Z = 3, HW = 5, M = 9, IW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t cur = '{z: 1, y: 1, x: 1};
  pkt_t in_pkt [NPORT], out_pkt [NPORT];
  logic [M-1:0][HW-1:0] nmv [4], mv;
  logic [3:0][LOADW-1:0] nl;
  logic [LOADW-1:0] load;
  logic hf_v, hf_f, vf_v, vf_f, vf_d;
  logic [IW-1:0] hf_n, vf_n;
  logic [1:0] hf_d;
  logic inj_v, inj_acc, ej_v, rdy;
  pkt_t inj_p, ej_p;
  logic [6:0] ev_d, ev_s, ev_c, ev_t;

  erfan_router #(.X(X), .Y(Y), .Z(Z), .HW(HW), .DYNAMIC(1'b1)) dut (
    .clk, .rst_n, .cur, .in_pkt, .out_pkt, .nbr_mv(nmv), .mv, .nbr_load(nl), .load,
    .hf_valid(hf_v), .hf_node(hf_n), .hf_dir(hf_d), .hf_faulty(hf_f),
    .vf_valid(vf_v), .vf_node(vf_n), .vf_dir(vf_d), .vf_faulty(vf_f),
    .inj_valid(inj_v), .inj_pkt(inj_p), .inj_accept(inj_acc), .ej_valid(ej_v), .ej_pkt(ej_p),
    .ready(rdy), .ev_deflect(ev_d), .ev_set_tv(ev_s), .ev_clr_tv(ev_c), .ev_detour(ev_t));

  function automatic int absd(int a, int b); return a > b ? a - b : b - a; endfunction
  initial begin
    int nx [4] = '{1, 2, 1, 0};
    int ny [4] = '{0, 1, 2, 1};
    for (int d = 0; d < 4; d++)
      for (int p = 0; p < M; p++) nmv[d][p] = HW'(absd(nx[d], p % X) + absd(ny[d], p / X));
  end

  int checks = 0, failures = 0;

  function automatic pkt_t mk(int dz, int dy, int dx, int hc, int tag);
    pkt_t p = '0;
    p.v = 1; p.dadd = '{z: coord_t'(dz), y: coord_t'(dy), x: coord_t'(dx)};
    p.hc = HCW'(hc); p.payload = PAYW'(tag);
    return p;
  endfunction

  task automatic clear_in();
    for (int i = 0; i < NPORT; i++) in_pkt[i] = '0;
    inj_v = 0; inj_p = '0;
  endtask

  task automatic expect_out(int port, int tag, int hc, string what);
    checks++;
    if (!out_pkt[port].v || out_pkt[port].payload != PAYW'(tag) || out_pkt[port].hc != HCW'(hc)) begin
      failures++;
      $display("FAIL %s: port %0d v=%0d tag=%0d hc=%0d", what, port, out_pkt[port].v,
               out_pkt[port].payload, out_pkt[port].hc);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    clear_in();
    nl = '0;
    hf_v = 0; vf_v = 0; hf_n = 0; vf_n = 0; hf_d = 0; vf_d = 0; hf_f = 0; vf_f = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // injection is held until the table has settled
    inj_v = 1; inj_p = mk(2, 1, 1, 0, 1);
    #1;
    checks++;
    if (inj_acc) begin failures++; $display("FAIL injection before ready"); end
    n = 0;
    while (!rdy) begin step(); n++; end
    checks++;
    if (n != X + Y + 1) begin failures++; $display("FAIL ready after %0d cycles", n); end
    // 1. injected packet for the layer above goes Up with HC 1
    checks++;
    if (!inj_acc) begin failures++; $display("FAIL injection refused"); end
    step();
    clear_in();
    expect_out(P_U, 1, 1, "vertical first");
    // 2. a packet for this node is ejected; the rest of the outputs stay idle
    in_pkt[P_N] = mk(1, 1, 1, 3, 2);
    step(); clear_in();
    checks++;
    if (!ej_v || ej_p.payload != 2) begin failures++; $display("FAIL eject"); end
    // 3. two packets for (2,1,1): HC 2 beats HC 7 for East, HC 7 is deflected to a 3-hop port
    in_pkt[P_W] = mk(1, 1, 2, 7, 3);
    in_pkt[P_S] = mk(1, 1, 2, 2, 4);
    nl = '{default: 0};
    step(); clear_in();
    expect_out(P_E, 4, 3, "priority winner");
    checks++;
    if (!(out_pkt[P_N].v && out_pkt[P_N].payload == 3)) begin
      failures++; $display("FAIL deflected packet not on N (lowest of the equal 3-hop ports)");
    end
    checks++;
    if (load != 2) begin failures++; $display("FAIL load %0d", load); end
    // 4. broken Up TSV at this node: nearest healthy node is index 1 = (1,0), reached through N
    vf_v = 1; vf_n = 4; vf_d = 0; vf_f = 1;
    step(); vf_v = 0;
    in_pkt[P_E] = mk(2, 2, 2, 1, 5);
    #1;
    checks++;
    if (ev_s == 0) begin failures++; $display("FAIL no intermediate node chosen"); end
    step(); clear_in();
    expect_out(P_N, 5, 2, "to intermediate node");
    checks++;
    if (!out_pkt[P_N].tv || out_pkt[P_N].tadd != '{z: 1, y: 0, x: 1}) begin
      failures++; $display("FAIL T-Add %p tv %0d", out_pkt[P_N].tadd, out_pkt[P_N].tv);
    end
    // 5. broken East link: a packet for (2,1,1) takes the least loaded of N, S, W (all 3 hops)
    hf_v = 1; hf_n = 4; hf_d = 1; hf_f = 1;
    step(); hf_v = 0;
    nl[0] = 5; nl[2] = 1; nl[3] = 3;
    in_pkt[P_U] = mk(1, 1, 2, 0, 6);
    #1;
    checks++;
    if (ev_t == 0) begin failures++; $display("FAIL detour not flagged"); end
    step(); clear_in();
    expect_out(P_S, 6, 1, "least loaded shortest port");
    checks++;
    if (out_pkt[P_E].v) begin failures++; $display("FAIL broken link used"); end
    // 6. heal East; six arriving packets fill every port, injection is blocked, load is 6
    hf_v = 1; hf_f = 0;
    step(); hf_v = 0;
    vf_v = 1; vf_n = 4; vf_d = 0; vf_f = 0;
    step(); vf_v = 0;
    for (int i = 0; i < NPORT; i++) in_pkt[i] = mk(0, 0, 0, i, 10 + i);
    inj_v = 1; inj_p = mk(0, 2, 2, 0, 20);
    #1;
    checks++;
    if (inj_acc) begin failures++; $display("FAIL injection into a full switch"); end
    step(); clear_in();
    n = 0;
    for (int i = 0; i < NPORT; i++) if (out_pkt[i].v) n++;
    checks++;
    if (n != 6 || load != 6) begin failures++; $display("FAIL full switch: %0d out, load %0d", n, load); end
    step();
    checks++;
    if (load != 0) begin failures++; $display("FAIL idle load %0d", load); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
