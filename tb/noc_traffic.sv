// noc_traffic: random-traffic harness for the ERFAN 3-D mesh.
//
// After reset it writes NHF random horizontal link faults (at most one per
// node, so no layer is cut apart) and NVF random TSV faults (keeping at
// least one healthy TSV between every pair of layers) through the fault
// report ports, while the routing tables settle. Then every node injects
// NPKT packets to uniformly random destinations other than itself, offering
// a new one with probability RATE/100 per cycle and holding it until it is
// accepted.
//
// Checks, from an independent scoreboard:
//   * every packet is ejected exactly once, at its destination, with its
//     payload intact;
//   * one hop per cycle: latency from acceptance to ejection = HC + 1, and
//     HC is at least the Manhattan distance;
//   * no packet is ever sent on a link marked broken;
//   * every mechanism happened at least once: deflection, intermediate-node
//     selection for a broken TSV, arrival at the intermediate node, a
//     detour round a broken link and (if REQUIRE_EVENTS) injection refused
//     by a busy switch.
// When all packets are delivered `done` rises with the counts.
module noc_traffic
  import erfan_pkg::*;
#(
  parameter int X = 4, parameter int Y = 4, parameter int Z = 4,
  parameter bit DYNAMIC = 1'b1,
  parameter int NPKT = 20, parameter int RATE = 10,
  parameter int NHF = 10, parameter int NVF = 6,
  parameter int MAXCYC = 20000,
  parameter bit REQUIRE_EVENTS = 1'b1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int M = X * Y, N = M * Z;
  localparam int IW = (M > 1) ? $clog2(M) : 1;
  localparam int ZW = (Z > 1) ? $clog2(Z) : 1;
  localparam int EW = $clog2(X * Y * Z * (NPORT + 1) + 1);

  logic rst_n = 0;
  logic inj_valid [Z][Y][X], inj_accept [Z][Y][X], ej_valid [Z][Y][X];
  pkt_t inj_pkt [Z][Y][X], ej_pkt [Z][Y][X];
  logic hf_valid = 0, hf_faulty = 0, vf_valid = 0, vf_faulty = 0, ready;
  logic [ZW-1:0] hf_z = '0, vf_z = '0;
  logic [IW-1:0] hf_node = '0, vf_node = '0;
  logic [1:0] hf_dir = '0;
  logic [EW-1:0] ev_deflect, ev_set_tv, ev_clr_tv, ev_detour;

  erfan_noc #(.X(X), .Y(Y), .Z(Z), .DYNAMIC(DYNAMIC)) dut (
    .clk, .rst_n, .inj_valid, .inj_pkt, .inj_accept, .ej_valid, .ej_pkt,
    .hf_valid, .hf_z, .hf_node, .hf_dir, .hf_faulty,
    .vf_valid, .vf_z, .vf_node, .vf_faulty, .ready,
    .ev_deflect, .ev_set_tv, .ev_clr_tv, .ev_detour);

  // fault model: link faults per node and direction (N E S W U D)
  logic [5:0] bad [Z][Y][X];

  // scoreboard
  int   p_src [N*NPKT], p_dst [N*NPKT], p_t [N*NPKT];
  bit   p_got [N*NPKT];
  int   sent [Z][Y][X];
  int   cyc = 0, delivered = 0, total = N * NPKT;
  int   n_defl = 0, n_settv = 0, n_clrtv = 0, n_detour = 0, n_blocked = 0;
  longint lat_sum = 0;
  bit   traffic = 0;
  bit   busy;

  function automatic int absd(int a, int b); return a > b ? a - b : b - a; endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int z = 0; z < Z; z++) for (int y = 0; y < Y; y++) for (int x = 0; x < X; x++) begin
      bad[z][y][x] = '0; inj_valid[z][y][x] = 0; inj_pkt[z][y][x] = '0; sent[z][y][x] = 0;
    end
    for (int i = 0; i < N * NPKT; i++) p_got[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // horizontal faults
    for (int k = 0, tries = 0; k < NHF && tries < 1000; tries++) begin
      automatic int z = $urandom % Z, y = $urandom % Y, x = $urandom % X, d = $urandom % 4;
      automatic int nx = x, ny = y;
      case (d) 0: ny--; 1: nx++; 2: ny++; default: nx--; endcase
      if (nx < 0 || nx >= X || ny < 0 || ny >= Y) continue;
      if (bad[z][y][x][3:0] != 0 || bad[z][ny][nx][3:0] != 0) continue;
      bad[z][y][x][d] = 1; bad[z][ny][nx][opposite(3'(d))] = 1;
      @(negedge clk);
      hf_valid = 1; hf_z = ZW'(z); hf_node = IW'(y * X + x); hf_dir = 2'(d); hf_faulty = 1;
      @(negedge clk);
      hf_valid = 0;
      k++;
    end
    // TSV faults
    for (int k = 0, tries = 0; k < NVF && tries < 1000; tries++) begin
      automatic int z = $urandom % (Z - 1), y = $urandom % Y, x = $urandom % X, healthy = 0;
      if (bad[z][y][x][4]) continue;
      for (int yy = 0; yy < Y; yy++) for (int xx = 0; xx < X; xx++) if (!bad[z][yy][xx][4]) healthy++;
      if (healthy <= 2) continue;
      bad[z][y][x][4] = 1; bad[z+1][y][x][5] = 1;
      @(negedge clk);
      vf_valid = 1; vf_z = ZW'(z); vf_node = IW'(y * X + x); vf_faulty = 1;
      @(negedge clk);
      vf_valid = 0;
      k++;
    end
    while (!ready) @(posedge clk);
    @(posedge clk);
    traffic = 1;
  end

  // injection and ejection
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (traffic) begin
      n_defl   += int'(ev_deflect);
      n_settv  += int'(ev_set_tv);
      n_clrtv  += int'(ev_clr_tv);
      n_detour += int'(ev_detour);
      for (int z = 0; z < Z; z++) for (int y = 0; y < Y; y++) for (int x = 0; x < X; x++) begin
        automatic int me = (z * Y + y) * X + x;
        // links marked broken stay silent
        for (int p = 0; p < NPORT; p++)
          if (bad[z][y][x][p] && dut.opkt[z][y][x][p].v) begin
            failures++; $display("FAIL packet on broken link node %0d port %0d cyc %0d bad %b", me, p, cyc, bad[z][y][x]);
          end
        // ejection
        if (ej_valid[z][y][x]) begin
          automatic int id = int'(ej_pkt[z][y][x].payload[31:0]);
          automatic int s, hops;
          checks++;
          if (id < 0 || id >= total || p_got[id] || p_dst[id] != me ||
              ej_pkt[z][y][x].dadd != '{z: coord_t'(z), y: coord_t'(y), x: coord_t'(x)} ||
              ej_pkt[z][y][x].payload[79:32] != 48'(id) * 48'h9E37) begin
            failures++; $display("FAIL bad ejection id %0d at node %0d cyc %0d dst %0d got %0d dadd %p", id, me, cyc, p_dst[id], p_got[id], ej_pkt[z][y][x].dadd);
          end else begin
            p_got[id] = 1;
            delivered++;
            s = p_src[id];
            hops = absd(s % X, x) + absd((s / X) % Y, y) + absd(s / M, z);
            checks++;
            if (cyc - p_t[id] != int'(ej_pkt[z][y][x].hc) + 1 || int'(ej_pkt[z][y][x].hc) < hops) begin
              failures++;
              $display("FAIL id %0d latency %0d hc %0d distance %0d", id, cyc - p_t[id], ej_pkt[z][y][x].hc, hops);
            end
            lat_sum += longint'(cyc - p_t[id]);
          end
        end
        // injection
        busy = inj_valid[z][y][x];
        if (inj_valid[z][y][x] && inj_accept[z][y][x]) begin
          automatic int id = int'(inj_pkt[z][y][x].payload[31:0]);
          p_t[id] = cyc;
          sent[z][y][x]++;
          busy = 0;
          inj_valid[z][y][x] <= 0;
        end else if (inj_valid[z][y][x]) begin
          n_blocked++;
        end
        if (!busy && sent[z][y][x] < NPKT && ($urandom % 100) < RATE) begin
          automatic int id = me * NPKT + sent[z][y][x];
          automatic int d;
          automatic pkt_t pk;
          do d = $urandom % N; while (d == me);
          pk = '0;
          pk.dadd = '{z: coord_t'(d / M), y: coord_t'((d / X) % Y), x: coord_t'(d % X)};
          pk.payload = {48'(id) * 48'h9E37, 32'(id)};
          p_src[id] = me; p_dst[id] = d;
          inj_pkt[z][y][x] <= pk;
          inj_valid[z][y][x] <= 1;
        end
      end
      if (delivered == total && !done) begin
        checks++;
        if (n_defl == 0)    begin failures++; $display("FAIL no deflection happened"); end
        checks++;
        if (n_settv == 0)   begin failures++; $display("FAIL no intermediate node was chosen"); end
        checks++;
        if (n_clrtv == 0)   begin failures++; $display("FAIL no packet reached an intermediate node"); end
        checks++;
        if (NHF > 0 && n_detour == 0) begin failures++; $display("FAIL no detour round a broken link"); end
        checks++;
        if (REQUIRE_EVENTS && n_blocked == 0) begin failures++; $display("FAIL injection was never refused"); end
        $display("%0dx%0dx%0d %s: %0d packets in %0d cycles, mean latency %0.2f, deflections %0d, TSV bypasses %0d/%0d, detours %0d, refused injections %0d",
                 X, Y, Z, DYNAMIC ? "ERFAN-Dy" : "ERFAN-Sp", delivered, cyc, real'(lat_sum) / delivered,
                 n_defl, n_settv, n_clrtv, n_detour, n_blocked);
        done <= 1;
      end
    end
    if (cyc == MAXCYC && !done) begin
      failures++;
      $display("FAIL only %0d of %0d packets delivered after %0d cycles", delivered, total, cyc);
      done <= 1;
    end
  end
endmodule
