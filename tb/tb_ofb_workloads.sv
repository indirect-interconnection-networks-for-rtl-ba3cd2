// tb_ofb_workloads: the overflow-buffer switch under the traffic of its
// performance study, for overflow-buffer size ratios 1, 2, 4 and 8 at once.
//
// Four 16-port switches (8-cell VOQs, ratio 1, 2, 4, 8) receive the same cells.
// Every input carries one flow loaded to 92%:
//   Bernoulli-bursty  inputs 0-7 bursty, inputs 8-15 Bernoulli with uniform
//                     destinations;
//   bursty            all 16 inputs bursty.
// A bursty flow sends bursts to one destination, drawn uniformly; burst and gap
// lengths are geometric, with a mean burst of 16 cells and the gap chosen for a
// 92% load. The burst length is this testbench's choice; the study does not
// state one.
// Each flow mode runs with priority, round-robin (RR) and round-robin with
// global information (RRG) arbitration under the PRIVATE policy, then with RR
// under the PUBLIC and PUBLIC-PRIVATE policies. Each phase lasts PHASE cell
// times plus a drain.
//
// Checks: every cell leaves at its own output at most once; per switch and
// phase, cells sent = delivered + lost on the bus + refused by the overflow
// buffer; RRG never moves a cell the overflow buffer refuses; the largest ratio
// never drops more than the smallest. Drop rate and mean delay (cell times) are
// printed for every phase and ratio.
module tb_ofb_workloads;
  import ofb_pkg::*;
  localparam int N = 16, W = 32, NR = 4;
  localparam int PHASE = 4000;
  localparam int RAT[NR] = '{1, 2, 4, 8};

  logic clk = 0, rst_n = 0;
  arb_mode_t   arb;
  buf_policy_t pol;
  logic [N-1:0] in_v;
  logic [N-1:0][3:0] in_dest;
  logic [N-1:0][W-1:0] in_d;
  logic [NR-1:0][N-1:0] out_v;
  logic [NR-1:0][N-1:0][W-1:0] out_d;
  logic [NR-1:0][15:0] n_bus, n_lost, n_full, n_ofo;
  int checks = 0, failures = 0, cyc = 0;

  for (genvar r = 0; r < NR; r++) begin : g_sw
    ofb_switch #(.N(N), .VOQ_DEPTH(8), .RATIO(RAT[r]), .W(W), .ITERS(4)) u_sw (
      .clk, .rst_n, .arb_mode(arb), .buf_policy(pol),
      .in_v, .in_dest, .in_d,
      .out_v(out_v[r]), .out_d(out_d[r]), .out_src(),
      .n_bus(n_bus[r]), .n_bus_lost(n_lost[r]), .n_of_full(n_full[r]), .n_of_out(n_ofo[r]));
  end

  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  localparam int MAXC = 2 * 5 * PHASE * N + 16;
  int t0[], dst[];
  bit got[NR][];
  int sent = 0;
  int del[NR], lost[NR], full[NR];
  longint dly[NR];

  initial begin
    t0 = new[MAXC]; dst = new[MAXC];
    for (int r = 0; r < NR; r++) got[r] = new[MAXC];
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int r = 0; r < NR; r++) begin
      lost[r] <= lost[r] + int'(n_lost[r]);
      full[r] <= full[r] + int'(n_full[r]);
      if (arb == ARB_RRG) chk(n_full[r] == 0, "RRG moved a cell the overflow buffer refused");
    end
  end

  always @(negedge clk) if (rst_n)
    for (int r = 0; r < NR; r++)
      for (int o = 0; o < N; o++)
        if (out_v[r][o]) begin
          automatic int id = int'(out_d[r][o]);
          chk(id > 0 && id <= sent && dst[id] == o && !got[r][id], "cell at its own output, once");
          if (id > 0 && id <= sent && !got[r][id]) begin
            got[r][id] = 1'b1; del[r]++; dly[r] += longint'(cyc - t0[id]);
          end
        end

  initial begin
    #((2 * 5 * (PHASE + 800) + 100) * 10 * 2);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flow state: bursty inputs hold a destination while the burst lasts
  int bdest[N];
  bit bon[N];

  task automatic phase(input int mode, input arb_mode_t a, input buf_policy_t p, inout real drop1, inout real drop8);
    int s0 = sent;
    int d0[NR], l0[NR], f0[NR];
    longint y0[NR];
    arb = a; pol = p;
    for (int r = 0; r < NR; r++) begin d0[r] = del[r]; l0[r] = lost[r]; f0[r] = full[r]; y0[r] = dly[r]; end
    for (int t = 0; t < PHASE; t++) begin
      @(posedge clk); #1;
      in_v = '0;
      for (int i = 0; i < N; i++) begin
        automatic bit bursty = (mode == 1) || (i < N / 2);
        automatic int d = -1;
        if (bursty) begin
          // a burst ends with probability 1/16 (mean 16 cells); a gap ends
          // with probability 0.719 (mean 1.39 cycles), so 16 / 17.39 = 92%
          if (bon[i]) begin if ($urandom % 16 == 0) bon[i] = 0; end
          else if ($urandom % 1000 < 719) begin bon[i] = 1; bdest[i] = $urandom % N; end
          if (bon[i]) d = bdest[i];
        end else if ($urandom % 100 < 92) d = $urandom % N;
        if (d >= 0) begin
          sent++;
          in_v[i] = 1; in_dest[i] = 4'(d); in_d[i] = W'(sent);
          t0[sent] = cyc; dst[sent] = d;
        end
      end
    end
    @(posedge clk); #1 in_v = '0;
    repeat (800) @(posedge clk);
    #1;
    for (int r = 0; r < NR; r++) begin
      automatic int s = sent - s0, dd = del[r] - d0[r], ll = lost[r] - l0[r], ff = full[r] - f0[r];
      automatic real dr = real'(ll + ff) / real'(s);
      chk(s == dd + ll + ff, $sformatf("ratio %0d conservation %0d = %0d + %0d + %0d", RAT[r], s, dd, ll, ff));
      $display("%-16s %-8s %-14s ratio %0d: load %0.3f drop rate %0.4f mean delay %0.2f",
               mode ? "bursty" : "bernoulli-bursty", a.name(), p.name(), RAT[r],
               real'(s) / real'(PHASE * N), dr, real'(dly[r] - y0[r]) / real'(dd));
      if (r == 0) drop1 = dr;
      if (r == NR - 1) drop8 = dr;
    end
  endtask

  initial begin
    real d1, d8;
    arb = ARB_PRIORITY; pol = BUF_PRIVATE;
    in_v = '0; in_dest = '0; in_d = '0;
    for (int r = 0; r < NR; r++) begin del[r] = 0; lost[r] = 0; full[r] = 0; dly[r] = 0; end
    for (int i = 0; i < N; i++) begin bon[i] = 0; bdest[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      for (int a = 0; a < 3; a++) begin
        phase(m, arb_mode_t'(a), BUF_PRIVATE, d1, d8);
        chk(d8 <= d1, "ratio 8 drops no more than ratio 1");
      end
      for (int p = 1; p < 3; p++) begin
        phase(m, ARB_RR, buf_policy_t'(p), d1, d8);
        chk(d8 <= d1, "ratio 8 drops no more than ratio 1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
