// tb_imsf_configs: the interleaved fabric in the single-panel and two-panel
// configurations of its performance study, side by side under the same cells.
//
// Five 64-port fabrics (4x8 elements, so one full copy is 3 stages) receive the
// same uniform traffic: S4/P1, S4/P2, S6/P1, S6/P2 and S12/P1 (SX/PY = X stages
// per panel, Y panels). The port count is reduced from 256 to keep five fabrics
// in one simulation; the stage counts are those of the study.
// Phases: uniform load p=0.5 and p=1.0 for PHASE cycles each, then p=0.8 with
// one faulty element (second stage, row 7, first panel) in every fabric.
//
// Checks: every cell leaves at its own output at most once; without faults,
// every cell sent is delivered or counted as dropped; at full load two panels
// drop fewer cells than one panel of the same length (S4/P2 against S4/P1,
// S6/P2 against S6/P1) and about as few as S12/P1, which has the same number
// of stages; with the faulty element S6/P2 drops fewer cells than both S6/P1
// and S12/P1. Mean latency and drop rate of every fabric and phase are printed.
// The published latency advantage of two panels was measured with queues in
// the elements; in these bufferless elements a cell that would wait is
// deflected or dropped instead, so the advantage shows in the drop rate and
// latency is not compared.
module tb_imsf_configs;
  import imsf_pkg::*;
  localparam int N = 64, PW = 20, NC = 5, NSE = N / 4;
  localparam int PHASE = 600;
  localparam int CX[NC] = '{4, 4, 6, 6, 12};
  localparam int CY[NC] = '{1, 2, 1, 2, 1};

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_v;
  logic [N-1:0][5:0] in_dest;
  logic [N-1:0][PW-1:0] in_pay;
  logic [NC-1:0][N-1:0][1:0] out_v;
  logic [NC-1:0][N-1:0][1:0][PW-1:0] out_pay;
  logic [NC-1:0][15:0] n_drop;
  logic fault_on = 1'b0;
  int checks = 0, failures = 0, cyc = 0;

  for (genvar c = 0; c < NC; c++) begin : g_f
    logic [CY[c]-1:0][CX[c]-1:0][NSE-1:0] flt;
    always_comb begin
      flt = '0;
      flt[0][1][7] = fault_on;
    end
    imsf_fabric #(.N(N), .B(4), .X(CX[c]), .Y(CY[c]), .XI(2), .PW(PW)) u_fab (
      .clk, .rst_n, .raif_mode(RAIF0), .panel_fail('0), .fault(flt),
      .in_v, .in_dest, .in_pay,
      .out_v(out_v[c]), .out_pay(out_pay[c]),
      .active(), .standby(), .degraded(), .in_panel(),
      .n_in(), .n_out(), .n_drop(n_drop[c]), .n_defl(), .n_rc());
  end

  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  localparam int MAXC = 3 * PHASE * N + 16;
  int t0[], dst[];
  bit got[NC][];
  int sent = 0;
  int del[NC], drp[NC];
  longint lat[NC];

  initial begin
    t0 = new[MAXC]; dst = new[MAXC];
    for (int c = 0; c < NC; c++) got[c] = new[MAXC];
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int c = 0; c < NC; c++) drp[c] <= drp[c] + int'(n_drop[c]);
  end

  always @(negedge clk) if (rst_n)
    for (int c = 0; c < NC; c++)
      for (int o = 0; o < N; o++)
        for (int k = 0; k < 2; k++)
          if (out_v[c][o][k]) begin
            automatic int id = int'(out_pay[c][o][k]);
            chk(id > 0 && id <= sent && dst[id] == o && !got[c][id], "cell at its own output, once");
            if (id > 0 && id <= sent && !got[c][id]) begin
              got[c][id] = 1'b1; del[c]++; lat[c] += longint'(cyc - t0[id]);
            end
          end

  initial begin
    #((3 * (PHASE + 300) + 100) * 10 * 2);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mlat[NC], mdrop[NC];

  task automatic phase(input string name, input int pct, input bit conserve);
    int s0 = sent;
    int d0[NC], r0[NC];
    longint l0[NC];
    for (int c = 0; c < NC; c++) begin d0[c] = del[c]; r0[c] = drp[c]; l0[c] = lat[c]; end
    for (int t = 0; t < PHASE; t++) begin
      @(posedge clk); #1;
      in_v = '0;
      for (int l = 0; l < N; l++)
        if ($urandom % 100 < pct) begin
          sent++;
          in_v[l] = 1; in_dest[l] = 6'($urandom % N); in_pay[l] = PW'(sent);
          t0[sent] = cyc; dst[sent] = in_dest[l];
        end
    end
    @(posedge clk); #1 in_v = '0;
    repeat (300) @(posedge clk);
    #1;
    for (int c = 0; c < NC; c++) begin
      automatic int s = sent - s0, dd = del[c] - d0[c], rr = drp[c] - r0[c];
      mlat[c]  = real'(lat[c] - l0[c]) / real'(dd);
      mdrop[c] = real'(rr) / real'(s);
      if (conserve) chk(s == dd + rr, $sformatf("S%0d/P%0d conservation %0d = %0d + %0d", CX[c], CY[c], s, dd, rr));
      else          chk(s >= dd + rr, $sformatf("S%0d/P%0d no cell created", CX[c], CY[c]));
      $display("%-22s S%0d/P%0d: sent %0d delivered %0d drop rate %0.5f mean latency %0.2f cycles",
               name, CX[c], CY[c], s, dd, mdrop[c], mlat[c]);
    end
  endtask

  initial begin
    in_v = '0; in_dest = '0; in_pay = '0;
    for (int c = 0; c < NC; c++) begin del[c] = 0; drp[c] = 0; lat[c] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    phase("uniform p=0.5", 50, 1'b1);
    phase("uniform p=1.0", 100, 1'b1);
    chk(mdrop[1] < mdrop[0], "S4/P2 drops less than S4/P1");
    chk(mdrop[3] <= mdrop[2], "S6/P2 drops no more than S6/P1");
    chk(mdrop[3] <= mdrop[4] + 0.001, "S6/P2 drops about as little as S12/P1");
    fault_on = 1'b1;
    phase("one fault p=0.8", 80, 1'b0);
    chk(mdrop[3] < mdrop[2], "with a fault, S6/P2 drops less than S6/P1");
    chk(mdrop[3] < mdrop[4], "with a fault, S6/P2 drops less than S12/P1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
