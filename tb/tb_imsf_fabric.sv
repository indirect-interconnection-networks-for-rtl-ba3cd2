// tb_imsf_fabric: interleaved fabric with 16 ports, 4x8 elements, two panels of
// three stages and output speedup 2.
//   1. Isolated cells: a cell alone in the fabric reaches its output distance+1
//      cycles after it is presented; consecutive cycles use alternating panels.
//   2. Random traffic at full and half load: every output cell is known, at its
//      own destination and delivered once; sent = delivered + dropped + cells
//      still inside; deflection, recirculation into the other panel, drops and
//      two cells to one output in one cycle (speedup) must all occur.
//   3. Faulty elements in the first stage of one panel: traffic still flows.
//   4. Redundant-array modes: RAIF1 uses one panel, a failed panel is replaced
//      by the standby one, RAIF2 keeps one panel in standby.
module tb_imsf_fabric;
  import imsf_pkg::*;
  localparam int N = 16, B = 4, X = 3, Y = 2, XI = 2, PW = 16, TW = 4, NSE = 4;
  logic clk = 0, rst_n = 0;
  raif_mode_t raif_mode;
  logic [Y-1:0] panel_fail, active, standby;
  logic [Y-1:0][X-1:0][NSE-1:0] fault;
  logic [N-1:0] in_v;
  logic [N-1:0][TW-1:0] in_dest;
  logic [N-1:0][PW-1:0] in_pay;
  logic [N-1:0][XI-1:0] out_v;
  logic [N-1:0][XI-1:0][PW-1:0] out_pay;
  logic degraded;
  logic [0:0] in_panel;
  logic [15:0] n_in, n_out, n_drop, n_defl, n_rc;
  int checks = 0, failures = 0, cyc = 0;

  imsf_fabric #(.N(N), .B(B), .X(X), .Y(Y), .XI(XI), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  int dest_of[int];
  int sent = 0, delivered = 0, dropped = 0, defl_seen = 0, rc_seen = 0, dual_seen = 0;
  int cnt_in = 0, cnt_out = 0;

  function automatic int inside_cells();
    return $countones(dut.g_panel[0].u_panel.r_v) + $countones(dut.g_panel[0].u_panel.l_v)
         + $countones(dut.g_panel[1].u_panel.r_v) + $countones(dut.g_panel[1].u_panel.l_v);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    dropped   <= dropped + n_drop;
    defl_seen <= defl_seen + n_defl;
    rc_seen   <= rc_seen + n_rc;
    cnt_in    <= cnt_in + n_in;
    cnt_out   <= cnt_out + n_out;
  end

  always @(negedge clk) if (rst_n) begin
    for (int l = 0; l < N; l++) begin
      if (out_v[l] == 2'b11) dual_seen++;
      chk(!(out_v[l][1] && !out_v[l][0]), "lanes fill from lane 0");
      for (int k = 0; k < XI; k++)
        if (out_v[l][k]) begin
          automatic int id = out_pay[l][k];
          chk(dest_of.exists(id), $sformatf("unknown cell %0d", id));
          if (dest_of.exists(id)) begin
            chk(dest_of[id] == l, $sformatf("cell %0d at %0d, dest %0d", id, l, dest_of[id]));
            dest_of.delete(id);
            delivered++;
          end
        end
    end
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic traffic(input int cycles, input int pct, inout int id);
    for (int t = 0; t < cycles; t++) begin
      @(posedge clk); #1;
      in_v = '0;
      for (int l = 0; l < N; l++)
        if (($urandom % 100) < pct) begin
          automatic int d = $urandom % N;
          in_v[l] = 1; in_dest[l] = TW'(d); in_pay[l] = PW'(id);
          dest_of[id] = d; id++; sent++;
        end
    end
    @(posedge clk); #1 in_v = '0;
    repeat (60) @(posedge clk);
    #1;
  endtask

  initial begin
    int id = 1;
    raif_mode = RAIF0; panel_fail = '0; fault = '0;
    in_v = '0; in_dest = '0; in_pay = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    chk(active == 2'b11 && standby == 0, "RAIF0: both panels active");
    // 1. isolated cells
    for (int src = 0; src < N; src += 3)
      for (int dst = 0; dst < N; dst++) begin
        automatic int tg = src ^ dst;
        automatic int dd = (tg % 4 != 0) ? 1 : 0;
        automatic logic p0;
        @(posedge clk); #1;
        p0 = in_panel;
        in_v = '0; in_v[src] = 1; in_dest[src] = TW'(dst); in_pay[src] = PW'(id);
        dest_of[id] = dst; sent++;
        @(posedge clk); #1 in_v = '0;
        chk(in_panel != p0, "panels alternate");
        repeat (dd) @(posedge clk);
        #1 chk(out_v[dst][0] && out_pay[dst][0] == PW'(id),
               $sformatf("latency %0d->%0d: expected %0d cycles", src, dst, dd + 1));
        repeat (2) @(posedge clk);
        id++;
      end
    chk(sent == delivered, "isolated cells all delivered");
    // 2. random traffic
    traffic(400, 100, id);
    traffic(400, 50, id);
    chk(sent == delivered + dropped + inside_cells(), "conservation (fault free)");
    chk(cnt_in == sent && cnt_out == delivered, "event counters");
    $display("fault free: sent %0d delivered %0d dropped %0d defl %0d rc %0d dual %0d",
             sent, delivered, dropped, defl_seen, rc_seen, dual_seen);
    chk(defl_seen > 0, "deflection happened");
    chk(rc_seen > 0, "recirculation happened");
    chk(dual_seen > 0, "speedup: two cells to one output in a cycle");
    // 3. faulty first-stage element in panel 0
    begin
      int d0 = dropped, del0 = delivered;
      fault[0][0][1] = 1;
      traffic(300, 40, id);
      chk(dropped > d0, "cells lost at faulty first-stage element");
      chk(delivered > del0, "traffic still delivered with a fault");
      chk(sent == delivered + dropped + inside_cells(), "conservation (fault)");
      fault = '0;
    end
    // 4. redundant array modes
    raif_mode = RAIF1;
    @(posedge clk); @(posedge clk); #1;
    chk(active == 2'b01 && standby == 2'b10, "RAIF1: panel 0 active, panel 1 standby");
    begin
      int del0 = delivered;
      for (int t = 0; t < 20; t++) begin
        @(posedge clk); #1 chk(in_panel == 0, "RAIF1 uses panel 0 only");
      end
      traffic(200, 30, id);
      chk(delivered > del0, "RAIF1 delivers");
    end
    panel_fail = 2'b01;
    @(posedge clk); @(posedge clk); #1;
    chk(active == 2'b10 && standby == 2'b00 && !degraded, "standby panel replaces failed one");
    begin
      int del0 = delivered;
      traffic(200, 30, id);
      chk(delivered > del0, "delivers on replacement panel");
    end
    panel_fail = 2'b00; raif_mode = RAIF2;
    @(posedge clk); @(posedge clk); #1;
    chk(active == 2'b01 && standby == 2'b10, "RAIF2 with two panels: one active, one standby");
    panel_fail = 2'b11;
    @(posedge clk); @(posedge clk); #1;
    chk(degraded && active == 0, "all panels failed: degraded");
    panel_fail = 2'b00; raif_mode = RAIF0;
    @(posedge clk); @(posedge clk); #1;
    traffic(100, 80, id);
    chk(sent == delivered + dropped + inside_cells(), "conservation (end)");
    chk(dropped > 0, "drop happened");
    $display("end: sent %0d delivered %0d dropped %0d", sent, delivered, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
