// tb_router_fabrics_top: end-to-end test of both fabrics at their default
// sizes (16-port overflow-buffer switch; 256-port, two-panel, six-stage
// interleaved fabric with 4x8 elements).
//
// Overflow-buffer switch: one isolated cell (one cell time), a hot-spot burst,
// then bursty random traffic under every bus arbitration and buffer policy,
// switched at run time. Every output cell is checked against its destination,
// and cells are conserved (delivered + lost on the bus + refused).
//
// Interleaved fabric: isolated cells (latency = distance + 1 cycles),
// uniform traffic at full load, the five-hot-spot pattern (outputs 19, 63, 135,
// 182, 237 receiving 12% extra traffic), a faulty first-stage element at row 31
// of panel 1, and a switch to RAIF1 with a failed panel. Every output cell is
// checked and cells are conserved. Mean latency and drop rate of each phase are
// printed.
//
// Each mechanism must occur at least once: shared-bus transfer, bus
// collision, overflow-buffer refusal, crossbar service from the overflow
// buffer, every arbitration mode and buffer policy, deflection, recirculation
// into the other panel, fabric drop, two cells to one output in one cycle,
// a faulty element, panel standby and replacement.
module tb_router_fabrics_top;
  import ofb_pkg::*;
  import imsf_pkg::*;
  localparam int ON = DEF_N, OW = DEF_W;
  localparam int IN = imsf_pkg::DEF_N, IX = DEF_X, IY = DEF_Y, IXI = DEF_XI, IPW = DEF_PW;
  localparam int NSE = IN / DEF_B;

  logic clk = 0, rst_n = 0;
  arb_mode_t   ofb_arb_mode;
  buf_policy_t ofb_buf_policy;
  logic [ON-1:0] ofb_in_v, ofb_out_v;
  logic [ON-1:0][3:0] ofb_in_dest;
  logic [ON-1:0][OW-1:0] ofb_in_d, ofb_out_d;
  logic [ON-1:0][4:0] ofb_out_src;
  logic [15:0] ofb_n_bus, ofb_n_bus_lost, ofb_n_of_full, ofb_n_of_out;
  raif_mode_t imsf_raif_mode;
  logic [IY-1:0] imsf_panel_fail, imsf_active, imsf_standby;
  logic [IY-1:0][IX-1:0][NSE-1:0] imsf_fault;
  logic [IN-1:0] imsf_in_v;
  logic [IN-1:0][7:0] imsf_in_dest;
  logic [IN-1:0][IPW-1:0] imsf_in_pay;
  logic [IN-1:0][IXI-1:0] imsf_out_v;
  logic [IN-1:0][IXI-1:0][IPW-1:0] imsf_out_pay;
  logic imsf_degraded;
  logic [0:0] imsf_in_panel;
  logic [15:0] imsf_n_in, imsf_n_out, imsf_n_drop, imsf_n_defl, imsf_n_rc;
  int checks = 0, failures = 0, cyc = 0;

  router_fabrics_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  // ---------------- bookkeeping ----------------
  int o_dest[int];
  int o_sent = 0, o_del = 0, o_lost = 0, o_ref = 0, o_bus = 0, o_ofout = 0, o_src_of = 0;
  int i_dest[int], i_t0[int];
  int i_sent = 0, i_del = 0, i_drop = 0, i_defl = 0, i_rc = 0, i_dual = 0;
  longint i_lat = 0;
  int mode_seen[3], pol_seen[3];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    o_lost <= o_lost + ofb_n_bus_lost; o_ref <= o_ref + ofb_n_of_full;
    o_bus <= o_bus + ofb_n_bus; o_ofout <= o_ofout + ofb_n_of_out;
    if (ofb_n_bus != 0) begin mode_seen[ofb_arb_mode]++; pol_seen[ofb_buf_policy]++; end
    i_drop <= i_drop + imsf_n_drop; i_defl <= i_defl + imsf_n_defl; i_rc <= i_rc + imsf_n_rc;
  end

  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < ON; o++)
      if (ofb_out_v[o]) begin
        automatic int id = ofb_out_d[o];
        chk(o_dest.exists(id) && o_dest[id] == o, "overflow switch: cell at its own output");
        if (ofb_out_src[o] == 5'(ON)) o_src_of++;
        if (o_dest.exists(id)) begin o_dest.delete(id); o_del++; end
      end
    for (int l = 0; l < IN; l++) begin
      if (imsf_out_v[l] == 2'b11) i_dual++;
      for (int k = 0; k < IXI; k++)
        if (imsf_out_v[l][k]) begin
          automatic int id = imsf_out_pay[l][k];
          chk(i_dest.exists(id) && i_dest[id] == l, $sformatf("fabric: cell %0d at output %0d", id, l));
          if (i_dest.exists(id)) begin
            i_lat += cyc - i_t0[id];
            i_dest.delete(id); i_del++;
          end
        end
    end
  end

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int inside_cells();
    return $countones(dut.u_imsf.g_panel[0].u_panel.r_v) + $countones(dut.u_imsf.g_panel[0].u_panel.l_v)
         + $countones(dut.u_imsf.g_panel[1].u_panel.r_v) + $countones(dut.u_imsf.g_panel[1].u_panel.l_v);
  endfunction

  // ---------------- overflow-buffer switch ----------------
  task automatic ofb_cycle(input logic [ON-1:0] v, input int hot, inout int id);
    @(posedge clk); #1;
    ofb_in_v = v;
    for (int i = 0; i < ON; i++)
      if (v[i]) begin
        automatic int d = (hot >= 0 && $urandom % 2) ? hot : $urandom % ON;
        ofb_in_dest[i] = 4'(d); ofb_in_d[i] = OW'(id); o_dest[id] = d; id++; o_sent++;
      end
  endtask

  task automatic ofb_test();
    int id = 1;
    // isolated cell: one cell time
    @(posedge clk); #1;
    ofb_in_v = '0; ofb_in_v[3] = 1; ofb_in_dest[3] = 4'd9; ofb_in_d[3] = OW'(id);
    o_dest[id] = 9; id++; o_sent++;
    @(posedge clk); #1 ofb_in_v = '0;
    chk(ofb_out_v[9] && ofb_out_d[9] == 1, "overflow switch: one cell time latency");
    // hot spot on output 5, then bursty traffic under every mode and policy
    for (int t = 0; t < 60; t++) ofb_cycle('1, 5, id);
    for (int a = 0; a < 3; a++)
      for (int p = 0; p < 3; p++) begin
        ofb_arb_mode = arb_mode_t'(a); ofb_buf_policy = buf_policy_t'(p);
        for (int t = 0; t < 120; t++) ofb_cycle(ON'($urandom) | ON'($urandom), t < 60 ? (a * 3 + p) % ON : -1, id);
      end
    @(posedge clk); #1 ofb_in_v = '0;
    repeat (600) @(posedge clk);
    #1;
    chk(o_sent == o_del + o_lost + o_ref, $sformatf("overflow switch conservation %0d = %0d + %0d + %0d",
        o_sent, o_del, o_lost, o_ref));
    chk(o_bus > 0, "mechanism: shared-bus transfer");
    chk(o_lost > 0, "mechanism: bus collision");
    chk(o_ref > 0, "mechanism: overflow buffer refusal");
    chk(o_ofout > 0 && o_src_of > 0, "mechanism: crossbar serves the overflow buffer");
    for (int k = 0; k < 3; k++) begin
      chk(mode_seen[k] > 0, $sformatf("mechanism: bus used under arbitration mode %0d", k));
      chk(pol_seen[k] > 0, $sformatf("mechanism: bus used under buffer policy %0d", k));
    end
    $display("overflow switch: sent %0d delivered %0d bus %0d lost %0d refused %0d via overflow %0d per mode %0d/%0d/%0d per policy %0d/%0d/%0d",
             o_sent, o_del, o_bus, o_lost, o_ref, o_ofout, mode_seen[0], mode_seen[1], mode_seen[2], pol_seen[0], pol_seen[1], pol_seen[2]);
  endtask

  // ---------------- interleaved fabric ----------------
  int hot[5] = '{19, 63, 135, 182, 237};

  task automatic imsf_phase(input string name, input int cycles, input int pct, input int hot_pct, inout int id);
    int s0 = i_sent, d0 = i_del, dr0 = i_drop;
    longint l0 = i_lat;
    for (int t = 0; t < cycles; t++) begin
      @(posedge clk); #1;
      imsf_in_v = '0;
      for (int l = 0; l < IN; l++)
        if (($urandom % 100) < pct) begin
          automatic int d = (($urandom % 100) < hot_pct) ? hot[$urandom % 5] : $urandom % IN;
          imsf_in_v[l] = 1; imsf_in_dest[l] = 8'(d); imsf_in_pay[l] = IPW'(id);
          i_dest[id] = d; i_t0[id] = cyc; id++; i_sent++;
        end
    end
    @(posedge clk); #1 imsf_in_v = '0;
    repeat (60) @(posedge clk);
    #1;
    chk(i_sent == i_del + i_drop + inside_cells(), {"fabric conservation: ", name});
    $display("%s: sent %0d delivered %0d dropped %0d drop rate %0.4f mean latency %0.2f cycles",
             name, i_sent - s0, i_del - d0, i_drop - dr0,
             real'(i_drop - dr0) / real'(i_sent - s0), real'(i_lat - l0) / real'(i_del - d0));
  endtask

  task automatic imsf_test();
    int id = 1;
    // isolated cells: latency = distance + 1
    for (int k = 0; k < 8; k++) begin
      automatic int src = $urandom % IN, dst = $urandom % IN;
      automatic int tg = src ^ dst, dd = 0;
      for (int q = 0; q < 4; q++) if (((tg >> (6 - 2 * q)) & 3) != 0) dd = q;
      @(posedge clk); #1;
      imsf_in_v = '0; imsf_in_v[src] = 1; imsf_in_dest[src] = 8'(dst); imsf_in_pay[src] = IPW'(id);
      i_dest[id] = dst; i_t0[id] = cyc; i_sent++;
      @(posedge clk); #1 imsf_in_v = '0;
      repeat (dd) @(posedge clk);
      #1 chk(imsf_out_v[dst][0] && imsf_out_pay[dst][0] == IPW'(id), "fabric: latency = distance + 1");
      repeat (2) @(posedge clk);
      id++;
    end
    imsf_phase("uniform p=1.0", 60, 100, 0, id);
    imsf_phase("five hot spots p=1.0", 40, 100, 12, id);
    imsf_fault[1][0][31] = 1'b1;
    begin
      int dr0 = i_drop;
      imsf_phase("faulty element stage 1 row 31 of panel 2, p=0.5", 40, 50, 0, id);
      chk(i_drop > dr0, "mechanism: cells lost at a faulty first-stage element");
    end
    imsf_fault = '0;
    imsf_raif_mode = RAIF1;
    repeat (2) @(posedge clk);
    #1 chk(imsf_active == 2'b01 && imsf_standby == 2'b10, "mechanism: RAIF1 standby panel");
    imsf_panel_fail = 2'b01;
    repeat (2) @(posedge clk);
    #1 chk(imsf_active == 2'b10, "mechanism: standby panel replaces the failed one");
    imsf_phase("RAIF1 on the replacement panel, p=0.3", 30, 30, 0, id);
    chk(i_defl > 0, "mechanism: deflection");
    chk(i_rc > 0, "mechanism: recirculation");
    chk(i_drop > 0, "mechanism: fabric drop");
    chk(i_dual > 0, "mechanism: output speedup (two cells in a cycle)");
    $display("fabric totals: sent %0d delivered %0d dropped %0d deflections %0d recirculations %0d dual %0d",
             i_sent, i_del, i_drop, i_defl, i_rc, i_dual);
  endtask

  initial begin
    ofb_arb_mode = ARB_PRIORITY; ofb_buf_policy = BUF_PRIVATE;
    ofb_in_v = '0; ofb_in_dest = '0; ofb_in_d = '0;
    imsf_raif_mode = RAIF0; imsf_panel_fail = '0; imsf_fault = '0;
    imsf_in_v = '0; imsf_in_dest = '0; imsf_in_pay = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    fork
      ofb_test();
      imsf_test();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
