// tb_ico_panel: one 16-line panel of 4x8 elements with three stages (one full
// copy plus one repeated stage). The primary outputs are fed back into the
// panel's own recirculation inputs (a one-panel fabric) and the testbench
// drains every local outlet each cycle, acting as an ideal concentrator.
//   1. Single cells from every input to every destination in an empty panel
//      must leave at the row of their destination, at stage = distance, after
//      distance+1 cycles.
//   2. Random traffic: every extracted cell must be one that was sent, at its
//      own destination, once; sent = delivered + dropped after draining;
//      deflection and recirculation must both occur.
//   3. The same with a faulty element in stage 1 and one in stage 0: no cell
//      may pass through a faulty element, input cells at the faulty first-stage
//      element are dropped.
module tb_ico_panel;
  localparam int N = 16, B = 4, X = 3, PW = 16, TW = 4, NSE = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_v, rc_v, po_v;
  logic [N-1:0][TW-1:0] in_tag, rc_tag, po_tag;
  logic [N-1:0][PW-1:0] in_pay, rc_pay, po_pay;
  logic [X-1:0][NSE-1:0] fault;
  logic [15:0] rnd;
  logic [X-1:0][N-1:0] loc_v, loc_take;
  logic [X-1:0][N-1:0][PW-1:0] loc_pay;
  logic [15:0] n_drop, n_defl, n_rc_in;
  int checks = 0, failures = 0;
  int cyc = 0;

  ico_panel #(.N(N), .B(B), .X(X), .PW(PW)) dut (.*);

  always #5 clk = ~clk;
  assign rc_v = po_v; assign rc_tag = po_tag; assign rc_pay = po_pay;
  assign loc_take = loc_v;
  always @(posedge clk) begin cyc <= cyc + 1; rnd <= 16'($urandom); end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  // bookkeeping of cells in flight, indexed by payload id
  int dest_of[int];
  int t_of[int];
  int sent, delivered, dropped, defl_seen, rc_seen;
  logic [X-1:0][NSE-1:0] fault_seen;

  always @(posedge clk) if (rst_n) begin
    dropped   <= dropped + n_drop;
    defl_seen <= defl_seen + n_defl;
    rc_seen   <= rc_seen + n_rc_in;
  end

  // check every extracted cell
  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < X; s++)
      for (int l = 0; l < N; l++)
        if (loc_v[s][l]) begin
          automatic int id = loc_pay[s][l];
          chk(dest_of.exists(id), $sformatf("unknown cell %0d", id));
          if (dest_of.exists(id)) begin
            chk(dest_of[id] == l, $sformatf("cell %0d at row %0d, dest %0d", id, l, dest_of[id]));
            dest_of.delete(id);
            delivered++;
          end
        end
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_random(input int cycles, input int pct, inout int id);
    for (int t = 0; t < cycles; t++) begin
      @(posedge clk); #1;
      in_v = '0;
      for (int l = 0; l < N; l++)
        if (($urandom % 100) < pct) begin
          automatic int d = $urandom % N;
          in_v[l] = 1; in_tag[l] = TW'(l ^ d); in_pay[l] = PW'(id);
          dest_of[id] = d; id++; sent++;
        end
    end
    @(posedge clk); #1 in_v = '0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    int id;
    in_v = '0; in_tag = '0; in_pay = '0; fault = '0;
    sent = 0; delivered = 0; dropped = 0; defl_seen = 0; rc_seen = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. isolated cells: exit stage and latency
    id = 1;
    for (int src = 0; src < N; src++)
      for (int dst = 0; dst < N; dst++) begin
        automatic int tg = src ^ dst;
        automatic int dd = (tg % 4 != 0) ? 1 : 0;
        @(posedge clk); #1;
        in_v = '0; in_v[src] = 1; in_tag[src] = TW'(tg); in_pay[src] = PW'(id);
        dest_of[id] = dst; sent++;
        @(posedge clk); #1 in_v = '0;
        // the cell is in the stage-dist local latch after dist+1 edges
        repeat (dd) @(posedge clk);
        #1 chk(loc_v[dd][dst] && loc_pay[dd][dst] == PW'(id),
               $sformatf("isolated %0d->%0d at stage %0d", src, dst, dd));
        repeat (3) @(posedge clk);
        id++;
      end
    chk(delivered == sent, "all isolated cells delivered");
    // 2. random traffic, full load then medium load
    run_random(300, 100, id);
    run_random(300, 50, id);
    chk(dest_of.size() == 0 || (sent == delivered + dropped), "nothing left in flight");
    chk(sent == delivered + dropped, $sformatf("conservation sent %0d delivered %0d dropped %0d", sent, delivered, dropped));
    chk(defl_seen > 0, "deflection happened");
    chk(rc_seen > 0, "recirculation happened");
    $display("random: sent %0d delivered %0d dropped %0d deflections %0d recirculated %0d",
             sent, delivered, dropped, defl_seen, rc_seen);
    // 3. faulty elements
    foreach (dest_of[k]) dest_of.delete(k);
    fault[1][0] = 1; fault[0][1] = 1;
    begin
      int d0 = dropped;
      run_random(300, 60, id);
      // cells that can only be corrected in the faulty element keep circulating
      chk(sent == delivered + dropped + $countones(dut.r_v) + $countones(dut.l_v),
          "conservation with faults");
      chk(dropped > d0, "input cells dropped at faulty first-stage element");
    end
    $display("faults: sent %0d delivered %0d dropped %0d", sent, delivered, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // no cell may ever sit at the inlets of a faulty element
  for (genvar s = 1; s < X; s++) begin : g_fc
    for (genvar e = 0; e < NSE; e++) begin : g_fe
      always @(negedge clk)
        if (rst_n && fault[s][e]) chk(dut.g_stage[s].g_se[e].i_v == 0, "cell inside a faulty element");
    end
  end
endmodule
