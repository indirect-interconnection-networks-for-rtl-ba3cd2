// tb_voq_buffer: the shared-memory VOQ buffer (4 queues, 16 cells) against a
// queue-per-output reference model, under each space management policy.
// Random enqueues and dequeues (also to the same queue in one cycle) check the
// admission rule of every queue each cycle, the FIFO order and data of every
// dequeued cell, the drop flag and the occupancy counts. Each policy is driven
// until some queue is refused while the memory still has room (PRIVATE,
// PUBLIC-PRIVATE) or the memory is full (PUBLIC).
module tb_voq_buffer;
  import ofb_pkg::*;
  localparam int NQ = 4, CAP = 16, W = 16;
  logic clk = 0, rst_n = 0;
  buf_policy_t policy;
  logic enq_v, enq_drop, deq_v;
  logic [1:0] enq_q, deq_q;
  logic [W-1:0] enq_d, deq_d;
  logic [NQ-1:0] acc_ok, nonempty;
  logic [NQ-1:0][4:0] count;
  logic [4:0] total;
  int checks = 0, failures = 0;

  voq_buffer #(.NQ(NQ), .CAP(CAP), .W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  logic [W-1:0] model[NQ][$];

  function automatic logic exp_ok(int q);
    int tot = 0, pub = 0;
    for (int k = 0; k < NQ; k++) begin
      tot += model[k].size();
      if (model[k].size() > CAP / (2 * NQ)) pub += model[k].size() - CAP / (2 * NQ);
    end
    case (policy)
      BUF_PRIVATE: return model[q].size() < CAP / NQ;
      BUF_PUBLIC:  return tot < CAP;
      default:     return model[q].size() < CAP / (2 * NQ) || pub < CAP / 2;
    endcase
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int refused_with_room, full_seen;
    logic ok_now;
    policy = BUF_PRIVATE; enq_v = 0; deq_v = 0; enq_q = 0; deq_q = 0; enq_d = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      policy = buf_policy_t'(p);
      refused_with_room = 0; full_seen = 0;
      for (int t = 0; t < 3000; t++) begin
        automatic int tot = 0;
        automatic int bias = (t % 600) < 300 ? 85 : 30;   // fill, then drain
        // random stimulus; queue 0 is the heavy one
        enq_v = ($urandom % 100) < bias;
        enq_q = ($urandom % 2) ? 2'd0 : 2'($urandom);
        enq_d = 16'($urandom);
        deq_q = 2'($urandom);
        deq_v = (($urandom % 100) < 100 - bias) && model[deq_q].size() > 0;
        #1;
        for (int q = 0; q < NQ; q++) begin
          tot += model[q].size();
          chk(acc_ok[q] == exp_ok(q), $sformatf("policy %0d admission q%0d", p, q));
          chk(nonempty[q] == (model[q].size() > 0) && count[q] == 5'(model[q].size()), "occupancy");
        end
        chk(total == 5'(tot), "total");
        chk(enq_drop == (enq_v && !exp_ok(enq_q)), "drop flag");
        if (enq_v && !exp_ok(enq_q) && tot < CAP) refused_with_room++;
        if (tot == CAP) full_seen++;
        if (deq_v) chk(deq_d == model[deq_q][0], "FIFO order and data");
        ok_now = exp_ok(enq_q);
        @(posedge clk);
        // update the model with this cycle's operations
        if (deq_v) void'(model[deq_q].pop_front());
        if (enq_v && ok_now) model[enq_q].push_back(enq_d);
        #1;
      end
      if (p == 1) chk(full_seen > 0, "PUBLIC: memory filled completely");
      else        chk(refused_with_room > 0, "queue limit reached with memory left");
      // drain
      enq_v = 0;
      for (int q = 0; q < NQ; q++)
        while (model[q].size() > 0) begin
          deq_v = 1; deq_q = 2'(q); #1;
          chk(deq_d == model[q][0], "drain order");
          @(posedge clk); void'(model[q].pop_front()); #1;
        end
      deq_v = 0; #1;
      chk(total == 0, "empty after drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
