// tb_bus_arbiter: the shared-bus arbiter (8 requesters) against a reference
// model of the three policies: static priority (lowest index wins), round
// robin (search from the pointer, pointer to one past the winner) and round
// robin restricted to requesters whose overflow FIFO has room. Also checks
// that round robin serves every persistent requester within N grants.
module tb_bus_arbiter;
  import ofb_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  arb_mode_t mode;
  logic [N-1:0] req, space_ok, gnt;
  logic gnt_v;
  logic [2:0] gnt_idx, ptr;
  int checks = 0, failures = 0;

  bus_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int mptr = 0;
    mode = ARB_PRIORITY; req = 0; space_ok = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      mode = arb_mode_t'(m);
      for (int t = 0; t < 2000; t++) begin
        automatic logic [N-1:0] elig;
        automatic int win = -1;
        req = N'($urandom); space_ok = N'($urandom);
        elig = (m == 2) ? (req & space_ok) : req;
        if (m == 0) begin
          for (int i = N - 1; i >= 0; i--) if (elig[i]) win = i;
        end else begin
          for (int k = 0; k < N && win < 0; k++) if (elig[(mptr + k) % N]) win = (mptr + k) % N;
        end
        #1;
        chk(ptr == 3'(mptr), "pointer");
        if (win < 0) chk(!gnt_v && gnt == 0, "no grant");
        else chk(gnt_v && gnt_idx == 3'(win) && gnt == N'(1) << win,
                 $sformatf("mode %0d grant %0d exp %0d", m, gnt_idx, win));
        @(posedge clk);
        if (m != 0 && win >= 0) mptr = (win + 1) % N;
        #1;
      end
    end
    // fairness: all requesting all the time, round robin serves each in turn
    mode = ARB_RR; req = '1; space_ok = '1;
    begin
      automatic int seen[N] = '{default: 0};
      for (int t = 0; t < N; t++) begin
        #1 seen[gnt_idx]++;
        @(posedge clk);
      end
      foreach (seen[i]) chk(seen[i] == 1, "round robin visits every requester once");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
