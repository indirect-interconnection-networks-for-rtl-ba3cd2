// tb_islip_sched: iSLIP on a 5 x 4 crossbar (ITERS=2) against a reference
// model written here from the algorithm (request, grant from the grant pointer,
// accept from the accept pointer, pointers moved only by first-iteration
// matches). Also checks that the match is a valid matching of requested
// pairs, and that with every input requesting every output the pointers
// desynchronise so that all outputs are matched within a few cell times.
module tb_islip_sched;
  localparam int NI = 5, NO = 4, ITERS = 2;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0][NO-1:0] req;
  logic [NI-1:0] in_match;
  logic [NI-1:0][1:0] in_out;
  logic [NO-1:0] out_match;
  logic [NO-1:0][2:0] out_in;
  int checks = 0, failures = 0;

  islip_sched #(.NI(NI), .NO(NO), .ITERS(ITERS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  int gp[NO], ap[NI];
  int mi[NI], mo[NO];   // model match, -1 = none

  task automatic model(output int ngp[NO], output int nap[NI]);
    for (int i = 0; i < NI; i++) begin mi[i] = -1; nap[i] = ap[i]; end
    for (int o = 0; o < NO; o++) begin mo[o] = -1; ngp[o] = gp[o]; end
    for (int it = 0; it < ITERS; it++) begin
      int g[NO];
      for (int o = 0; o < NO; o++) begin
        g[o] = -1;
        if (mo[o] < 0)
          for (int k = 0; k < NI && g[o] < 0; k++) begin
            int i = (gp[o] + k) % NI;
            if (req[i][o] && mi[i] < 0) g[o] = i;
          end
      end
      for (int i = 0; i < NI; i++) begin
        if (mi[i] >= 0) continue;
        for (int k = 0; k < NO; k++) begin
          int o = (ap[i] + k) % NO;
          if (g[o] == i) begin
            mi[i] = o; mo[o] = i;
            if (it == 0) begin nap[i] = (o + 1) % NO; ngp[o] = (i + 1) % NI; end
            break;
          end
        end
      end
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ngp[NO], nap[NI];
    req = '0;
    foreach (gp[o]) gp[o] = 0;
    foreach (ap[i]) ap[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NI; i++) req[i] = NO'($urandom);
      model(ngp, nap);
      #1;
      for (int i = 0; i < NI; i++) begin
        chk(in_match[i] == (mi[i] >= 0), "input matched");
        if (mi[i] >= 0) chk(in_out[i] == 2'(mi[i]) && req[i][mi[i]], "input's output");
      end
      for (int o = 0; o < NO; o++) begin
        chk(out_match[o] == (mo[o] >= 0), "output matched");
        if (mo[o] >= 0) chk(out_in[o] == 3'(mo[o]) && in_out[mo[o]] == 2'(o), "one-to-one");
      end
      @(posedge clk);
      gp = ngp; ap = nap;
      #1;
    end
    // full load: after desynchronisation every output is matched every cycle
    req = '1;
    repeat (NI * NO) @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      #1 chk(out_match == '1, "full matching under saturated uniform requests");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
