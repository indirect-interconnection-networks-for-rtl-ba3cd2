// tb_concentrator: random source patterns; the expected selection (up to XI
// sources, highest stage first, lower panel first within a stage) is computed
// here independently and compared with take/out_*.
module tb_concentrator;
  localparam int NS = 12, Y = 2, XI = 2, PW = 16;
  logic [NS-1:0] src_v, take;
  logic [NS-1:0][PW-1:0] src_pay;
  logic [XI-1:0] out_v;
  logic [XI-1:0][PW-1:0] out_pay;
  logic [XI-1:0][3:0] out_src;
  int checks = 0, failures = 0;

  concentrator #(.NS(NS), .Y(Y), .XI(XI), .PW(PW)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int order[$];
      automatic logic [NS-1:0] exp_take = '0;
      src_v = NS'($urandom);
      for (int k = 0; k < NS; k++) src_pay[k] = 16'(k * 257 + n);
      // priority list: stage 5 panel 0, stage 5 panel 1, stage 4 panel 0 ...
      for (int s = NS / Y - 1; s >= 0; s--)
        for (int p = 0; p < Y; p++)
          if (src_v[s*Y+p] && order.size() < XI) order.push_back(s*Y+p);
      foreach (order[q]) exp_take[order[q]] = 1'b1;
      #1;
      checks++;
      if (take !== exp_take) begin failures++; $display("FAIL take %b exp %b", take, exp_take); end
      for (int q = 0; q < XI; q++) begin
        checks++;
        if (q < order.size()) begin
          if (!(out_v[q] && out_pay[q] == src_pay[order[q]] && out_src[q] == 4'(order[q]))) begin
            failures++; $display("FAIL lane %0d", q);
          end
        end else if (out_v[q]) begin
          failures++; $display("FAIL lane %0d should be idle", q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
