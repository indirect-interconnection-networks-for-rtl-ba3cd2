// tb_crossbar: random selections on a 5 x 4 crossbar; every output must carry
// exactly the selected input's data and be idle when not selected.
module tb_crossbar;
  localparam int NI = 5, NO = 4, W = 16;
  logic [NI-1:0][W-1:0] in_d;
  logic [NO-1:0] sel_v, out_v;
  logic [NO-1:0][2:0] sel;
  logic [NO-1:0][W-1:0] out_d;
  int checks = 0, failures = 0;

  crossbar #(.NI(NI), .NO(NO), .W(W)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NI; i++) in_d[i] = W'($urandom);
      sel_v = NO'($urandom);
      for (int o = 0; o < NO; o++) sel[o] = 3'($urandom % NI);
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (out_v[o] != sel_v[o] || (sel_v[o] && out_d[o] != in_d[sel[o]])) begin
          failures++; $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
