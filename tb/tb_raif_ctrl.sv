// tb_raif_ctrl: every mode against every failure pattern for Y=3 panels; the
// expected active/standby sets are worked out here and compared one clock
// after the inputs change.
module tb_raif_ctrl;
  import imsf_pkg::*;
  localparam int Y = 3;
  logic clk = 0, rst_n = 0;
  raif_mode_t mode;
  logic [Y-1:0] panel_fail, active, standby;
  logic degraded;
  int checks = 0, failures = 0;

  raif_ctrl #(.Y(Y)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mode = RAIF0; panel_fail = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      for (int f = 0; f < (1 << Y); f++) begin
        automatic int want, got;
        automatic logic [Y-1:0] ea = '0, es = '0;
        mode = raif_mode_t'(m); panel_fail = Y'(f);
        want = (m == 0) ? Y : (m == 1) ? 1 : Y - 1;
        got = 0;
        for (int p = 0; p < Y; p++)
          if (!panel_fail[p]) begin
            if (got < want) begin ea[p] = 1; got++; end else es[p] = 1;
          end
        @(posedge clk); #1;
        checks++;
        if (active !== ea || standby !== es || degraded !== (got < want)) begin
          failures++;
          $display("FAIL mode %0d fail %b: act %b/%b stb %b/%b", m, panel_fail, active, ea, standby, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
