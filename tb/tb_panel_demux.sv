// tb_panel_demux: checks the routing tag (input XOR destination), that all
// cells of a cycle go to one panel, that the panel cycles as t mod Y when all
// panels are active, that inactive panels are skipped, and that cells are
// dropped and counted when no panel is active.
module tb_panel_demux;
  localparam int N = 16, Y = 3, PW = 8, TW = 4;
  logic clk = 0, rst_n = 0;
  logic [Y-1:0] active;
  logic [N-1:0] in_v;
  logic [N-1:0][TW-1:0] in_dest;
  logic [N-1:0][PW-1:0] in_pay;
  logic [Y-1:0][N-1:0] p_v;
  logic [Y-1:0][N-1:0][TW-1:0] p_tag;
  logic [Y-1:0][N-1:0][PW-1:0] p_pay;
  logic [1:0] cur_panel;
  logic [15:0] n_drop;
  int checks = 0, failures = 0;

  panel_demux #(.N(N), .Y(Y), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_p;
    active = '1; in_v = '0; in_dest = '0; in_pay = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_p = 0;
    for (int t = 0; t < 200; t++) begin
      if (t == 60)  active = 3'b101;
      if (t == 120) active = 3'b010;
      if (t == 180) active = 3'b000;
      in_v = N'($urandom);
      for (int l = 0; l < N; l++) begin in_dest[l] = TW'($urandom); in_pay[l] = PW'($urandom); end
      #1;
      if (active == 0) begin
        chk(p_v == 0 && n_drop == 16'($countones(in_v)), "drop with no active panel");
      end else begin
        while (!active[exp_p]) exp_p = (exp_p + 1) % Y;
        chk(cur_panel == 2'(exp_p), $sformatf("panel at t=%0d: %0d exp %0d", t, cur_panel, exp_p));
        for (int p = 0; p < Y; p++)
          for (int l = 0; l < N; l++) begin
            if (p == exp_p) begin
              chk(p_v[p][l] == in_v[l], "valid follows input");
              if (in_v[l]) chk(p_tag[p][l] == (TW'(l) ^ in_dest[l]) && p_pay[p][l] == in_pay[l], "tag = line xor dest");
            end else chk(!p_v[p][l], "other panels idle");
          end
        exp_p = (exp_p + 1) % Y;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
