// tb_ofb_switch: overflow-buffer switch with 4 line cards, VOQs of 2 cells and
// an overflow buffer twice the size of a line-card buffer.
//   1. A single cell crosses an empty switch in one cell time.
//   2. Hot-spot bursts to output 0 fill the line-card VOQs, so cells take the
//      shared bus, some lose it, the overflow buffer fills and refuses cells,
//      and the overflow input sends cells through the crossbar.
//   3. Random bursty traffic under every bus arbitration and buffer policy:
//      every output cell is known, at its own output and delivered once; after
//      draining, sent = delivered + lost on the bus + refused by the overflow
//      buffer. Under RRG arbitration no cell is ever refused after the bus.
//   4. At most one cell per output per cell time.
module tb_ofb_switch;
  import ofb_pkg::*;
  localparam int N = 4, VOQ_DEPTH = 2, RATIO = 2, W = 32, ITERS = 2;
  logic clk = 0, rst_n = 0;
  arb_mode_t arb_mode;
  buf_policy_t buf_policy;
  logic [N-1:0] in_v, out_v;
  logic [N-1:0][1:0] in_dest;
  logic [N-1:0][W-1:0] in_d, out_d;
  logic [N-1:0][2:0] out_src;
  logic [15:0] n_bus, n_bus_lost, n_of_full, n_of_out;
  int checks = 0, failures = 0, cyc = 0;

  ofb_switch #(.N(N), .VOQ_DEPTH(VOQ_DEPTH), .RATIO(RATIO), .W(W), .ITERS(ITERS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  int dest_of[int];
  int sent = 0, delivered = 0, lost = 0, refused = 0, bus = 0, of_out = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    lost <= lost + n_bus_lost; refused <= refused + n_of_full;
    bus <= bus + n_bus; of_out <= of_out + n_of_out;
  end

  always @(negedge clk) if (rst_n)
    for (int o = 0; o < N; o++)
      if (out_v[o]) begin
        automatic int id = out_d[o];
        chk(dest_of.exists(id), $sformatf("unknown cell %0d", id));
        if (dest_of.exists(id)) begin
          chk(dest_of[id] == o, "cell at its own output");
          dest_of.delete(id);
          delivered++;
        end
      end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input logic [N-1:0] v, input int d[N], inout int id);
    in_v = v;
    for (int i = 0; i < N; i++)
      if (v[i]) begin
        in_dest[i] = 2'(d[i]); in_d[i] = W'(id); dest_of[id] = d[i]; id++; sent++;
      end
  endtask

  task automatic drain();
    @(posedge clk); #1 in_v = '0;
    repeat (80) @(posedge clk);
    #1;
  endtask

  initial begin
    int id = 1;
    arb_mode = ARB_RR; buf_policy = BUF_PRIVATE; in_v = '0; in_dest = '0; in_d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. latency of one cell time
    for (int i = 0; i < N; i++) begin
      automatic int d[N] = '{default: (i + 1) % N};
      @(posedge clk); #1;
      send(N'(1) << i, d, id);
      @(posedge clk); #1 in_v = '0;
      chk(out_v[(i + 1) % N] && out_d[(i + 1) % N] == W'(id - 1), "one cell time through an empty switch");
    end
    drain();
    // 2. hot spot: every input sends to output 0 for 40 cycles
    begin
      automatic int d[N] = '{default: 0};
      for (int t = 0; t < 40; t++) begin @(posedge clk); #1 send('1, d, id); end
      drain();
      chk(bus > 0, "cells took the shared bus");
      chk(lost > 0, "cells lost the bus");
      chk(refused > 0, "overflow buffer refused cells");
      chk(of_out > 0, "overflow buffer sent cells through the crossbar");
      chk(sent == delivered + lost + refused, "conservation (hot spot)");
    end
    // 3. every arbitration x policy, bursty random traffic
    for (int a = 0; a < 3; a++)
      for (int p = 0; p < 3; p++) begin
        automatic int r0 = refused;
        arb_mode = arb_mode_t'(a); buf_policy = buf_policy_t'(p);
        for (int t = 0; t < 300; t++) begin
          automatic int d[N];
          automatic logic [N-1:0] v;
          // bursts: half of the time the inputs pile onto one or two outputs
          for (int i = 0; i < N; i++) d[i] = ((t / 25) % 2) ? ($urandom % 2) : ($urandom % N);
          v = N'($urandom) | N'($urandom);
          @(posedge clk); #1 send(v, d, id);
        end
        drain();
        chk(sent == delivered + lost + refused,
            $sformatf("conservation arb %0d policy %0d: %0d %0d %0d %0d", a, p, sent, delivered, lost, refused));
        if (a == 2) chk(refused == r0, "RRG sends no cell the overflow buffer would refuse");
      end
    $display("sent %0d delivered %0d bus %0d lost %0d refused %0d of_out %0d", sent, delivered, bus, lost, refused, of_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
