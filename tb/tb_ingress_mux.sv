// tb_ingress_mux: a cell goes to its VOQ when that queue has room, otherwise
// to the shared bus; no cell goes both ways and none is invented.
module tb_ingress_mux;
  localparam int N = 16, W = 16;
  logic arr_v, enq_v, bus_req;
  logic [3:0] arr_dest, enq_q, bus_dest;
  logic [W-1:0] arr_d, enq_d, bus_d;
  logic [N-1:0] voq_ok;
  int checks = 0, failures = 0;

  ingress_mux #(.N(N), .W(W)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int to_voq = 0, to_bus = 0;
    for (int t = 0; t < 2000; t++) begin
      arr_v = 1'($urandom); arr_dest = 4'($urandom); arr_d = W'($urandom); voq_ok = N'($urandom);
      #1;
      checks++;
      if (arr_v && voq_ok[arr_dest]) begin
        to_voq++;
        if (!(enq_v && !bus_req && enq_q == arr_dest && enq_d == arr_d)) begin failures++; $display("FAIL voq"); end
      end else if (arr_v) begin
        to_bus++;
        if (!(bus_req && !enq_v && bus_dest == arr_dest && bus_d == arr_d)) begin failures++; $display("FAIL bus"); end
      end else if (enq_v || bus_req) begin
        failures++; $display("FAIL phantom");
      end
    end
    checks++;
    if (to_voq == 0 || to_bus == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
