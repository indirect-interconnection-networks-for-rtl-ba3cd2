// islip_sched: iSLIP scheduler for an NI x NO input-queued crossbar with
// virtual output queues.
//
// Each cell time it runs ITERS request-grant-accept iterations:
//   request  every unmatched input requests every output it holds cells for;
//   grant    every unmatched output grants the requesting unmatched input that
//            comes first at or after its grant pointer;
//   accept   every input accepts the granting output that comes first at or
//            after its accept pointer.
// Only matches made in the first iteration move the pointers: the grant pointer
// of the output to one past the accepted input, the accept pointer of the input
// to one past the accepted output. Later iterations only fill in the matching.
//
// Combinational from req to the match; pointers update at the clock edge.
module islip_sched #(
  parameter int unsigned NI    = 17,
  parameter int unsigned NO    = 16,
  parameter int unsigned ITERS = 4,
  localparam int unsigned IW = $clog2(NI),
  localparam int unsigned OW = $clog2(NO)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NI-1:0][NO-1:0]   req,
  output logic [NI-1:0]           in_match,   // input i is matched
  output logic [NI-1:0][OW-1:0]   in_out,     // to this output
  output logic [NO-1:0]           out_match,  // output o is matched
  output logic [NO-1:0][IW-1:0]   out_in      // to this input
);
  logic [NO-1:0][IW-1:0] gptr;
  logic [NI-1:0][OW-1:0] aptr;
  logic [NO-1:0]         upd_g;
  logic [NO-1:0][IW-1:0] new_g;
  logic [NI-1:0]         upd_a;
  logic [NI-1:0][OW-1:0] new_a;

  always_comb begin
    automatic logic [NO-1:0]         g_v;
    automatic logic [NO-1:0][IW-1:0] g_to;
    in_match  = '0;
    in_out    = '0;
    out_match = '0;
    out_in    = '0;
    upd_g = '0; new_g = '0; upd_a = '0; new_a = '0;
    for (int it = 0; it < int'(ITERS); it++) begin
      // grant
      g_v  = '0;
      g_to = '0;
      for (int o = 0; o < int'(NO); o++) begin
        if (!out_match[o]) begin
          for (int k = int'(NI) - 1; k >= 0; k--) begin
            automatic int i = (int'(gptr[o]) + k) % NI;
            if (req[i][o] && !in_match[i]) begin
              g_v[o]  = 1'b1;
              g_to[o] = IW'(i);
            end
          end
        end
      end
      // accept
      for (int i = 0; i < int'(NI); i++) begin
        if (!in_match[i]) begin
          automatic logic          acc = 1'b0;
          automatic logic [OW-1:0] ao  = '0;
          for (int k = int'(NO) - 1; k >= 0; k--) begin
            automatic int o = (int'(aptr[i]) + k) % NO;
            if (g_v[o] && g_to[o] == IW'(i)) begin
              acc = 1'b1;
              ao  = OW'(o);
            end
          end
          if (acc) begin
            in_match[i]   = 1'b1;
            in_out[i]     = ao;
            out_match[ao] = 1'b1;
            out_in[ao]    = IW'(i);
            if (it == 0) begin
              upd_a[i]  = 1'b1;
              new_a[i]  = (ao == OW'(NO - 1)) ? '0 : ao + 1'b1;
              upd_g[ao] = 1'b1;
              new_g[ao] = (i == int'(NI) - 1) ? '0 : IW'(i + 1);
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gptr <= '0;
      aptr <= '0;
    end else begin
      for (int o = 0; o < int'(NO); o++) if (upd_g[o]) gptr[o] <= new_g[o];
      for (int i = 0; i < int'(NI); i++) if (upd_a[i]) aptr[i] <= new_a[i];
    end
  end
endmodule
