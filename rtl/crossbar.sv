// crossbar: NI x NO cell crossbar. Output o carries the cell of input sel[o]
// when sel_v[o] is set; each output takes at most one input per cell time and,
// as the scheduler guarantees, each input feeds at most one output.
// Combinational.
module crossbar #(
  parameter int unsigned NI = 17,
  parameter int unsigned NO = 16,
  parameter int unsigned W  = 32,
  localparam int unsigned IW = $clog2(NI)
) (
  input  logic [NI-1:0][W-1:0]   in_d,
  input  logic [NO-1:0]          sel_v,
  input  logic [NO-1:0][IW-1:0]  sel,
  output logic [NO-1:0]          out_v,
  output logic [NO-1:0][W-1:0]   out_d
);
  always_comb begin
    for (int o = 0; o < int'(NO); o++) begin
      out_v[o] = sel_v[o] && (int'(sel[o]) < int'(NI));
      out_d[o] = '0;
      for (int i = 0; i < int'(NI); i++)
        if (sel_v[o] && sel[o] == IW'(i)) out_d[o] = in_d[i];
    end
  end
endmodule
