// concentrator: gathers cells for one destination row from the local outlet
// latches of every stage of every panel and passes up to XI of them per cycle
// (the output speedup) to the outgoing line card.
//
// Source k is stage (k / Y), panel (k % Y), so a higher index means a later
// stage. Later (rightmost) stages are served first whatever their panel, so
// cells that have travelled furthest, recirculated ones included, do not
// starve; between panels at the same stage the lower panel number goes first
// (this order within a stage is this design's own choice). A source that is not
// served keeps its cell in its latch, and the element feeding that latch sees
// the local outlet busy until it is drained.
//
// Combinational: take[k] drains source k in the same cycle out_v/out_pay
// present its cell.
module concentrator #(
  parameter int unsigned NS = 12,   // sources = stages per panel * panels
  parameter int unsigned Y  = 2,
  parameter int unsigned XI = 2,
  parameter int unsigned PW = 16
) (
  input  logic [NS-1:0]          src_v,
  input  logic [NS-1:0][PW-1:0]  src_pay,
  output logic [NS-1:0]          take,
  output logic [XI-1:0]          out_v,
  output logic [XI-1:0][PW-1:0]  out_pay,
  output logic [XI-1:0][$clog2(NS)-1:0] out_src
);
  always_comb begin
    automatic int unsigned got = 0;
    take    = '0;
    out_v   = '0;
    out_pay = '0;
    out_src = '0;
    for (int st = int'(NS / Y) - 1; st >= 0; st--) begin
      for (int p = 0; p < int'(Y); p++) begin
        automatic int unsigned k = unsigned'(st) * Y + unsigned'(p);
        if (src_v[k] && got < XI) begin
          take[k]      = 1'b1;
          out_v[got]   = 1'b1;
          out_pay[got] = src_pay[k];
          out_src[got] = ($clog2(NS))'(k);
          got++;
        end
      end
    end
  end
endmodule
