// bus_arbiter: arbiter of the shared bus that carries blocked cells from the
// line cards to the overflow buffer, one cell per cell time.
//
// Three policies, selected at run time by `mode`:
//   ARB_PRIORITY  static priority, requester 0 highest;
//   ARB_RR        round robin: the search starts at the selection pointer and
//                 the pointer moves to one past the winner, so the requester
//                 served last has the lowest priority next time;
//   ARB_RRG       round robin restricted to requesters whose cell would find
//                 room in its overflow FIFO (space_ok), so no bus slot is spent
//                 on a cell the overflow buffer would refuse.
// Requesters that are not granted lose their cell (the caller drops it).
// Combinational grant; the pointer updates at the clock edge after a grant in
// a round-robin mode.
module bus_arbiter #(
  parameter int unsigned N = 16,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ofb_pkg::arb_mode_t mode,
  input  logic [N-1:0]      req,
  input  logic [N-1:0]      space_ok,
  output logic [N-1:0]      gnt,
  output logic              gnt_v,
  output logic [IW-1:0]     gnt_idx,
  output logic [IW-1:0]     ptr
);
  import ofb_pkg::*;

  logic [N-1:0] elig;

  always_comb begin
    elig    = (mode == ARB_RRG) ? (req & space_ok) : req;
    gnt     = '0;
    gnt_v   = 1'b0;
    gnt_idx = '0;
    if (mode == ARB_PRIORITY) begin
      for (int i = int'(N) - 1; i >= 0; i--)
        if (elig[i]) gnt_idx = IW'(i);
    end else begin
      for (int k = int'(N) - 1; k >= 0; k--)
        if (elig[(int'(ptr) + k) % N]) gnt_idx = IW'((int'(ptr) + k) % N);
    end
    gnt_v = |elig;
    if (gnt_v) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (gnt_v && mode != ARB_PRIORITY)
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
