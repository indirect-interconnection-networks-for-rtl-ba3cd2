// ico_panel: one I-Cubeout (ICO) panel of X stages of N/B switching elements.
//
// Lines are numbered 0..N-1 and written in base B with n = log_B(N) digits,
// the most significant digit first. Stage s (0-based) corrects digit s mod n:
// its element e joins the B lines that differ only in that digit, and inlet or
// outlet j of the element is the line whose digit equals j. The first n stages
// form one full copy of the indirect n-cube; later stages repeat the pattern.
//
// Every remote outlet ends in a one-cell latch that feeds the next stage in the
// following cycle (one stage per cycle, no buffering inside an element). Every
// local outlet ends in a one-cell latch read by the concentrator of that row;
// it stays busy until the concentrator drains it (loc_take).
//
// Cells leaving the last stage (primary outputs po_*) go to the recirculation
// inputs rc_* of the next panel. A recirculated cell on line L enters the last
// copy of stages (stages X-n..X-1) on the same logical line L, at the first
// stage whose inlet on that line is free this cycle and whose element works
// (first-available, FA). Its tag is rotated to match that stage. A cell that
// finds no entry point is dropped. With X == n the first stage is also an FA
// point; a new input cell then has priority over a recirculated one.
//
// A faulty element (fault bit set) accepts nothing: elements of the previous
// stage treat outlets leading to it as unusable, FA skips it, and input cells
// arriving at a faulty first-stage element are dropped.
//
// Timing: a cell presented on in_* in cycle t is in the stage-s latch at the
// end of cycle t+s; a cell extracted at stage s is visible on loc_* in cycle
// t+s+1.
module ico_panel #(
  parameter int unsigned N  = 256,
  parameter int unsigned B  = 4,
  parameter int unsigned X  = 6,
  parameter int unsigned PW = 16,
  localparam int unsigned TW  = $clog2(N),
  localparam int unsigned NSE = N / B
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // new cells (tag = line XOR destination, unrotated)
  input  logic [N-1:0]                 in_v,
  input  logic [N-1:0][TW-1:0]         in_tag,
  input  logic [N-1:0][PW-1:0]         in_pay,
  // recirculated cells from the previous panel's primary outputs
  input  logic [N-1:0]                 rc_v,
  input  logic [N-1:0][TW-1:0]         rc_tag,
  input  logic [N-1:0][PW-1:0]         rc_pay,
  input  logic [X-1:0][NSE-1:0]        fault,
  input  logic [15:0]                  rnd,
  // local outlet latches, one per stage and row, and their drain strobes
  output logic [X-1:0][N-1:0]          loc_v,
  output logic [X-1:0][N-1:0][PW-1:0]  loc_pay,
  input  logic [X-1:0][N-1:0]          loc_take,
  // primary outputs (last-stage remote latches)
  output logic [N-1:0]                 po_v,
  output logic [N-1:0][TW-1:0]         po_tag,
  output logic [N-1:0][PW-1:0]         po_pay,
  // per-cycle event counts
  output logic [15:0]                  n_drop,
  output logic [15:0]                  n_defl,
  output logic [15:0]                  n_rc_in
);
  localparam int unsigned DW = $clog2(B);
  localparam int unsigned ND = TW / DW;
  localparam int unsigned LASTC = X - ND;   // first stage of the last copy

  // digit position s mod n occupies bits [sh +: DW] of a line number
  function automatic int unsigned shift_of(int unsigned s);
    return (ND - 1 - (s % ND)) * DW;
  endfunction
  function automatic int unsigned line_of(int unsigned s, int unsigned e, int unsigned j);
    automatic int unsigned sh = shift_of(s);
    return ((e >> sh) << (sh + DW)) | (j << sh) | (e & ((1 << sh) - 1));
  endfunction
  function automatic int unsigned se_of(int unsigned s, int unsigned l);
    automatic int unsigned sh = shift_of(s);
    return ((l >> (sh + DW)) << sh) | (l & ((1 << sh) - 1));
  endfunction
  function automatic logic [TW-1:0] rotl(logic [TW-1:0] t, int unsigned digits);
    automatic logic [2*TW-1:0] tt = {t, t};
    automatic int unsigned k = (digits % ND) * DW;
    return tt[2*TW-1-k -: TW];
  endfunction

  // stage latches
  logic [X-1:0][N-1:0]          r_v;
  logic [X-1:0][N-1:0][TW-1:0]  r_tag;
  logic [X-1:0][N-1:0][PW-1:0]  r_pay;
  logic [X-1:0][N-1:0]          l_v;
  logic [X-1:0][N-1:0][PW-1:0]  l_pay;

  // stage inlets after input / recirculation multiplexing
  logic [X-1:0][N-1:0]          s_v;
  logic [X-1:0][N-1:0][TW-1:0]  s_tag;
  logic [X-1:0][N-1:0][PW-1:0]  s_pay;
  logic [N-1:0]                 rc_drop;
  logic [N-1:0]                 in_drop;
  logic [N-1:0]                 rc_in;

  always_comb begin
    for (int s = 0; s < X; s++) begin
      for (int l = 0; l < N; l++) begin
        if (s == 0) begin
          s_v[s][l]   = in_v[l] && !fault[0][se_of(0, l)];
          s_tag[s][l] = in_tag[l];
          s_pay[s][l] = in_pay[l];
        end else begin
          s_v[s][l]   = r_v[s-1][l];
          s_tag[s][l] = r_tag[s-1][l];
          s_pay[s][l] = r_pay[s-1][l];
        end
      end
    end
    // input cells at a faulty first-stage element, and cells still in flight
    // towards an element that has just been marked faulty, are lost
    for (int l = 0; l < N; l++) begin
      in_drop[l] = in_v[l] && fault[0][se_of(0, l)];
      for (int s = 1; s < X; s++)
        if (r_v[s-1][l] && fault[s][se_of(s, l)]) in_drop[l] = 1'b1;
    end
    // first-available recirculation entry on the same logical line
    rc_drop = '0;
    rc_in   = '0;
    for (int l = 0; l < N; l++) begin
      automatic logic placed = 1'b0;
      for (int s = LASTC; s < X; s++) begin
        if (rc_v[l] && !placed && !s_v[s][l] && !fault[s][se_of(s, l)]) begin
          placed      = 1'b1;
          s_v[s][l]   = 1'b1;
          s_tag[s][l] = rotl(rc_tag[l], s - LASTC);
          s_pay[s][l] = rc_pay[l];
        end
      end
      rc_in[l]   = placed;
      rc_drop[l] = rc_v[l] && !placed;
    end
  end

  // switching elements
  logic [X-1:0][N-1:0]          o_v;
  logic [X-1:0][N-1:0][TW-1:0]  o_tag;
  logic [X-1:0][N-1:0][PW-1:0]  o_pay;
  logic [X-1:0][N-1:0]          lo_v;
  logic [X-1:0][N-1:0][PW-1:0]  lo_pay;
  logic [X-1:0][N-1:0]          e_defl, e_drop;

  for (genvar s = 0; s < X; s++) begin : g_stage
    for (genvar e = 0; e < NSE; e++) begin : g_se
      logic [B-1:0]           i_v, r_ok, l_ok, q_rv, q_lv, q_defl, q_drop;
      logic [B-1:0][TW-1:0]   i_tag, q_rtag;
      logic [B-1:0][PW-1:0]   i_pay, q_rpay, q_lpay;
      always_comb begin
        for (int j = 0; j < B; j++) begin
          automatic int unsigned ln = line_of(s, e, j);
          i_v[j]   = s_v[s][ln] && !fault[s][e];
          i_tag[j] = s_tag[s][ln];
          i_pay[j] = s_pay[s][ln];
          r_ok[j]  = (s == X - 1) ? 1'b1 : !fault[(s + 1) % X][se_of((s + 1) % X, ln)];
          l_ok[j]  = !l_v[s][ln] || loc_take[s][ln];
        end
      end
      ico_se #(.B(B), .TW(TW), .PW(PW)) u_se (
        .in_v   (i_v),
        .in_tag (i_tag),
        .in_pay (i_pay),
        .rem_ok (r_ok),
        .loc_ok (l_ok),
        .rnd    (DW'(rnd + 16'(s * 7 + e))),
        .rem_v  (q_rv),
        .rem_tag(q_rtag),
        .rem_pay(q_rpay),
        .loc_v  (q_lv),
        .loc_pay(q_lpay),
        .defl   (q_defl),
        .drop   (q_drop)
      );
      for (genvar j = 0; j < B; j++) begin : g_out
        localparam int unsigned LN = ((e >> ((ND - 1 - (s % ND)) * DW)) << ((ND - 1 - (s % ND)) * DW + DW))
                                   | (j << ((ND - 1 - (s % ND)) * DW))
                                   | (e & ((1 << ((ND - 1 - (s % ND)) * DW)) - 1));
        assign o_v[s][LN]    = q_rv[j];
        assign o_tag[s][LN]  = q_rtag[j];
        assign o_pay[s][LN]  = q_rpay[j];
        assign lo_v[s][LN]   = q_lv[j];
        assign lo_pay[s][LN] = q_lpay[j];
        // defl/drop are per inlet; inlet j sits on the same line as outlet j
        assign e_defl[s][LN] = q_defl[j];
        assign e_drop[s][LN] = q_drop[j];
      end
    end
  end

  // valid bits are reset; cell contents need no reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v <= '0;
      l_v <= '0;
    end else begin
      r_v <= o_v;
      for (int s = 0; s < X; s++)
        for (int l = 0; l < N; l++)
          if (lo_v[s][l])          l_v[s][l] <= 1'b1;
          else if (loc_take[s][l]) l_v[s][l] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    r_tag <= o_tag;
    r_pay <= o_pay;
    for (int s = 0; s < X; s++)
      for (int l = 0; l < N; l++)
        if (lo_v[s][l]) l_pay[s][l] <= lo_pay[s][l];
  end

  assign loc_v   = l_v;
  assign loc_pay = l_pay;
  assign po_v    = r_v[X-1];
  assign po_tag  = r_tag[X-1];
  assign po_pay  = r_pay[X-1];

  always_comb begin
    n_drop  = '0;
    n_defl  = '0;
    n_rc_in = '0;
    for (int l = 0; l < N; l++) begin
      n_drop  = n_drop + 16'(in_drop[l]) + 16'(rc_drop[l]);
      n_rc_in = n_rc_in + 16'(rc_in[l]);
    end
    for (int s = 0; s < X; s++)
      for (int l = 0; l < N; l++) begin
        n_drop = n_drop + 16'(e_drop[s][l]);
        n_defl = n_defl + 16'(e_defl[s][l]);
      end
  end

  // one full copy of stages is the minimum an ICO panel may have
  if (X < ND) begin : g_bad_x
    $error("ico_panel: X must be at least log_B(N)");
  end

endmodule
