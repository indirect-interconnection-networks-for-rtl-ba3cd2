// imsf_fabric: interleaved multistage switching fabric.
//
// Y panels of X-stage I-Cubeout networks (ico_panel) switch fixed-length cells
// between N inputs and N outputs. The input demultiplexers (panel_demux) tag
// each cell with input XOR destination and send all cells of a cycle to one
// panel, cycling through the active panels. Cells that leave the last stage of
// panel i without having reached their destination recirculate into the last
// copy of stages of the next active panel (i+1 mod Y in plain interleaving),
// on the same logical row, at the first available entry point. One
// concentrator per destination row takes up to XI cells per cycle from the
// local outlets of all stages of all panels, rightmost stage first.
//
// The redundant-array controller (raif_ctrl) chooses the active panels from the
// mode input and per-panel failure flags; `fault` marks individual faulty
// switching elements, which the routing avoids.
//
// Interface: in_v/in_dest/in_pay present one cell per input per cycle (no back
// pressure: a cell that cannot be carried is dropped and counted). out_v/out_pay
// carry up to XI cells per output per cycle. The n_* outputs count events in the
// current cycle. A cell whose route is free of conflicts appears at the output
// k+1 cycles after it is presented, k being the stage (0-based) where it exits.
//
// The defaults are the evaluated configuration S6/P2: 256 ports, 4x8 elements,
// 6 stages per panel, 2 panels, output speedup 2. Elements carry no internal
// queues: each outlet holds one cell (see ico_panel).
module imsf_fabric #(
  parameter int unsigned N  = imsf_pkg::DEF_N,
  parameter int unsigned B  = imsf_pkg::DEF_B,
  parameter int unsigned X  = imsf_pkg::DEF_X,
  parameter int unsigned Y  = imsf_pkg::DEF_Y,
  parameter int unsigned XI = imsf_pkg::DEF_XI,
  parameter int unsigned PW = imsf_pkg::DEF_PW,
  localparam int unsigned TW  = $clog2(N),
  localparam int unsigned NSE = N / B
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  imsf_pkg::raif_mode_t           raif_mode,
  input  logic [Y-1:0]                   panel_fail,
  input  logic [Y-1:0][X-1:0][NSE-1:0]   fault,
  input  logic [N-1:0]                   in_v,
  input  logic [N-1:0][TW-1:0]           in_dest,
  input  logic [N-1:0][PW-1:0]           in_pay,
  output logic [N-1:0][XI-1:0]           out_v,
  output logic [N-1:0][XI-1:0][PW-1:0]   out_pay,
  output logic [Y-1:0]                   active,
  output logic [Y-1:0]                   standby,
  output logic                           degraded,
  output logic [((Y > 1) ? $clog2(Y) : 1)-1:0] in_panel,   // panel taking this cycle's inputs
  output logic [15:0]                    n_in,
  output logic [15:0]                    n_out,
  output logic [15:0]                    n_drop,
  output logic [15:0]                    n_defl,
  output logic [15:0]                    n_rc
);
  localparam int unsigned NS = X * Y;
  localparam int unsigned YW = (Y > 1) ? $clog2(Y) : 1;

  // ---- redundant array control and pseudo-random tie breaking ----
  raif_ctrl #(.Y(Y)) u_raif (
    .clk, .rst_n,
    .mode      (raif_mode),
    .panel_fail(panel_fail),
    .active    (active),
    .standby   (standby),
    .degraded  (degraded)
  );

  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  // ---- input demultiplexers ----
  logic [Y-1:0][N-1:0]          d_v;
  logic [Y-1:0][N-1:0][TW-1:0]  d_tag;
  logic [Y-1:0][N-1:0][PW-1:0]  d_pay;
  logic [15:0]                  dmx_drop;

  panel_demux #(.N(N), .Y(Y), .PW(PW)) u_demux (
    .clk, .rst_n,
    .active   (active),
    .in_v     (in_v),
    .in_dest  (in_dest),
    .in_pay   (in_pay),
    .p_v      (d_v),
    .p_tag    (d_tag),
    .p_pay    (d_pay),
    .cur_panel(in_panel),
    .n_drop   (dmx_drop)
  );

  // ---- panels and recirculation between them ----
  logic [Y-1:0][N-1:0]                 po_v, rc_v;
  logic [Y-1:0][N-1:0][TW-1:0]         po_tag, rc_tag;
  logic [Y-1:0][N-1:0][PW-1:0]         po_pay, rc_pay;
  logic [Y-1:0][X-1:0][N-1:0]          loc_v, loc_take;
  logic [Y-1:0][X-1:0][N-1:0][PW-1:0]  loc_pay;
  logic [Y-1:0][15:0]                  p_drop, p_defl, p_rc;
  logic [15:0]                         rc_lost;

  // panel that receives the recirculated cells of panel i: the next active one
  function automatic int unsigned next_active(int unsigned i, logic [Y-1:0] act);
    automatic int unsigned r = Y;   // Y means none
    for (int k = int'(Y); k >= 1; k--)
      if (act[(i + unsigned'(k)) % Y]) r = (i + unsigned'(k)) % Y;
    return r;
  endfunction

  always_comb begin
    rc_v    = '0;
    rc_tag  = '0;
    rc_pay  = '0;
    rc_lost = '0;
    for (int i = 0; i < int'(Y); i++) begin
      automatic int unsigned q = next_active(unsigned'(i), active);
      for (int l = 0; l < int'(N); l++) begin
        if (po_v[i][l]) begin
          if (q < Y && !rc_v[q][l]) begin
            rc_v[q][l]   = 1'b1;
            rc_tag[q][l] = po_tag[i][l];
            rc_pay[q][l] = po_pay[i][l];
          end else begin
            rc_lost = rc_lost + 16'd1;
          end
        end
      end
    end
  end

  for (genvar p = 0; p < Y; p++) begin : g_panel
    ico_panel #(.N(N), .B(B), .X(X), .PW(PW)) u_panel (
      .clk, .rst_n,
      .in_v    (d_v[p]),
      .in_tag  (d_tag[p]),
      .in_pay  (d_pay[p]),
      .rc_v    (rc_v[p]),
      .rc_tag  (rc_tag[p]),
      .rc_pay  (rc_pay[p]),
      .fault   (fault[p]),
      .rnd     (lfsr ^ 16'(p * 16'h3B5)),
      .loc_v   (loc_v[p]),
      .loc_pay (loc_pay[p]),
      .loc_take(loc_take[p]),
      .po_v    (po_v[p]),
      .po_tag  (po_tag[p]),
      .po_pay  (po_pay[p]),
      .n_drop  (p_drop[p]),
      .n_defl  (p_defl[p]),
      .n_rc_in (p_rc[p])
    );
  end

  // ---- concentrators, one per destination row ----
  for (genvar l = 0; l < N; l++) begin : g_conc
    logic [NS-1:0]          c_v, c_take;
    logic [NS-1:0][PW-1:0]  c_pay;
    for (genvar s = 0; s < X; s++) begin : g_s
      for (genvar p = 0; p < Y; p++) begin : g_p
        assign c_v[s*Y+p]       = loc_v[p][s][l];
        assign c_pay[s*Y+p]     = loc_pay[p][s][l];
        assign loc_take[p][s][l] = c_take[s*Y+p];
      end
    end
    concentrator #(.NS(NS), .Y(Y), .XI(XI), .PW(PW)) u_conc (
      .src_v  (c_v),
      .src_pay(c_pay),
      .take   (c_take),
      .out_v  (out_v[l]),
      .out_pay(out_pay[l]),
      .out_src()
    );
  end

  // ---- per-cycle event counts ----
  always_comb begin
    n_in   = '0;
    n_out  = '0;
    n_drop = dmx_drop + rc_lost;
    n_defl = '0;
    n_rc   = '0;
    for (int l = 0; l < int'(N); l++) begin
      n_in = n_in + 16'(in_v[l]);
      for (int k = 0; k < int'(XI); k++) n_out = n_out + 16'(out_v[l][k]);
    end
    for (int p = 0; p < int'(Y); p++) begin
      n_drop = n_drop + p_drop[p];
      n_defl = n_defl + p_defl[p];
      n_rc   = n_rc + p_rc[p];
    end
  end

endmodule
