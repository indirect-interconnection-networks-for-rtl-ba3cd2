// panel_demux: the input demultiplexers of the interleaved fabric.
//
// For every input line L a cell with destination D gets the routing tag
// L XOR D and is sent to one panel. All cells presented in the same cycle go to
// the same panel; the panel advances every cycle, so with all Y panels active
// cycle t uses panel t mod Y. Panels that are not active (standby or failed
// under the redundant-array control) are skipped, which is this design's
// extension of the cyclic rule to a partly active array. With no panel active
// the cells are dropped and counted.
//
// Timing: combinational from in_* to p_*; the panel pointer is a register that
// moves at every clock edge.
module panel_demux #(
  parameter int unsigned N  = 256,
  parameter int unsigned Y  = 2,
  parameter int unsigned PW = 16,
  localparam int unsigned TW = $clog2(N),
  localparam int unsigned YW = (Y > 1) ? $clog2(Y) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [Y-1:0]                 active,
  input  logic [N-1:0]                 in_v,
  input  logic [N-1:0][TW-1:0]         in_dest,
  input  logic [N-1:0][PW-1:0]         in_pay,
  output logic [Y-1:0][N-1:0]          p_v,
  output logic [Y-1:0][N-1:0][TW-1:0]  p_tag,
  output logic [Y-1:0][N-1:0][PW-1:0]  p_pay,
  output logic [YW-1:0]                cur_panel,
  output logic [15:0]                  n_drop
);
  logic [YW-1:0] ptr, sel, nxt;
  logic          any;

  // first active panel at or after ptr, and the one after it
  always_comb begin
    any = |active;
    sel = ptr;
    nxt = ptr;
    for (int k = int'(Y) - 1; k >= 0; k--)
      if (active[(int'(ptr) + k) % Y]) sel = YW'((int'(ptr) + k) % Y);
    nxt = YW'((int'(sel) + 1) % Y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else        ptr <= nxt;
  end

  always_comb begin
    p_v    = '0;
    p_tag  = '0;
    p_pay  = '0;
    n_drop = '0;
    for (int l = 0; l < N; l++) begin
      if (any) begin
        p_v[sel][l]   = in_v[l];
        p_tag[sel][l] = TW'(l) ^ in_dest[l];
        p_pay[sel][l] = in_pay[l];
      end else begin
        n_drop = n_drop + 16'(in_v[l]);
      end
    end
  end

  assign cur_panel = sel;
endmodule
