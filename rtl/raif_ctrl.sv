// raif_ctrl: panel control for a Redundant Array of Independent Fabrics.
//
// Each panel of the interleaved fabric is treated like a disk of a RAID array.
// From the operating mode and the per-panel failure flags it decides which
// panels carry traffic (active) and which are powered but idle (standby):
//   RAIF0  every working panel is active (plain interleaving);
//   RAIF1  one working panel is active, the others stand by and replace it
//          when it fails;
//   RAIF2  Y-1 working panels are active and one stands by.
// Active panels are the lowest-numbered working ones; the rest of the working
// panels stand by. `degraded` is set when fewer panels are active than the
// mode asks for. Outputs are registered, so a change takes effect on the next
// clock edge. The choice of which working panels become active is this
// design's own.
module raif_ctrl #(
  parameter int unsigned Y = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  imsf_pkg::raif_mode_t mode,
  input  logic [Y-1:0]         panel_fail,
  output logic [Y-1:0]         active,
  output logic [Y-1:0]         standby,
  output logic                 degraded
);
  import imsf_pkg::*;

  logic [Y-1:0] act_d, stb_d;
  logic         deg_d;

  always_comb begin
    automatic int unsigned want = Y;
    automatic int unsigned got  = 0;
    unique case (mode)
      RAIF0:   want = Y;
      RAIF1:   want = 1;
      RAIF2:   want = (Y > 1) ? Y - 1 : 1;
      default: want = Y;
    endcase
    act_d = '0;
    stb_d = '0;
    for (int p = 0; p < int'(Y); p++) begin
      if (!panel_fail[p]) begin
        if (got < want) begin
          act_d[p] = 1'b1;
          got++;
        end else begin
          stb_d[p] = 1'b1;
        end
      end
    end
    deg_d = got < want;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= '0;
      standby  <= '0;
      degraded <= 1'b0;
    end else begin
      active   <= act_d;
      standby  <= stb_d;
      degraded <= deg_d;
    end
  end
endmodule
