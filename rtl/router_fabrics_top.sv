// router_fabrics_top: the two switching fabrics for high-performance routers,
// side by side, each with its own ports.
//
//   ofb_*   a 16-port crossbar switch whose line cards share an overflow
//           buffer reached over a shared bus (ofb_switch, 17 x 16 crossbar
//           with iSLIP scheduling);
//   imsf_*  a 256-port interleaved multistage switching fabric of two panels
//           of six-stage I-Cubeout networks with recirculation between the
//           panels and redundant-array panel control (imsf_fabric).
//
// The two share only the clock and the active-low asynchronous reset. See the
// two modules for their timing.
module router_fabrics_top #(
  parameter int unsigned OFB_N         = ofb_pkg::DEF_N,
  parameter int unsigned OFB_VOQ_DEPTH = ofb_pkg::DEF_VOQ_DEPTH,
  parameter int unsigned OFB_RATIO     = ofb_pkg::DEF_RATIO,
  parameter int unsigned OFB_W         = ofb_pkg::DEF_W,
  parameter int unsigned OFB_ITERS     = ofb_pkg::DEF_ITERS,
  parameter int unsigned IM_N          = imsf_pkg::DEF_N,
  parameter int unsigned IM_B          = imsf_pkg::DEF_B,
  parameter int unsigned IM_X          = imsf_pkg::DEF_X,
  parameter int unsigned IM_Y          = imsf_pkg::DEF_Y,
  parameter int unsigned IM_XI         = imsf_pkg::DEF_XI,
  parameter int unsigned IM_PW         = imsf_pkg::DEF_PW,
  localparam int unsigned OQW = $clog2(OFB_N),
  localparam int unsigned OIW = $clog2(OFB_N + 1),
  localparam int unsigned ITW = $clog2(IM_N),
  localparam int unsigned NSE = IM_N / IM_B,
  localparam int unsigned IYW = (IM_Y > 1) ? $clog2(IM_Y) : 1
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  // overflow-buffer crossbar switch
  input  ofb_pkg::arb_mode_t                      ofb_arb_mode,
  input  ofb_pkg::buf_policy_t                    ofb_buf_policy,
  input  logic [OFB_N-1:0]                        ofb_in_v,
  input  logic [OFB_N-1:0][OQW-1:0]               ofb_in_dest,
  input  logic [OFB_N-1:0][OFB_W-1:0]             ofb_in_d,
  output logic [OFB_N-1:0]                        ofb_out_v,
  output logic [OFB_N-1:0][OFB_W-1:0]             ofb_out_d,
  output logic [OFB_N-1:0][OIW-1:0]               ofb_out_src,
  output logic [15:0]                             ofb_n_bus,
  output logic [15:0]                             ofb_n_bus_lost,
  output logic [15:0]                             ofb_n_of_full,
  output logic [15:0]                             ofb_n_of_out,
  // interleaved multistage switching fabric
  input  imsf_pkg::raif_mode_t                    imsf_raif_mode,
  input  logic [IM_Y-1:0]                         imsf_panel_fail,
  input  logic [IM_Y-1:0][IM_X-1:0][NSE-1:0]      imsf_fault,
  input  logic [IM_N-1:0]                         imsf_in_v,
  input  logic [IM_N-1:0][ITW-1:0]                imsf_in_dest,
  input  logic [IM_N-1:0][IM_PW-1:0]              imsf_in_pay,
  output logic [IM_N-1:0][IM_XI-1:0]              imsf_out_v,
  output logic [IM_N-1:0][IM_XI-1:0][IM_PW-1:0]   imsf_out_pay,
  output logic [IM_Y-1:0]                         imsf_active,
  output logic [IM_Y-1:0]                         imsf_standby,
  output logic                                    imsf_degraded,
  output logic [IYW-1:0]                          imsf_in_panel,
  output logic [15:0]                             imsf_n_in,
  output logic [15:0]                             imsf_n_out,
  output logic [15:0]                             imsf_n_drop,
  output logic [15:0]                             imsf_n_defl,
  output logic [15:0]                             imsf_n_rc
);

  ofb_switch #(
    .N(OFB_N), .VOQ_DEPTH(OFB_VOQ_DEPTH), .RATIO(OFB_RATIO), .W(OFB_W), .ITERS(OFB_ITERS)
  ) u_ofb (
    .clk, .rst_n,
    .arb_mode  (ofb_arb_mode),
    .buf_policy(ofb_buf_policy),
    .in_v      (ofb_in_v),
    .in_dest   (ofb_in_dest),
    .in_d      (ofb_in_d),
    .out_v     (ofb_out_v),
    .out_d     (ofb_out_d),
    .out_src   (ofb_out_src),
    .n_bus     (ofb_n_bus),
    .n_bus_lost(ofb_n_bus_lost),
    .n_of_full (ofb_n_of_full),
    .n_of_out  (ofb_n_of_out)
  );

  imsf_fabric #(
    .N(IM_N), .B(IM_B), .X(IM_X), .Y(IM_Y), .XI(IM_XI), .PW(IM_PW)
  ) u_imsf (
    .clk, .rst_n,
    .raif_mode (imsf_raif_mode),
    .panel_fail(imsf_panel_fail),
    .fault     (imsf_fault),
    .in_v      (imsf_in_v),
    .in_dest   (imsf_in_dest),
    .in_pay    (imsf_in_pay),
    .out_v     (imsf_out_v),
    .out_pay   (imsf_out_pay),
    .active    (imsf_active),
    .standby   (imsf_standby),
    .degraded  (imsf_degraded),
    .in_panel  (imsf_in_panel),
    .n_in      (imsf_n_in),
    .n_out     (imsf_n_out),
    .n_drop    (imsf_n_drop),
    .n_defl    (imsf_n_defl),
    .n_rc      (imsf_n_rc)
  );

endmodule
