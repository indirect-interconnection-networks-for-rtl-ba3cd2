// ofb_switch: crossbar switch with a shared overflow buffer.
//
// N line cards each keep N virtual output queues (VOQs) in their own input
// buffer, split equally among the queues. Next to them sits one overflow
// buffer, shared by all line cards and reached over a shared bus; it also keeps
// N VOQs and is the (N+1)-th input of an (N+1) x N crossbar. A cell that finds
// its line-card VOQ full is not dropped at once: the ingress multiplexer asks
// for the bus, the bus arbiter picks one such cell per cell time and moves it
// into the overflow buffer. Cells that lose the bus, or that the overflow
// buffer refuses under its space management rule, are dropped. An iSLIP
// scheduler matches the N+1 inputs to the N outputs every cell time.
//
// Sizes: each line-card buffer holds N*VOQ_DEPTH cells; the overflow buffer
// holds RATIO times that. Bus arbitration (arb_mode) and overflow-buffer space
// management (buf_policy) are run-time inputs.
//
// Timing: one clock is one cell time. A cell that arrives in cycle t is stored
// at the edge ending t and, with no contention, leaves on out_* in cycle t+1
// (a cell that takes the bus likewise). out_src tells which crossbar input a
// cell came from (N = overflow buffer). The n_* outputs count events in the
// current cycle.
module ofb_switch #(
  parameter int unsigned N         = ofb_pkg::DEF_N,
  parameter int unsigned VOQ_DEPTH = ofb_pkg::DEF_VOQ_DEPTH,
  parameter int unsigned RATIO     = ofb_pkg::DEF_RATIO,
  parameter int unsigned W         = ofb_pkg::DEF_W,
  parameter int unsigned ITERS     = ofb_pkg::DEF_ITERS,
  localparam int unsigned QW = $clog2(N),
  localparam int unsigned IW = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ofb_pkg::arb_mode_t    arb_mode,
  input  ofb_pkg::buf_policy_t  buf_policy,
  input  logic [N-1:0]          in_v,
  input  logic [N-1:0][QW-1:0]  in_dest,
  input  logic [N-1:0][W-1:0]   in_d,
  output logic [N-1:0]          out_v,
  output logic [N-1:0][W-1:0]   out_d,
  output logic [N-1:0][IW-1:0]  out_src,
  output logic [15:0]           n_bus,       // cells moved over the bus
  output logic [15:0]           n_bus_lost,  // cells that lost the bus
  output logic [15:0]           n_of_full,   // cells refused by the overflow buffer
  output logic [15:0]           n_of_out     // cells sent from the overflow buffer
);
  import ofb_pkg::*;

  localparam int unsigned ICAP = N * VOQ_DEPTH;
  localparam int unsigned OCAP = RATIO * ICAP;
  localparam int unsigned NI   = N + 1;

  // ---- line cards: ingress multiplexer + VOQ input buffer ----
  logic [N-1:0]         enq_v, bus_req;
  logic [N-1:0][QW-1:0] enq_q, bus_dest;
  logic [N-1:0][W-1:0]  enq_d, bus_d;
  logic [NI-1:0][N-1:0] nonempty, acc_ok;
  logic [NI-1:0]        in_match;
  logic [NI-1:0][QW-1:0] in_out;
  logic [NI-1:0][W-1:0] head_d;

  for (genvar i = 0; i < N; i++) begin : g_lc
    ingress_mux #(.N(N), .W(W)) u_mux (
      .arr_v   (in_v[i]),
      .arr_dest(in_dest[i]),
      .arr_d   (in_d[i]),
      .voq_ok  (acc_ok[i]),
      .enq_v   (enq_v[i]),
      .enq_q   (enq_q[i]),
      .enq_d   (enq_d[i]),
      .bus_req (bus_req[i]),
      .bus_dest(bus_dest[i]),
      .bus_d   (bus_d[i])
    );
    voq_buffer #(.NQ(N), .CAP(ICAP), .W(W)) u_buf (
      .clk, .rst_n,
      .policy  (BUF_PRIVATE),
      .enq_v   (enq_v[i]),
      .enq_q   (enq_q[i]),
      .enq_d   (enq_d[i]),
      .enq_drop(),
      .deq_v   (in_match[i]),
      .deq_q   (in_out[i]),
      .deq_d   (head_d[i]),
      .acc_ok  (acc_ok[i]),
      .nonempty(nonempty[i]),
      .count   (),
      .total   ()
    );
  end

  // ---- shared bus ----
  logic [N-1:0]  space_ok, gnt;
  logic          gnt_v;
  logic [QW-1:0] gnt_idx, bus_ptr;
  logic          of_drop;

  always_comb
    for (int i = 0; i < int'(N); i++) space_ok[i] = acc_ok[N][bus_dest[i]];

  bus_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .mode    (arb_mode),
    .req     (bus_req),
    .space_ok(space_ok),
    .gnt     (gnt),
    .gnt_v   (gnt_v),
    .gnt_idx (gnt_idx),
    .ptr     (bus_ptr)
  );

  // ---- overflow buffer: crossbar input N ----
  voq_buffer #(.NQ(N), .CAP(OCAP), .W(W)) u_ofb (
    .clk, .rst_n,
    .policy  (buf_policy),
    .enq_v   (gnt_v),
    .enq_q   (bus_dest[gnt_idx]),
    .enq_d   (bus_d[gnt_idx]),
    .enq_drop(of_drop),
    .deq_v   (in_match[N]),
    .deq_q   (in_out[N]),
    .deq_d   (head_d[N]),
    .acc_ok  (acc_ok[N]),
    .nonempty(nonempty[N]),
    .count   (),
    .total   ()
  );

  // ---- scheduler and crossbar ----
  logic [N-1:0]         out_match;
  logic [N-1:0][IW-1:0] out_in;

  islip_sched #(.NI(NI), .NO(N), .ITERS(ITERS)) u_sched (
    .clk, .rst_n,
    .req      (nonempty),
    .in_match (in_match),
    .in_out   (in_out),
    .out_match(out_match),
    .out_in   (out_in)
  );

  crossbar #(.NI(NI), .NO(N), .W(W)) u_xbar (
    .in_d (head_d),
    .sel_v(out_match),
    .sel  (out_in),
    .out_v(out_v),
    .out_d(out_d)
  );

  assign out_src = out_in;

  always_comb begin
    n_bus      = 16'(gnt_v);
    n_bus_lost = '0;
    for (int i = 0; i < int'(N); i++) n_bus_lost = n_bus_lost + 16'(bus_req[i] && !gnt[i]);
    n_of_full  = 16'(of_drop);
    n_of_out   = 16'(in_match[N]);
  end
endmodule
