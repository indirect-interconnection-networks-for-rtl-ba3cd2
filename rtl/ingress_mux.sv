// ingress_mux: the multiplexer at the ingress of a line card.
//
// An arriving cell goes into the line card's own VOQ for its destination when
// that queue has room (voq_ok). Only when the queue is full does the cell turn
// to the shared bus, raising bus_req with the cell on bus_dest/bus_d for the
// bus arbiter. Combinational.
module ingress_mux #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 32,
  localparam int unsigned QW = $clog2(N)
) (
  input  logic            arr_v,
  input  logic [QW-1:0]   arr_dest,
  input  logic [W-1:0]    arr_d,
  input  logic [N-1:0]    voq_ok,
  output logic            enq_v,
  output logic [QW-1:0]   enq_q,
  output logic [W-1:0]    enq_d,
  output logic            bus_req,
  output logic [QW-1:0]   bus_dest,
  output logic [W-1:0]    bus_d
);
  logic room;
  assign room     = voq_ok[arr_dest];
  assign enq_v    = arr_v && room;
  assign enq_q    = arr_dest;
  assign enq_d    = arr_d;
  assign bus_req  = arr_v && !room;
  assign bus_dest = arr_dest;
  assign bus_d    = arr_d;
endmodule
