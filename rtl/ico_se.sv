// ico_se: b x 2b self-routing switching element of an I-Cubeout panel.
//
// The element has B inlets, B remote outlets (to the next stage) and B local
// outlets (to the destination queues of its B rows). Every cell carries a
// routing tag: the digit-wise XOR of the line it sits on and its destination,
// kept rotated so that the digit this stage corrects is always the leftmost
// log2(B) bits. That makes the element identical in every stage.
//
// Per cycle, purely combinational:
//   1. A cell whose distance is 0 (no nonzero tag digit right of the leftmost
//      one) asks for local outlet (inlet XOR leftmost digit). If several ask for
//      the same free local outlet one of them wins.
//   2. Remaining cells are served in order of increasing distance. A cell takes
//      the remote outlet (inlet XOR leftmost digit), which zeroes the digit; if
//      that outlet is taken or leads to a faulty element the cell is deflected
//      to the first usable free outlet and its digit is set to the value that
//      outlet leaves uncorrected. A cell that finds no usable outlet (possible
//      only when next-stage elements are faulty) is dropped.
//   3. Every outgoing tag is rotated left by log2(B) bits.
// Ties in steps 1 and 2 go to the inlet order starting at `rnd`, which the
// fabric drives from a pseudo-random source; the architecture asks for a
// random choice, the rotating start is this design's way of providing one.
//
// Inputs rem_ok/loc_ok tell which outlets may be used this cycle (next-stage
// element working; local outlet latch empty or being drained).
module ico_se #(
  parameter int unsigned B  = 4,
  parameter int unsigned TW = 8,   // tag width = log2(N)
  parameter int unsigned PW = 16
) (
  input  logic [B-1:0]                 in_v,
  input  logic [B-1:0][TW-1:0]         in_tag,
  input  logic [B-1:0][PW-1:0]         in_pay,
  input  logic [B-1:0]                 rem_ok,
  input  logic [B-1:0]                 loc_ok,
  input  logic [$clog2(B)-1:0]         rnd,
  output logic [B-1:0]                 rem_v,
  output logic [B-1:0][TW-1:0]         rem_tag,
  output logic [B-1:0][PW-1:0]         rem_pay,
  output logic [B-1:0]                 loc_v,
  output logic [B-1:0][PW-1:0]         loc_pay,
  output logic [B-1:0]                 defl,     // inlet's cell was deflected
  output logic [B-1:0]                 drop      // inlet's cell was dropped
);
  localparam int unsigned DW = $clog2(B);
  localparam int unsigned ND = TW / DW;     // digits in a tag = stages per copy

  logic [B-1:0][DW-1:0] want;
  logic [B-1:0][$clog2(ND+1)-1:0] dis;
  logic [B-1:0] done;
  logic [B-1:0] rem_taken, loc_taken;
  logic [B-1:0][DW-1:0] newdig;

  always_comb begin
    for (int i = 0; i < B; i++) begin
      want[i] = DW'(i) ^ in_tag[i][TW-1 -: DW];
      // distance: position (from the left) of the rightmost nonzero digit
      dis[i] = '0;
      for (int d = 0; d < ND; d++)
        if (in_tag[i][TW-1-d*DW -: DW] != '0) dis[i] = ($clog2(ND+1))'(d);
    end
  end

  always_comb begin
    done      = '0;
    rem_taken = '0;
    loc_taken = '0;
    loc_v     = '0;
    loc_pay   = '0;
    rem_v     = '0;
    rem_tag   = '0;
    rem_pay   = '0;
    defl      = '0;
    drop      = '0;
    newdig    = '0;
    // step 1: local outlets for distance-0 cells
    for (int k = 0; k < B; k++) begin
      automatic int i = (int'(rnd) + k) % B;
      if (in_v[i] && dis[i] == 0 && loc_ok[want[i]] && !loc_taken[want[i]]) begin
        loc_taken[want[i]] = 1'b1;
        loc_v[want[i]]     = 1'b1;
        loc_pay[want[i]]   = in_pay[i];
        done[i]            = 1'b1;
      end
    end
    // step 2: remote outlets, shortest distance first
    for (int d = 0; d < ND; d++) begin
      for (int k = 0; k < B; k++) begin
        automatic int i = (int'(rnd) + k) % B;
        if (in_v[i] && !done[i] && dis[i] == ($clog2(ND+1))'(d)) begin
          done[i] = 1'b1;
          if (rem_ok[want[i]] && !rem_taken[want[i]]) begin
            newdig[i] = '0;
            rem_taken[want[i]] = 1'b1;
            rem_v[want[i]]     = 1'b1;
            rem_tag[want[i]]   = {in_tag[i][TW-DW-1:0], newdig[i]};
            rem_pay[want[i]]   = in_pay[i];
          end else begin
            automatic logic found = 1'b0;
            for (int j = 0; j < B; j++) begin
              if (!found && rem_ok[j] && !rem_taken[j]) begin
                found     = 1'b1;
                // digit left to correct: outlet value XOR destination digit
                newdig[i] = DW'(j) ^ want[i];
                rem_taken[j] = 1'b1;
                rem_v[j]     = 1'b1;
                rem_tag[j]   = {in_tag[i][TW-DW-1:0], newdig[i]};
                rem_pay[j]   = in_pay[i];
              end
            end
            defl[i] = found;
            drop[i] = !found;
          end
        end
      end
    end
  end

endmodule
