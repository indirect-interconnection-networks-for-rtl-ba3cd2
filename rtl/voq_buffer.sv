// voq_buffer: cell buffer holding NQ virtual output queues (one FIFO per
// output) in one shared memory of CAP cells.
//
// The queues are linked lists in the shared memory: every cell slot has a
// next-pointer, every queue a head and a tail pointer, and free slots sit in a
// circular free list. This lets the space management decide freely how much of
// the memory each queue may use; `policy` selects one of three rules, checked
// against the occupancy at the start of the cycle:
//   BUF_PRIVATE      queue q accepts while it holds fewer than CAP/NQ cells;
//   BUF_PUBLIC       any queue accepts while the memory has a free slot;
//   BUF_PUBLIC_PRIV  queue q accepts while it holds fewer than its private
//                    share CAP/(2*NQ), or while the public half (cells held
//                    beyond the private shares) is below CAP/2.
// acc_ok[q] reports the rule for every queue so that a requester can look
// before it sends. An enqueue to a queue that does not accept is dropped and
// flagged on enq_drop.
//
// One enqueue and one dequeue per cycle (one cell time), also to the same
// queue. The head cell of deq_q is on deq_d combinationally; deq_v removes it
// at the clock edge. A cell enqueued in cycle t can be dequeued from cycle t+1.
// The line-card buffers use this module with BUF_PRIVATE; the overflow buffer
// uses the policy chosen at run time.
module voq_buffer #(
  parameter int unsigned NQ  = 16,
  parameter int unsigned CAP = 128,
  parameter int unsigned W   = 32,
  localparam int unsigned QW = $clog2(NQ),
  localparam int unsigned AW = $clog2(CAP),
  localparam int unsigned CW = $clog2(CAP + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ofb_pkg::buf_policy_t    policy,
  input  logic                    enq_v,
  input  logic [QW-1:0]           enq_q,
  input  logic [W-1:0]            enq_d,
  output logic                    enq_drop,
  input  logic                    deq_v,
  input  logic [QW-1:0]           deq_q,
  output logic [W-1:0]            deq_d,
  output logic [NQ-1:0]           acc_ok,
  output logic [NQ-1:0]           nonempty,
  output logic [NQ-1:0][CW-1:0]   count,
  output logic [CW-1:0]           total
);
  import ofb_pkg::*;

  localparam int unsigned PRIV_SHARE = CAP / NQ;
  localparam int unsigned HALF_SHARE = CAP / (2 * NQ);

  logic [W-1:0]          mem  [CAP];
  logic [AW-1:0]         nxt  [CAP];
  logic [AW-1:0]         flist[CAP];
  logic [AW-1:0]         head [NQ];
  logic [AW-1:0]         tail [NQ];
  logic [NQ-1:0][CW-1:0] cnt;
  logic [CW-1:0]         tot;
  logic [AW-1:0]         fl_rd, fl_wr;
  logic [CW-1:0]         pub_used;

  // admission
  always_comb begin
    pub_used = '0;
    for (int q = 0; q < int'(NQ); q++)
      if (cnt[q] > CW'(HALF_SHARE)) pub_used = pub_used + cnt[q] - CW'(HALF_SHARE);
    for (int q = 0; q < int'(NQ); q++) begin
      unique case (policy)
        BUF_PRIVATE:     acc_ok[q] = cnt[q] < CW'(PRIV_SHARE);
        BUF_PUBLIC:      acc_ok[q] = tot < CW'(CAP);
        BUF_PUBLIC_PRIV: acc_ok[q] = (cnt[q] < CW'(HALF_SHARE)) ||
                                     (pub_used < CW'(CAP - NQ * HALF_SHARE));
        default:         acc_ok[q] = 1'b0;
      endcase
    end
  end

  logic          do_enq, do_deq, same;
  logic [AW-1:0] a_new, h_old;

  assign do_enq   = enq_v && acc_ok[enq_q];
  assign enq_drop = enq_v && !acc_ok[enq_q];
  assign do_deq   = deq_v && (cnt[deq_q] != '0);
  assign same     = do_enq && do_deq && (enq_q == deq_q);
  assign a_new    = flist[fl_rd];
  assign h_old    = head[deq_q];
  assign deq_d    = mem[h_old];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      tot   <= '0;
      fl_rd <= '0;
      fl_wr <= '0;
      for (int i = 0; i < int'(CAP); i++) flist[i] <= AW'(i);
      for (int q = 0; q < int'(NQ); q++) begin
        head[q] <= '0;
        tail[q] <= '0;
      end
    end else begin
      if (do_deq) begin
        if (cnt[deq_q] != CW'(1)) head[deq_q] <= nxt[h_old];
        flist[fl_wr] <= h_old;
        fl_wr <= (fl_wr == AW'(CAP - 1)) ? '0 : fl_wr + 1'b1;
      end
      if (do_enq) begin
        // empty queue, or its only cell leaves in this cycle: new cell is head
        if (cnt[enq_q] == '0 || (same && cnt[enq_q] == CW'(1)))
          head[enq_q] <= a_new;
        tail[enq_q] <= a_new;
        fl_rd <= (fl_rd == AW'(CAP - 1)) ? '0 : fl_rd + 1'b1;
      end
      for (int q = 0; q < int'(NQ); q++)
        cnt[q] <= cnt[q] + CW'(do_enq && enq_q == QW'(q)) - CW'(do_deq && deq_q == QW'(q));
      tot <= tot + CW'(do_enq) - CW'(do_deq);
    end
  end

  // cell memory and links: written on enqueue, no reset needed
  always_ff @(posedge clk) begin
    if (do_enq) begin
      mem[a_new] <= enq_d;
      if (cnt[enq_q] != '0) nxt[tail[enq_q]] <= a_new;
    end
  end

  always_comb
    for (int q = 0; q < int'(NQ); q++) nonempty[q] = cnt[q] != '0;
  assign count = cnt;
  assign total = tot;

  // a dequeue must name a queue that holds a cell
  assert property (@(posedge clk) disable iff (!rst_n) deq_v |-> cnt[deq_q] != '0)
    else $error("voq_buffer: dequeue from empty queue %0d", deq_q);
  // the free list never runs dry while the admission rule holds
  assert property (@(posedge clk) disable iff (!rst_n) do_enq |-> (tot < CW'(CAP) || do_deq))
    else $error("voq_buffer: enqueue with no free slot");
endmodule
