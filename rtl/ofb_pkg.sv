// ofb_pkg: shared constants and types of the overflow-buffer crossbar switch.
// The switch has N line-card inputs plus one overflow-buffer input on an
// (N+1) x N crossbar. Port count, the overflow-buffer size ratio and the three
// bus arbitration / three buffer management policies follow the architecture;
// the VOQ depth and cell width are this design's own choices.
package ofb_pkg;

  localparam int unsigned DEF_N         = 16;  // line cards (crossbar outputs)
  localparam int unsigned DEF_VOQ_DEPTH = 8;   // cells per VOQ in an input buffer
  localparam int unsigned DEF_RATIO     = 2;   // overflow buffer size / input buffer size
  localparam int unsigned DEF_W         = 32;  // cell data bits
  localparam int unsigned DEF_ITERS     = 4;   // iSLIP iterations per cell time

  // Shared bus arbitration.
  typedef enum logic [1:0] {
    ARB_PRIORITY = 2'd0,  // static priority, port 0 highest
    ARB_RR       = 2'd1,  // round robin
    ARB_RRG      = 2'd2   // round robin over requesters whose overflow FIFO has room
  } arb_mode_t;

  // Buffer space management.
  typedef enum logic [1:0] {
    BUF_PRIVATE     = 2'd0,  // space split equally among the FIFOs
    BUF_PUBLIC      = 2'd1,  // any cell accepted while the buffer has room
    BUF_PUBLIC_PRIV = 2'd2   // half split equally, half shared
  } buf_policy_t;

endpackage
