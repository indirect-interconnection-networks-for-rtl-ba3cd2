// imsf_pkg: shared constants and types of the interleaved multistage switching
// fabric (I-Cubeout panels built from b x 2b self-routing switching elements).
// The default sizes are the ones the fabric is evaluated with: 256 ports, 4x8
// switching elements, two panels of six stages (S6/P2) and an output speedup of
// two. The payload width is this design's own choice; the cell format beyond the
// routing tag is not fixed by the architecture.
package imsf_pkg;

  localparam int unsigned DEF_N  = 256;  // fabric size (inputs = outputs)
  localparam int unsigned DEF_B  = 4;    // SE has B inlets, B remote and B local outlets
  localparam int unsigned DEF_X  = 6;    // stages per panel
  localparam int unsigned DEF_Y  = 2;    // number of interleaved panels
  localparam int unsigned DEF_XI = 2;    // output speedup: cells per destination per cycle
  localparam int unsigned DEF_PW = 16;   // payload bits carried by a cell

  // Redundant Array of Independent Fabrics operating modes.
  //   RAIF0: all working panels carry traffic in parallel.
  //   RAIF1: one panel carries traffic, the other working panels stand by.
  //   RAIF2: all but one working panel carry traffic, one stands by.
  typedef enum logic [1:0] {
    RAIF0 = 2'd0,
    RAIF1 = 2'd1,
    RAIF2 = 2'd2
  } raif_mode_t;

endpackage
