// switch_pkg: default sizes shared by the blocks of the K-slot VOQ cell switch.
//
// The switch is an input-queued cell switch with virtual output queues (VOQs)
// in which one schedule is computed every K cell time slots and each matched
// input/output pair then forwards up to K cells.  The port count, the VOQ
// depth, K = 2 and the 12-clock time slot are the numbers of the reference
// configuration; the 424-bit cell (a 53-byte ATM cell), the number of iSLIP
// iterations and the arbiter lane count are this design's own choices.
package switch_pkg;

  localparam int unsigned DEF_N            = 8;     // switch ports
  localparam int unsigned DEF_K            = 2;     // time slots per schedule
  localparam int unsigned DEF_DEPTH        = 2048;  // cells per VOQ
  localparam int unsigned DEF_CELL_W       = 424;   // 53-byte ATM cell
  localparam int unsigned DEF_CLK_PER_SLOT = 12;    // clocks per cell time slot
  localparam int unsigned DEF_ITER         = 3;     // iSLIP iterations (log2 N)

endpackage
