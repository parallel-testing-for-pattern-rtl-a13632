// Shared types for the parallel-test RAM.
//
// ctrl_t is the control half of one memory operation as it travels from the
// port (or the built-in test sequencer) into a subarray: the TEST mode pin,
// the two active-low group-select lines L1 (even bit lines) and L2 (odd bit
// lines), and the write / read strobes.  One operation is issued per clock.
// The class and phase encodings used by the test sequencer also live here.
package ptram_pkg;

  typedef struct packed {
    logic test;  // 1: parallel test mode, bit line decoder outputs forced off
    logic l1;    // active low: select every even bit line in test mode
    logic l2;    // active low: select every odd bit line; also picks the group seen by the comparator
    logic we;    // write the data-in value into every selected cell
    logic re;    // read the selected cells
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{test: 1'b0, l1: 1'b1, l2: 1'b1, we: 1'b0, re: 1'b0};

  // Sequencer phases: Algorithm 1 (initialise, 4 loops, re-initialise,
  // 4 loops) followed by Algorithm 2 (ascending then descending bit line scan).
  typedef enum logic [3:0] {
    PH_IDLE,
    PH_A1_INIT0,   // write 0 into every cell
    PH_A1_LOOP,    // one of the eight 4-hamiltonian loops
    PH_A1_INIT1,   // write 1 into every cell on an even bit line
    PH_A2_INIT,    // clear the word line used by Algorithm 2
    PH_A2_UP,      // read 0 / write 1, bit line 0 .. b-1
    PH_A2_DOWN,    // read 1 / write 0, bit line b-1 .. 0
    PH_FLUSH,      // wait for the last responses
    PH_DONE
  } phase_t;

  // One transition-write procedure of Algorithm 1 acts on one of four cell
  // classes, named by the parity of its bit line and of its word line:
  //   ProcA odd/odd, ProcB odd/even, ProcC even/even, ProcD even/odd.
  typedef struct packed {
    logic bl_odd;
    logic wl_odd;
    logic inv;     // procedure is called with (1-x) instead of x
  } proc_t;

  localparam proc_t PROC_A  = '{bl_odd: 1'b1, wl_odd: 1'b1, inv: 1'b0};
  localparam proc_t PROC_B  = '{bl_odd: 1'b1, wl_odd: 1'b0, inv: 1'b0};
  localparam proc_t PROC_C  = '{bl_odd: 1'b0, wl_odd: 1'b0, inv: 1'b0};
  localparam proc_t PROC_D  = '{bl_odd: 1'b0, wl_odd: 1'b1, inv: 1'b0};
  localparam proc_t PROC_Ci = '{bl_odd: 1'b0, wl_odd: 1'b0, inv: 1'b1};
  localparam proc_t PROC_Di = '{bl_odd: 1'b0, wl_odd: 1'b1, inv: 1'b1};

  // Order of the four procedures inside each of the eight loops
  // (loop 0..3 run from the all-0 state, loop 4..7 from the state where
  // the even bit lines hold 1).  Entry [loop][k] is the k-th call.
  typedef proc_t proc_row_t [4];
  localparam proc_row_t LOOP_ORDER [8] = '{
    '{PROC_A,  PROC_C,  PROC_D,  PROC_B },
    '{PROC_B,  PROC_D,  PROC_C,  PROC_A },
    '{PROC_C,  PROC_A,  PROC_B,  PROC_D },
    '{PROC_D,  PROC_B,  PROC_A,  PROC_C },
    '{PROC_Ci, PROC_A,  PROC_B,  PROC_Di},
    '{PROC_Di, PROC_B,  PROC_A,  PROC_Ci},
    '{PROC_A,  PROC_Ci, PROC_Di, PROC_B },
    '{PROC_B,  PROC_Di, PROC_Ci, PROC_A }
  };

endpackage
