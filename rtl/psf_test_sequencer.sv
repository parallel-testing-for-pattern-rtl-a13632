// Test sequencer for the parallel pattern-sensitive-fault test.
//
// It issues, one operation per clock, Algorithm 1 (the parallel static and
// dynamic pattern sensitive fault test) followed by Algorithm 2 (the bit
// line decoder multiple-access test), and checks every read it issued.
//
// Algorithm 1.  The cells fall into four classes by bit line and word line
// parity: A = odd/odd, B = odd/even, C = even/even, D = even/odd.  A
// procedure Proc<class>(y) visits, in ascending order, every word line j of
// the class's parity and applies the marching macro element
//     R(g,j) W_y(g,j) R(g,j) R(g,j-1) R(h,j) R(h,j-1)
// where g is the class's bit line group (all even or all odd bit lines,
// accessed in parallel) and h the other group; j-1 wraps modulo W.  The
// reads after the write cover the 2x2 block of the four classes around the
// written cells.  After writing 0 everywhere, four loops run; each calls
// four procedures with x = 1 and then the same four with x = 0, so every
// cell's four-cell neighbourhood walks a closed eight-step cycle through
// its state space.  Then every even bit line is set to 1 and four more loops
// run, some procedures taking 1-x.  The procedure orders (ptram_pkg
// LOOP_ORDER) reproduce the transition write sequences listed for the
// algorithm.  Since each class holds one value everywhere, the expected
// value of any read is the class state the sequencer tracks.
//
// Algorithm 2.  Word line 0 is cleared; then, in normal mode, bit lines
// 0..B-1 are each read (expect 0) and written 1, and bit lines B-1..0 are
// each read (expect 1) and written 0.  A decoder that also selects another
// bit line disturbs a cell that is read later.
//
// Checking.  A read's data-out and error flag are sampled RESP_LAT cycles
// after issue.  A read fails if any subarray's data-out differs from the
// expected value, or, in test mode, if any error latch is set.  fail_o is
// sticky, fail_count_o counts failing reads and fail_op_o holds the
// operation number of the first one.  op_count_o counts issued operations:
// 194*W + 4*B + 1 for a full run.
//
// Interface: start_i (pulse) starts a run from idle or done; busy_o, done_o;
// the command outputs ctrl_o, wl_addr_o, bl_addr_o, din_o drive all
// subarrays at once; dout_i, error_i return one bit per subarray.
// The algorithms follow the document; generating them in hardware is the
// document's suggested option, and the word line used by Algorithm 2, the
// response checking and the counters are this design's choices.
module psf_test_sequencer
  import ptram_pkg::*;
#(
  parameter int unsigned B        = 256,
  parameter int unsigned W        = 256,
  parameter int unsigned P        = 4,
  parameter int unsigned RESP_LAT = 2,
  parameter int unsigned BAW      = $clog2(B),
  parameter int unsigned WAW      = $clog2(W)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start_i,
  output logic           busy_o,
  output logic           done_o,
  output logic           fail_o,
  output logic [31:0]    fail_count_o,
  output logic [31:0]    fail_op_o,
  output logic [31:0]    op_count_o,
  output phase_t         phase_o,
  // command to the subarrays
  output ctrl_t          ctrl_o,
  output logic [WAW-1:0] wl_addr_o,
  output logic [BAW-1:0] bl_addr_o,
  output logic           din_o,
  // responses
  input  logic [P-1:0]   dout_i,
  input  logic [P-1:0]   error_i
);

  localparam int unsigned HW      = W / 2;   // word lines per parity class
  localparam int unsigned FLUSH_W = $clog2(RESP_LAT + 2);

  phase_t         phase;
  logic [2:0]     lp;        // loop 0..7; 4..7 follow the re-initialisation
  logic           xi;        // 0: x = 1, 1: x = 0
  logic [1:0]     pk;        // procedure call within the iteration
  logic [WAW-1:0] jj;        // word line index within the parity class
  logic [2:0]     op;        // step of the marching macro element, 0..5
  logic [WAW-1:0] row;       // word line of an initialisation pass
  logic [BAW-1:0] bi;        // bit line of Algorithm 2
  logic           a2w;       // Algorithm 2: 0 read, 1 write
  logic [FLUSH_W-1:0] flush;
  logic           st [2][2]; // class state [bit line odd][word line odd]

  // ---------------------------------------------------------------------
  // Current Algorithm 1 procedure
  proc_t          pr;
  logic           x, y, g, wo;
  logic [WAW-1:0] j, jm1;

  always_comb begin
    pr  = LOOP_ORDER[lp][pk];
    x   = !xi;
    y   = pr.inv ? !x : x;
    g   = pr.bl_odd;
    wo  = pr.wl_odd;
    j   = WAW'((32'(jj) << 1) | 32'(wo));
    jm1 = j - WAW'(1);
  end

  // ---------------------------------------------------------------------
  // Command generation
  logic exp_bit;   // expected value of a read issued this cycle

  function automatic ctrl_t grp(logic odd, logic we, logic re);
    ctrl_t c;
    c.test = 1'b1;
    c.l1   = odd;      // L1 low selects the even bit lines
    c.l2   = !odd;     // L2 low selects the odd bit lines
    c.we   = we;
    c.re   = re;
    return c;
  endfunction

  always_comb begin
    ctrl_o    = CTRL_IDLE;
    wl_addr_o = '0;
    bl_addr_o = '0;
    din_o     = 1'b0;
    exp_bit   = 1'b0;
    unique case (phase)
      PH_A1_INIT0: begin
        ctrl_o    = '{test: 1'b1, l1: 1'b0, l2: 1'b0, we: 1'b1, re: 1'b0};
        wl_addr_o = row;
        din_o     = 1'b0;
      end
      PH_A1_INIT1: begin
        ctrl_o    = grp(1'b0, 1'b1, 1'b0);
        wl_addr_o = row;
        din_o     = 1'b1;
      end
      PH_A1_LOOP: begin
        unique case (op)
          3'd0: begin ctrl_o = grp( g, 1'b0, 1'b1); wl_addr_o = j;   exp_bit = st[g][wo];   end
          3'd1: begin ctrl_o = grp( g, 1'b1, 1'b0); wl_addr_o = j;   din_o   = y;           end
          3'd2: begin ctrl_o = grp( g, 1'b0, 1'b1); wl_addr_o = j;   exp_bit = y;           end
          3'd3: begin ctrl_o = grp( g, 1'b0, 1'b1); wl_addr_o = jm1; exp_bit = st[g][!wo];  end
          3'd4: begin ctrl_o = grp(!g, 1'b0, 1'b1); wl_addr_o = j;   exp_bit = st[!g][wo];  end
          default: begin ctrl_o = grp(!g, 1'b0, 1'b1); wl_addr_o = jm1; exp_bit = st[!g][!wo]; end
        endcase
      end
      PH_A2_INIT: begin
        ctrl_o    = '{test: 1'b1, l1: 1'b0, l2: 1'b0, we: 1'b1, re: 1'b0};
        din_o     = 1'b0;
      end
      PH_A2_UP, PH_A2_DOWN: begin
        ctrl_o    = '{test: 1'b0, l1: 1'b1, l2: 1'b1, we: a2w, re: !a2w};
        bl_addr_o = bi;
        din_o     = (phase == PH_A2_UP);
        exp_bit   = (phase == PH_A2_DOWN);
      end
      default: ;
    endcase
  end

  assign busy_o  = (phase != PH_IDLE) && (phase != PH_DONE);
  assign done_o  = (phase == PH_DONE);
  assign phase_o = phase;

  // ---------------------------------------------------------------------
  // Sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      lp <= '0; xi <= 1'b0; pk <= '0; jj <= '0; op <= '0;
      row <= '0; bi <= '0; a2w <= 1'b0; flush <= '0;
      for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++) st[a][b] <= 1'b0;
    end else begin
      unique case (phase)
        PH_IDLE, PH_DONE: if (start_i) begin
          phase <= PH_A1_INIT0;
          row   <= '0;
        end
        PH_A1_INIT0: begin
          row <= row + 1'b1;
          if (32'(row) == W - 1) begin
            for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++) st[a][b] <= 1'b0;
            phase <= PH_A1_LOOP;
            lp <= '0; xi <= 1'b0; pk <= '0; jj <= '0; op <= '0;
          end
        end
        PH_A1_INIT1: begin
          row <= row + 1'b1;
          if (32'(row) == W - 1) begin
            st[0][0] <= 1'b1;
            st[0][1] <= 1'b1;
            phase <= PH_A1_LOOP;
            lp <= 3'd4; xi <= 1'b0; pk <= '0; jj <= '0; op <= '0;
          end
        end
        PH_A1_LOOP: begin
          if (op != 3'd5) op <= op + 1'b1;
          else begin
            op <= '0;
            if (32'(jj) != HW - 1) jj <= jj + 1'b1;
            else begin
              jj <= '0;
              st[g][wo] <= y;
              pk <= pk + 1'b1;
              if (pk == 2'd3) begin
                xi <= !xi;
                if (xi) begin
                  lp <= lp + 1'b1;
                  if (lp == 3'd3) begin
                    phase <= PH_A1_INIT1;
                    row   <= '0;
                  end else if (lp == 3'd7) begin
                    phase <= PH_A2_INIT;
                  end
                end
              end
            end
          end
        end
        PH_A2_INIT: begin
          phase <= PH_A2_UP;
          bi <= '0; a2w <= 1'b0;
        end
        PH_A2_UP: begin
          a2w <= !a2w;
          if (a2w) begin
            bi <= bi + 1'b1;
            if (32'(bi) == B - 1) begin
              phase <= PH_A2_DOWN;
              bi <= BAW'(B - 1);
            end
          end
        end
        PH_A2_DOWN: begin
          a2w <= !a2w;
          if (a2w) begin
            bi <= bi - 1'b1;
            if (bi == '0) begin
              phase <= PH_FLUSH;
              flush <= '0;
            end
          end
        end
        PH_FLUSH: begin
          flush <= flush + 1'b1;
          if (32'(flush) == RESP_LAT) phase <= PH_DONE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // Response checking: delay the expectation of each read by RESP_LAT.
  typedef struct packed {
    logic        rd;
    logic        test;
    logic        exp;
    logic [31:0] opn;
  } chk_t;

  chk_t chk_pipe [RESP_LAT];
  chk_t chk_now;

  assign chk_now = chk_pipe[RESP_LAT-1];

  logic bad;
  always_comb begin
    bad = 1'b0;
    for (int unsigned k = 0; k < P; k++)
      if ((dout_i[k] != chk_now.exp) || (chk_now.test && error_i[k])) bad = 1'b1;
    bad = bad && chk_now.rd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < RESP_LAT; k++) chk_pipe[k] <= '0;
      fail_o       <= 1'b0;
      fail_count_o <= '0;
      fail_op_o    <= '0;
      op_count_o   <= '0;
    end else begin
      chk_pipe[0] <= '{rd: busy_o && ctrl_o.re, test: ctrl_o.test, exp: exp_bit, opn: op_count_o};
      for (int unsigned k = 1; k < RESP_LAT; k++) chk_pipe[k] <= chk_pipe[k-1];
      if ((phase == PH_IDLE || phase == PH_DONE) && start_i) begin
        fail_o       <= 1'b0;
        fail_count_o <= '0;
        op_count_o   <= '0;
        fail_op_o    <= '0;
      end else begin
        if (ctrl_o.we || ctrl_o.re) op_count_o <= op_count_o + 1;
        if (bad) begin
          fail_count_o <= fail_count_o + 1;
          if (!fail_o) fail_op_o <= chk_now.opn;
          fail_o <= 1'b1;
        end
      end
    end
  end

endmodule
