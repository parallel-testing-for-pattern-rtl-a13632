# Parallel pattern-sensitive-fault testing for a DRAM array

Testing a large RAM for pattern-sensitive faults cell by cell takes time
proportional to n, the number of bits, times a large constant. Here a fault
in one cell shows up only when its neighbours hold particular values or
change. This design makes the test time grow with the square root of n
instead. It needs only two small additions to an ordinary RAM subarray:

* a **modified bit line decoder**. In test mode it ignores the address and
  selects *every even* or *every odd* bit line at once. One write then stores
  the same value into B/2 cells of a word line.
* a **parallel comparator with an error latch**. On a test-mode read it checks
  that all B/2 selected cells agree. If any cell differs, it sets `ERROR`.

Word lines are still visited one at a time. A full test therefore costs a
fixed number of operations per word line, and all subarrays of the RAM are
tested at the same time. On top of this, the design has a sequencer that
generates the test: Algorithm 1 for static and dynamic neighbourhood pattern
faults, then Algorithm 2 for bit line decoder multiple-access faults. The
sequencer checks every read.

The default configuration is a 256K x 1 RAM made of 4 subarrays of 256 bit
lines x 256 word lines.

## Files

| file | module | role |
|---|---|---|
| `rtl/ptram_pkg.sv` | package | operation control struct, sequencer phases, procedure order table |
| `rtl/parallel_test_ram.sv` | `parallel_test_ram` | top: P subarrays, port, built-in sequencer |
| `rtl/testable_subarray.sv` | `testable_subarray` | one subarray with all its test circuitry |
| `rtl/psf_test_sequencer.sv` | `psf_test_sequencer` | Algorithm 1 + Algorithm 2 generator and checker |
| `rtl/memory_array.sv` | `memory_array` | B x W cells, multi-cell write, whole-row read |
| `rtl/bitline_decoder.sv` | `bitline_decoder` | decoder with L1/L2 group select |
| `rtl/wordline_decoder.sv` | `wordline_decoder` | binary to one-hot |
| `rtl/column_mux.sv` | `column_mux` | selected bit lines to data out (wired OR or AND) |
| `rtl/parallel_comparator.sv` | `parallel_comparator` | all-ones / all-zeros / same over one group |
| `rtl/error_detector.sv` | `error_detector` | error latch |
| `rtl/address_buffer.sv`, `rtl/data_buffer.sv` | | word/bit line buffers, data in/out buffers |

Each `tb/tb_<module>.sv` is a self-checking testbench of that module.
`tb_parallel_test_ram_full` runs the top at its default size, and
`tb_table4_workloads` runs it at three larger sizes, using the helper
`tb/bist_workload.sv`.

## Cell classes and neighbourhoods

Cell C(i,j) lies on bit line i and word line j. Its neighbours fall into three
kinds:

* the two cells on the same bit line, j±1 (N_b);
* the two cells on the same word line, i±1 (N_w);
* the four diagonal cells (N_2).

The fault model treats each kind as one unit. When one neighbour of a kind
changes, the test changes the others of that kind before anything else. So
the neighbourhood reduces to four logical cells:

| state bit | cell |
|---|---|
| 0 | the cell itself |
| 1 | its N_b neighbours |
| 2 | its N_w neighbours |
| 3 | its N_2 neighbours |

These four bits give 16 states. A full test must cover the 64 single-bit
transitions between them.

Bit line parity and word line parity split the array into four classes:

| class | bit line | word line |
|---|---|---|
| A | odd | odd |
| B | odd | even |
| C | even | even |
| D | even | odd |

For any cell, bits 0 to 3 of its state are the values of four different
classes. Within a class, every cell holds the same value at the end of each
procedure. That is what makes a parallel write and a parallel compare
possible: a read of one group on one word line must return a uniform value.

## Algorithm 1: the parallel test

A procedure `Proc<class>(y)` walks the word lines of its class's parity in
ascending order. At each word line j it applies this macro element, one
operation per clock:

```
R(g,j)  W_y(g,j)  R(g,j)  R(g,j-1)  R(h,j)  R(h,j-1)
```

Here g is the class's bit line group (all even or all odd lines, accessed
together), h is the other group, and j-1 wraps around modulo W. The four reads
after the write cover the 2x2 block of all four classes around the cells just
written. Each read is checked two ways: its data out must equal the class
value the sequencer tracks, and the error latch must stay clear.

The test runs in this order:

1. Write 0 into every cell: both groups, one operation per word line.
2. Run four loops. Each loop calls four procedures with x = 1, then the same
   four with x = 0. Each cell's four-bit state therefore walks a closed
   8-step tour: set all four bits one by one, then clear them in the same
   order.
3. Write 1 into every cell on an even bit line. Class A cells now see state
   12, class C cells state 3.
4. Run four more loops. Some procedures take `1-x` here, so the tours run
   around the other half of the state space.

The procedure order in each loop is this table (`LOOP_ORDER` in
`ptram_pkg`; a primed letter means the procedure is called with 1-x):

| loop | order |
|---|---|
| 1 | A C D B |
| 2 | B D C A |
| 3 | C A B D |
| 4 | D B A C |
| 5 | C' A B D' |
| 6 | D' B A C' |
| 7 | A C' D' B |
| 8 | B D' C' A |

Over the 8 loops, every class sees 8 tours, and each of the 64 directed
transitions of its 4-cube occurs exactly once. `tb_psf_test_sequencer`
records the neighbourhood state of one cell of each class at every procedure
boundary. It checks all 8 loops x 4 classes x 9 states against the reference
tours.

**Operation count.** A loop costs 2 x 4 procedures x W/2 word lines x
6 operations = 24W. With the two initialisations, Algorithm 1 takes 194W
operations. At the default W = 256, that is 49,664 operations, the same for
any number of subarrays. The source's complexity figure, 97.5·sqrt(n/(pe)),
counts 12W per loop and 1.5W for the initialisations. The procedure structure
above adds up to twice that, and this RTL follows the procedure structure.

## Algorithm 2: bit line decoder multiple access

Algorithm 1 compares only even lines with even lines and odd with odd. It
therefore cannot see a decoder that selects an odd line together with an even
one. Algorithm 2 covers that case. It runs in normal mode on word line 0,
after clearing that word line with one parallel write:

* for i = 0 .. B-1: read bit line i (expect 0), then write 1;
* for i = B-1 .. 0: read bit line i (expect 1), then write 0.

If the decoder also selects a line above i, the first pass corrupts a cell
that has not been read yet. If it also selects a line below i, the second
pass does. The scan costs 4B + 1 operations. The choice of word line 0 is
this design's.

A whole built-in test therefore takes **194W + 4B + 1** operations: 50,689
at the default size, or 10.1 ms at a 200 ns cycle. Add 4 cycles for start and
response flush.

## Subarray datapath and timing

```
            +-------------+      +-----------+
 wl_addr -->| WL buffer   |----->| WL decoder|--> word lines
            +-------------+      +-----------+        |
            +-------------+      +-----------+   +----v-----+    +---------+
 bl_addr -->| BL buffer   |----->| BL decoder|-->|  array   |--->| col mux |--> data-out buffer --> dout
 TEST,L1,L2 ----------------------->  (mod.)  |   | (sensed  |    +---------+
 din ------> data-in buffer --------------------->|  row)    |--> parallel comparator --> error latch --> error
            +-------------+      +-----------+   +----------+       (group chosen by L2)
```

* **Issue.** In cycle t, the buffers capture the operation, its addresses
  and its data.
* **Execute.** In cycle t+1, the decoders drive the array. A write stores
  its data at the end of t+1. A read's data out and the comparator result
  are latched at the end of t+1.
* **Result.** In cycle t+2, `dout` and `error` show the result. One
  operation can be issued every cycle.

Control is a packed struct `ctrl_t` with fields `test`, `l1`, `l2`, `we`
and `re`. L1 and L2 are active low:

| mode | TEST | L1 | L2 | bit lines selected |
|---|---|---|---|---|
| normal | 0 | 1 | 1 | the addressed one |
| test, even group | 1 | 0 | 1 | all even |
| test, odd group | 1 | 1 | 0 | all odd |
| test, all | 1 | 0 | 0 | all (used to clear) |

The comparator always looks at the group chosen by L2: L2 = 0 is odd,
L2 = 1 is even.

Data out is the OR of the selected cells. Set `WIRED_AND = 1` for the AND.
The real circuit could produce either, and the test does not depend on
which, because a fault-free group is uniform.

**Error latch.** A test-mode read whose group is not uniform sets the latch.
Further reads leave it set. A write, or any operation in normal mode, clears
it. An idle cycle leaves it unchanged. An external tester must therefore
sample `error` after every test-mode read, before the next write. The
built-in sequencer does exactly this.

## Top level: `parallel_test_ram`

Parameters: `B` (bit lines, 256), `W` (word lines, 256), `P` (subarrays, 4)
and `WIRED_AND` (0). The RAM size is P·B·W.

* **Normal access.** Set `ext_ctrl_i.test = 0` and `l1 = l2 = 1`.
  `ext_sub_i` picks the subarray, and `ext_wl_addr_i` / `ext_bl_addr_i`
  pick the cell.
* **External parallel test.** Set `ext_ctrl_i.test = 1`. Every subarray takes
  the operation. `dout_o[p]` and `error_o[p]` report per subarray. Keep
  `test` high in idle cycles between test operations. Otherwise the idle
  cycle counts as normal mode and clears the error latch.
* **Built-in test.** Pulse `bist_start_i`. While `bist_busy_o` is high, the
  sequencer drives all subarrays and the port is ignored. Afterwards
  `bist_done_o` stays high and the results are held:
  * `bist_fail_o`: pass / fail;
  * `bist_fail_count_o`: number of failing reads;
  * `bist_fail_op_o`: operation number of the first failing read;
  * `bist_op_count_o`: number of operations issued.

  A new start clears them. When the test finishes, the even bit lines hold 1,
  the odd ones 0, and word line 0 is all 0.

## How far it follows the source, and where it departs

Taken from the source:

* the subarray organisation;
* the even/odd group select by L1 and L2 and its mode table;
* the comparator group select by L2;
* the error latch rule;
* the cell classes and the macro element;
* the eight neighbourhood tours, which fix the procedure order;
* the shape of Algorithm 2;
* P = 4 for a 256K-bit RAM.

Choices of this design:

* **Subarray size.** B = W = 256 (square subarrays, e = 1). The source gives
  no subarray dimensions. Its timing table assumes e = 1.2, which gives no
  power-of-two size.
* **Circuit level.** Transistor-level circuits are replaced by their logic
  functions. The dynamic comparator becomes static logic. The PLA decoder
  becomes OR-ed select terms. The clock phases become one synchronous clock
  with the two-cycle timing above.
* **Initialisation.** Both groups are cleared in one operation per word line,
  and the even group is set in one per word line. That is 2W operations,
  where the source counts 1.5W.
* **Operation count.** It is 194W + 4B + 1, not the source's 97.5W (see
  above).
* **Algorithm 2.** It runs on word line 0 only, and starts with a parallel
  clear of that word line.
* **Built-in sequencer.** The source intends the test to be applied from
  outside the chip and only suggests generating it in hardware. The sequencer
  here is optional: the port gives an external tester the same access.
* **Port and reset.** The subarray select in normal mode, the counters and
  reporting, and the asynchronous active-low reset of everything except the
  cells are this design's.
* **Sense amplifiers.** They are not modelled separately. The array's read
  port delivers the sensed row.

Larger configurations and what is not covered:

* The source's larger configurations (1M, 4M and 16M bits with 8, 8 and 16
  partitions) need larger parameters than the defaults.
  `tb_table4_workloads` runs the built-in test on them with these overrides:

  | size | P | B x W | operations | time at 200 ns |
  |---|---|---|---|---|
  | 1M | 8 | 512 x 256 | 51,713 | 10.3 ms |
  | 4M | 8 | 1024 x 512 | 103,425 | 20.7 ms |
  | 16M | 16 | 1024 x 1024 | 202,753 | 40.6 ms |
* Decoder faults are not injectable in the RTL itself. The sequencer's
  testbench gives its behavioural subarray three decoder faults:
  * a word line address that also raises a second word line, caught in
    Algorithm 1;
  * a bit line address that also selects a higher bit line of the other
    parity, invisible to Algorithm 1 and caught in Algorithm 2;
  * the same with a lower bit line, also caught in Algorithm 2.

  The full RAM's testbenches use cell upsets and a disturbed cell ahead of
  the Algorithm 2 scan.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/ptram_pkg.sv tb/tb_parallel_test_ram.sv \
          --top-module tb_parallel_test_ram -o sim
./obj_dir/sim
```

Add `-Itb` for `tb_table4_workloads`, which uses `tb/bist_workload.sv`. That
run takes about half a minute.

Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_parallel_test_ram` runs at B = 16, W = 8, P = 2. It exercises and counts
  these mechanisms:
  * normal and parallel reads and writes;
  * an error latch set in only the disturbed subarray;
  * the latch clamped by a write and by normal mode;
  * a passing built-in test, with exact operation count and run length;
  * two failing built-in tests: a cell upset in Algorithm 1, and a disturbed
    cell ahead of the Algorithm 2 scan.
* `tb_parallel_test_ram_full` runs the default 256K-bit RAM through one full
  built-in test (50,689 operations) and one failing run. It takes about a
  second.
* `tb_psf_test_sequencer` drives the sequencer against a behavioural
  subarray. It checks the neighbourhood tours, the Algorithm 2 scan order,
  stuck-at-0 and stuck-at-1 cells, and the three decoder faults above.

To change the size, override `B`, `W` and `P` on `parallel_test_ram`. `B` and
`W` must be even, because the classes rely on parity. W ≥ 4 keeps the j-1
neighbour distinct.
