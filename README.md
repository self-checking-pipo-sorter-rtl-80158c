# Self-checking odd-even transposition sorter (PIPO) with Berger code

A row of identical cells sorts the words it holds by odd-even transposition:
neighbouring cells compare their words and exchange them if they are out of
order, alternating between the "odd" pairs (1,2), (3,4), ... and the "even"
pairs (0,1), (2,3), .... After N such phases an array of N cells is sorted.
The array is loaded and read in parallel (parallel-in, parallel-out), or
word by word with push and pop through cell 0.

Every word is stored as a **Berger codeword**, and every compare-exchange is
checked *while it happens* (concurrent error detection):

* a **storage check** verifies the two stored codewords at the same time as
  the comparator works on them; an error stops the exchange;
* a **processing check** verifies the two codewords after the swap circuit;
  an error closes the write-back buffers so the cells keep their old words.

Both checks add logic but no clock cycle: a phase still takes one cycle.

## Berger code used here

A word has I = 15 information bits and k = 4 check bits; the check bits are
the binary count of the **0s** in the information bits (`berger_csg`). The
codeword is `{data[14:0], chk[3:0]}`. Berger codes detect every
*unidirectional* error — any number of bits flipped, provided they all flip
1→0 or all flip 0→1 — which is the typical effect of many physical faults.

Because 15 = 2⁴ − 1 the code has maximal length: for a valid codeword the
count of 1s is exactly the bitwise complement of the stored count of 0s. The
checker (`berger_tsc_checker`) therefore:

1. counts the 1s of the information bits;
2. pairs each stored check bit with the matching bit of that count, giving
   four two-rail pairs that must each be complementary (01 or 10);
3. reduces them with a two-rail checker tree (`two_rail_checker`,
   cells `z1 = x1·y0 + x0·y1`, `z0 = x1·y1 + x0·y0`).

The output is a two-rail pair: 01 or 10 means "codeword", 00 or 11 means
"error". This is the classic totally self-checking arrangement: a fault in
the checker itself also shows up as 00/11 for some valid input. `err_o` is
the decoded error bit. The checker is written for `DATA_W = 2**CHK_W - 1`
only and stops elaboration otherwise (with `DATA_W = 7, CHK_W = 3` it works
at a smaller size).

The four checkers in each control unit are merged two at a time by another
two-rail cell, so each check still ends in a single two-rail pair.

## The array

```
 host ── CU0 ──┬─ cell0 ── CU ── cell1 ── CU ── cell2 ── ... ── cell N-1
               └─ status counter
```

* **Cell** (`sorter_cell`): register A (15 bits), register CSRA (4 check
  bits), and an occupied flag. Each clock it takes at most one new value:
  a parallel load, a shift up (push), a shift down (pop), or an exchange
  result from the control unit above or below it.
* **Control unit between cells i and i+1** (`sorter_cu`, parameter `IDX=i`):
  two storage checkers, the 15-bit comparator (`magnitude_comparator`), the
  swap circuit (`swap_circuit`), two processing checkers, and the write-back
  gate (`we_o`). The pair is *active* when a sort phase of the pair's parity
  is running (odd phase for odd `IDX`) and both cells hold a word. Then
  `we_o = out_of_order & !storage_error & !processing_error`. The unit also
  passes the sort, phase-parity, push and pop signals on to the next unit.
  Towards the lower cell it returns the occupancy of the upper cell (`occB_o`)
  and the upper cell's codeword (`npopA_o`), which moves down on a pop. In
  the top, the unit between cells i and i+1 is instance `g_cu[i]`. Each cell
  thus has two checkers on its account: one for storage, one for processing.
* **Main control unit** (`sorter_cu0`): decodes the host commands, runs the
  sort, and holds the sticky error flags. Its phase counter is an
  `up_down_counter` instance.
* **Status counter** (`up_down_counter` in the top): number of stored words.
  It counts up on push, down on pop, and is set to N by a parallel load. It
  gives `empty_o`, `full_o` and `count_o`.

Words always occupy a block of cells starting at cell 0 (push, pop and load
keep it that way, and an assertion in the top checks it). Empty cells
therefore stay above every word and never take part in an exchange. This is
how a partly filled array is sorted.

### Sort order

By default the smaller word goes to the lower-numbered cell, so after a sort
cell 0 holds the minimum and pop returns the words in ascending order. With
`DESCENDING = 1` the order is reversed. Either way, empty cells stay at the
top.

## Host interface and timing (`pipo_sorter`)

| Port | Meaning |
|---|---|
| `push_i`, `data_i` | The word gets its check symbol and enters cell 0. Every stored word moves up one cell. Ignored when full. |
| `pop_i` | `pop_data_o` shows cell 0 in the same cycle, with `pop_valid_o = 1`. At the clock edge every word moves down one cell. Ignored when empty. `pop_err_o` is high if a storage checker finds the popped codeword damaged. |
| `load_i`, `load_data_i[N]` | All N cells are written at once, each with its own check symbol. |
| `sort_i` | Starts a sort: N phases, one per cycle (odd, even, odd, ...). `busy_o` is high during the phases. `done_o` pulses in cycle N+1 after the cycle in which `sort_i` was accepted. |
| `data_o[N]`, `occ_o` | Parallel output of all cells and their occupied flags. |
| `count_o`, `empty_o`, `full_o` | Status counter. |
| `err_storage_o`, `err_proc_o` | Sticky error flags. A sort or a load clears them; so does reset. |

At most one command is accepted per cycle, with the priority load, sort,
pop, push. Commands that arrive during a sort are ignored. Reset is
asynchronous and active low. It empties every cell, leaving in it the valid
codeword of the word 0.

**Throughput**
* A sort of N words takes N + 1 cycles from command to `done_o`.
* Push and pop take one cycle each.
* The critical path of one phase is checker ∥ comparator → swap → checker →
  register enable.

## Behaviour under faults

* **Storage fault** (a stored bit flips): every pair that includes the
  damaged cell refuses to exchange, and `err_storage_o` is set. The damaged
  word therefore stays where it is, while the rest of the array keeps
  sorting around it. When the word is popped, `pop_err_o` flags it.
* **Processing fault** (the comparator/swap path produces a non-codeword):
  that pair does not write, and `err_proc_o` is set. No corrupted codeword
  reaches a register through that path.

Neither case is corrected. The flags tell the host that the result of the
last sort, or the popped word, cannot be trusted.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `DATA_W` | 15 | width of register A |
| `CHK_W` | 4 | width of register CSRA, ⌈log2(DATA_W+1)⌉ |
| `N` | 8 | number of cells; this design's choice, any N ≥ 2 works |
| `DESCENDING` | 0 | sort order; this design's choice |

## Design choices beyond the base scheme

The cell contents, the checker placement and the odd-first phase schedule
come from the scheme described above. The following are choices of this
implementation:

* Number of cells N = 8.
* Unsigned comparison of the words.
* The occupied flags, and the rule that only two occupied cells are compared.
* The parallel-load port.
* The command priorities and the sticky error flags.
* Reset values.
* The TSC checker structure (complement generator plus two-rail tree).
* The meaning of the status counter: a count of stored words, with a second
  counter instance counting sort phases.

The scheme as originally described is inconsistent about which way words
move:
* "lower numbered processors contain the smaller values";
* "exchange if A(i+1) is greater than A(i)" / "send smallest value to the
  next cell".

The default follows the first, which is also what the odd-even transposition
algorithm gives. `DESCENDING = 1` gives the second.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_berger_csg`: all 2¹⁵ words.
* `tb_berger_tsc_checker`: all valid codewords, every single-bit error of
  each, and random unidirectional multi-bit errors. It also checks that both
  code values 01 and 10 appear at the output. Finally, it forces each
  internal net of the checker stuck at 0 and at 1 and requires that some
  valid codeword then produces an error indication. That is the self-testing
  half of the totally self-checking property.
* `tb_magnitude_comparator`, `tb_swap_circuit`, `tb_up_down_counter`,
  `tb_sorter_cell`: checked against models in the testbench.
* `tb_sorter_cu`: exchange decisions in both phases and both orders, storage
  faults injected as unidirectional errors, and processing faults injected by
  forcing a swap output.
* `tb_sorter_cu0`: command decoding, the N-phase schedule, the `done_o`
  latency, and the sticky flags.
* `tb_pipo_sorter`: the whole sorter at its default size against a
  reference model. It covers:
  * push and pop, including refusals at full and at empty;
  * sorts of full and partly filled arrays;
  * parallel loads;
  * the N+1-cycle latency;
  * commands issued during a sort;
  * a flipped stored bit (storage error, blocked exchanges, flagged pop);
  * a stuck swap output (processing error, blocked write).

  It counts each of these and fails if one never happens.
* `tb_pipo_sorter_small`: a reduced sorter (5 cells, 7-bit words, 3 check
  bits, descending order) driven by 20,000 cycles of random commands and
  compared with a reference model.
* `tb_two_rail_checker`: all input combinations of a four-pair checker.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sorter_pkg.sv \
    tb/tb_pipo_sorter.sv --top-module tb_pipo_sorter -o sim
./obj_dir/sim
```

The fault-injection tests use `force` on internal signals
(`dut.g_cell[3].u_cell.a_q`, `dut.g_cu[2].u_cu.lo_o`). If you rename those
instances, update the tests.

## Files

* `rtl/sorter_pkg.sv`: widths and the two-rail type.
* `rtl/berger_csg.sv`, `rtl/berger_tsc_checker.sv`, `rtl/two_rail_checker.sv`:
  the code.
* `rtl/magnitude_comparator.sv`, `rtl/swap_circuit.sv`: the datapath of a
  control unit.
* `rtl/sorter_cell.sv`, `rtl/sorter_cu.sv`, `rtl/sorter_cu0.sv`,
  `rtl/up_down_counter.sv`: cells and control.
* `rtl/pipo_sorter.sv`: top level.
* `tb/tb_*.sv`: one testbench per module.
