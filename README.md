# Self-repairing memory with input-vector-monitoring concurrent BIST

A small memory (10 words of 10 bits) that tests itself in two ways.

- **At power-up it tests and repairs itself.** A memory BIST checks every
  row. A redundancy analyser maps each faulty row onto a spare row.
- **While the system uses it, it tests itself concurrently.** No test time is
  set aside. A *concurrent BIST unit* (CBU) watches the addresses the system
  reads. It takes the first read of each address as a test vector and adds the
  data read into a signature. Once every address has been read, the
  signature is compared with the expected one. If the system does not read
  every address often enough, a test mode lets the CBU drive the remaining
  addresses itself.

The concurrent part is the core of the design. The hard question there is:
how can hardware remember which of the 2^n vectors it has already seen,
without 2^n bits of storage? The answer is to monitor one *window* of
vectors at a time.

## Windows, hits and the logic module

The n-bit vector is the memory address here (n = 4). It is split into two
parts:

- the **k high-order bits** name a window (k = 2, so 4 windows);
- the **w low-order bits** give the position inside the window
  (w = 2, so W = 4 positions: 00, 01, 10, 11).

Only one window is *active* at a time. The state that tracks it is small:

| part | what it holds or does |
|---|---|
| test generator (`test_generator`) | k-bit counter: the number of the active window |
| comparator (`comparator`) | checks whether the k high bits of the current vector equal the window number |
| modified decoder (`modified_decoder`) | enabled by the comparator; turns the w low bits into one of W word lines |
| logic module (`logic_module`) | W one-bit SRAM-like cells, one per position of the active window |

The logic module reads the selected cell through a sense amplifier (an
AND-OR here). If the selected cell is still 0, the vector is a **hit**:

1. the cell is written to 1;
2. `rve` (response verifier enable) is raised in the same cycle;
3. the w-bit hit counter counts up.

A read of a position already seen, or of an address outside the active
window, does nothing. When the counter overflows (the W-th hit), `tge` is
raised. On that same clock edge the test generator moves to the next window
and all cells are cleared, so no cycle is lost. If that was the last window,
an end-of-test flag is set. Two flip-flops (the flag and its delayed copy)
turn it into a one-cycle `test_end` strobe for the response verifier. After
that no more hits are taken until the test is restarted (`ctest_clr`).

So the cost is k + w + W + 2 flip-flops and a little logic, not 2^n bits.
The price is latency. With uniformly random reads, a window needs on
average W·H(W) in-window reads (the coupon-collector result, where H is the
harmonic number). A random read lands in the window with probability 2^-k.
The mean concurrent test latency (CTL) is therefore 2^n · H(2^w) cycles per
window: 16 · 25/12 · 4 ≈ 133 cycles for the whole test at the default sizes.
Simulation measures 133–134 cycles.

**Test mode.** When T/N = 1, the multiplexer in front of the memory takes
its address from the CBU instead of the system. The CBU offers
`TG = {window, lowest empty cell}`, which is always a hit. A test started in
test mode therefore ends in exactly 2^n = 16 cycles. A test started in normal
mode finishes in 16 minus (hits so far) cycles. Writes are blocked in test
mode. The system may switch modes at any time; the cells keep track either
way.

**Which accesses are monitored.** Only reads count as vectors, because a
write returns no response. Reads are only monitored after the power-up
repair has finished.

## Response verifier

`response_verifier` adds the 10-bit word read into a 10-bit accumulator on
every `rve` (one full adder and one flip-flop per bit; the carry out is
dropped). Addition does not depend on order. That matters, because the
system decides in which order the vectors arrive.

On `test_end` the signature is compared with `golden_sig`, and
`ctest_pass = 1` means it matched. The expected signature is the sum, modulo
2^10, of the words at all 16 addresses. Addresses 10 to 15 hold no word and
read as 0. A zero-filled memory therefore has signature 0.

The comparison is only meaningful if the words read during a test are not
rewritten with different data before the test ends. Check this when you use
the design under live traffic.

## Power-up self-repair

After reset, `bisr_bist` owns the memory. It first tests the two spare rows
(physical rows 10 and 11), then main rows 0 to 9. Each row gets six
accesses: write 0, read 0, write 1, read 1, write 0, read 0. Every row is
left at 0.

On the first wrong read in a row, the BIST does the following:

1. It pulses `err` with a fault syndrome: whether the row is a spare, the
   physical row, and the read data XOR the expected data.
2. It pauses.
3. When Continue arrives, it moves to the next row. The rest of the faulty
   row is skipped.

`bira` handles each syndrome in one cycle:

- **Faulty spare:** the spare is marked bad.
- **Faulty main row:** the row gets the lowest-numbered spare that is
  neither bad nor in use. If none is left, `repair_fail` is set.

Continue follows one cycle after `err`. A fault-free power-up takes
6 × 12 = 72 cycles. A faulty row takes (index of the failing access + 1)
cycles, plus 2 for ERR and Continue.

`spare_control` is the wrapper between the multiplexer and the array:

- While the BIST runs, BIST accesses pass through unchanged.
- Afterwards, it looks up each logical address in the repair table. A
  repaired row is sent to its spare.
- Addresses past row 9 are disabled: reads return 0 and writes are dropped.

The repair table is cleared by reset, so test and analysis are redone at
every power-up. Only whole rows are repaired; there are no spare columns.

## Structure

```
   a_addr ─┐
           ├─ tn_mux ── d ──┬── spare_control ── memory_array ── dout ──┬──▶
 TG ───────┘  (T/N)         │     ▲ repair table     (10+2 rows)         │
  ▲                         ▼     │                                      ▼
  └──────────────────────── cbu ──┼── rve ──────────▶ response_verifier ──▶ ctest_pass
                                  │
        bisr_bist ── err/FS ──▶ bira ── Continue ──▶ bisr_bist
```

| file | module |
|---|---|
| `rtl/cbist_pkg.sv` | sizes (`MAIN_ROWS=10`, `COLS=10`, `SPARE_ROWS=2`, `W_BITS=2`, `K_BITS=2`) and the fault-syndrome struct |
| `rtl/cbist_bisr_top.sv` | the whole design |
| `rtl/cbu.sv` | comparator + test generator + modified decoder + logic module |
| `rtl/comparator.sv`, `rtl/test_generator.sv`, `rtl/modified_decoder.sv`, `rtl/logic_module.sv` | CBU parts |
| `rtl/tn_mux.sv` | T/N multiplexer |
| `rtl/response_verifier.sv` | accumulator signature and verdict |
| `rtl/memory_array.sv` | 12 × 10-bit array, synchronous write, asynchronous read |
| `rtl/spare_control.sv` | main/spare steering wrapper |
| `rtl/bisr_bist.sv`, `rtl/bira.sv` | power-up test and redundancy analysis |

## Top-level interface and timing (`cbist_bisr_top`)

Everything is synchronous to the rising edge of `clk`. `rst_n` is
asynchronous and active low, and the power-up test starts when it is
released. `dout` is the asynchronous read of the address applied in the
same cycle. `rve` and `tge` are combinational in the cycle of the vector
they concern.

| port | dir | width | meaning |
|---|---|---|---|
| `tn` | in | 1 | 0 normal, 1 test mode |
| `a_addr`, `a_we`, `a_wdata` | in | 4, 1, 10 | system access (ignored until `bisr_done`) |
| `dout` | out | 10 | memory data |
| `ctest_clr` | in | 1 | restart the concurrent test |
| `golden_sig` | in | 10 | expected signature, sampled on the `test_end` edge |
| `rve`, `tge` | out | 1 | hit / window completed this cycle |
| `ctest_done`, `ctest_valid`, `ctest_pass`, `signature` | out | 1, 1, 1, 10 | test status and verdict |
| `bisr_done`, `bisr_err`, `repair_fail` | out | 1 | power-up repair status |
| `spare_used`, `spare_bad`, `repaired` | out | 2, 2, 1 | repair table summary; current access uses a spare |

The sizes live in `cbist_pkg`. The CBU modules take `W_BITS` and `K_BITS`
parameters and can be used alone at other sizes. `n = w + k` must cover the
memory's address.

## Where this design makes its own choices

The source design fixes these points:

- the 10 × 10 memory;
- the split of the vector into k window bits and w position bits;
- comparator, test generator, decoder and logic module with SRAM-like
  cells, sense amplifier, two flip-flops and a w-stage counter;
- hit / rve / next window;
- T/N multiplexing;
- accumulator response compaction with "1 = fault free";
- spare-then-main power-up testing with ERR, fault syndrome and Continue;
- a wrapper that selects main or spare.

It leaves these open, and this RTL chooses:

- **Vector and sizes:** the monitored vector is the 4-bit address, with
  w = k = 2 (taking the vectors 00, 01, 10, 11 as one window). There are two
  spare rows.
- **Test generator:** a binary counter.
- **Decoder:** the "modified" decoder is a decoder with an enable.
- **Test-mode vector:** the low bits are the lowest empty cell.
- **Flip-flops:** the two flip-flops form the end-of-test flag and strobe.
- **Monitoring:** only reads are monitored. The expected signature comes in
  on a port.
- **Power-up test:** the row test is W0 R0 W1 R1 W0 R0.
- **Repair:** the lowest good free spare is allocated, for rows only.
  Continue takes one cycle.
- **Start-up order:** concurrent testing is held until repair has finished.

Not built:

- **Spare test controller.** The source says a faulty controller can be
  swapped for a spare one, but not how a faulty controller is detected or
  how the swap is made.
- **Permanent store of compressed test vectors.** It is only mentioned as an
  alternative to the test generator and decoder, with no contents or format.

## Verification

Each module has a self-checking testbench in `tb/` that compares against an
independent model:

- the logic module and CBU against a set of vectors seen per window;
- the response verifier against a running sum, with order reversal;
- the BIST against a memory model with stuck-at bits;
- the BIRA against hand-worked repair tables.

The cycle-exact checks are:

- a test-mode test takes 2^n cycles;
- a fault-free power-up takes 72 cycles, and 70 with the injected faults.

Two testbenches run the full top at its default sizes:

- **`cbist_bisr_top_tb`** powers up with a faulty spare and a faulty main
  row, then:
  - checks the repair;
  - fills the memory and runs a normal-mode test under random traffic,
    checking every read;
  - runs a test-mode test and a mixed test;
  - detects a defect that appears after repair;
  - powers up again with more faulty rows than spares.

  It counts each mechanism: hits, repeats, out-of-window reads,
  unmonitored writes, window advances, test-mode hits, mode switches,
  passes, detections, spare marking, repairs, accesses to a spare, and
  repair failure. It fails if any of them never happens.
- **`cbist_workload_tb`** reads a zero-filled memory in address order
  (passes after exactly 16 reads, signature 0). It then adds a stuck-at-1
  bit (fails, signature 1) and measures CTL over 300 random-traffic tests
  against the 133.3-cycle formula above.

Faults are injected by `force` on bits of `u_mem.mem`, which is a packed
array for that reason.

Concurrent assertions in the RTL check the protocol rules; run with
`--assert` to enable them:

- at most one word line, and only when enabled;
- a window advance is always a hit;
- `test_end` and ERR are single-cycle pulses;
- Continue follows every ERR, and only ERR;
- a faulty spare is never allocated;
- the BIST is idle once done;
- no write reaches the memory in test mode.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/cbist_pkg.sv \
    tb/cbist_bisr_top_tb.sv --top cbist_bisr_top_tb
./obj_dir/Vcbist_bisr_top_tb
```

Replace the testbench name to run any other. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Lint with
`verilator --lint-only -Wall -y rtl -Irtl rtl/cbist_pkg.sv rtl/<module>.sv`.
At the default sizes the whole design synthesises to about 190 word-level
cells and 172 flip-flop bits, 120 of which are the memory itself.
