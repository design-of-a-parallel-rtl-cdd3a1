# Parallel Vector Access unit for word-interleaved SDRAM

A processor that walks an array with a large stride wastes most of a cache
line fill: it asks for one word and the memory returns 32. This unit lets the
memory controller ask for a *strided vector* instead. The request is a base
address B, a stride S and a length L of up to 32 words. The unit gathers those
words into one dense 128-byte line, or scatters a dense line back to the
strided addresses.

The memory is 16 SDRAM banks with word interleaving: word A lives in bank
`A mod 16`. Each bank has its own bank controller. A vector command is
broadcast to all 16 controllers at once. Each controller works out *on its
own*, in one clock cycle, whether any element of the vector is stored in its
bank. If so, it finds the first such element and the distance to the next one.
The controllers then access their banks in parallel. Each one reorders its
accesses to keep SDRAM rows open. Finally, the controllers take turns putting
their words onto a shared bus, so the line is merged without any central unit.

The RTL is SystemVerilog in `rtl/`, one module per file. Every parameter
default is the prototype configuration:

| Parameter | Value |
|---|---|
| Banks | 16 × 32-bit |
| Elements per command | 32 |
| Outstanding transactions | 8 |
| BC bus width | 128 bits |
| Vector contexts per bank | 4 |
| Request queue entries | 8 |
| SDRAM RAS-to-CAS and CAS latency | 2 cycles each |

## 1. Which elements belong to a bank: FirstHit and NextHit

Use these names:
- M = 16 banks, m = 4.
- `b0 = B mod M`, the bank of element 0.
- For bank b, `d = (b − b0) mod M`.
- Write the low stride bits as `S mod M = σ·2^s`, with σ odd. If S is a multiple of 16, then s = m.

Element i sits in bank `(b0 + i·S) mod M`. From this, three facts follow.

* **Hit test.** Bank b holds some element of an unbounded vector only if d is a multiple of 2^s.
* **NextHit.** Once a bank is hit, it is hit again every `δ = 2^(m−s)` elements. The element address then grows by `S·δ = S << (m−s)`. That is one shift, with no multiply.
* **FirstHit.** The first index that hits is `K = (K1 · (d >> s)) mod 2^(m−s)`. K1 is the smallest k with `k·S ≡ 2^s (mod M)`, which is the inverse of σ modulo 2^(m−s). K1 depends only on the 4 low stride bits. It is a 16-entry table that `pva_pkg::build_k1_table` computes at elaboration.

The bank takes part only if `K < L`. It then owns `ceil((L − K)/δ)` elements: K, K+δ, K+2δ, and so on.

For example, take B = 2, S = 10, bank 6:
- d = 4 and `10 mod 16 = 5·2^1`, so s = 1 and δ = 8.
- d is even, so the bank is hit. K1(10) = 13, because 13·10 = 130 ≡ 2.
- K = (13·2) mod 8 = 2. Check: element 2 is at 2 + 20 = 22, and 22 mod 16 = 6.
- With L = 32, the bank owns elements 2, 10, 18 and 26.

The address of element K is `B + K·S`:
- For a power-of-two stride (and stride 0) this is a shift. It is ready in the same cycle as the hit test.
- For any other stride it needs a 32-bit multiply-add. That runs in a separate unit over two cycles, while other requests proceed.

## 2. The vector bus and the transaction lines

The memory controller issues four commands. Each carries a 3-bit transaction id t:

| command | what the unit does |
|---|---|
| `VEC_READ t, B, S, L` | every bank gathers its elements of the vector into buffer t |
| `VEC_WRITE t, B, S, L` | every bank writes its elements from buffer t to SDRAM |
| `STAGE_WRITE t` | the next 16 cycles carry the 32-word line into buffer t of every bank |
| `STAGE_READ t` | for the next 16 cycles, each bank drives the words of line t that it gathered |

A data cycle carries 64 bits, which is two elements. Data cycle k (k = 0..15) carries elements 2k and 2k+1:
- An even k uses bits 63:0 of the 128-bit BC bus.
- An odd k uses bits 127:64.

Consecutive cycles use different wires, so a change of driving bank never needs a turnaround cycle. Data cycles start the cycle after the command.

A write therefore takes two steps: `STAGE_WRITE t` with the line, then `VEC_WRITE t`. A read also takes two steps:
1. `VEC_READ t`.
2. Wait until transaction line t reports completion.
3. `STAGE_READ t`.

Each bank controller keeps a busy flag per transaction id:
- It is set by the `VEC_*` command.
- It is cleared one cycle later if the bank owns no element.
- Otherwise it is cleared when the bank's last element has been read back, or has been issued as a write.

The flags of all 16 banks are ORed, as a wired OR would. The port `transaction_complete[t]` is the inverse of that OR, so it reads 1 once every bank is done.

Request fields and data are on separate ports (`vb_req`, `vb_wdata`, `vb_rdata`). The original bus multiplexes them on one set of lines. The cycle order is the same.

Command codes: VEC_READ = 0, VEC_WRITE = 1, STAGE_READ = 2, STAGE_WRITE = 3.

## 3. Inside a bank controller

```
 vector bus ──► FirstHit Predict ──┬─► Request FIFO / Register File (8) ──► Access Scheduler ──► SDRAM
                  (1 cycle)        │          ▲   │                           (4 vector contexts)
                                   │   FirstHit Calculate (2 cycles)                 │
                                   └──────── bypass paths ───────────►               ▼
                                                                   Staging Unit ◄── read data
                                                                   (8 × 32 words) ──► BC bus
```

**FirstHit Predict** (`firsthit_predict`) evaluates section 1 in combinational logic and registers the result. The queued request records:
- K, the NextHit log (m−s) and the element count.
- The first address, if the stride is a power of two.
- The *ACC* flag (address calculation complete) for those strides.

**Register File and Request FIFO** (`register_file`, `request_fifo`) hold up to eight waiting requests, one per possible transaction. The file has two write ports and two read ports:
- Inbus_0 is written by the FIFO, from FirstHit Predict.
- Inbus_1 is written by FirstHit Calculate.
- Outbus_0 is read at the queue head by the scheduler.
- Outbus_1 is read by FirstHit Calculate.

**FirstHit Calculate** (`firsthit_calc`) walks the queue in order with a work pointer and skips entries that already have ACC:
- Cycle 1: it multiplies stride by K.
- Cycle 2: it adds the product to B and writes the entry back with ACC set.

The scheduler only takes a head entry whose ACC flag is set.

**Bypasses.** Two paths skip the queue and feed the scheduler's entry context directly:
- From FirstHit Predict, when the queue is empty and the stride is a power of two.
- From FirstHit Calculate's write-back, when that entry is the head.

Measured from the command cycle to the request sitting in a vector context, on an idle controller:

| Stride | Latency |
|---|---|
| Power of two | 2 cycles |
| Stride 19 | 4 cycles |

## 4. The access scheduler

This is the part that decides performance, and the hardest part to follow.

**Vector contexts.** Four contexts (`vector_context`) each hold one request being serviced:
- The current element address, its index and the remaining count.
- The step `S << (m−s)`.

New requests enter context 0. When a context empties, the requests below it shift up by one place per cycle. So a higher-numbered context always holds an older request.

Each context compares its element's SDRAM coordinates with the open row of its internal bank:
- **ready**: the row is open and matches.
- **blocked**: the row is closed, or a different row is open.

**Datapath lock.** One SDRAM command can be issued per cycle. A lock passes from the oldest context to the youngest. One `sched_policy` unit per context applies these rules:
- A *ready* context issues its read or write if it holds the lock, and if no context has raised `bank_actv` ("I could activate or precharge now").
- A *blocked* context issues an activate (or a precharge of the wrong row) if it holds the lock and its timers allow it. It also requires that nobody has raised `bank_hit_predict` for that internal bank ("someone still wants this open row").
- Otherwise the context passes the lock on.

Opens and precharges are thus promoted above reads and writes, so rows are opened as early as possible. A context that waits for a row lets younger contexts use other internal banks meanwhile.

**Predict lines.** There is one set per internal bank, each formed as a wired OR over the contexts:
- `bank_hit_predict`: some context could access the open row.
- `bank_more_hit_predict`: a context *other than the issuing one* hits the open row.
- `bank_close_predict`: some context needs a different row there.

**ManageRow** decides, for each read or write, whether to add auto-precharge (A10):
- If this is not the request's last element: keep the row open when the next element is in the same row, or when `more_hit` is set. Otherwise close it.
- If it is the last element: keep the row open when `more_hit` is set. Otherwise close it when `close` is set, or when the one-bit predictor of that internal bank says so.
- The predictor is updated on the *first* access of every request. It is set to "close" unless the request's first row equals the row last accessed in that internal bank. This detects a loop that keeps returning to the same row.

An explicit precharge is issued only when a blocked context meets a different open row.

**Bus polarity.** A context may read or write only when two conditions hold:
- Every older valid context moves data in the same direction.
- The last transfer on the SDRAM data bus went that way too.

The oldest context may always reverse the direction, and a reversal costs one idle data cycle. This rule means that a read never passes an older write, or a write an older read. Two writes to the same word, with no read between them, may still be reordered. It also makes turnarounds rare.

**Restimers** (`restimer`) are small down-counters, one per SDRAM timing rule:
- Activate to read/write: T_RCD.
- Precharge (explicit or automatic) to activate: T_RP.
- Write to precharge: T_WR.
- Read/write spacing on the data bus, including the turnaround.

A context may act only when every restimer it needs shows "available".

**Timing at the SDRAM pins.**
- The command and the write data leave through registers, one cycle after the decision.
- Read data is sampled T_CL cycles after the command reaches the part. It goes to the staging unit with its transaction id and element index.

## 5. Staging unit and the shared bus

`staging_unit` keeps one 32-word buffer per transaction id. The same buffer serves reads and writes:
- **Reads.** Each returned word is stored at its element index, and a mask records which elements this bank owns.
- **Writes.** The whole 16-cycle line is captured. The scheduler fetches each word when it issues the write.
- **STAGE_READ.** The unit drives its owned words into their 32-bit slots and zeros elsewhere.

`vector_bus` ORs the 16 banks' drives and busy flags. It flags (and asserts against) any slot driven by two banks at once.

## 6. SDRAM interface

Each bank is two 256 Mbit ×16 parts side by side: 4 internal banks × 8192 rows × 512 columns of 32-bit words. So the unit addresses 2^28 words in total. The bank-local word address `A >> 4` is split as follows:

```
 A[31:28] unused | A[27:15] row | A[14:13] internal bank | A[12:4] column | A[3:0] bank number
```

The command bus `sdram_cmd_t` is an operation (NOP, ACT, RD, WR, PRE), a 2-bit internal bank and 13 address bits. For RD and WR, A10 requests auto-precharge. Refresh, mode-register set-up and tRAS are not modelled.

## 7. What follows the original design and what does not

These follow the prototype:
- The bank count, element count, transaction count, queue depth, number of contexts and bus widths.
- The FirstHit/NextHit arithmetic.
- The Schedule() rules.
- The predict lines and the one-bit auto-precharge predictor.
- The polarity rule.
- The restimers.
- Both bypass paths.
- The two-cycle multiply-add.
- RAS and CAS latency of 2.

These are this implementation's own choices:
- **Precharge time and write recovery.** Both are 2 cycles, and tRAS is ignored.
- **Address bit order.** As shown in section 6.
- **Command codes.** As listed in section 2.
- **Data cycle timing.** The one-cycle gap before data cycles.
- **Separate request and data ports.** The original bus multiplexes them.
- **One staging buffer per transaction.** The original describes separate read and write staging units.
- **Transaction-line polarity.** The original description is not consistent about whether the line is low while busy or low when complete. Here the exported signal is 1 when complete.
- **Bypass target.** Both bypasses feed context 0, the only context a new request can enter.
- **Only contexts the polarity rule lets issue drive `bank_hit_predict`.** Without this, a younger context waiting to write could hold a row open against an older context that needs to precharge it, and the two could wait for each other forever.
- **Stride 0** counts as a power-of-two stride.

The Vector Command Unit is left out, because the front end that splits processor requests into commands is not designed here. The unit's ports are its interface, and the testbenches play its role. The SDRAM parts are modelled behaviourally in `tb/sdram_model.sv`.

The gate counts and on-chip RAM size of the original FPGA prototype are not a target here. At default parameters, a generic yosys synthesis of `pva_top` gives about 61k cells, 12k flip-flop bits, and 147k bits of memory arrays (the staging buffers and register files).

## 8. Verification

Every module has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and stops on a watchdog.

| testbench | what it checks |
|---|---|
| `tb_firsthit_predict` | all 16 banks vs brute-force expansion of ~450 random and directed vectors: hit, K, count, NextHit, ACC, first address |
| `tb_request_fifo`, `tb_register_file` | random traffic vs reference queue / array |
| `tb_firsthit_calc` | write-back value and exactly-once write-back; 2-cycle latency |
| `tb_vector_context` | address/index walk, last element, row hit/conflict/next-row-hit |
| `tb_sched_policy` | all input combinations vs the scheduling rules |
| `tb_restimer` | cycle-exact availability |
| `tb_staging_unit` | transaction-line hold/release, STAGE_READ slots, STAGE_WRITE capture |
| `tb_vector_bus` | merge, transaction lines, double-drive detection |
| `tb_access_scheduler` | 600 random requests against the SDRAM model: data, completion, reordering, zero timing violations |
| `tb_bank_controller` | one bank through the bus: slot ownership, data, line release, latency, both bypasses |
| `tb_pva_top` | full unit, default parameters, 16 SDRAM models |
| `tb_pva_kernels` | the loop kernels below on the full unit, results read back and compared |

`tb_pva_top` runs directed stride-19 writes and reads, 60 random batches of mixed reads and writes, and a copy loop unrolled four ways. It compares every gathered word with a reference memory, and checks the bus halves and the SDRAM timing. It also counts each mechanism and fails if one never happened:
- FirstHit Predict bypasses and FirstHit Calculate bypasses.
- Queued requests.
- Out-of-order issue between contexts.
- `bank_actv` deferrals.
- Explicit precharges and auto-precharges.
- Bus polarity reversals.
- Row activates, and accesses that leave a row open.
- Vector context shifts, and banks a vector does not hit.

The SDRAM model (`tb/sdram_model.sv`) keeps a sparse memory and counts every breach of these rules:
- Activate on an open bank, or before T_RP.
- Read or write to a closed bank, or before T_RCD.
- Precharge before T_WR.
- Data-bus collision, or a missing turnaround cycle.

### Loop kernels

`tb_pva_kernels` plays both the processor and the memory controller. It runs eight loop kernels:

| Kernel | Operation |
|---|---|
| copy | `y = x` |
| saxpy | `y += a·x` |
| scale | `x = a·x` |
| swap | exchanges x and y |
| tridiag | `x[i] = z[i]·(y[i] − x[i−1])` |
| vaxpy | `y += a[i]·x[i]` |
| copy2, scale2 | copy and scale unrolled twice, so two lines per vector are in flight |

Each kernel runs on vectors of 1024 elements at strides 1, 2, 4, 8, 16 and 19. Every line is gathered, computed on and scattered through the unit. Each output vector is then read back and compared with a word-by-word reference.

All 48 runs are correct. The table gives the cycles per run, from the first command until the last write completes. The testbench issues each chunk's commands in order and waits for each gather before computing, so these are not best-case figures:

| kernel | S=1 | S=2 | S=4 | S=8 | S=16 | S=19 |
|---|---|---|---|---|---|---|
| copy | 1728 | 1573 | 1705 | 1975 | 2501 | 1807 |
| copy2 | 1392 | 1383 | 1451 | 1591 | 2102 | 1434 |
| saxpy | 2176 | 2149 | 2281 | 2551 | 3487 | 2265 |
| scale | 1542 | 1668 | 1924 | 2440 | 3467 | 1615 |
| scale2 | 1364 | 1428 | 1556 | 1846 | 2763 | 1399 |
| swap | 2912 | 2759 | 2891 | 3159 | 4095 | 2995 |
| tridiag | 2333 | 2459 | 2308 | 2576 | 3106 | 2418 |
| vaxpy | 2752 | 2880 | 2857 | 3253 | 3649 | 2841 |

Stride 16 is the slowest case: every element of a vector sits in one bank, so a single controller does all the work. Stride 19 is as fast as stride 1, because an odd stride spreads the 32 elements evenly, two per bank.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv --top-module tb_pva_top \
  rtl/pva_pkg.sv tb/pva_tb_pkg.sv tb/tb_pva_top.sv -Mdir obj
./obj/Vtb_pva_top
```

To run another block, replace `tb_pva_top` with its testbench name. `tb_pva_top` finishes in well under a second of simulation time; `tb_pva_kernels` takes a few seconds.

## 9. Files

- **`rtl/pva_pkg.sv`**: sizes, command and bus structs, address split, the K1 table function.
- **`rtl/pva_top.sv`**: 16 bank controllers and the bus merge.
- **`rtl/bank_controller.sv`**: FirstHit Predict, queue, FirstHit Calculate, scheduler and staging unit, with the bypass selection.
- **The remaining `rtl/` files**: one block each, named as in sections 3 to 5.
- **`tb/`**: the testbenches, the SDRAM model and a small package with the initial-memory-content function.
