# Functionality-based runtime relocation for heterogeneous FPGAs

A circuit running on an FPGA sometimes has to move. The usual reasons are a damaged region, a fragmented floor plan, or a hot spot. The classic way is to load the circuit's own partial bitstream at another place. That only works if the destination has exactly the same column layout of CLBs, BRAMs and DSPs. On a modern heterogeneous device such a place often does not exist. It also never works for an encrypted IP bitstream, which cannot be edited.

This design adds a second way to move a circuit: **relocation by function**. It applies to small, referentially transparent circuits, meaning the same input always gives the same output. While such a circuit runs normally, every result it produces is stored in a table indexed by the input. When the circuit must move:

1. The inputs whose results are still missing are fed to the original circuit once.
2. A generic pre-built *memory template* is configured at any free place.
3. The completed table is copied into the template.

From then on the template answers every request by lookup. It deliberately waits as long as the original circuit would have, so the rest of the system sees the same timing. Direct bitstream relocation is still tried first. The functional path is only taken when the direct path is unavailable.

The RTL is sized for a case study: three CORDIC circuits (square root, sin/cos, tanh), each with an 8-bit input, an 8-bit output, and a done flag. They are selected by a 2-bit Task ID and run at 100 MHz.

## Block map

```
relocation_system (top)
├── output_memorizer
│   ├── task_memory          Task ID -> {relocatable, Base_Addr, offset bits, tolerance}
│   ├── memo_logic           CHECK / SAVE / FILL / COPY / REFRESH engine
│   └── output_memory        2048 x 9 bit block RAM (one 18 kb BRAM)
├── duration_evaluator       per-circuit timing table, R_t = sum(n*e + Mt) + C_t
├── area_finder              state matrix + candidate template locations, first-fit scan
├── relocation_controller    the relocation flow (DBR, FBR, duration, area, fill, configure, copy)
└── memory_template          the relocated equivalent: lookup memory + delay block
```

`reloc_pkg` holds the shared sizes and types:

- `memo_mode_t`: the mode of the memo logic.
- `reloc_result_t`: the outcome of a relocation request.
- `task_entry_t`: one entry of the task memory.
- `copy_word_t`: one word of the copy stream.

Four things live outside the top, and their signals are top-level ports:

- The original circuits.
- The direct-bitstream relocater, which only delivers a yes/no.
- The self-reconfiguration controller, which configures bitstreams and moves data through the configuration layer.
- The host that loads the tables.

## Output memorizer: how results are memorized

### Address formation

Each relocatable circuit owns a contiguous section of the output memory. Its task-memory entry holds:

- `base`: the first word of the section.
- `off_bits`: log2 of the section size.
- `tol`: the tolerance, i.e. how many input LSBs may be ignored because the output barely changes across them.

An input `x` of circuit `t` maps to one word:

```
addr = base[t] + (x >> tol[t])
```

Every possible input owns a word, so finding a stored result never needs a search. It always takes the same number of cycles. The cost is memory: a section needs `2^(input bits - tol)` words. This is why the scheme is limited to narrow ports or large tolerances.

### Word format

Each word is `{output[7:0], valid}`, with the valid flag in bit 0. `valid = 1` means the word holds the circuit's result for that input.

### MEMO mode: CHECK and SAVE

This is the normal operation. The top watches every computation the user starts on a relocatable circuit:

| step | timing |
|---|---|
| CHECK: read the word, test the valid bit | `chk_done`, `chk_hit`, `chk_data` registered **3 cycles** after the start, in parallel with the circuit |
| SAVE on a miss: write `{result, 1}` | `save_done` **2 cycles** after the circuit's done |

For a circuit that takes 3 or more cycles, CHECK adds no delay. SAVE adds two cycles after the circuit's result, and only the first time an input is seen. The memo logic accepts the next MEMO start in the second SAVE cycle.

### Sweep modes, used by the relocation and by partial reconfiguration

Each sweep walks one circuit's section, one word at a time, and ends with `sweep_done`.

- **FILL** computes the missing outputs. For every word with `valid = 0`, the memo logic turns the offset back into an input, `x = offset << tol`. It starts the original circuit with that input (`fill_start`/`fill_data`, multiplexed onto `app_*` by the top). The result is written with its valid bit in the circuit's done cycle. The sweep is pipelined. While the circuit computes one missing output, the section is read on, one word per cycle, to find the next missing word, and that word is started in the same done cycle. A FILL therefore costs the sum of `e` over the missing outputs, plus about one cycle for each memorized word whose read is not hidden behind a computation.
- **COPY** streams every word of the section out as `copy_word_t {task_id, offset, data}` on a valid/ready handshake (`copy_valid`/`copy_ready`). While `copy_valid` is high and `copy_ready` is low, the word is held stable, and an assertion checks this. The pace is set by whoever drains the stream.
- **REFRESH** clears every valid bit, one word per cycle. It is used when a circuit has been changed by partial reconfiguration, because its old results are then wrong.

The memo logic also keeps a **missing-output counter** per circuit. A REFRESH loads it with the section size, and every SAVE decrements it. This gives the duration check its `n` without scanning the memory.

## The relocation flow (`relocation_controller`)

A request carries three things:

- `req_mask`: the set of circuits to move together. The case study moves all three into one template.
- `req_deadline`: the time constraint in cycles.
- `req_dbr_ok`: the direct-bitstream relocater's verdict.

The controller then runs these steps:

| step | does | on failure |
|---|---|---|
| DBR check | if `req_dbr_ok`, configure the original bitstream (`bs_cfg_start` -> `bs_cfg_done`) | go to FBR |
| FBR check | every circuit in the mask must be marked relocatable in the task memory | `RES_NOT_MEMO` |
| Duration check | duration evaluator: `R_t <= deadline` | `RES_TOO_SLOW` |
| Area check | area finder: some candidate location is free | `RES_NO_AREA` |
| Compute missing outputs | FILL sweep of each circuit, lowest Task ID first | |
| Configure template | `tpl_cfg_start` with the location found (`tpl_row`, `tpl_col`, `tpl_loc`) -> `tpl_cfg_done` | |
| Copy data | COPY sweep of each circuit; the circuit's `e` is written to the template's delay table | |
| Report success | commit the area as used, set the circuits' bits in `relocated_mask` | |

`rel_done` pulses with `rel_code` and with four cycle counts:

- `rel_cycles`: the whole request.
- `rel_fill_cycles`: the compute step.
- `rel_cfg_cycles`: the configure step.
- `rel_copy_cycles`: the copy step.

`rel_estimate` is the R_t the duration evaluator computed for the request.

The three relocation steps run one after another. The first must finish before the copy, and the template must exist before it can be written. When the controller is idle, it also takes refresh requests. A `dpr_event` goes through it, so a refresh never overlaps a relocation. A refresh also clears the circuit's `relocated_mask` bit, which returns its traffic to the reconfigured original.

## Duration check (`duration_evaluator`)

A small LUT RAM holds two values per circuit:

- `e`: cycles to compute one output.
- `Mt`: cycles to copy the circuit's section.

Two global registers hold the template configuration time and the area-finder time. For a request:

```
R_t = sum over requested circuits of (n_i * e_i + Mt_i)  +  max(T_config, T_area)
```

`n_i` is the missing-output counter. The sum takes one cycle per Task ID, and the answer is ready at most `NUM_TASKS + 2` cycles after the request.

When a circuit is changed by partial reconfiguration, its `e` is re-measured. The first run of that circuit after `dpr_event` is timed from start to done, and the result replaces the table entry. The template's delay table takes its latency from the same entry.

## Area finder

The state memory is an M x N bit matrix, with `'0'` for a free resource and `'1'` for a used or damaged one. It can be written cell by cell.

A second memory lists `NUM_LOCS` candidate template locations, each a rectangle `{valid, row, col, height, width}`. The scan is first-fit. It tests one row of one candidate per cycle against a column mask and reports the first candidate whose rectangle is all free. A candidate that crosses the device edge counts as occupied. After a successful relocation, a commit ORs the rectangle into the matrix (height + 1 cycles).

## Memory template and delay block

The template memory is addressed by `{task_id, offset}`, which gives 1024 words of 8 bits. The COPY stream writes straight into it. Reading takes 2 cycles. A per-task latency table (the delay block) holds `done` back until `max(2, e)` cycles after the start, so a relocated circuit answers with exactly the latency of the original (an `e` above 255 is saturated to 255). The data stays valid after `done`.

The top sends a user computation to the template when the task's bit in `relocated_mask` is set. Otherwise it goes to the original circuit. `res_from_template` tells which one answered.

## User interface of the top

Handshake:

- When `user_ready` is high, a computation is started with `user_start`, `user_task` and `user_data`.
- The result arrives on `res_done` and `res_data`.
- One computation is in flight at a time.

`user_ready` is low in these cases:

- while a sweep owns the memorizer,
- while the memorizer is still finishing a SAVE,
- while a computation is running.

The traffic to the original circuits appears on `app_start`, `app_task` and `app_data`, and returns on `app_done` and `app_dout`.

For observation, the top brings out the memo logic's `chk_done`, `chk_hit`, `chk_data`, `save_done` and the circuit's `task_base`.

## Sizes

| parameter | default | basis |
|---|---|---|
| `TASK_W` / `NUM_TASKS` (pkg) | 2 / 4 | 2-bit Task ID of the case-study wrapper, three circuits used |
| `IN_W`, `OUT_W` (pkg) | 8, 8 | case-study DataIn / DataOut |
| `OM_AW`, `OM_DW` (pkg) | 11, 9 | one 18 kb BRAM = 2048 x 9 |
| template `AW` x `DW` | 10 x 8 | 3 x 256 results need 768 words |
| `ROWS` x `COLS` (area finder) | 32 x 64 | own choice, device-dependent |
| `NUM_LOCS` | 8 | own choice |
| `TIME_W`, `E_W`, `LAT_W` | 32, 16, 8 | own choice; `LAT_W` holds the largest latency (56) |

The case study fits: 768 results of 9 bits = 6912 bits, in an output memory of 18432 bits. A circuit with a 12-bit port already needs 4096 words per section and does not fit without raising `OM_AW` and `IN_W`. A 16-bit multiplier needs 65536 words.

## Measured timing against the reference figures

The testbenches use these figures:

- Circuit latencies: 15, 19 and 56 cycles.
- Template configuration: 8230 cycles (82.30 µs).
- Deadline: 1 ms.
- The copy stream accepts one word every 6 cycles. This is the testbenches' model of the configuration-layer copy.

`relocation_cases_tb` memorizes 0 %, 50 % and 100 % of the 768 outputs and then relocates all three circuits. At 100 MHz:

| memorized | compute (µs) | configure (µs) | copy (µs) | total (µs) | reference total (µs) |
|---|---|---|---|---|---|
| 0 % (worst case) | 230.62 | 82.31 | 46.11 | 359.30 | 361.86 |
| 50 % | 119.26 | 82.31 | 46.10 | 247.94 | 306.80 |
| 100 % (best case) | 7.84 | 82.31 | 46.09 | 136.52 | 131.44 |

For comparison, the reference splits at 50 % are 175.36 µs compute, 82.30 µs configure and 49.14 µs copy.

The worst case matches closely: 256 x (15 + 19 + 56) = 23040 cycles of pure computation, against 23062 measured. The copy is about 3 µs faster only because of the assumed copy pace. At 100 %, the remaining 7.84 µs is the scan of 768 memorized words, one per cycle.

The 50 % figures differ because the reference's compute time at 50 % (175.36 µs) is more than half of its worst case. That depends on which outputs happen to be memorized. Here exactly the lower half of each circuit's inputs is memorized, so the compute time is half of the worst case.

`relocation_system_tb` requests its relocation at about 47 % memorized, with random inputs. It measures 25442 cycles in total: 12577 compute, 8231 configure and 4610 copy. The duration evaluator's R_t for that request was 26924 cycles.

## Where this design departs from, or adds to, the reference description

- **Reading of the C_t term.** The description defines C_t as the larger of the template configuration time and the area-finder time. A later remark says the area finder runs in parallel with the computation of missing outputs. Here C_t = max(configuration, area finder), and the missing outputs are the separate `n*e` term, as the equation is written. In hardware, all steps run one after the other.
- **Own choices, not specified in the description:**
  - The request mask, so several circuits move into one template.
  - The missing-output counters.
  - The task-entry fields besides `Base_Addr`.
  - The tolerance as a right shift of the input.
  - The mode encoding.
  - All handshakes.
  - The synchronous active-low reset.
  - The first-fit rectangle scan of the area finder. Its actual scan procedure is described elsewhere.
  - The area commit.
- **Copy step.** The copy through the FPGA configuration layer is replaced by a valid/ready stream that writes the template memory directly. Its pace comes from outside (`copy_ready`).
- **Communication with a relocated circuit.** The clock-buffer based channel is replaced by a multiplexer in the top.
- **Template size.** The template here is 1024 x 8 bits. The reference figure for the template is "10 kB of reserved memory" in one 18 kb RAM. 1024 x 8 is what the three 256-entry circuits need.
- **Refresh and re-measurement.** These are started by a single `dpr_event` input.
- **Not built**, because none of them is a design given in the description:
  - the CORDIC circuits (vendor IP),
  - the self-reconfiguration controller,
  - the direct-bitstream relocater,
  - the clock-buffer channel,
  - the off-chip bitstream store.

  Their signals are ports.
- **Testbench circuit model.** The CORDIC circuits are modelled in `tb/cordic_app_model.sv`. The model has the real latencies, and its functions are close to the real ones: `sqrt(x*256)`, `127*sin(2*pi*x/256)`, `127*tanh(x/32)` for signed x, and `~x` for the unused fourth slot. The exact output codes of the real cores are not reproduced, which does not matter for a lookup-based scheme.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<m>`, and it has a watchdog. All run with plain Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/reloc_pkg.sv tb/cordic_ref_pkg.sv tb/relocation_system_tb.sv \
    --top-module relocation_system_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run another one:

| testbench | covers |
|---|---|
| `task_memory_tb` | entry writes and reads, reset, relocatable mask |
| `output_memory_tb` | read-first dual-port behaviour |
| `memo_logic_tb` | 3-cycle CHECK, 2-cycle SAVE, FILL/COPY/REFRESH sweeps, missing counters |
| `output_memorizer_tb` | the three sub-blocks wired together with the circuit model |
| `duration_evaluator_tb` | R_t against an independent sum, C_t, result latency, re-measurement of e |
| `area_finder_tb` | scan against a reference model on random state matrices, commit |
| `relocation_controller_tb` | every outcome of the flow and the step order, directed and 80 random requests against a reference of the flow |
| `memory_template_tb` | lookup data and exact done latency for each circuit |
| `relocation_system_tb` | end to end at the default sizes |
| `relocation_cases_tb` | relocation time at 0 %, 50 % and 100 % memorized, R_t, and the template afterwards |

`relocation_system_tb` runs at the default parameters and finishes in well under a minute. It does the following in order:

1. Memorizes random traffic.
2. Drives one request to each outcome: direct bitstream, FBR declined, area declined, and duration declined.
3. Relocates all three circuits by function.
4. Replays all 768 inputs against the template, checking results and latencies.
5. Reconfigures one circuit and checks the refresh and the re-measurement of `e`.

It counts every mechanism, including hits, saves, fills, each outcome, template answers, refreshes, re-measurements and copy back-pressure. A mechanism that never happened counts as a failure.

## Limits

- The area finder's candidate list and state matrix are loaded by the host. Nothing in the RTL knows a real device's column layout.
- Only one user computation is in flight at a time. A circuit that accepts a new input every cycle would need a pipelined memo path.
- The output memory and the template are not cleared by reset. A REFRESH of each circuit is the required initialization, and the testbenches do that first.
