# Run-time task relocation and defragmentation for a column-configured FPGA

A partially reconfigurable FPGA can host several hardware tasks at a time. Each task occupies a contiguous strip of configuration columns, from the top of the device to the bottom. After tasks come and go, the free columns end up scattered. A new task can then be refused even though enough columns are free in total. On a heterogeneous device the problem is worse. The device mixes logic (CLB) columns with BlockRAM columns, so a task only fits where its own column pattern recurs.

This design tackles that in hardware with two mechanisms:

1. **Placement.** Each task type has a short list of feasible positions, sorted ahead of time. Placing a task means taking the first free entry in that list. This is *SUP Fit* placement.
2. **Relocation with defragmentation.** When no listed position is free but enough columns are, the design looks for the cheapest set of running tasks to move out of the way. It then moves them *with their state*. The flip-flop values and BlockRAM contents are read back through the configuration port and saved. Each task is then written again at its new column, with those values loaded as the register preset values.

The device model follows a Xilinx Virtex-II XC2V4000:

- 824-byte configuration frames.
- One configuration byte per clock cycle, which is SelectMAP at 50 MHz.
- 78 columns: 72 CLB columns and 6 BlockRAM columns (at 7, 20, 33, 46, 59 and 72).

## Columns, frames and the cost of moving a task

A CLB column keeps the state of its flip-flops in 2 of its frames. Every read access through the configuration port returns one useless *pad frame* first. Two single-frame reads per CLB column therefore move 4 frames. A BlockRAM column's contents are 64 frames, read in one access, so 65 frames including the pad. Writing a task takes 22 frames per CLB column and 86 per BlockRAM column. Erasing it costs the same.

Moving one task therefore costs (4 + 22 + 22) = 48 frames per CLB column and (65 + 86 + 86) = 237 frames per BlockRAM column:

    T_reloc = (48 N_clb + 237 N_ram) * 824 bytes / f_port

The defragmentation search minimizes exactly this number, counted in frames. The testbenches check it byte for byte on the port. Some examples at 50 MHz:

| Task | Cost | Bytes | Time |
|---|---|---|---|
| 19-column CLB-only task | 48·19 frames | 751,488 | 15.0 ms |
| 3 CLB + 1 BlockRAM column task | (48·3 + 237) frames | 313,944 | 6.3 ms |

## How a request is served (`reloc_controller`)

The host sends `PLACE(type)` or `REMOVE(slot)` on `op_*`, and receives one `resp_*` pulse per operation.

1. **PLACE.** The controller takes the lowest free slot and runs the SUP Fit placer.
   - If the placer finds a position, the new task is allocated there.
   - If not, and the free columns are at least the task's width, the defragmentation engine runs.
   - If there are not enough free columns, or defragmentation finds no solution, the answer is `ok = 0`. Queuing the request and trying again later is the host's job.
2. **Moving the displaced tasks** happens in two passes. Without two passes, a task's new position could overlap another displaced task that has not been moved yet.
   - *Pass 1*, for each displaced task, lowest slot first:
     - drop its `task_clk_en` so its state stops changing;
     - read back its state frames and extract the state bits into the task's context area;
     - erase its columns.
   - *Pass 2*, for each displaced task:
     - stream its pre-implemented bitstream from the bitstream store, through the State Inclusion Filter (saved states into the preset bits) and the external relocation filter (new column), into the configuration port;
     - pulse `task_rst` so the registers load their preset values, which are the saved states;
     - raise the clock enable again.
3. **The requested task** is then allocated the same way, with no state to include.
4. **REMOVE** stops the task's clock, erases its columns and frees the slot.

The counters `n_placed`, `n_defrag`, `n_reloc`, `n_refused`, `n_removed` and `n_state_bits` count how often each of these happened. `defrag_frames` holds the cost, in frames, of the last defragmentation. `defrag_tried` and `defrag_rejected` count the positions the search solved and rejected since reset. `busy` is high while any unit works.

## SUP Fit placement (`sup_fit_placer`)

The *static utilization probability* (SUP) of a column says how likely it is to be used by some task type, weighted by each type's request probability. A position's weight adds up the SUP of the columns it covers. Positions that block few other tasks come first.

Computing the weights is done before run time. The hardware only receives, per task type, its feasible positions in weight order. At run time the placer walks that list, one entry per cycle, and returns the first position where all the task's columns are free. A hit at list index k takes k + 2 cycles. A miss over n entries takes n + 2 cycles. `tb_sup_fit_placer` computes the weights itself and checks a small 9-column example with two task types. It reproduces the expected coverage, SUP and weight numbers and the order 8, 1, 4, 5.

## Partial displacement defragmentation (`defrag_engine`)

For each feasible position x(i) of the requested task, in list order, the engine works on a virtual copy of the occupancy:

1. It removes the placed tasks that overlap the request at x(i).
2. It puts the request at x(i).
3. It tries to re-place each removed task with the SUP Fit rule, lowest slot first.
4. If all of the removed tasks fit, their total move cost is compared with the best so far. The new cost replaces the best only if it is strictly lower, so on a tie the earlier position in weight order wins.

At the end the engine reports the best position (`x_best`), the tasks to move (`def_mask`) and their new columns (`new_pos`). It shares the placer's single position-list read port, multiplexed between the request's list and the re-placement searches. Its run time is roughly the number of feasible positions times the search lengths. That is microseconds, against milliseconds for any move.

## Where the state bits are: location lists

Each task type carries two lists in the location memory. Every entry is a *run* `{offset, len}` of consecutive bit positions.

- The **capture** list gives the state bits as bit offsets within the concatenation of all state frames the Configuration Manager passes on, pad frames removed, column by column.
- The **inclusion** list gives the preset bits within the frame data of the type's allocation bitstream.

Both lists are sorted. Byte n of a stream holds bit offsets 8n … 8n + 7, with bit k at offset 8n + k. A BlockRAM column's whole contents take a single run.

Both filters use the same combinational helper, `loc_run_matcher`. It turns the current run and the current byte into an 8-bit mask. It then says whether the run ends in this byte, and whether the next run may start in the same byte. In that last case the byte is held for one more cycle, which is a **run-boundary stall**. Otherwise both filters keep the stream at one byte per cycle.

- **`state_extraction_filter`** packs the selected bits in stream order, LSB first, into the task's 64 KiB context area. The last byte is padded with zeros. It outputs the number of bits.
- **`state_inclusion_filter`** replaces located bits of the passing bitstream with consecutive bits from the context area. It reads two neighbouring context bytes so that any 8-bit window is available. With an empty list it passes the stream unchanged, which is how new tasks are allocated.

## Storage (`task_database`)

| Table | Per | Contents |
|---|---|---|
| type table | task type (8) | width, BlockRAM column count, original column of its bitstream, bitstream address, feasible-position count, base and length of both location lists |
| position lists | task type | up to 78 columns each |
| location memory | shared | 16384 runs |
| slot table | placed task (16) | valid, type, current column |
| state buffer | slot | 64 KiB context area, address `{slot, offset}` |

The column occupancy `occ` is computed from the slot table. The memories are read combinationally.

## Interfaces of `reloc_top`

- **Host set-up:** `ty_*`, `pos_*` and `loc_*` write the tables. `host_st_addr`/`host_st_data` read saved contexts back.
- **Requests:** `op_valid`/`op_ready` with `op_remove`, `op_type`, `op_slot`. Results on `resp_valid` with `resp_ok`, `resp_slot`, `resp_pos` (leftmost column, 1-based) and `resp_defrag`.
- **Configuration port (`cp_*`):** a command `{read|write, {column, minor}, nframes}` accepted on valid & ready. A read returns a pad frame plus `nframes` frames on `cp_rd_*`. A write takes `nframes` frames on `cp_wr_*`. Data moves one byte per handshake. This is an abstraction of SelectMAP/ICAP. The real packet format, CRC and vendor frame address encoding are left to an adapter.
- **Bitstream store (`bs_*`):** `bs_req` with `bs_addr` asks for a pre-implemented bitstream. It arrives as a stream of `fbeat_t` (byte, frame address, first/last of frame, end of stream).
- **Relocation filter (`rep_*`):** the bitstream with included states leaves on `rep_out_*`, together with `rep_orig_col` and `rep_new_col`. It must come back relocated on `rep_in_*`. The bitstream relocation filter itself is not part of this RTL.
- **Tasks:** `task_clk_en[slot]` should drive a clock gate or clock enable. `task_rst[slot]` is a one-cycle reset after allocation.

## Departures and own choices

- The frame address is an abstract {column, minor} pair. The two flip-flop state frames of a CLB column are taken to be minors 2 and 3 (`STATE_MINOR0/1`). The real positions depend on the device.
- The BlockRAM column positions are evenly spread, which is an assumption about the device (`DEV_RAM_MAP`).
- A BlockRAM capture is counted with its pad frame, 65 frames per column. Some published read-data figures leave that pad frame out.
- Erasing writes zero frames, 22 per CLB column and 86 per BlockRAM column, rather than a stored de-allocation bitstream. Compressed (multi-frame write) bitstreams are not modelled.
- Re-placement order during defragmentation (lowest slot first), the two-pass move, the slot and type limits, and the context area size are choices of this design.
- A task that straddles a BlockRAM column it does not use still occupies and moves that column, counted as one of its BlockRAM columns. On the device map here there are at most 12 adjacent CLB columns, so a 19-CLB-column task becomes 19 CLB + 1 BlockRAM column and costs 1149 frames (18.9 ms) to move instead of 912 (15.0 ms).
- Rewriting the bitstream is meant to cost no time. Here it costs one cycle for each location run that ends inside a byte shared with the next run, plus a few cycles per frame for port commands: about 2 to 4 per 824-byte frame, measured.
- The placement queue, the choice of which queued task to retry, and the off-line SUP weight computation belong to the host software.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. The references are computed independently in the testbench:

- **`tb_sup_fit_placer`:** the small worked example, plus random maps compared with a first-fit model.
- **`tb_defrag_engine`:** random maps against a full software model of the search, including the tie rule.
- **`tb_state_extraction_filter`, `tb_state_inclusion_filter`:** random run lists, including runs that meet inside a byte, compared with a bit-level model. They also check the throughput of one byte per cycle plus one cycle per run-boundary stall.
- **`tb_config_manager`:** frame addresses, pad-frame removal, byte counts and cycle counts for CLB and BlockRAM columns.
- **`tb_task_database`:** table writes, read ports and occupancy.
- **`tb_reloc_controller`:** the order of the steps, clock-enable and reset behaviour.
- **`tb_reloc_top`:** runs the whole system at its default size. Around it are behavioural models of:
  - the configuration port with its frame memory (`tb_cfg_port_model`);
  - the bitstream store (`tb_bs_store_model`);
  - the relocation filter (`tb_replica_model`).

  A schedule fragments the device, forces defragmentations (one of them moves a task with a BlockRAM column), refuses a request for lack of columns, and removes tasks. After each operation it checks three things:
  - every moved task's preset bits at its new column equal the state read back at its old one;
  - the rest of its frames equal the original bitstream;
  - the bytes on the port equal the cost formula above.

  It also counts each mechanism and fails if one never happened: direct placement, defragmentation, relocation, refusal, removal, BlockRAM capture, and stalls in both filters.

- **`tb_reloc_table1`:** relocates five tasks of realistic size at the default parameters, one at a time. A one-column request inside the task forces a defragmentation that moves it. Per task it checks the bytes read back, the bytes through the port, the cost in frames, the cycle count, the captured bit count, and the state at the new column. The results at one byte per cycle and 50 MHz:

| Task (CLB/BlockRAM columns, flip-flops used) | Read back | Moved | Time |
|---|---|---|---|
| LDPC decoder (1/0, 44) | 3,296 B | 39,552 B | 0.79 ms |
| 16-bit divider (1/0, 211) | 3,296 B | 39,552 B | 0.79 ms |
| FIR filter (3/1, 944 + BlockRAM) | 63,448 B | 313,944 B | 6.28 ms |
| Rijndael (7/0, 788) | 23,072 B | 276,864 B | 5.54 ms |
| S-Core CPU (19/1 here, 2287) | 116,184 B | 946,776 B | 18.94 ms |

- **`tb_reloc_schedule`:** serves 50 random requests of those five task sizes. Each task runs for three times its allocation time, then is removed. A host-side queue holds requests in order: a refused request and everything behind it wait until a task is removed. Every operation is checked against a model kept in the testbench:
  - a direct placement takes the first free listed position;
  - defragmentation happens only when needed and possible;
  - refusals are justified;
  - port byte counts are exact;
  - occupancy, counters and cycle bounds agree.

  With the built-in seed, 5 requests had to wait and none needed defragmentation. SUP Fit alone found a position every time enough columns were free. The test reports total time (373.6 ms at 50 MHz), the longest queue and the column utilization.

Simulating with Verilator 5, for example:

    verilator --binary --timing -Wno-fatal --top-module tb_reloc_top \
        rtl/reloc_pkg.sv $(ls rtl/*.sv | grep -v reloc_pkg) \
        tb/tb_cfg_port_model.sv tb/tb_bs_store_model.sv tb/tb_replica_model.sv tb/tb_reloc_top.sv
    ./obj_dir/Vtb_reloc_top

The block testbenches build the same way, with their own top module and the models they use.

## Changing it

- The device is described by `DEV_COLS`, `DEV_RAM_MAP` and the frame constants in `reloc_pkg`.
- The task and slot limits are parameters of `reloc_top` (`NUM_TYPES`, `NUM_SLOTS`), with the address widths in the package.
- A different port or frame layout only touches `config_manager` and the location lists the host loads.
