# Bandwidth-efficient motion compensation and SDRAM controller for an H.264 HDTV decoder

This is SystemVerilog RTL for the motion-compensation (MC) part of an H.264
main-profile decoder and the SDRAM memory controller that feeds it. It is
built from the design in "A Bandwidth-Efficient Motion Compensation Memory
Organization for H.264 HDTV Decoder". The target is 1920x1088 at 30 frames/s
with a 100 MHz clock and one 32-bit SDR SDRAM. The part is 4 banks x 2048 rows
x 256 columns.

## What is in it

The top level is `rtl/mc_top.sv`. It has two halves.

The motion-compensation engine (`mc_engine`) contains:

- **MV generator** (`mv_generator`, `mvp_gen`, `mv_row_fifo`, `scalefactor_gen`, `direct_mv`):
  - MV prediction plus MVD for 16x16, 16x8, 8x16 and 8x8 partitions, using
    neighbour-selection tables with median and directional prediction.
  - Spatial direct mode reuses the MVP hardware.
  - Temporal direct mode uses a division- and multiplication-free ScaleFactor
    unit with co-located vectors read from memory.
  - Neighbour vectors of the MB row above are held in one row FIFO.
- **E2CMA sequencer** (`e2cma_ctrl`):
  - Walks the blocks of each 8x8 in the order upper-left, lower-left, upper-right, lower-right.
  - For each 4x4 block it picks vertical reuse, horizontal reuse, both or neither.
  - It requests only the reference words that the interpolator does not already hold.
  - A luma 4x4 block needs 27, 9, 12 or 4 word cycles, depending on the reuse kind.
- **Interpolator** (`clci_interp` with `input_entry`, `clci_unit`, `cfir`, `fir6`, `bilinear`):
  - One combined luma/chroma interpolator per list.
  - Luma uses the 6-tap filter and quarter-sample averaging; chroma uses the eighth-sample bilinear filter on the same adders.
  - Each unit outputs 4 luma or 2 chroma pixels per cycle.
  - A 21-entry reuse register file keeps the rows of the block above.
- **Weighted prediction** (`weighted_pred`):
  - Default, explicit and implicit modes, with the residual added and the result clipped.
  - One cycle of latency.

The memory controller (`mem_ctrl`) contains:

- **Channel address generator and scheduler** (`mcags`). It serves three channels:
  - direct-mode vectors;
  - interpolation windows;
  - de-blocking writes.
- **Address translator** (`addr_translator`):
  - A frame start table, so frames can be placed anywhere.
  - Each 8x8 quadrant of an MB goes to its own bank, so the four quadrants of a window can be served from four banks.
  - One row holds 16 luma MBs or 32 chroma MBs.
  - A 1080HD frame with its vectors takes 797 rows.
- **Command queue** (`cmd_queue`):
  - 7 entries.
  - Each entry is classified on entry as row hit, bank hit/row miss, or bank miss.
- **Per-bank controllers and access scheduler** (`bank_ctrl`, `mem_sched`):
  - PRECHARGE and ACTIVE of later accesses are overlapped with the data transfer of earlier ones.
  - `sched_en = 0` runs the accesses strictly one after another, for comparison.
- **Timing unit** (`timing_unit`): tRP, tRCD, CAS latency, burst length and tWR are set at initialisation.
- **Read and write data buffers** (`data_buffer`).

Shared types and constants are in `rtl/mc_pkg.sv`.

## Interface summary (`mc_top`)

- **Setup:**
  - `cfg_*` SDRAM latencies, written with `cfg_we`;
  - `sched_en`;
  - the frame start table (`tbl_we`, `tbl_idx`, `tbl_row`);
  - POCs, reference, co-located and current frame indices;
  - weighted-prediction mode, weights and offsets.
- **Per MB:**
  1. `mb_start`, with `need_col` and the MB position.
  2. One command per partition: list, partition, index, mode (MVP / spatial / temporal), MVD.
  3. `mb_end`.
  - Handshakes are `mb_ready`, `cmd_ready` and `end_ready`.
- **Output:**
  - `pred_valid`, with plane, raster block and column, 4 predicted pixels and 4 reconstructed pixels.
  - The residual for that column is sampled in the same cycle.
- **De-blocking channel:** `db_valid` / `db_ready` with frame, plane, position and a 32-bit word.
- **SDRAM:**
  - a decoded command (`sd_cmd`), bank, address, DQ in/out/enable and DQM;
  - a pad ring maps `sd_cmd` to CS#/RAS#/CAS#/WE#.
- **Statistics:** one-cycle event pulses, for reuse kinds, access statuses, queue full and command overlap.

## Measured behaviour

- Two reads that each miss their row, in different banks, with CL = 2, BL = 4 and tRP = tRCD = 2:
  - 14 cycles with scheduling;
  - 20 cycles without.
  - This matches the figures of the original design.
- The E2CMA word counts per 4x4 luma block (27 / 9 / 12 / 4) are checked cycle by cycle.
- **Throughput falls short of real-time 1080HD.** In the end-to-end test, five MBs at CL = 3, BL = 4 with scheduling take 9185 cycles, about 1840 cycles per MB.
  - 1080HD at 30 frames/s and 100 MHz allows 408 cycles per MB.
  - The cause is that each reference word is a separate SDRAM access, and only the first word of each burst is used.
  - Using all four beats of a burst for horizontally adjacent words is the obvious next step.
- **Frame memory at the defaults:** the 64 Mbit part holds two 1920x1088 frame slots of 797 rows each.
  - Sixteen reference pictures need `ROW_W = 14`, which means a 512 Mbit part.
  - For smaller pictures, lower `FRAME_W_MB` and `FRAME_H_MB`: at CIF, 17 frames take 680 rows.

## Tests

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`.

- `tb_clci_interp`: the interpolator against a reference model of H.264 luma/chroma interpolation, for every fraction and reuse kind, including word counts.
- `tb_scalefactor_gen`: ScaleFactor, implicit weights and direct-mode scaling over random POCs and vectors, against the standard's division formula.
- `tb_weighted_pred`: all weighted-prediction modes with random weights, offsets and residuals.
- `tb_mem_ctrl`: the memory controller against the SDRAM model (`tb/sdram_model.sv`). It covers:
  - the 14/20-cycle case;
  - all four access statuses;
  - reads and writes on all channels, including multi-word windows.
- `tb_mc_top`: full-size end-to-end test at the default parameters.
  - Nine MBs are decoded with MVP, bi-prediction, 16x8, 8x16 and 8x8 partitions, temporal and spatial direct, and all three weighting modes.
  - Several CAS latencies and burst lengths are used, with scheduling on and off.
  - De-blocking traffic runs at the same time.
  - Every output column is compared with a software model.
  - The test fails if any counted mechanism never occurred.

## Design choices and limits

- **Not included:** the SDRAM itself (a behavioural model is in `tb/`), the de-blocking filter and the entropy decoder. Their interfaces are ports.
- **Memory geometry:** 256 columns x 2048 rows per bank. This gives 16 luma MBs per row.
  - The original text also mentions 9 column address bits, but the stated MBs per row and the part size both need 256 columns.
- **ScaleFactor range:** clipped to [-1024, 1023] as in H.264. TD_B and TD_D are clipped to [-128, 127].
- **Picture edges:** reference windows are not padded, so motion vectors must keep the window inside the picture.
- **Not supported:**
  - 8x4 and 4x8 partitions;
  - the reference-index rules of spatial direct;
  - the MVP exceptions other than the C->D replacement.
- **Not issued:** SDRAM refresh.
- **Writes:** a write stores a single word, and the rest of the burst is masked.
- **Read bursts:** the MC read channel uses only the first word of a burst.
- **Bank conflicts:** instead of a second FSM per bank, each bank controller accepts the next access to the open row while it waits after a column command.
- **Channel priority:** a window in progress first, then direct-mode vectors, then de-blocking.

## Simulating

Compile the package first, then the modules, then the testbench. For example, for the full design:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
        rtl/mc_pkg.sv $(ls rtl/*.sv | grep -v mc_pkg) tb/sdram_model.sv \
        tb/tb_mc_top.sv --top-module tb_mc_top -o sim
    ./obj_dir/sim

The block testbenches are built the same way, with their own top module.
`tb_mc_top` ends after about 200 us of simulated time, which takes well under a second to run.
It prints the count for each mechanism and the phase-A cycle count.
