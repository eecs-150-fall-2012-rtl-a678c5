# MIPS150 cached memory system

A small pipelined MIPS processor on a Virtex-5 board used to run only from on-chip block
RAM, which limits programs to a few hundred kilobytes. This RTL puts the processor in front
of the board's 256 MB DDR2 module instead. Two 8 KB caches sit between the CPU and the
DRAM. A small read-only BIOS memory lets the CPU boot, because DRAM cannot be preloaded.
Two counters measure cycles per instruction. The CPU keeps the simple block-RAM timing it
had before: it presents an address and gets the word in the next cycle. When the memory
cannot answer in time, a single `stall` signal freezes the pipeline.

```
              fetch port                 data port
   CPU  ──────────┬───────────────────────────┬──────────
                  │        mem_decode         │
          ┌───────┼──────────┬───────────┬────┴───────┐
          │       │          │           │            │
       bios_mem  cache (I$)  cache (D$)  io_regs ── UART
                  │          │
               request_controller
                  │    │    │          CPU clock, 50 MHz
      ─ ─ ─ ─ ─ mig_af mig_wdf mig_rdf ─ ─ ─ ─ ─ (async_fifo x3)
                  │    │    │          DDR2 clock, 200 MHz
               DDR2 memory controller (vendor IP, not included)
```

`mips150_mem_system` (the top) contains all of this except the CPU pipeline, the UART, and
the DDR2 controller and module. Their signals are top-level ports. `memory150` groups the
two caches, the request controller and the three FIFOs.

## Memory map

The top four address bits choose the target. The fetch port and the data port are decoded
separately:

| `addr[31:28]` | fetch (PC)        | data access                                              |
|---------------|-------------------|----------------------------------------------------------|
| `0001`        | instruction cache | data cache, read/write                                   |
| `0010`        | —                 | instruction cache, write only, if the store's PC[30] = 1 |
| `0011`        | —                 | data cache (read/write) and instruction cache (write, if PC[30] = 1) |
| `0100`        | BIOS              | BIOS, read only                                          |
| `1000`        | —                 | I/O page                                                 |

Both caches and every DDR2 command use only address bits [27:0]. Segments `0x1`, `0x2`
and `0x3` are therefore three names for the same DRAM location. This is how a program gets
loaded:

1. The CPU boots at `0x4000_0000` and runs from the BIOS.
2. The BIOS receives a program over the UART. It stores the program to `0x3xxx_xxxx`.
   The store goes through both caches and on to DRAM.
3. The BIOS jumps to `0x1xxx_xxxx`. The CPU now fetches the program through the
   instruction cache, and it reads the program's data section through the data cache.

The PC[30] rule means only code running from the BIOS (PC `0x4…`) can write the
instruction cache. `mem_decode` takes the store's own PC on the extra input `data_pc`.

The caches are not kept coherent with each other. A store to `0x1…` updates only the data
cache (and DRAM). If the instruction cache holds that line, it keeps the old copy.
Software that writes code must use `0x3…`.

## CPU-side timing and the stall

This is the part most easily got wrong when connecting a CPU.

* In cycle *t* the CPU drives `pc` and, for the data port, `data_addr`/`data_re`/
  `data_we`/`data_din`. The answer (`instr`, `data_dout`) appears in cycle *t+1*.
* In cycle *t+1*, `stall` tells the CPU whether that answer is valid. If `stall` is high,
  the CPU must freeze. Every pipeline register holds, and the CPU keeps driving the
  request of cycle *t+1* unchanged. Do this with a clock enable, not a gated clock.
* A request is accepted at each clock edge where `stall` is low. While `stall` is high,
  each cache holds its last accepted request, so its output stays valid. This holds even
  when only the other cache is stalling. The BIOS and the decoder's output selects are
  held in the same way.
* `stall` is the OR of both caches' stall signals. It depends only on registered state,
  never combinationally on the current request. Its sources:
  * a read miss in either cache, from the cycle after the request until the refilled
    word is on `dout`;
  * any store to a cached segment, until both data beats of the write-through are in
    the write-data FIFO. Stores are never buffered.
* A read hit costs no stall cycle. A store costs at least two stall cycles. A read miss
  costs two clock-domain crossings plus the DRAM latency. In simulation, with the DDR2
  model answering 8 controller cycles after the command, that comes to about 10–20 CPU
  cycles.
* The I/O page applies a store's side effects (UART byte, counter clear) and a load's
  side effects (consuming a received byte) only in a cycle with `stall` low. Each
  access therefore acts exactly once.

Once `rst` is released, the CPU should fetch from `0x4000_0000`.

## The cache (`cache`)

The instruction and data caches are two instances of the same module:

* 8 KB, direct-mapped, 256-bit (32-byte) blocks, so 256 lines.
* Write-through: every store goes to DRAM.
* Write-no-allocate: a store that misses does not bring its line into the cache.

A 256-bit block is one DDR2 burst: four 64-bit words, delivered as two 128-bit beats.

| address bits | use                                                   |
|--------------|-------------------------------------------------------|
| `[27:13]`    | tag (15 bits), kept in `cache_tag_blk_ram`            |
| `[12:5]`     | line index                                            |
| `[4]`        | which 128-bit half, i.e. which beat                   |
| `[3:2]`      | word within the half                                  |

`cache_data_blk_ram` stores each line as two entries of 128 bits, with a byte-enable per
byte. A refill writes one entry per beat, and a store writes only its own bytes. Both RAMs
have a registered read port and read the old contents when a read and a write hit the same
entry. The valid bits are 256 flip-flops, so `rst` clears them in one cycle.

States: `S_IDLE` → `S_RD_REQ` → `S_RD_BEAT0` → `S_RD_BEAT1` → `S_REFETCH` for a read
miss, and `S_IDLE` → `S_WR_REQ` → `S_WR_BEAT2` for a store. In `S_REFETCH` the RAMs
re-read the refilled line, so the next `S_IDLE` cycle finds a hit and drops `stall`. A
store that hits updates the line in the same cycle that it enters `S_WR_REQ`.

DDR2 commands, toward the request controller. Addresses count 64-bit words:
`af_addr_din = {6'b0, addr[27:5], 2'b00}`. That is 31 bits, of which the low 25 are
significant.

* **Read** (`af_cmd_din = 3'b001`): `af_wr_en` stays high until `!af_full`. Then
  `rdf_rd_en` stays high. Each cycle with `rdf_valid` high delivers one beat, low half
  first.
* **Write** (`af_cmd_din = 3'b000`): the command and the first beat are offered together
  and go in together when `!af_full && !wdf_full`. The second beat follows when
  `!wdf_full`. The 32-bit store word is copied into all four lanes of both beats.
  `wdf_mask_din` is active low (a 0 writes that byte), and only the stored bytes are
  unmasked.

`af_wr_en`, `wdf_wr_en` and `rdf_rd_en` are valid/ready signals driven from state alone.
The full flags and `rdf_valid` only decide when a transfer happens. This avoids
combinational paths through the arbiter.

## Sharing the DRAM (`request_controller`)

The request controller lets each cache behave as if it owned the FIFOs.

* **Command grant.** A cache requests by raising `af_wr_en`. If both request in the same
  cycle, the one served less recently wins (round robin). The losing cache sees both full
  flags high, so it simply waits in its current state.
* **Write lock.** Once a write's first beat is accepted, the controller stays locked to
  that cache until its second beat is in. Two beats of one block are never separated by
  the other cache's data.
* **Read return.** Each accepted read pushes its requester's number (0 = I$, 1 = D$) into
  a two-entry in-order queue. The DDR2 controller returns read data in command order, so
  the head of the queue names the owner of the beats now at the read FIFO's output. Only
  that cache sees `rdf_valid`, and only its `rdf_rd_en` pops the FIFO. The entry retires
  after two beats.

Because of the read queue, an instruction miss and a data miss can be outstanding at the
same time: the second command goes out while the first one's data is still returning. The
controller asserts that read data never arrives while no read is outstanding.

## Clock crossing (`async_fifo`)

The three FIFOs are instances of one dual-clock FIFO:

| FIFO      | width | contents                |
|-----------|-------|-------------------------|
| `mig_af`  | 34    | `{cmd, addr}`           |
| `mig_wdf` | 144   | `{mask, data}`          |
| `mig_rdf` | 128   | read data               |

Each FIFO is 16 entries deep. The read and write pointers cross clock domains in Gray code
through two-flip-flop synchronisers. `full` and `valid` (not empty) are conservative by
the synchroniser delay. The read side is first-word-fall-through: `dout` shows the oldest
word whenever `valid` is high, and `rd_en` removes it. `memory150` brings out the DDR2
controller ends of the FIFOs:

| ports                                          | direction | function                        |
|------------------------------------------------|-----------|---------------------------------|
| `mig_af_cmd`, `mig_af_addr`, `mig_af_valid`    | out       | head of the address FIFO        |
| `mig_af_rd_en`                                 | in        | pops the address FIFO           |
| `mig_wdf_data`, `mig_wdf_mask`, `mig_wdf_valid`| out       | head of the write-data FIFO     |
| `mig_wdf_rd_en`                                | in        | pops the write-data FIFO        |
| `mig_rdf_data`, `mig_rdf_wr_en`                | in        | pushes into the read-data FIFO  |
| `mig_rdf_full`                                 | out       | read-data FIFO is full          |

A DDR2 controller attaches to these ends. It pops commands and write beats, and it
pushes read beats, two per read command, in the order the commands were taken.

## BIOS and I/O

`bios_mem` is a 4096-word read-only memory with two ports: port A serves fetches, port B
serves loads. Its contents come from a hex file named by the parameter `BIOS_FILE`
(`INIT_FILE` in the module), one 32-bit word per line. If no file is given, it reads as
zero, and synthesis then removes it.

`io_regs`:

| address       | access | contents                                           |
|---------------|--------|----------------------------------------------------|
| `0x8000_0000` | read   | `{31'b0, uart_tx_ready}`                           |
| `0x8000_0004` | read   | `{31'b0, uart_rx_valid}`                           |
| `0x8000_0008` | write  | low byte goes to the UART; `uart_tx_valid` pulses  |
| `0x8000_000C` | read   | `{24'b0, uart_rx_data}`; `uart_rx_ready` pulses    |
| `0x8000_0010` | read   | cycle counter: +1 every clock                      |
| `0x8000_0014` | read   | instruction counter: +1 every clock with `stall` low |
| `0x8000_0018` | write  | clears both counters                               |

The CPI of a benchmark is the difference of the cycle counter divided by the difference
of the instruction counter. The instruction counter assumes the pipeline retires one
instruction in every cycle it is not stalled. If a clear and a count fall in the same
cycle, the clear wins.

## Where this follows the original design and where it does not

These parts follow the original specification:

* the cache geometry and policies;
* the 256-bit block as one burst of four 64-bit words;
* the DDR2 command codes, address format, active-low mask and the write and read
  sequences;
* the memory map, including the PC[30] rule and the `0x3` segment;
* the I/O register map and the counting rules;
* the partitioning: caches, request controller, three clock-crossing FIFOs, a
  dual-port BIOS ROM;
* the clock rates: CPU at 50 MHz, DDR2 controller at 200 MHz.

These are choices made in this RTL. Each one is also noted in the comment at the top of
its module:

* the cache's state machine, the refetch cycle, the flip-flop valid bits, and stalling on
  every store (no write buffer);
* the arbitration policy (round robin), the write lock and the in-order read-return queue;
* the FIFO depth (16), Gray-code pointers and fall-through reads;
* the BIOS depth (16 KB);
* the `data_pc` input that carries PC[30];
* zero for reads of unmapped addresses;
* dropping an instruction-cache fetch in the cycle the instruction cache is written. This
  cannot happen while both the store and the next fetch run from the BIOS.

Not included:

* the CPU pipeline;
* the UART;
* the vendor DDR2 controller and the DDR2 module;
* the video blocks of the final board system (line engine, DVI driver, DVI transmitter
  chip);
* the RS-232 level shifter.

The CPU-side ports are shaped so that a three-stage MIPS pipeline built around block-RAM
memories can connect directly.

## Files

| file | contents |
|------|----------|
| `rtl/mem_pkg.sv` | widths, DDR2 command codes, address helpers, memory-map constants |
| `rtl/mips150_mem_system.sv` | top: decoder, BIOS, I/O, `memory150` |
| `rtl/mem_decode.sv` | memory-map decoder and output multiplexers |
| `rtl/memory150.sv` | two caches, request controller, three FIFOs |
| `rtl/cache.sv`, `rtl/cache_tag_blk_ram.sv`, `rtl/cache_data_blk_ram.sv` | the cache and its RAMs |
| `rtl/request_controller.sv` | arbiter between the caches and the FIFOs |
| `rtl/async_fifo.sv` | dual-clock FIFO |
| `rtl/bios_mem.sv`, `rtl/io_regs.sv` | boot ROM; UART registers and counters |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mmult_trace` (benchmark traffic) |
| `tb/mig_model.sv` | behavioural DDR2 controller + memory (see below) |
| `tb/tb_mem_pkg.sv` | initial DRAM contents and byte-merge helpers for the testbenches |
| `tb/bios_test.hex` | 64-word BIOS image for `tb_bios_mem`; word *i* = (*i* × 0x9E3779B1) XOR 0x0BADF00D |

## Simulation

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each one also has a
watchdog that ends a hung run as a failure. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/mem_pkg.sv \
  --top-module tb_mips150_mem_system tb/tb_mips150_mem_system.sv
./obj_dir/Vtb_mips150_mem_system
```

Replace the top-module name to run another testbench. Run from the folder that contains
`rtl/` and `tb/`, because `tb_bios_mem` reads `tb/bios_test.hex` by that path.

`mig_model` stands in for the DDR2 controller. It takes one command at a time. It answers
a read after a fixed latency (`READ_LAT` controller cycles) with the two beats of the
burst. It applies writes byte by byte according to the mask. It can pause at random for
`PAUSE_LEN` cycles, which lets the FIFOs fill up. DRAM that was never written reads as a
fixed hash of its address (`tb_mem_pkg::init_word`), so every read can be checked.

* `tb_mips150_mem_system` runs the whole system at its default sizes. It loads the BIOS
  image through the hierarchy and boots from it. It copies a 1024-word program through
  `0x3…`, checks that a store to `0x2…` from outside the BIOS is ignored, and runs the
  program from the instruction cache while loading and storing through the data cache.
  It also exercises the UART registers and the counters, and checks the counter values
  cycle-exactly. It counts each mechanism and fails if one never happened: BIOS fetch
  and load, misses in both caches and both at once, store hit and store miss,
  write-through stall, full write FIFO, the PC[30] guard, counter clear, UART transmit
  and receive.
* `tb_memory150` drives both cache ports the way a pipeline does: it presents the next
  request before it knows whether the previous one stalls. It checks every word, and
  checks that a loop over a warm working set never stalls.
* `tb_cache` drives the cache like a pipeline, with random `stall_in`, and keeps its own
  model of the cache directory. It checks the following:
  * a predicted read hit stalls for zero cycles and reaches no DRAM;
  * a predicted miss costs exactly one block read;
  * every store is exactly one block write with the right number of unmasked bytes;
  * a store miss does not allocate;
  * `dout` is held while only the other cache stalls.
* `tb_request_controller`, `tb_async_fifo` (both clock ratios, and forced full),
  `tb_mem_decode`, `tb_io_regs`, `tb_bios_mem`, `tb_cache_tag_blk_ram` and
  `tb_cache_data_blk_ram` test their modules alone.

## Sizes and workloads

At the default parameters, the RTL synthesises to about 143 kbit of memory and about 900
flip-flops. Most of the memory is the two caches: 2 × (64 kbit of data + 3.75 kbit of
tags).

The benchmark intended for this system multiplies two 64 × 64 matrices of 32-bit words.
Its three matrices take 48 KB. That fits easily in the 256 MB of DRAM, but is six times
the data cache, so it runs with a steady stream of misses. The program itself needs the
CPU, which is not part of this RTL.

`tb_mmult_trace` replays the benchmark's memory traffic through the full system at its
default sizes:

* a 16-instruction loop fetched from the instruction cache;
* two loads per multiply-accumulate, through the data cache;
* one store per result element.

It checks all 4096 elements of S. It reads the cycle and instruction counters through the
I/O page and prints the CPI. The matrices sit on 64 KB boundaries (`0x1001_0000`,
`0x1002_0000`), so their rows map onto the same cache lines, and the trace is close to a
worst case for the direct-mapped cache. With the DDR2 model's 8-cycle read latency, the
run takes about 3.5 M cycles for 1.05 M instructions, a CPI of 3.3. The matrix contents
are this testbench's own: A[i][j] = i + 2j + 1 and B[i][j] = 3i − j + 7. The original
program's checksum therefore does not apply. The simulation takes about 20 seconds.
