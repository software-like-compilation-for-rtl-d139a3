# Replicated stream processors behind a fixed connectivity shell

Many data-center FPGA accelerators are one small *processing unit* (PU)
copied a hundred times or more, plus infrastructure that moves data between
external memory and those copies. The infrastructure rarely changes; the PU
changes all the time. This design is built around that split: a
**connectivity shell** that is the same for every application of a given
interface size, and **PU slots** that are all filled with the same PU. The
shell and each slot meet only at a **register block**, a plain column of
registers on each side of the border, so a slot sees exactly the same
registered boundary wherever it sits and the shell never has to know what is
inside a slot. The price of that boundary is two cycles of delay on every
wire in each direction, and the interface protocol is built to tolerate it.

The default configuration is 180 PU slots holding a k-nearest-neighbour PU.
Five PU kinds are provided; one is chosen per build.

```
            memory port (AXI4-Lite style, one DDR channel)
                 |  read (AR/R)                 ^ write (AW/W/B)
                 v                              |
   +-------------------------- connectivity_shell ---------------------+
   |  input_stream_ctrl                          output_stream_ctrl    |
   |   reset phase -> per-PU config -> broadcast   per-PU rx buffers,  |
   |   (shared token bus, per-PU valid)            round-robin writer  |
   +------|------------------------------------------------^-----------+
          | s2p[i]                                          | p2s[i]
   +------v------------------------------------------------|-----------+
   | reg_block[i]   left column  ->  right column  (2 regs per bit)    |
   +------|------------------------------------------------^-----------+
          v                                                 |
   +--------------------------- pu_slot[i] ----------------------------+
   |  pu_port (input buffer, output sender)  ->  PU core (PU_KIND)     |
   +--------------------------------------------------------------------+
                            i = 0 .. NUM_PU-1
```

## The PU IO interface

Everything between shell and PU crosses one bundle of wires per slot. Its
width is fixed by the token sizes: IN_W input data bits, 8 output data bits,
five handshake bits and one reset bit. That is **46 bits** for PUs with 32-bit
input tokens (Summer, Dot, KNN) and **22 bits** for PUs with 8-bit tokens
(Counter, Time Series Prediction).

| direction   | bits                                   | meaning |
|-------------|----------------------------------------|---------|
| shell -> PU | `in_data[IN_W-1:0]`                    | input token (same on all slots) |
| shell -> PU | `in_valid` (bit IN_W)                  | a token is sent to this slot this cycle |
| shell -> PU | `in_last` (bit IN_W+1)                 | the token is the last of the stream |
| shell -> PU | `out_ready` (bit IN_W+2)               | grant: the PU may send one output token |
| shell -> PU | `pu_rst` (bit IN_W+3)                  | synchronous reset of the PU |
| PU -> shell | `in_ready` (bit 0)                     | grant: the shell may send one input token |
| PU -> shell | `out_data[7:0]` (bits 8:1)             | output token |
| PU -> shell | `out_valid` (bit 9)                    | an output token is sent this cycle |

### Why ready is a grant, not a level

With two registers in each direction, a receiver that drops `ready` is
obeyed only four cycles later; a normal valid/ready handshake would lose
data. Here a `ready` pulse is a **grant for one beat**: in every cycle where
the sender sees the (delayed) ready bit high it may send at most one beat,
and a grant it does not use simply expires. The receiver
(`li_rx_fifo`) remembers the grants it issued during the last `LAT` cycles
(`LAT` = 4: two register stages out, two back) and only grants again when

    occupancy + beat arriving now + grant now + grants of the last LAT cycles + 1 <= DEPTH

Every beat that can still arrive is thus already paid for, and the buffer
cannot overflow, whatever the sender does with its grants and however the
consumer stalls. With `DEPTH = 8` the receiver still grants every cycle when
its consumer keeps up, so the interface runs at one beat per cycle
(the PU-port testbench measures at least 190 beats in 200 cycles).

The same buffer is used at both ends: inside every slot for input tokens
(`pu_port`) and inside the shell for every slot's output tokens
(`output_stream_ctrl`). A sender is always trivial: `valid = have_data &&
grant_seen`.

Grants tolerate *any* delay up to `LAT`, so the same slot logic also works
with the register block removed (the shell and slot testbenches do this).
Longer paths need a larger `LAT`, which `EXTRA_REGS` sets (see Parameters).

## One job, step by step

The host side is represented by plain ports: `cfg_base`, `data_base`,
`out_base` (byte addresses), `data_words`, a `start` pulse, and `busy`/`done`.
Memory is 32-bit words.

1. **Reset phase** (`8 + LAT` cycles, 12 by default). The shell drives `pu_rst` on all slots. The
   slots' input buffers, the PU cores and the shell's output buffers are
   cleared, and any beat still in flight from the previous job is dropped.
   A PU can therefore be rerun with new configuration without a global reset.
2. **Configuration.** PU 0 gets `cfg_words(kind)` words from `cfg_base`, then
   PU 1 the next ones, and so on. A configuration token goes to its PU in a
   cycle where that PU grants. Each memory word is cut into `32 / IN_W`
   tokens, lowest bits first.
3. **Broadcast.** The shared stream (`data_words` words from `data_base`) is
   sent to **all** PUs at once: a token leaves only in a cycle where every PU
   grants, so the stream runs at the pace of the slowest PU
   (`bcast_stall` marks the cycles in which it waits). The final token
   carries `in_last`. The general stream-processor model gives every PU a
   stream of its own; this design follows the simpler single-channel
   variant in which all PUs share one stream and differ only in their
   configuration. Separate streams would change only this controller.
4. **Results.** After `in_last` each PU sends a fixed number of output
   tokens (`out_len(kind)`). The shell buffers them per slot and writes them
   round-robin, one token per 32-bit word, token j of PU i to word
   `i * out_len + j` after `out_base` (`out_contention` marks cycles in which
   a PU waits for the write port). `done` rises once all
   `NUM_PU * out_len` writes are acknowledged.

Reads are prefetched up to 8 words ahead and the read-data channel is always
ready, because space for each request is reserved when it is issued. Writes
are issued one at a time (address and data together, then the response).

## PU kinds

All PUs take a stream of tokens with `in_last` on the final one and then
send their result, least significant byte first. Their configuration comes
first in the same stream.

| `PU_KIND`    | token | config per PU | output tokens | what it computes |
|--------------|-------|---------------|---------------|------------------|
| `PU_SUMMER`  | 32 b  | 1 word        | 4             | sum of every token received, configuration included, mod 2^32 |
| `PU_DOT`     | 32 b  | 1 word (ignored) | 4          | sum of a_i * b_i mod 2^32 over the interleaved stream a0, b0, a1, b1, ... |
| `PU_COUNTER` | 8 b   | 1 word (ignored) | 512        | a 16-bit count for each of the 256 byte values, in value order |
| `PU_KNN`     | 32 b  | 4 words (query vector) | 6      | 16-bit indices of the 3 nearest 4-element vectors, nearest first |
| `PU_TSP`     | 8 b   | 6 words       | 4             | number of correctly predicted signs (time series prediction) |

**KNN.** Elements are the low 16 bits of a token, signed. Each group of four
data tokens is one vector; its squared Euclidean distance to the query is
accumulated one element per cycle and then inserted into a sorted list of
the three best. On equal distance the earlier vector stays ahead. Unfilled
places report `0xFFFF`. Vector indices are 16 bits, so streams are limited to
65536 vectors.

**Time series prediction.** Elements are signed bytes. For each new element
the PU compares the 7 previous elements (index 0 = most recent) with 7
configured coefficients; bit i of a 7-bit index is `hist[i] > coef[i]`. A
configured 128-entry one-bit table maps the index to the prediction
"element >= 0", which is scored against the element that arrives.
Predictions start after 7 elements. Configuration bytes 0..6 are the
coefficients, byte 7 is unused, bytes 8..23 are the table (entry n at bit
n mod 8 of byte 8 + n/8).

**Counter.** After each reset the PU first clears its 256-entry block RAM
(256 cycles; its grants stay low meanwhile, which the broadcast absorbs).
Each token is a read-modify-write: read when accepted, written back
incremented in the next cycle. When the same byte arrives twice in a row the
RAM read returns the value before the pending write, so the written value is
forwarded instead. This keeps one token per cycle. The PU exposes this
forwarding as `bypass_used`.

Summer and Dot take one token per cycle; KNN and TSP likewise.

## Files

| file | contents |
|------|----------|
| `rtl/fleet_pkg.sv` | PU kinds, interface widths, per-kind configuration and output lengths |
| `rtl/fleet_top.sv` | top: shell, NUM_PU register blocks and slots |
| `rtl/connectivity_shell.sv` | shell: input and output stream controllers, interface packing |
| `rtl/input_stream_ctrl.sv` | reset phase, configuration, broadcast; read prefetch |
| `rtl/output_stream_ctrl.sv` | per-slot output buffers, round-robin memory writer |
| `rtl/reg_block.sv` | two register columns per slot border |
| `rtl/li_rx_fifo.sv` | grant-based receive buffer used at both ends of the interface |
| `rtl/pu_port.sv`, `rtl/pu_slot.sv` | slot-side interface logic, core selection |
| `rtl/pu_summer.sv`, `pu_dot.sv`, `pu_counter.sv`, `pu_knn.sv`, `pu_tsp.sv` | PU cores |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ref_pkg.sv` | reference models of the five PUs |
| `tb/axi_mem_model.sv` | behavioural memory with random back-pressure |
| `tb/fleet_job_harness.sv` | runs jobs on one `fleet_top` and checks memory |
| `tb/tb_fleet_top.sv`, `tb_fleet_full.sv`, `tb_fleet_workloads.sv` | whole-design runs (see below) |

### Parameters

| parameter | default | where |
|-----------|---------|-------|
| `NUM_PU` | 180 | `fleet_top`, `connectivity_shell` |
| `PU_KIND` | `PU_KNN` | `fleet_top`, `connectivity_shell`, `pu_slot` |
| `ADDR_W` | 64 | byte address width of the memory port |
| `LI_LAT`, `LI_DEPTH` | 4, 8 | `fleet_pkg`: grant window and receive-buffer depth |
| `EXTRA_REGS` | 0 | `fleet_top`: further register stages each way between the shell and every register block |
| `KNN_K`, `KNN_DIM`, `TSP_K`, `CNT_W` | 3, 4, 7, 16 | `fleet_pkg` |

`EXTRA_REGS` is the knob for a faster clock: long shell-to-slot routes get
more registers, and the grant window `LAT` of both ends (the output
controller's buffers and every PU port) becomes `4 + 2 * EXTRA_REGS`. The
PU reset phase is `8 + LAT` cycles, long enough for grants still in flight
from an earlier job to arrive before configuration starts. Correctness does
not depend on the depth, but rate does: by the grant rule below, the default
`LI_DEPTH = 8` sustains one beat per cycle only at `LAT = 4`; keeping full
rate with extra stages needs about two more entries per stage.

180 slots is the slot count of the original layout (four columns of 30
slots and six of 10); the column structure is physical placement and does
not appear in the RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5, from the top directory (packages first, other files found
by module name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fleet_pkg.sv tb/tb_ref_pkg.sv tb/tb_fleet_top.sv --top-module tb_fleet_top
./obj_dir/Vtb_fleet_top
```

- `tb_fleet_top` builds five accelerators of 5 slots, one per PU kind, plus
  a sixth (Counter) with `EXTRA_REGS = 2`, runs
  two jobs on each against the memory model, checks every output token,
  and fails if broadcast stalls, output contention, memory back-pressure,
  the per-job PU reset or the Counter bypass never occurred.
- `tb_fleet_full` runs `fleet_top` at its defaults (180 KNN PUs) through one
  job with 16 vectors: 6543 cycles from `start` to `done`, most of it the 720
  configuration words and 1080 output writes. It builds in about 30 s.
- `tb_fleet_workloads` covers the narrower 22-bit interface at full size:
  one 180-slot accelerator of Counter PUs and one of TSP PUs, one job each,
  every one of the 180 x 512 counts checked. It takes about 45 s in all.
  Summer and Dot have only been simulated at 5 slots; at 180 slots their
  build alone takes several minutes.
- The other testbenches exercise one module each with random stalls.

The simulator used has two signal states, so every register that is read is
reset; PU state is reset through the interface's reset bit only, so until
the first job's reset phase the PU cores hold arbitrary values.

## What this design adds, and what it leaves out

The shell/slot split, the register pair per interface bit, the 46/22-bit
interface sizes with five control bits and one reset bit, one shared stream
with per-PU configuration in front, a single memory channel, 180 slots, and
the functions of the five PUs (k = 3 for KNN, k = 7 for time series
prediction) are the design's starting points. Everything else was chosen
here and can be changed freely:

- which five control bits exist, and the grant protocol;
- the memory port (32-bit AXI4-Lite style, single beats, in-order) and the
  memory layout, one output token per 32-bit word;
- the fixed per-kind output length as the shell's way of knowing a PU is
  finished;
- PU details: vector length 4 and 16-bit elements for KNN, the comparison
  direction and configuration layout of TSP, 16-bit counts and read-out
  order of Counter, 32-bit wrapping sums, and that Dot and Counter ignore
  their one configuration word.

Not included:

- the **JSON parsing** and **integer compression** PUs, whose behaviour is
  defined elsewhere and not specified here;
- the DDR controller, the PCIe host interface and the platform's shell
  (represented by the memory port, the memory model and the job ports);
- physical aspects: slot placement, per-column implementation templates,
  clock buffers.

No timing closure has been attempted; the original runs at 125 MHz. The
shell's round-robin picker and the per-slot counters grow linearly with
`NUM_PU` and would be the first places to pipeline.
