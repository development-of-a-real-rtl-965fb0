# DEMON: a configurable on-chip monitoring unit for TRBnet FPGAs

A detector read-out network consists of hundreds of FPGAs. Each of them has internal signals worth watching: trigger rates, busy times, buffer fill levels, temperatures and error states. DEMON is a small block you drop into each of those FPGAs. It samples the signals it is handed and stores them with a timestamp. A slow-control request (16-bit address, 32-bit data) then reads them out without disturbing the chip's main job. It is built for the TRBnet network of the HADES experiment. Its slow-control side therefore looks like the TRBnet RegIO register interface.

Every chip is built from the same source code. Only one SystemVerilog package, the *setup*, differs between chips. The setup says:

- how many cells the chip has;
- how wide they are;
- how often each one samples;
- which clock stamps them.

The unit also carries a ROM that describes its own setup. Software that reads the ROM can decode everything else on the chip without any outside database.

This repository has the hardware part as synthesizable SystemVerilog, plus self-checking testbenches for every block and for the whole unit.

## The two kinds of storage cell

Signals come in over two wide input ports. Each port is cut into equal segments, one per cell:

| Port | Default width | Cell type | Use |
|---|---|---|---|
| `fifo_data_in` | `FIFO_NUM × FIFO_BUS_WIDTH` = 8 × 32 bits | FIFO cell | signals whose *history* matters: rates, time behaviour, statistics |
| `reg_data_in` | `REG_NUM × REG_BUS_WIDTH` = 12 × 64 bits | register cell | signals whose *present value* matters: temperatures, voltages, states |

Cell *i* always uses segment *i*. A signal narrower than its segment sits in the low bits, and the caller pads the rest with zeros. Equal segments keep everything simple: the generate loops and the read multiplexers only need an index × width. The cost is a few unused wires.

Each cell also gets a 4-bit slice of a control port (`ctrl_in`, `reg_ctrl_in`). The chip's own logic can use it to *mark* values, for example "this sample was taken while the temperature alarm was on". A cell stores the low `ctrl_bits` bits of its slice directly above the data. For block-RAM FIFOs these bits fill the RAM's parity field, so they cost no storage:

- 16-bit BRAM FIFOs: 2 bits
- 32-bit BRAM FIFOs: 4 bits
- 64-bit BRAM FIFOs: 8 bits
- LUT FIFOs: no control bits

The unit passes the control bits straight through. Any state machine that should set them is user logic outside the unit.

**Register cells** (`register_cell`) are plain flip-flops. They load their segment and control bits every clock cycle, and a read returns the latest value.

**FIFO cells** (`data_cell`) are the heart of the design and are described next.

## Inside a FIFO cell

A FIFO cell is a `fifo_controller` in front of a `demon_fifo`, governed by a 4-bit configuration cell (`cfg_cell`).

### Controller: rate, validation, packet

`fifo_controller` turns the free-running input segment into a stream of packets:

- **Frequency regulation.** A counter lets one write through every 2^`frequency` clock cycles. `frequency = 0` writes every cycle; at 100 MHz, `frequency = 15` writes every 327.68 µs. The phase of the writes is fixed by reset or by the cell's reset bit.
- **Input validation** (configuration bit 2). A value equal to the last *written* raw value is not written again. The cell then stores only changes. The comparison uses the raw data field only, so a new timestamp alone does not make a value "different".
- **Halt** (configuration bit 3) blocks all writes. Software sets it before draining a FIFO so that the contents stay consistent.
- **Packing.** Each packet is built MSB first:

  ```
  {ctrl[ctrl_bits], event[event_size], time[time_size], data[data_size]}
  ```

  with `data_size + time_size + event_size = width`.
  - `data` is the low bits of the input segment.
  - `time` is `timer[timer_res +: time_size]`, a window of the selected timer. A larger resolution value gives a coarser, longer-range clock.
  - `event` is the low bits of the event number input.
  - `ctrl` lies outside `width`, in the parity field.

  The timer is picked per cell by `timer_type`:

  | `timer_type` | Timer |
  |---|---|
  | 0 | none (time field unused) |
  | 1 | global time |
  | 2 | local/system time |
  | 3 | trigger time |

The controller's output is registered, so a sample reaches the FIFO one cycle after it was on the input.

### Storage: standard mode and ringbuffer mode

`demon_fifo` is a synchronous FIFO with a registered read port:

- `rd_en` pops a word.
- One cycle later `rd_valid` comes with the data, or `no_more_data` comes if the FIFO was empty.

A sampling FIFO fills up long before anybody reads it, so the interesting question is what happens then. There are two modes.

**Standard mode.** A write to a full FIFO is dropped. The FIFO keeps the *oldest* samples, which suits capturing what happened right after a start.

**Ringbuffer mode** (configuration bit 1, only in cells built as the ringbuffer variant). The FIFO keeps the *newest* samples:

- The threshold is `LIMIT = depth − log2(depth)`. For example, a 32-deep FIFO has a limit of 27 and a 2048-deep FIFO has a limit of 2037.
- Once the fill count reaches `LIMIT`, the FIFO discards its oldest word with a **fake read**, an internal pop whose output is thrown away.
- Two flags track this:
  - `t1` is high in the cycle of the fake read.
  - `t2` is high in the following cycle, when the popped word would appear. It tells the read side to suppress that word.
- A real read from slow control always wins. If one is pending in the same cycle, no fake read happens, neither flag rises, and the word goes to the reader.
- With a write every cycle, the FIFO settles at `LIMIT` words and never becomes full. The log2(depth) words of headroom absorb writes while a fake read is in flight.

The ringbuffer is a mode, not a separate FIFO. Clearing bit 1 turns a ringbuffer cell back into a standard FIFO. A cell built as the standard variant (`RINGBUF = 0`) has no fake-read logic at all and ignores bit 1.

To read a ringbuffer consistently while it is being written, halt it first. Otherwise fake reads and real reads interleave.

### FIFO catalogue

A cell's FIFO type is one of a fixed catalogue. The code goes into the ROM; OR-ing in `FT_RING` (0x80) gives the ringbuffer variant.

| Family | Width × depth | Codes | Control bits |
|---|---|---|---|
| Block RAM | 16×1024, 16×2048, 16×4096 | 0x01–0x03 | 2 |
| Block RAM | 32×512, 32×1024, 32×2048 | 0x04–0x06 | 4 |
| Block RAM | 64×512, 64×1024 | 0x07–0x08 | 8 |
| LUT | 8×16, 8×32, 16×16, 16×32, 32×16, 32×32, 64×16, 64×32 | 0x09–0x10 | 0 |

In this RTL every type is the same generic register-array FIFO of the right width and depth (`mem[DEPTH]`). A synthesis tool maps it to block RAM or to distributed RAM by size. It does not instantiate vendor FIFO cores. Depth must be a power of two, as all catalogue depths are.

### Configuration cell

Each FIFO has one `CFG_SIZE`-bit configuration cell (default 4). These are the only writable locations of the unit.

| Bit | Name | Effect |
|---|---|---|
| 0 | reset | Clears the FIFO, restarts the rate counter and forgets the validation value. It is **self-clearing**: written as 1, it is high for one cycle and reads back 0 afterwards. |
| 1 | ringbuffer | Ringbuffer mode (ringbuffer variants only). |
| 2 | validate | Store only changed values. |
| 3 | halt | Block writes. |

Higher bits, if `CFG_SIZE > 4`, are stored and read back but drive nothing. Reset loads the setup's initial value, which the ROM also publishes.

## Slow control: addresses, latency, wide words

### Address map

The unit has one request/response port, `sc_req` / `sc_rsp` (types in `demon_pkg`). It is meant to sit behind the RegIO module of the surrounding chip.

| Range | Contents | Access |
|---|---|---|
| 0x1000–0x106F | ROM, 112 words | read |
| 0x1800 + i | configuration cell of FIFO i (i < 20) | read / write |
| 0x2000 + i | FIFO cell i | read (pops) |
| 0x3000 + j | register cell j (j < 32) | read |

Addresses are resolved in two stages:

1. `demon_bus_handler` looks at the upper address byte and passes the request to one segment only.
2. That segment's multiplexer (`cfg_mux`, `fifo_mux`, `register_mux`) or the ROM resolves the low byte.

Any address outside the four segments, a cell index that does not exist, or a write anywhere except a configuration cell gets an `unknown_addr` response.

### Protocol

- `sc_req` carries `read`, `write`, `addr[15:0]` and `data[31:0]`, valid for one cycle.
- Every request gets **exactly one** one-cycle response pulse on `sc_rsp`. It is one of `dataready` (with `data`), `no_more_data` (the FIFO was empty), `write_ack` or `unknown_addr`.
- Only one request may be outstanding at a time. Assertions in the multiplexers check this.

Latencies, counted from the request cycle:

| Access | Latency |
|---|---|
| ROM, configuration cell, register cell, `unknown_addr` | 1 cycle |
| FIFO cell, first or only piece | 2 cycles (FIFO read, then response register) |
| FIFO cell, following pieces | 1 cycle |

### Words wider than 32 bits

The slow-control word is 32 bits, but a packet or register can be wider, for example a 32-bit FIFO with 4 control bits (36 bits) or a 64-bit register. The multiplexers handle this in pieces:

1. The first read of a cell returns bits 31:0. The multiplexer keeps the whole word.
2. Each following read of the **same address** returns the next 32 bits. For FIFOs this does not pop again.
3. A read of any other address throws the kept word away.

The cell reports how many pieces its word needs (`nwords`, from width plus control bits):

- 36-bit packets take two reads.
- A 64-bit BRAM packet with its 8 control bits (72 bits) takes three.

The register multiplexer freezes the register value at the first piece, so all pieces belong to the same sample.

Software must therefore read a FIFO cell `nwords` times in a row per packet. It knows `nwords` from the ROM.

### The ROM: the unit describes itself

`demon_rom` is computed at elaboration time from the setup. Nothing is stored in a file. Cells that do not exist read as zero, and a zero type or width ends the list.

| Word | Contents |
|---|---|
| 4i + 0 (FIFO i, i = 0..19) | `{type[7:0], width[7:0], depth[15:0]}` |
| 4i + 1 | `{frequency, timer_type, timer_res, time_size}` (8 bits each) |
| 4i + 2 | `{data_size, event_size, ctrl_bits, log2_depth}` (8 bits each) |
| 4i + 3 | initial configuration-cell value |
| 80 + j (register j, j = 0..31) | `{8'h00, ctrl_bits[7:0], width[15:0]}` |

A typical session:

1. Read the ROM.
2. Set the configuration bits.
3. Let the FIFOs fill.
4. Set halt.
5. Read each FIFO until `no_more_data`.
6. Clear halt, or pulse reset to start over.

## The setup package

`rtl/demon_setup_pkg.sv` is the one file to edit per chip. Its defaults are the reference setup below. FIFO 0 is the example cell whose properties are fully specified in the original configuration file. The other cells are a representative mix chosen to cover the catalogue, the timers and both modes.

| Global | Value |
|---|---|
| `FIFO_NUM` / `FIFO_BUS_WIDTH` | 8 / 32 |
| `REG_NUM` / `REG_BUS_WIDTH` | 12 / 64 |
| `CFG_SIZE` | 4 |

| FIFO | Type | Mode | Freq | Timer (res) | Time/data/event bits |
|---|---|---|---|---|---|
| 0 | BRAM 32×2048 | ring | 1 | trigger (3) | 4/26/2 |
| 1 | BRAM 32×512 | ring | 0 | local (0) | 4/26/2 |
| 2 | BRAM 32×1024 | ring | 4 | global (4) | 4/26/2 |
| 3 | BRAM 32×512 | standard | 1 | local (1) | 6/24/2 |
| 4 | BRAM 16×1024 | ring | 3 | trigger (3) | 4/10/2 |
| 5 | BRAM 16×2048 | standard | 0 | none | 0/16/0 |
| 6 | LUT 32×16 | ring | 1 | local (1) | 8/24/0 |
| 7 | LUT 32×32 | standard | 0 | global (0) | 4/26/2 |

The registers are:

- 0–7: 64 bits wide, no control bits.
- 8 and 9: 28 bits, 4 control bits.
- 10: 16 bits, 2 control bits.
- 11: 12 bits, 4 control bits.

Each setup is written as functions that return packed arrays (`fifo_setup()`, `reg_setup()`, `cfg_setup()`). The helpers `mk_fifo` and `mk_reg` in `demon_pkg` derive width, depth, log2 depth and control bits from the type code. The top module `monitoring_unit` takes the same arrays as parameters, so a different setup can also be passed from outside without editing the package. The testbench `tb_demon_setups` does exactly that.

Limits: up to 20 FIFO cells and 32 register cells, bus widths up to 64 bits, and configuration cells up to 32 bits.

## Blocks

| Module | Role |
|---|---|
| `monitoring_unit` | Top level. Splits the ports, generates the cells, selects timers and wires the slow-control tree. |
| `data_cell` | One FIFO cell: controller plus FIFO, connected to its configuration bits. |
| `fifo_controller` | Rate regulation, validation, halt and packet assembly. |
| `demon_fifo` | Standard/ringbuffer FIFO with fake read and t1/t2 flags. |
| `cfg_cell` | Configuration bits with the self-clearing reset bit. |
| `register_cell` | Flip-flop register cell with control-bit marking. |
| `demon_rom` | Self-description, computed from the setup. |
| `demon_bus_handler` | First-stage address decode and response merge. |
| `cfg_mux`, `fifo_mux`, `register_mux` | Second-stage decode and multi-piece reads. |
| `demon_pkg`, `demon_setup_pkg` | Shared types and constants; the setup. |

## Where this RTL departs from the original design

- **Vendor FIFOs.** The original uses vendor block-RAM and LUT FIFO cores, one per catalogue entry. Here one generic FIFO stands for all of them. Type codes are numbered in catalogue order. The original's numeric encodings are not reproduced.
- **Three-piece reads.** The original describes two reads for words over 32 bits. This RTL counts the control bits too: a 64-bit packet with 8 control bits needs three reads.
- **Timing.** The slow-control timing (one cycle for most accesses, two for a FIFO read) is this design's own. The original quotes a rate of two consecutive reads every 10 cycles, and that figure includes the external RegIO module.
- **Timers.** All three timer inputs are 32 bits wide. The surrounding chip pads narrower timers.
- **Control bits.** The control-port slice is fixed at 4 bits per cell. The bits are copied into the stored word unchanged; there is no built-in marking state machine.
- **Reset bit.** The reset configuration bit is self-clearing here, so one write of 1 gives exactly one clear. The original does not say whether the bit clears itself.
- **Not included.** The RegIO module, the TRBnet protocol layers and media interface, the timer sources and the monitoring server/client software are outside this RTL. The unit's ports are where they would connect.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_demon_fifo` | Standard and ringbuffer modes against a reference model: fake-read threshold, t1/t2 timing, priority of real reads, drops, clear and mode switches. |
| `tb_fifo_controller` | Write spacing for several frequencies, validation, halt, clear and the packet fields against the timer and event inputs. |
| `tb_data_cell`, `tb_cfg_cell`, `tb_register_cell` | The cells. |
| `tb_cfg_mux`, `tb_fifo_mux`, `tb_register_mux`, `tb_demon_bus_handler`, `tb_demon_rom` | The slow-control path, including the exact latencies and multi-piece reads. |
| `tb_monitoring_unit` | The whole unit **at its default setup**. It reads and decodes the full ROM and fills all FIFOs from inputs that count clock cycles. It halts and drains every FIFO, checking the timestamp, the packet spacing (= 2^frequency) and the control bits. It then exercises validation, the reset bit, registers and illegal addresses. It counts every mechanism (ROM read, configuration write, rate regulation, two-piece read, fake read, drop, validation, halt, reset, no-more-data, unknown address, register read, marking) and fails if any never occurred. |
| `tb_demon_setups` | Six further setups in parallel. |

The six setups in `tb_demon_setups` (helper module `setup_runner`) are:

- 4 mixed LUT/BRAM FIFOs with 4 × 32-bit registers
- 4 BRAM FIFOs up to 16×4096
- 12 BRAM FIFOs
- 12 LUT FIFOs
- 4 FIFOs with 16 × 64-bit registers
- a 64-bit FIFO bus with 64×512 and 64×1024 FIFOs read in three pieces

All testbenches pass.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing -Irtl -Itb rtl/demon_pkg.sv rtl/demon_setup_pkg.sv \
    -y rtl -y tb tb/tb_monitoring_unit.sv --top-module tb_monitoring_unit
./obj_dir/Vtb_monitoring_unit
```

The same works for any other testbench: replace the file and the top module name. The packages must come first on the command line. The full-size run finishes in seconds.

To build a different chip, edit `demon_setup_pkg.sv`:

1. Set the global numbers.
2. Set one `mk_fifo(type, frequency, timer_type, timer_res, time_size, data_size, event_size)` per FIFO.
3. Set one `mk_reg(width, ctrl_bits)` per register.
4. Set the initial configuration values.

Keep `time_size + data_size + event_size` equal to the FIFO type's width, and every width within its bus width.
