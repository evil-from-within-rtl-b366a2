# A dormant, programmable parameter-swapping trojan in a DPU load path

A machine-learning accelerator does not know which model it is running. The
host streams it one layer's parameters and inputs at a time, and the
accelerator simply buffers and computes. This design shows how little
hardware an attacker needs to backdoor such an accelerator from the inside.
A few hundred flip-flops and a small line memory go into the accelerator's
LOAD engine. Together they recognise the weight loads of one particular model
and overwrite a handful of parameters while those loads enter the on-chip
buffer.

Outside the chip the model file is untouched, so integrity checks on the
model see nothing. Inside, the compute engines work on a backdoored model.
Until the trojan is programmed it does nothing. Programmed, it still adds no
clock cycle to any load, so the core's timing does not give it away.

The RTL models the load path of one core of a commercial FPGA deep-learning
processing unit (DPU) in its largest configuration, B4096, single core. Three
parts make up that load path:

- the memory reader FSM, which parses load instructions;
- the write controller;
- the on-chip buffer of 34 banks × 2048 lines × 16 bytes.

The trojan sits between the memory reader and the write controller. The
vendor's compute engines, instruction scheduler and STORE engine are not
modelled. Their connections are ports of the top module.

This is security-research RTL. Its purpose is to make the mechanism concrete
enough to study, simulate and build detection ideas against.

## Data flow

```
 inst bus ──► memory_reader ──line──► load_trojan ──line──► write_controller ──► onchip_ram ──► compute engines
 (load       IDLE→CFG→PARSE⇄SEND      (MUX)  ▲                (register,           34 banks      (ram_rd_* port)
  instr.)          →DONE                     │                 bank decode)        × 2048 lines
                 │      ▲           cfg_valid│ddr_addr                              × 16 bytes
                 ▼      │                    │
            data bus (shared memory)    target table ─ shift register ─ trojan ROM
                                        (tgt_* programming)            (rom_* programming)
```

`trojan_dpu_core` (top) = `load_engine` + `onchip_ram`.
`load_engine` = `memory_reader` → `load_trojan` → `write_controller`.
`load_trojan` = `trojan_addr_match` + `trojan_line_shreg` + `trojan_rom` + a
128-bit MUX and the ROM read pointer.

## Load instructions and the memory reader

A load instruction (`dpu_pkg::load_instr_t`) has four fields:

| field       | width | meaning                                          |
|-------------|-------|--------------------------------------------------|
| `ddr_addr`  | 32    | byte address of the first line in shared memory  |
| `bank_id`   | 6     | destination bank (0–33)                          |
| `bank_addr` | 11    | first destination line in that bank              |
| `n_lines`   | 12    | number of 16-byte memory lines                   |

Both addresses are start addresses. Per received line, `ddr_addr` advances
by 16 and `bank_addr` by 1. `bank_addr` wraps inside the bank.

The memory reader FSM has five states:

- **IDLE** accepts an instruction (`inst_valid`/`inst_ready`).
- **CFG** lasts one cycle. In this cycle the trojan sees the load's `ddr_addr`.
- **PARSE** issues one burst request on the data bus: address, and up to
  `MAX_BURST` = 16 lines, with `rd_req_valid`/`rd_req_ready`.
- **SEND** takes that burst's lines (`rd_data_valid`; `rd_data_ready` is high
  throughout SEND). It passes each line on in the same cycle, tagged with
  `bank_id` and the current `bank_addr`.
- **DONE** pulses `inst_done`.

PARSE and SEND alternate until all lines are in. On a bus that never waits,
an N-line load takes `3 + N + ceil(N/16)` cycles, from the acceptance cycle
to the DONE cycle inclusive. The testbenches check this figure.

The write controller registers each line. It decodes `bank_id` into a one-hot
bank write enable, so a line is in the RAM two clock edges after it arrives
on the data bus. A line addressed to a bank ≥ 34 is dropped and `wr_drop`
pulses.

## The trojan

### What it stores

**Target table** (`trojan_addr_match`, 8 entries). Each entry is a
`trojan_target_t` with four fields:

- `armed`: the entry is in use.
- `ddr_addr`: start address of a load instruction of the victim model.
- `mask`: 64 bits, one per line of that load. Bit *i* = 1 means "replace
  line *i*".
- `rom_base`: the first trojan-ROM line that holds the replacements for this
  load.

**Trojan ROM** (`trojan_rom`, 128 lines × 16 bytes). It holds the
replacement lines. The trojan replaces a whole 16-byte memory line, never a
single byte. A changed parameter therefore costs one ROM line, unless it
shares a line with another changed parameter.

Reset disarms every table entry. An unprogrammed trojan therefore never
matches. Its `out_line` is exactly its `in_line`, in every cycle and for every
model.

### What it does per load

1. **CFG cycle.** The load's `ddr_addr` is compared, combinationally and in
   parallel, with all armed entries. The lowest index wins.
   - On a hit, the entry's mask goes into the 64-bit shift register, the ROM
     read pointer is set to `rom_base`, and the load is "active".
   - On a miss, the shift register is cleared and the load is not active.
2. **Each arriving line.** If the load is active, the shift register moves
   one place (bit 0 always belongs to the line now arriving). If bit 0 was 1,
   the MUX outputs the ROM line under the pointer instead of the incoming
   line, and the pointer advances. The shift register fills with zeros, so
   lines after the 64th are never replaced.
3. **DONE.** The load stops being active.

### Why it costs no cycle

The ROM has a synchronous read, but it is read one line ahead:

- In the CFG cycle it reads `rom_base`.
- In a cycle with a swap it reads `pointer + 1`.
- In any other cycle it reads `pointer`.

The line the MUX needs is therefore always on the ROM output before the data
line arrives, even when swapped lines follow back-to-back. The MUX is the
only logic the trojan adds to the line path. A load takes the same number of
cycles whether or not lines are swapped. The end-to-end testbench compares
the cycle counts directly.

### Programming a backdoor

A backdoor is a list of (shared-memory byte address, new byte value) pairs,
taken from the victim model's compiled parameter image. To turn it into a
programming image:

1. Group the changed bytes by the load instruction whose
   `[ddr_addr, ddr_addr + 16·n_lines)` range holds them. Each group is one
   table entry; up to 8 are supported.
2. Within a load, a changed byte at address `a` lies in line
   `i = (a − ddr_addr) / 16`, and `i` must be below 64. Set mask bit `i`.
3. For each set mask bit, in increasing `i`, write one ROM line: the original
   16 bytes of that line with the changed bytes patched in. Put the lines of
   one entry at consecutive ROM addresses starting at its `rom_base`.
4. Write the ROM (`rom_we`, `rom_addr`, `rom_wdata`). Then write the table
   entry with `armed` = 1 (`tgt_we`, `tgt_idx`, `tgt_entry`). Each write takes
   one cycle.

To reprogram after a model update, rewrite the entries. To make the trojan
dormant again, write entries with `armed` = 0 or reset it. In an FPGA the ROM
and table could equally be set by a bitstream update. The write ports here
stand for whatever programming path is provisioned.

### What backdoor sizes fit

At the default sizes the trojan holds at least 128 changed 8-bit parameters:
any 128, one per line. It holds up to 2048 if they fill whole lines. The
changes may come from at most 8 load instructions, and each change must lie
in the first 64 lines of its load.

That covers these backdoors:

- the 30 weight changes chosen as the trade-off for a VGG-16 traffic-sign
  model (L1-regularised, 50×50-pixel trigger, about 78% success after 8-bit
  quantization);
- the whole sweep up to 100 changes;
- the very sparse L1/L2 backdoors of 5 to 80 changes.

Backdoors of 200 to 800 changes fit only if their changes share lines.
L0-regularised backdoors do not fit: after quantization they change almost
every byte of the layer (tens of thousands to millions). To hold larger
backdoors, raise `ROM_LINES` and `NUM_TARGETS`.

## The on-chip buffer

`onchip_ram` has `NUM_BANKS` = 34 banks of `BANK_LINES` = 2048 lines of 128
bits. Each bank is a `ram_bank`, a plain array with one synchronous write
port and one synchronous read port. The banks fall into three fixed regions:

| banks | region       |
|-------|--------------|
| 0–15  | feature maps |
| 16–32 | weights      |
| 33    | biases       |

The read port stands for the compute and STORE engines. It returns the line
and its region (`region_e`) one cycle after `rd_en`. A read of a bank that
does not exist returns 0 and `REG_INVALID`. The contents are not reset.

## Parameters

| parameter        | default | where                     | origin                                   |
|------------------|---------|---------------------------|------------------------------------------|
| `LINE_W`         | 128     | `dpu_pkg`                 | 16-byte line of B4096                    |
| `NUM_BANKS(_P)`  | 34      | `dpu_pkg`, RAM, top       | B4096                                    |
| `BANK_LINES(_P)` | 2048    | `dpu_pkg`, RAM, top       | B4096                                    |
| `FM_BANKS`/`W_BANKS` | 16/17 | `dpu_pkg`               | B4096 region split                       |
| `MASK_W`         | 64      | `dpu_pkg`                 | 64 lines per load instruction            |
| `NUM_TARGETS`    | 8       | trojan, load engine, top  | own choice                               |
| `ROM_LINES`      | 128     | trojan, load engine, top  | own choice: room for 100 scattered changes |
| `MAX_BURST`      | 16      | memory reader, top        | own choice                               |
| `DDR_ADDR_W`, `LEN_W` | 32, 12 | `dpu_pkg`            | own choice                               |

Other DPU sizes (B512 … B2048) use different bank counts and line widths.
Those values are not known here, so only B4096 is given. The bank count and
depth are parameters. The line width is a package constant.

## Where this RTL is its own, and what it leaves out

These details are the design's own choices. Each comes from a point where
the DPU's real behaviour is not public:

- **Buses.** The data bus is a simple valid/ready burst read (request channel
  plus data channel), not the vendor's AXI-based port. The instruction bus is
  a valid/ready handshake carrying the four-field instruction above. Only one
  data port is modelled; the real engine can have several.
- **FSM detail.** CFG takes one cycle, and the vendor FSM's sub-states are
  not modelled. A load with `n_lines` = 0 goes straight to DONE.
- **Trojan policy.** Matching is exact on the full start address. Matching
  only the upper address bits would also tolerate small model updates; it is
  a possible extension and is not built. When several entries match, the
  lowest index wins. The replacement lines of a target are consecutive in the
  ROM.
- **Write controller.** It is one register stage with a bank decoder, and it
  drops lines addressed to a bank that does not exist.
- **Reset.** Reset is synchronous and active-low (`rst_n`) on all control
  state. RAM and ROM contents are not reset.

Not built, because only their names and purposes are known:

- the instruction scheduler;
- the CONV engine;
- the ALU (pooling and element-wise operations);
- the STORE engine;
- the configuration and status registers;
- the host processor and shared memory.

The testbenches use a behavioural shared-memory model (`tb/ddr_model.sv`).

## Simulating

Each testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=N failures=M` line. Build and run one with Verilator 5 from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
  rtl/dpu_pkg.sv tb/tb_pkg.sv tb/tb_trojan_dpu_core.sv --top-module tb_trojan_dpu_core
./obj_dir/Vtb_trojan_dpu_core
```

`tb/tb_pkg.sv` holds two formulas. `ddr_line(a)` gives the content of the
shared-memory line at address `a`. `rom_line(i)` gives the replacement
patterns. The testbenches compute their expected RAM contents independently
from these formulas and from the programmed targets.

| testbench | what it shows |
|-----------|---------------|
| `tb_trojan_dpu_core` | End to end, at the default sizes. Runs a victim inference (feature-map, four weight and one bias load) with the trojan dormant. Programs 30 replacement lines over two weight loads and runs it again. Runs another model, the victim with bus stalls, a dropped load, a bank wrap, then reprograms. Reads back every written line with its region. Checks equal cycle counts with and without swaps. Counts every mechanism. |
| `tb_backdoor_sweep` | Workload test at the default sizes. Runs byte-level backdoors of 1, 7, 30, 40, 100 and 128 changed weights spread over eight 64-line weight loads. Each is turned into a programming image by the procedure above. The test reads the layer back and checks that exactly the chosen bytes changed, to the chosen values. Load timing must match the dormant run. |
| `tb_load_engine` | Every RAM write in order against an expected list. Dormant versus programmed behaviour. Hit and miss loads take the same number of cycles. |
| `tb_load_trojan` | The trojan alone, driven like the memory reader, with random gaps between lines. Loads longer than 64 lines. Disarmed entries. |
| `tb_memory_reader` | Data, bank and address of every line. Burst requests. The cycle formula. Random stalls on both channels. A zero-length load. |
| `tb_trojan_addr_match`, `tb_trojan_line_shreg`, `tb_trojan_rom`, `tb_write_controller`, `tb_onchip_ram` | Each unit against its own model. |

Every testbench has a watchdog. All of them run in seconds, the full-size
one included.
