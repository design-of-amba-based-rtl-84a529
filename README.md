# AHB-to-APB bridge

An AMBA system has a fast, pipelined system bus (AHB) for the processor,
DMA and memories, and a simple, low-power peripheral bus (APB) for slow
devices such as a UART, a timer, a keypad or a parallel port. This bridge
joins them. On the AHB it is an ordinary slave. On the APB it is the only
master. It latches each AHB transfer's address, control and write data,
performs the matching APB transfer, and returns the read data and the
response to the AHB.

The AHB side runs on `HCLK` and the APB side on `PCLK`. The two clocks may
have any ratio and any phase, and may also be the same clock. Between the
two sides only single-bit handshake levels cross.

## Block structure

```
           HCLK domain                                  PCLK domain
  AHB --> ahb_slave_if --> ahb_response ==buffer (held stable)==> apb_access --> APB
          decoder,         buffer, HREADYOUT,                     SETUP/ACCESS FSM,
          address-phase    HRDATA, HRESP                          PREADY, PRDATA
          register              |  PENDWR/PENDRD -> [sync] ->         |
                                |  <- [sync] <- PDONE                 |
                                +------- control_transfer ------------+
```
| module             | clock      | job |
|--------------------|------------|-----|
| `ahb_slave_if`     | HCLK       | Decodes the address phase into `valid` and a one-hot peripheral select. Registers the address phase (`hwaddr1`, `hwritereg`, `hsel1`, `valid1`) for the data phase. |
| `ahb_response`     | HCLK       | Data-phase controller. Owns the one-entry transfer buffer (`hwaddr2`, `hwdata2`, `hwrite2`, `hsel2`). Raises `PENDWR` or `PENDRD`. Drives `HREADYOUT`, `HRESP` and `HRDATA`. |
| `control_transfer` | both       | Flip-flop synchronisers: `PENDWR`/`PENDRD` into PCLK, `PDONE` into HCLK. |
| `apb_access`       | PCLK       | APB state machine: SETUP, ACCESS (with `PREADY` wait states), then DONE. Captures `PRDATA`. Raises `PDONE`. |
| `ahb2apb_bridge`   | both       | Top level; wires the four blocks together. |
| `ahb2apb_pkg`      | —          | HTRANS/HRESP encodings, state types, bus widths. |

## The handshake between the clock domains

This is the part to understand before changing anything.

A transfer is handed from HCLK to PCLK with a four-phase handshake:

1. `ahb_response` loads the buffer and raises `PENDWR` (write) or `PENDRD`
   (read). It then leaves the buffer alone.
2. After `SYNC_STAGES` PCLK edges, `apb_access` sees the request. It copies
   the buffer into `PADDR`/`PWDATA`/`PWRITE`/`PSEL` and runs the APB
   transfer. When `PREADY` ends the access phase it stores `PRDATA` (for a
   read) and raises `PDONE`.
3. After `SYNC_STAGES` HCLK edges, `ahb_response` sees `PDONE`. It copies
   the read data into `HRDATA` and drops its request.
4. `apb_access` sees the request drop and lowers `PDONE`. When
   `ahb_response` sees `PDONE` low, the buffer is free again.

The buffer is 70+ bits wide but never goes through a synchroniser. The
handshake guarantees that it is stable from step 1 until the request drops,
which is long after the APB side samples it. The captured read data
(`prdata_q`) is likewise stable from `PDONE` until the next request.
Therefore:

- Do not let `ahb_response` load the buffer outside `RSP_IDLE`.
- Do not let `apb_access` change `prdata_q` outside the ACCESS state.

The assertions `a_buffer_stable` and `a_one_request` check the first of
these rules in simulation.

## AHB behaviour

- **Selection.** A transfer is taken when `HSEL`, `HREADYIN` and
  `HTRANS` = NONSEQ or SEQ are all true, and `HADDR` lies in the APB window.
  IDLE and BUSY transfers are answered ready with OKAY and do nothing. So
  are unselected transfers and transfers outside the window.
- **Address map.** Peripheral *i* (`PSEL[i]`) covers
  `BASE_ADDR + i·2^SLOT_BITS` up to the start of the next slot. With the
  defaults this is four 16 MiB slots from `0x8000_0000` to `0x83FF_FFFF`.
  `PADDR` carries the full AHB address.
- **Writes are posted.** A write that finds the buffer free finishes its
  data phase with no wait state. The write then happens on the APB while
  the AHB moves on. A second write, or any read, that arrives while the
  buffer is busy waits with `HREADYOUT` low.
- **Reads wait for the data.** A read holds `HREADYOUT` low until its APB
  read has finished and the data is in `HRDATA`.
- **Bursts.** Each NONSEQ or SEQ beat becomes one APB transfer.
  `HBURST` and `HSIZE` are not inputs. Every APB transfer is a full 32-bit
  word at the beat's address.
- **Response.** `HRESP` is always OKAY. The APB side has no error input.

## Timing

AHB wait states (cycles with `HREADYOUT` low in the data phase), measured
with no APB wait states and the default `SYNC_STAGES = 2`:

| operation                                   | one clock for HCLK and PCLK | PCLK edge just after HCLK edge |
|---------------------------------------------|-----|-----|
| write, bridge idle (posted)                 | 0   | 0   |
| read, bridge idle                           | 9   | 8   |
| write right behind a posted write           | 14  | —   |
| read right behind a posted write            | 23  | —   |
| next beat of a burst read                   | 14  | —   |

Where the idle-bridge read's 9 cycles go, on a single clock:

| cycles | what happens |
|--------|--------------|
| 1 | issue the request |
| 2 | synchronise it into PCLK |
| 2 | APB SETUP and ACCESS |
| 1 | raise `PDONE` |
| 2 | synchronise `PDONE` back into HCLK |
| 1 | load `HRDATA` |

A transfer that follows a posted write waits 14 cycles for that write's
handshake to close completely. A transfer behind a completed read waits
for the rest of that read's handshake.

Each APB wait state adds one PCLK cycle. Each extra synchroniser stage adds
one cycle of the receiving clock at each crossing. On the APB, every
transfer takes a SETUP cycle, then one or more ACCESS cycles, then at least
one cycle with `PSEL` low.

This latency is the price of supporting unrelated clocks. The bridge
handles one transfer at a time, so APB throughput is one transfer per
handshake round trip: about 15 HCLK cycles when the clocks are equal.

## Parameters (`ahb2apb_bridge`)

| parameter     | default         | meaning |
|---------------|-----------------|---------|
| `NUM_PSEL`    | 4               | number of APB peripherals (`PSEL` width) |
| `BASE_ADDR`   | `32'h8000_0000` | start of the APB window |
| `SLOT_BITS`   | 24              | log2 of each peripheral's address slot |
| `SYNC_STAGES` | 2               | synchroniser depth, at least 2 |

The address and data width are 32 bits (`ADDR_W`, `DATA_W` in `ahb2apb_pkg`).

## Where this design departs from, or adds to, its source description

The source description gives the bridge's blocks and signal names, its
32-bit buses, its two clocks, and its support for peripherals that add wait
states. It also gives the operations it was simulated with: single write,
single read, burst write, burst read, and back-to-back transfers.

It does not give the insides of any block. The following are choices made
here:

- The four-phase `PENDWR`/`PENDRD`/`PDONE` handshake and the two-flop
  synchronisers.
- The single posted-write buffer.
- The APB state machine's states.
- The address map.
- The `PREADY` input used for wait states (as in APB3).
- Active-low asynchronous resets: `HRESETn` for the AHB side, `PRESETn` for
  the APB side.
- `HREADYOUT` comes from the HCLK-side response block. One drawing of the
  original places it at the APB controller instead.

The original implementation used about 134–203 registers on the FPGAs it
was mapped to, and 205 I/O pins. This design has 259 flip-flop bits,
because it registers all APB outputs and keeps separate buffers per clock
domain. It has 211 port bits at the defaults.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_ahb_slave_if`: random and boundary address phases, checked against a
  reference decoder and register.
- `tb_ahb_response`: AHB data phases against a fake APB side with random
  handshake delays. It checks buffer contents and order, zero-wait posted
  writes, write stalls, and that a read ends exactly two HCLK edges after
  `PDONE`.
- `tb_control_transfer`: two unrelated clocks. Every edge of every
  handshake line must arrive after exactly `SYNC_STAGES` edges (tested with
  2 and 3 stages).
- `tb_apb_access`: APB protocol checked cycle by cycle. Each transfer must
  take 3 + wait-state edges from request to `PDONE`. Read data is checked.
- `tb_ahb2apb_operations`: the whole bridge on a single clock. It runs
  single write, single read, four-beat burst write, four-beat burst read
  and back-to-back write/read, and checks the exact wait-state counts of
  the table above.
- `tb_ahb2apb_bridge`: the whole bridge at default parameters, with a
  pipelined AHB master model and `apb_slave_model`, an APB memory with
  random wait states.
  - It runs single write, single read, INCR4 burst write and read,
    back-to-back write/read, and a random mix including IDLE, BUSY,
    unselected and out-of-window transfers.
  - It runs all of these at four clock settings: equal clocks with and
    without wait states, slow PCLK, and fast PCLK.
  - It checks every read value and every APB transfer, and the 8-cycle read
    latency.
  - It counts each mechanism (stalls, wait states, ignored transfers, every
    `PSEL`) and fails if one never happened.

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ahb2apb_pkg.sv rtl/ahb_slave_if.sv rtl/ahb_response.sv \
  rtl/control_transfer.sv rtl/apb_access.sv rtl/ahb2apb_bridge.sv \
  tb/apb_slave_model.sv tb/tb_ahb2apb_bridge.sv --top-module tb_ahb2apb_bridge
./obj_dir/Vtb_ahb2apb_bridge
```

For a block testbench, list the package, the block's file and the
testbench. `tb_apb_access` also needs `tb/apb_slave_model.sv`. All
testbenches finish in well under a second.

Lint with `verilator --lint-only -Wall`. The remaining warnings are:

- `HTRANS[0]` is unused: NONSEQ and SEQ differ from IDLE and BUSY in
  `HTRANS[1]` alone;
- package constants (`ADDR_W`, `DATA_W`) are unused where a module does not need them;
- the resets being used both as asynchronous resets and in the assertions'
  `disable iff`.

## Not included

The rest of the AMBA system is left to the integrator. This includes the
processor, DMA, memories, the AHB decoder and multiplexor, and the APB
peripherals themselves. The bridge's AHB port is a plain slave port, and
`HREADYIN` must be the bus's `HREADY`.
