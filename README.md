# Logic controller for a radiation-tolerant 3D DDR3 memory cube

A stack of fourteen commercial DDR3 x16 dies sits directly on top of a
controller die. Each die has its own point-to-point path to the controller, so
the controller can read all fourteen in parallel and can reset, power-cycle or
retire any one of them. That is the central idea. Eight dies hold data, five
hold parity and one is a cold spare. Each 128-bit word is stored with 80 bits
of BCH parity, spread so that a die that fails completely still reads back
correct. Scrubbing, a rebuild sweep, BIST and automatic sparing keep the
stored data healthy over the long term. Several cubes can be chained on a
serial link and can vote 2-of-3 or act as XOR parity for each other.

This repository holds synthesizable SystemVerilog for that controller. The
analog parts are not included: the DDR PHY, the serial transceivers and the
DRAM dies themselves. The top module brings their signals out as ports. The
testbenches put a behavioural DDR3 die model behind those ports.

## The code word: how a whole die can fail

A burst of the cube is one DDR3 BL8 access to all 13 active dies at once.
That is 8 beats, and each beat is a 208-bit code word, made of 13 lanes of
16 bits, one lane per die.

| lanes | dies | content |
|------|------|---------|
| 0-7  | 0-7  | data word bits 16*l .. 16*l+15 (code word [127:0] is the data unchanged) |
| 8-12 | 8-12 | 80 parity bits |
| -    | 13   | cold spare, takes over one retired lane |

**Code.** The 128 data bits are split into 8 independent blocks of 16 bits.
Each block uses the binary BCH code with designed distance 5 over GF(2^5):

- Primitive polynomial: x^5 + x^2 + 1.
- Generator: g(x) = m1(x)·m3(x) = x^10+x^9+x^8+x^6+x^5+x^3+1.
- Length: the (31,21) code, shortened to (26,16).

So each block carries 10 parity bits, and 8 × 10 = 80. The encoder is
systematic: block positions 0..9 hold parity and 10..25 hold data. Encoding
is the remainder of x^10·d(x) divided by g(x) (`bch_pkg::bch_parity`).

**Interleave.** Block j takes bits j and j+8 of every lane. Every die
therefore contributes exactly two bits to every block. When a die fails
completely, each block sees at most a double error, and the code corrects
that. The mapping is in `bch_pkg::code_index`:

- Data bit i of block j goes to code bit `(i/2)*16 + j + 8*(i%2)`.
- Parity bit k of block j goes to `(8 + k/2)*16 + j + 8*(k%2)`.

**Decoder** (`edac_bch_dec`). The decoder is combinational and has four steps:

1. It computes the syndromes S1 and S3 per block.
2. It solves the degree-2 error locator directly: σ1 = S1, σ2 = (S3 + S1³)/S1.
3. A Chien search checks all 26 positions.
4. If the number of roots matches the degree of the locator, it flips those bits and reports `ce`. Otherwise it reports `ue` and changes nothing.

It also reports which lanes held corrected bits (`lane_err_o`). Sparing and
the diagnostic log use that. GF multiplication is written out bit by bit.
Inversion and powers of α come from two 31-entry constant tables, so the
whole decoder unrolls into plain XOR/AND logic. It is about 11k cells for the
full top after coarse synthesis.

**Limit.** With 10 parity bits per block the code is DEC, not DEC-TED.
Triple-error detection would need an eleventh bit per block (88 in all). A
triple error is flagged only when it leaves a locator with the wrong number
of roots. Otherwise it is miscorrected. A whole-die failure plus one more
upset in the same block is beyond the code. The scrubber exists to keep such
upsets from piling up.

## Request path

```
host link ─► serdes_ctrl ─► arbiter ─► edac_bch_enc ─► dram_controller ─► spiral / spare / selector ─► PHY ports
   ▲                          ▲  ▲  ▲                        │
   │                  BIST  rebuild  scrub                   ▼
   └──── response ◄── nmr_voter ◄── edac_bch_dec ◄──── read stream (spare steering on the way in)
```

**Arbiter** (in `cube_ctrl_top`). The host and three maintenance engines
share one controller port. The fixed priority is host > BIST > rebuild >
scrub. The choice is held while the 8 write beats of a granted write are
transferred. Every request carries a 2-bit source tag, so read data returns
to whoever asked.

**DRAM controller** (`dram_controller`). The controller is made of several parts:

- *Intake.* Write data is parked in an 8-slot `data_buffer`, one burst per slot.
- *Per-bank queues* (`request_queues`). Four entries per bank.
- *Scheduler* (`frfcfs_scheduler`). It uses first-ready first-come-first-served over the queue heads: a head that hits its bank's open row wins; otherwise the oldest wins. Age is taken from an 8-bit time stamp. Because only heads compete, requests to one bank are served in order. This is what makes read-after-write to the same burst safe.
- *Bank manager* (`bank_manager`). It tracks the open row of every bank and three countdowns per bank: column commands allowed, precharge allowed, activate allowed.
- *Command FSM* (`dram_fsm`). It issues ACT / RD / WR / PRE for the granted request. It also handles precharge-all plus REF, and power-down.
- *Policies.* Open-page is the default. In close-page mode every access ends with a PRE to its bank.
- *Refresh* (`refresh_ctrl`). The interval is programmable in cycles, which sets a variable refresh rate. Up to 8 refreshes may be owed while requests are served. At 8 owed, refresh preempts traffic.
- *Power-down.* This is optional. After a programmable number of idle cycles the FSM drops CKE. It leaves power-down when a request or refresh appears, after tCKE and tXP.
- *Reads.* One read is outstanding at a time. Its burst streams out as 8 consecutive beats.

The DDR3-1866 timings are counted in controller cycles of 2.426 ns. The
values are in `cube_pkg`:

| tRCD | tRP | tRAS | tWR | tRTP | tRFC (8 Gb) | tREFI | tXP | tCKE |
|------|-----|------|-----|------|-------------|-------|-----|------|
| 6    | 6   | 14   | 7   | 4    | 145         | 3215  | 3   | 3    |

Write-to-read turnaround, tFAW and tRRD are not enforced. The die model does
not check them either.

**Bank spiraling** (`bank_spiral`). Die d receives bank (b + d) mod 8 for
logical bank b. One particle track through the stack then hits a different
logical bank in each layer. It can be switched off (register 0).

**PHY side.** The PHY side has these signals:

- One command bus (`ddr_cke_o`, RAS/CAS/WE, `ddr_addr_o`) shared by all dies.
- Chip select and bank address per die.
- A whole 128-bit BL8 burst per die on `ddr_wr_data_o` / `ddr_rd_data_i`.

All outputs are registered. The PHY may return a read burst at any latency.
It is expected to handle the DDR3 electrical protocol: DQS, write levelling
and mode registers.

## Keeping the array healthy

- **Scrub** (`scrub_logic`). Once per programmable interval it reads one burst through the EDAC. If anything was corrected, it writes the corrected burst back. The scope can be one row, one bank, or the whole cube. A counter tracks completed passes.
- **Rebuild** (`rebuild`). One state machine reads and writes back every burst of the array, 2^26 bursts at the default size. It writes back even when nothing was corrected, so a die that was swapped in or power-cycled is refilled from the other twelve. It starts on a spare swap, at the end of a die service, or by command.
- **BIST** (`bist`). It writes an address-dependent pattern, or zeros ("zeroize"), to a range, then reads it back. Pattern word k of beat b at burst a is `(a·0x9E3779B1 + b·0x85EBCA6B + k·0x27D4EB2F) ^ seed`. It counts miscompares and corrected bursts, and logs each faulty burst address.
- **Sparing** (`spare_ctrl`). It counts, per lane, the read beats in which that lane needed correction. At `SPARE_THRESH` (64), or on a host command, the lane is retired: its writes go to die 13 and its reads come from die 13. Steering is combinational and sits between the EDAC lanes and the dies. There is only one spare.
- **Die service** (`ddr_selector`). On command it holds one die's reset low for `SEL_RST_CYC` cycles, or removes its supply for `SEL_PWR_CYC` cycles and then resets it. That die is deselected meanwhile. The EDAC covers its lane until the rebuild that follows has refilled it.
- **Diagnostic log** (`diag_log`). A 16-entry FIFO of error records. Each record holds the source, burst address, corrected / uncorrectable / miscompare flags, and the lanes involved. It is written by host reads, scrub, rebuild and BIST, and read by the host.

## Chaining and voting

Every cube has a 4-bit id (`my_id_i`). `serdes_ctrl` forwards a host packet
unchanged on the chain link when it names another cube. Id 15 is a broadcast:
every cube executes it and passes it on. Chained cubes can therefore be
driven in lock step. Response packets arriving on the chain link are passed
to the host link between local responses.

For n-modular redundancy, `nmr_voter` combines the local read word with the
words of two neighbours, `peer0_*` and `peer1_*`. The mode is set by
register 10:

- **Pass-through** (0): the local word is returned unchanged.
- **Bitwise 2-of-3 majority** (1): the result is the majority of the three words. A flag reports which word disagreed.
- **XOR** (2): the result is local ^ peer0 ^ peer1. This lets one cube act as the parity unit of the others and rebuild a failed cube.

Voting adds one cycle.

## Host packets and registers

The link carries 32-bit words.

- **Request word:** `{op[31:30], cube[29:26], burst address[25:0]}`, with op 0 NOP, 1 READ, 2 WRITE, 3 CFG.
- **Burst address:** `{row[15:0], bank[2:0], burst column[6:0]}`. A burst is 8 beats × 128 bits = 128 bytes of data, so 2^26 bursts = 8 GB.
- **Write:** a WRITE is followed by 32 data words, beat 0 first and the low word first.
- **Read response:** a header word `{8'hA5, 14'b0, ue, ce, cube id, 4'b0}` followed by 32 data words.
- **Configuration write:** CFG carries a register number in bits [25:20] and a value in [19:0].

| reg | content | reset value |
|-----|---------|-------------|
| 0 | {spiral_en, pd_en, close_page} | spiral on, power-down on, open page |
| 1 | idle cycles before power-down | 64 |
| 2 | refresh interval, cycles | 3215 |
| 3 | {scope[1:0], scrub_en}; scope 0 row, 1 bank, 2 all | off |
| 4 | scrub interval, cycles | 4096 |
| 5 | scrub target {bank[18:16], row[15:0]} | 0 |
| 6 | die service {power_cycle[4], die[3:0]} (action) | - |
| 7 | BIST start {zeroize[0]} (action) | - |
| 8 | force spare onto lane[3:0] (action) | - |
| 9 | start rebuild (action) | - |
| 10 | voter mode: 0 pass, 1 TMR, 2 XOR | 0 |
| 11 | pop diagnostic log (action) | - |
| 12 | BIST length in bursts, 0 = whole array | 0 |
| 13 | BIST seed, low 20 bits | 0 |

## Where this RTL departs from the original architecture

- **EDAC strength.** The architecture states DEC-TED and 80 parity bits together. These do not fit: DEC is built, TED is not (see above).
- **Serial protocol.** Serial RapidIO was only planned for the cube-to-cube links. The simple word-packet format above stands in for it.
- **Bandwidth.** The cube was rated at about 30 GB/s peak, which is DDR3-1866 × 16 bytes of data per transfer. This controller moves one 128-bit beat per 2.426 ns cycle on its internal ports (6.6 GB/s at most). It keeps one read outstanding. A faster design would need a wider PHY-side datapath and several reads in flight.
- **Designer's choices.** None of these are specified by the architecture: the sparing rule (per-lane count of corrected beats), the arbitration priority, the register map, the queue and buffer depths, the BIST pattern and the die-service pulse lengths.
- **Die geometry.** The dies are 8 Gb x16: 16 row bits, 8 banks, 1024 columns. A 15-bit DDR address bus would not reach all rows of this part, so the address bus is 16 bits wide.

## Files

Package and types:

- `rtl/cube_pkg.sv`: sizes, DDR3 timing, request and log record types, command encoding `{cs_n, ras_n, cas_n, we_n}`.
- `rtl/bch_pkg.sv`: GF(2^5) arithmetic, parity, single-block decode, interleave map.

Modules:

- `rtl/edac_bch_enc.sv`, `rtl/edac_bch_dec.sv`: the EDAC.
- `rtl/dram_controller.sv`: the controller. It instantiates `data_buffer`, `request_queues`, `frfcfs_scheduler`, `bank_manager`, `refresh_ctrl` and `dram_fsm`, each in its own file.
- `rtl/rmw_engine.sv`: the read / correct / write-back sequence shared by `scrub_logic` and `rebuild`.
- `rtl/bist.sv`, `rtl/spare_ctrl.sv`, `rtl/diag_log.sv`, `rtl/ddr_selector.sv`, `rtl/bank_spiral.sv`, `rtl/nmr_voter.sv`, `rtl/serdes_ctrl.sv`.
- `rtl/cube_ctrl_top.sv`: the top.

Test support:

- `tb/ddr3_die_model.sv`: behavioural DDR3 x16 die, for testbenches only. It stores bursts sparsely, checks the timing rules listed above, loses its contents on power-off, and has hooks for a dead die and single-bit upsets.
- `tb/tb_mem_responder.sv`: a simple memory stand-in for the engine testbenches.

## Simulating

Every testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/bch_pkg.sv rtl/cube_pkg.sv tb/tb_cube_ctrl_top.sv --top-module tb_cube_ctrl_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others. The testbenches are:

| testbench | what it shows |
|-----------|---------------|
| `tb_cube_ctrl_top` | End to end with 14 die models: row hits and conflicts, refresh, power-down, close page, upset correction, scrub write-back, dead die, forced spare and rebuild, die power cycle and rebuild, BIST, chain forwarding and chain responses, TMR and XOR, spiraling, the log. Each mechanism is counted. The rebuild and scrub ranges are shortened by parameter. |
| `tb_cube_full` | The top with every parameter at its default (full 8 GB geometry): writes, read-back through the EDAC, correction of an upset, zero DDR3 timing breaches. |
| `tb_dram_controller` | Controller with 13 die models under random traffic. It checks data, timing, close page, the refresh rate and power-down. |
| `tb_edac_bch` | Random words with no error, one or two bit errors, a whole die lane wiped or stuck at ones: data, ce flag and lanes must be right. Three errors in one block must never pass as "no error". |
| `tb_*` (others) | One per block; each block's header comment says what it checks. |

Simulations with reduced sizes override only the top's parameters
(`REBUILD_BURSTS`, `SCRUB_ROWS`, `SPARE_THRESH`, `SEL_RST_CYC`,
`SEL_PWR_CYC`). The default configuration is 2^26-burst sweeps and
2^16-row scrub passes. Running a complete rebuild at that size in simulation
is impractical. `tb_cube_full` therefore runs host operations at full size
but no full sweep.
