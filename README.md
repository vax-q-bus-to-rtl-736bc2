# Q-Bus decoupling interface for CAMAC on long branches

A Q-Bus VAX gives any bus cycle 10.5 µs to be answered. After that it
aborts the cycle with a bus error, and no software can change that limit.
The SCI 2280 systems crate interface maps CAMAC into VAX memory space, and it
answers a memory cycle only when the CAMAC operation behind it has finished.
On a long parallel CAMAC branch, with several pairs of differential branch
extenders, the CAMAC reply can take 25 µs or more, so the VAX times out.

This interface (called the 0715 below) sits on the VAX's Q-Bus in front of
the SCI 2280. It splits each CAMAC access into two parts:

* The VAX cycle. The 0715 answers it at once: it latches write data, or
  returns dummy data for a read.
* The SCI 2280 cycle. The 0715 keeps it going for as long as CAMAC needs.
  The VAX then polls a status flag and collects the result.

A transparent mode turns the decoupling off. Every access then goes through
unchanged, as if the 0715 were not there.

The RTL is SystemVerilog-2017. It is written for simulation with Verilator
and for synthesis.

## What software sees

### Registers

The address map is set by parameters of `qi715_top`. The defaults are
octal Q22 byte addresses:

| Address (octal) | Space | Register | Visible |
|---|---|---|---|
| 17764100 | I/O page (BBS7) | 0715 CSR | always |
| 17764102 | I/O page (BBS7) | 0715 DWL: low 16 data bits of the last decoupled CAMAC read | ENABLE=1, non-transparent, not busy |
| 10000000 – 10001776 | memory | SCI 2280 CAMAC command space; byte offset = {F, A, 0} | ENABLE=1, not busy |
| 10002000 | memory | SCI 2280 CSR: B and C in bits 12-8, N in bits 4-0, Q in bit 15, X in bit 7 | ENABLE=1, not busy |
| 10002002 | memory | SCI 2280 DBH: CAMAC data bits 24-17 | ENABLE=1, not busy |

The 0715 CSR has these bits:

| Bit | Name | Access | Meaning |
|---|---|---|---|
| 0 | ENABLE | R/W | 0 at power-up. While 0, only the 0715 CSR answers. |
| 1 | TRANSPARENT | R/W | 1 at power-up. Everything is passed through to the SCI 2280. |
| 7 | DONE | RO | The last decoupled CAMAC operation has finished. |
| 15 | BUSY | RO | A decoupled CAMAC operation is still running. |

Any access that is refused gets no reply, so the VAX takes a bus timeout.
These accesses are refused:

* any address other than the 0715 CSR while ENABLE is clear;
* the DWL while in transparent mode;
* any address other than the 0715 CSR while a decoupled CAMAC cycle is
  still running on the SCI 2280 side.

### A CAMAC operation in non-transparent mode (ENABLE=1, TRANSPARENT=0)

Write:

1. Write B, C and N to the SCI 2280 CSR. This is passed through.
2. Write data bits 24-17 to the DBH. This is passed through.
3. Write data bits 16-1 to the command-space address that encodes F and A.
   The 0715 stores the word in WRITE_DATA and answers about 4 clocks after
   DOUT. The SCI 2280 cycle continues, with its DOUT held.
4. Poll the 0715 CSR until BUSY=0 and DONE=1. While an operation is running,
   the CSR reads BUSY=1 and DONE=0.
5. Read the SCI 2280 CSR to get Q and X.

Read:

1. Read the command-space address. The 0715 answers at once with dummy
   data (0).
2. Poll the 0715 CSR as above.
3. Read bits 16-1 from the 0715 DWL and bits 24-17 from the SCI 2280 DBH.
4. Read Q and X from the SCI 2280 CSR.

### Transparent mode (ENABLE=1, TRANSPARENT=1)

The VAX accesses the SCI 2280 exactly as if the 0715 were absent. The 0715
holds the VAX in wait states until the SCI 2280 replies. A long CAMAC cycle
therefore still times out the VAX. The only 0715 register that answers is
its CSR.

## How it works inside

```
 VAX Q-Bus                                                SCI 2280 Q-Bus
  SYNC ──┬─> [sync] ─> QBUS_LOGIC ── RPLY ──>            
         │               │  strobe/accept/cycle_end
         └─> ADDRESS_DECODE ── route ──┬───────────> INTERFACE_CONTROL ──> SYNC DIN DOUT BBS7 WTBT, BDAL
  DIN/DOUT -> [sync] ────────────────── │ pass-through replay       ^ 
  BDAL ────> DATA_REGISTERS (WRITE_DATA, DWL, muxes) <──────────────┼──── BDAL (read data)
                 CSR (ENABLE TRANSPARENT BUSY DONE)                  │
                 LATCHED_LOGIC (held SYNC + DIN/DOUT for decoupled) ─┘ <── RPLY [sync]
```

### Routes

Each VAX cycle gets one *route*. ADDRESS_DECODE fixes it when SYNC arrives:

| Route | When | VAX reply | SCI 2280 side |
|---|---|---|---|
| `RT_CSR` | 0715 CSR | immediate | nothing |
| `RT_DWL` | DWL, non-transparent | immediate | nothing |
| `RT_PASS` | SCI CSR or DBH in either mode; command space in transparent mode | after the SCI 2280 reply | the VAX cycle is replayed |
| `RT_LATCH` | command space, non-transparent | immediate (dummy data for reads) | decoupled cycle held by LATCHED_LOGIC |
| `RT_NONE` | anything else, or refused | none | nothing |

### The SCI 2280 side has two sources

INTERFACE_CONTROL runs a pass-through cycle, which replays the VAX cycle:

1. It drives the latched address for one clock of setup.
2. It asserts SYNC.
3. For a write, it drives the VAX data for one clock before DOUT.
4. It follows the VAX's DIN or DOUT.
5. It returns the SCI 2280's RPLY to QBUS_LOGIC. The VAX's RPLY is held
   until both the VAX strobe and the SCI 2280 reply have been negated.
6. SCI SYNC drops when the VAX drops SYNC, which also covers a VAX timeout.

LATCHED_LOGIC runs a decoupled cycle. This is the mechanism that removes
the time limit:

1. When the route is decoded, it drives the address for one clock of setup,
   then asserts SCI SYNC.
2. The VAX's DIN or DOUT is captured as a request. It may arrive early,
   during the setup clock.
3. DIN is then asserted on the SCI side. For a write, WRITE_DATA is driven
   for one clock and then DOUT is asserted.
4. SYNC and the strobe stay asserted, with no timer, until the SCI 2280
   replies. QBUS_LOGIC has long since answered the VAX, and the VAX may have
   run many CSR polls in the meantime.
5. The SCI 2280's RPLY ends the CAMAC operation. In that clock DONE is set,
   BUSY is cleared and, for a read, DWL captures the data. The strobe is
   then released, and SYNC follows once RPLY has gone.

`active` covers the whole cycle, from the decode to the release of SYNC.
While it is high, ADDRESS_DECODE refuses everything except the 0715 CSR.
As a result, a pass-through cycle and a decoupled cycle never overlap.
`a_no_overlap` asserts this.

### BUSY and DONE

* Decoding a decoupled command clears DONE.
* The end of the VAX cycle that started the command sets BUSY, unless the
  CAMAC operation has already finished, as it can on a short branch.
* The SCI 2280's reply sets DONE and clears BUSY.

So the combination BUSY=0, DONE=1 always means the result is ready.

## Timing

All logic runs on one clock, `clk`. The testbenches use 10 MHz, which makes
the VAX timeout 105 clocks.

* **Strobe inputs.** The asynchronous strobes (VAX SYNC, DIN, DOUT and
  BINIT, and the SCI RPLY) pass through `SYNC_STAGES` flip-flops (default
  2).
* **Address capture.** The Q-Bus keeps the address on BDAL only briefly
  after the leading edge of SYNC. ADDRESS_DECODE therefore captures it in a
  register clocked by the raw SYNC edge. The clocked logic decodes that
  register once the synchronized SYNC arrives. This is the one place where
  a second clock (SYNC) is used.
* **Reply latency.** Local and decoupled cycles: RPLY comes 4 clocks after
  the VAX asserts DIN or DOUT. Pass-through: RPLY comes about 10 clocks
  after the SCI 2280's own reply time (40 clocks for a 30-clock branch).
* **Throughput.** `qi715_branch_sweep_tb` measures CAMAC reads per second
  at 10 MHz, before any software overhead. A transparent read is the
  command, then DBH, then CSR. A decoupled read is the command, the polls,
  then DWL, DBH and CSR.

| Branch delay | Transparent | Decoupled |
|---|---|---|
| 0.5 µs | 122,000 ops/s | 100,000 ops/s |
| 3 µs | 93,000 ops/s | 76,000 ops/s |
| 9 µs | 60,000 ops/s | 56,000 ops/s |
| 10 µs | VAX timeout | 51,000 ops/s |
| 25 µs | VAX timeout | 29,000 ops/s |
| 50 µs | VAX timeout | 17,000 ops/s |

  Transparent mode works up to a branch delay of about 9.5 µs. The
  synchronizers and setup clocks add about 10 clocks to the SCI 2280's own
  time. Decoupling costs one early-reply cycle, the polls and one more
  register read. Measured with real VAX software, the original hardware
  reached about 12,000 operations/s with a 25 µs branch. A system without
  the decoupling reached 13,000 on a 3 µs branch.
* **Late replies.** If the SCI 2280 replies to a pass-through cycle after
  the VAX has already dropped its strobe, that reply is not passed on.

## Ports of `qi715_top`

Signals are active high, unlike the inverted levels on the real backplane.

* **Bidirectional BDAL.** The lines are split by direction: `h_dal_in`,
  `h_dal_out` and `h_dal_oe` on the VAX side, `s_dal_out`, `s_dal_oe` and
  `s_dal_in` on the SCI side. The `*_oe` outputs are the transceiver
  direction controls. The transceivers themselves are outside the RTL.
* **BINIT.** `h_init` resets the 0715 to its power-up state and is passed
  through to `s_init`.
* **Status.** `busy` and `done` copy the CSR flags, for front-panel
  indicators.

## Choices this RTL makes

The register set, the flag behaviour, the routing rules and the
decoupling scheme are those of the original TRIUMF 0715. This design
chose the following itself:

* **Address map and CSR.** The addresses, the CSR bit positions and the
  power-up value of TRANSPARENT (1).
* **CAMAC encoding.** The command-space size (1 KiB) and the {F, A}
  encoding in the testbench model. The 0715 itself only checks that an
  address falls in the range.
* **Clocking.** The clocked implementation with synchronizers, and the
  one-clock setup times on the SCI side. The original was probably
  asynchronous logic.
* **Refused accesses.** They get no reply at all. The published description says only
  that such accesses are disabled.
* **Dummy data.** It is 0.
* **Cycle types.** Only single-word DATI and DATO cycles are handled. There
  is no DATIO, no block mode and no byte writes.
* **BINIT.** It resets the 0715 and is forwarded to the SCI 2280.
* **Abandoned cycles.** If the VAX ends a decoupled cycle before any data
  strobe, the SCI-side cycle is dropped.

The 0715 has no timeout of its own. As in the original, the SCI 2280 and
the CAMAC crate controller are expected to time out failed operations.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qi715_pkg.sv \
    tb/qi715_top_tb.sv --top-module qi715_top_tb -o sim
./obj_dir/sim
```

Replace `top` with `branch_sweep` to run the delay sweep. Replace it with
`address_decode`, `csr`, `datapath`, `qbus_logic`, `latched_logic` or
`interface_control` to run the block tests.

`qi715_top_tb` runs the whole interface with default parameters against
`tb/sci2280_model.sv`. That file is a behavioural SCI 2280 with a CAMAC
branch modelled as a reply delay, plus one 24-bit register per N and A.
The testbench covers:

* refusal at power-up;
* transparent accesses on a 3 µs branch;
* a VAX timeout in transparent mode on a 25 µs branch, with the SCI side
  released afterwards;
* the DWL hidden in transparent mode;
* decoupled writes and reads on a 25 µs branch, with the early reply
  checked;
* BUSY seen while CAMAC runs;
* refusal of the SCI registers and the DWL while busy;
* DONE polling;
* the DWL, DBH and Q/X results;
* the throughput loop;
* BINIT.

It counts each of these mechanisms and fails if one never happened. It
runs in well under a second.

## Files

* `rtl/qi715_pkg.sv`: shared types, CSR bit positions and the default
  address map.
* `rtl/qi715_sync.sv`: synchronizer.
* `rtl/qi715_address_decode.sv`, `rtl/qi715_qbus_logic.sv`, `rtl/qi715_csr.sv`,
  `rtl/qi715_datapath.sv`, `rtl/qi715_latched_logic.sv`,
  `rtl/qi715_interface_control.sv`: the blocks.
* `rtl/qi715_top.sv`: the interface.
* `tb/*_tb.sv`: the testbenches. `qi715_branch_sweep_tb` runs the delay
  sweep in both modes.
* `tb/sci2280_model.sv`: the SCI 2280 and CAMAC branch model.
