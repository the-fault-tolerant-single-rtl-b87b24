# Self-repairing reconfiguration controller for a single-FPGA TMR system

SRAM-based FPGAs used in space suffer single event upsets: a flipped bit in
the configuration memory changes the implemented circuit. Triple modular
redundancy (TMR) masks one faulty copy of a circuit, but faults that stay in
the configuration pile up until two copies are wrong and the voter fails.
They have to be removed by rewriting the damaged part of the configuration
through partial dynamic reconfiguration, and that is the job of a
reconfiguration controller (here called GPDRC, generic partial dynamic
reconfiguration controller).

If the controller sits on the same FPGA as the payload, it gets upsets too,
and a broken controller cannot repair anything, least of all itself. This
design therefore triplicates the controller as well (coarse-grained TMR,
CGTMR). Each of the three controller modules lives in its own reconfigurable
partition and watches both the payload copies and the other controller
modules. The triplicated controller can then rewrite any one of its own
modules while that module keeps running, and neither the payload nor the
repair stops.

## Structure

```
                 flash data ──────────────┬───────────────┬───────────────┐
                                          v               v               v
                              ┌──────── rc_module 1 ── rc_module 2 ── rc_module 3 ────┐
 prm_i[0..2] ──┬──────────────> fault_detection ──err──> gpdrc ──rc_each[m]──┐        │
  (PRM1..PRM3  │              └─────────────────────────────────────────────┼────────┘
   outside)    │                  ^  all three rc_each fed back to every detector
               │                  └──────────────────────────────────────────┤
               │                                                    rc_output_voter
               │                                                             │
               │                   flash_rd/addr, ICAP CE/WRITE/data, restart pulses
               v
           tmr_voter ──> out_o
```

Files in `rtl/`:

| file | what it is |
|------|------------|
| `gpdrc_pkg.sv` | shared constants and the controller output bundle `rc_bus_t` |
| `tmr_voter.sv` | bitwise 2-of-3 majority of a W-bit word |
| `rc_output_voter.sv` | votes the three controller bundles onto flash and ICAP |
| `fault_detection.sv` | marks the odd copy out on the error bus |
| `gpdrc.sv` | the reconfiguration controller, one copy |
| `rc_module.sv` | one controller partition: fault detection + GPDRC |
| `selfrepair_system.sv` | the top: payload voter, three controller modules, RC voters |

The payload copies (the evaluated payloads are ITC'99 benchmark circuits
b01, b05 and b12), the flash memory and the ICAP primitive are not in `rtl/`.
The payload outputs come in on `prm_i`, and the flash and ICAP signals are
ports of the top.

## Reconfigurable partitions and the error bus

Six partitions can be rewritten, and each has one bit on the 6-bit error
bus:

| bit | partition |
|-----|-----------|
| 0..2 | payload copies PRM1..PRM3 |
| 3..5 | controller modules 1..3 (fault detection + GPDRC) |

The bitstream of partition k sits in flash at word address
`FLASH_BASE + k*BS_WORDS` and is `BS_WORDS` 32-bit words long. It is a
complete partial bitstream, with its own headers and commands, so the
controller only copies it.

## How a fault is found

Every `fault_detection` forms the bitwise majority of the three payload
outputs and of the three controller bundles. A copy that differs from the
majority gets its bit set. The bit is sticky, so a glitch that lasts a single
cycle is still repaired. It is cleared only by the acknowledge, which is the
voted restart pulse that ends the repair of that partition. All three
detectors receive the same acknowledge.

The marks are kept in TMR too. Each detector receives the marks of all three
detectors, its own included, and votes them. Its next marks are the voted
marks, plus new mismatches, minus the acknowledged bits. The GPDRC acts on
the voted marks, not on its own detector's register. An upset mark therefore
heals in one cycle. A detector that restarts empty hands its GPDRC the same
pending repairs as the other two from its first cycle on.

A controller bundle (`rc_bus_t`: flash request and address, ICAP strobe and
data, restart pulses) is all zeros whenever the controller is idle. The
bundles of three healthy controllers are therefore equal at all times, and
any difference is a fault. A fault that only corrupts idle state shows up at
the next repair, when that controller drives its outputs.

## How a repair runs

Each GPDRC is a five-state machine:

| state | cycles | bundle |
|-------|--------|--------|
| IDLE  | until an error bit is set | zeros |
| REQ   | 1 | `flash_rd=1`, `flash_addr` |
| WAIT  | until `flash_valid_i` | zeros |
| WRITE | 1 | `icap_we=1`, `icap_data` = the word just read |
| DONE  | 1 | `rp_reset[k]=1` (restart of partition k and, once voted, the acknowledge) |

From WRITE the machine goes back to REQ until `BS_WORDS` words have been
copied. If several bits are set, the controller modules are repaired first,
then the payload, with the lower number first in each group. A second
controller fault would disable the controller, which is why its modules come
first. Bits that are set during a repair wait until the repair ends.

If the flash answers L cycles after a request, one word takes L+2 cycles.
From the cycle in which an error bit appears to the restart pulse, a repair
takes `1 + BS_WORDS*(L+2)` cycles. Counted from the payload mismatch, it
takes one cycle more.

## Self-repair of a controller module

This is the subtle part. Suppose controller module 2 is hit:

1. Its bundle differs from the other two, so all three detectors set bit 4.
   Module 2's own detector sets it too, because it sees the same three
   bundles.
2. Modules 1 and 3 rewrite partition 4. Module 2 may do anything meanwhile,
   but the RC output voters mask its outputs on the flash and the ICAP.
3. In DONE, the voted bundle carries `rp_reset[4]`. The top feeds this pulse
   back as module 2's restart, a synchronous reset of its GPDRC and detector,
   and as the acknowledge to all three detectors. At that clock edge, module 2
   returns to IDLE with no marks, and modules 1 and 3 leave DONE for IDLE and
   drop bit 4. The next cycle, module 2's GPDRC sees the voted marks of the
   other two detectors. If repairs are still pending, it starts on them
   together with the others.

In the DONE cycle, modules 1 and 3 are in DONE and module 2 is not, so the
detectors see a difference. The acknowledge beats a mismatch of the same
cycle, so this expected difference is not marked.

Both parts are needed:

- Without the restart, a module that has slipped out of step can stay
  stuck. One example is a module that missed a flash answer: it waits for an
  answer that never comes. The same happens to a module with a corrupted
  state.
- Without the voted marks, a restarted module forgets the repairs still
  queued and starts on a different partition than the other two. This
  spreads the disagreement instead of removing it.

The restart pulse of a payload partition goes out on `prm_rst_o`, for the
payload's own restart if it needs one.

## Interfaces and timing of the top

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_i`, `rst_i` | in | 1 | clock; synchronous active-high reset |
| `prm_i` | in | 3 x PRM_W | payload copy outputs |
| `out_o` | out | PRM_W | voted payload output (combinational) |
| `prm_rst_o` | out | 3 | one-cycle pulse after payload partition k was rewritten |
| `flash_rd_o`, `flash_addr_o` | out | 1, 24 | one-cycle read request, word address |
| `flash_data_i`, `flash_valid_i` | in | 32, 1 | read data, valid for one cycle, any latency |
| `icap_ce_n_o`, `icap_wr_n_o`, `icap_data_o` | out | 1, 1, 32 | 32-bit ICAP write port (active-low enable and write) |
| `rc_err_o`, `rc_busy_o` | out | 6, 1 | voted error bus and busy, for status |

All outputs except `out_o` come from controller registers through the voters.
Only one flash read is outstanding at a time.

Parameters (top defaults): `PRM_W = 36` (the widest benchmark output,
b05), `BS_WORDS = 4096`, `FLASH_BASE = 0`.

## What follows the original design and what is this implementation's own

The following come from the original design:

- the payload in TMR with an output voter;
- three controller modules, each a fault detection plus a GPDRC in its own
  partition;
- each detector fed by the three payload outputs and the three controller
  outputs;
- voters between the controller and the flash and ICAP;
- the repair of any payload copy or controller module through partial
  reconfiguration from flash;
- the 32-bit Virtex-5 ICAP as the target.

The following are this implementation's own choices, because the source does
not specify them:

- the controller's state machine;
- the flash handshake and the bitstream layout;
- the bit map and priority of the error bus;
- the sticky, voted marks and the acknowledge;
- the zero-when-idle bundle;
- the restart pulse;
- the way a rewritten controller module is brought back into step: a reset
  from the voted restart pulse, plus the voted marks;
- all widths and `BS_WORDS`.

The following are not included:

- the simpler system with a single, unprotected controller and a detecting
  output voter, which served only as a comparison;
- any checking of bitstream integrity (CRC, readback);
- any handling of latent faults in configuration that the circuit is not
  currently using. They are repaired only once they change an output.

How well the design can be trusted: every block has a self-checking
testbench. The top is simulated end to end at its default size. The
behaviour at the fault-tolerance level (MTTF, faults per failure) needs a
real FPGA with fault injection into its configuration memory and is not
modelled here.

## Simulation

Testbenches in `tb/` are self-checking and print
`TB_RESULT checks=N failures=M`. Models used only by testbenches:

- `flash_model.sv`: answers a read after `LAT` cycles with the word
  `(addr * 32'h9E3779B1) ^ 32'h5A5A0000`, so the expected ICAP stream can be
  computed.
- `prm_model.sv`: a registered stand-in payload,
  `out = (in*36'h1F3) ^ 36'h0F0F`. An XOR mask on its output models a
  configuration upset.

`tb_selfrepair_system` runs the top at its default parameters through five
scenarios:

1. a stuck payload fault, also checking the repair latency;
2. a one-cycle upset of one controller module's error bus, which makes that
   module start a repair of its own;
3. a stuck flash data input in a controller module together with a payload
   fault, so the controller repair queues behind the payload repair;
4. two payload copies faulty on different bits;
5. a controller module that misses a flash answer during a payload repair
   and is left one word behind.

It checks the voted output every cycle and
every flash address and ICAP word. It requires that each of these occurs at
least once: a masked payload fault, a payload repair, a masked controller
fault, a controller self-repair, a queued repair and a flash wait.

`tb_fault_campaign` is a random fault-injection run at the default size,
with 40 faults about one repair time apart:

- payload upsets on random bits;
- a one-cycle error-bus upset in a controller module;
- a dropped flash answer;
- a stuck flash data input, which stays latent until the next repair.

At most one controller fault is pending at a time. The voted output is
checked against the golden output XOR the majority of the injected masks.
Cycles in which two payload copies are wrong on the same bit are therefore
predicted and counted as system failure cycles rather than flagged. At the
end, every fault must be repaired and the controller modules must be back
in step. Different `+verilator+seed+N` values give different campaigns.

```
verilator --binary --timing --assert -Irtl \
  rtl/gpdrc_pkg.sv rtl/tmr_voter.sv rtl/rc_output_voter.sv rtl/fault_detection.sv \
  rtl/gpdrc.sv rtl/rc_module.sv rtl/selfrepair_system.sv \
  tb/flash_model.sv tb/prm_model.sv tb/tb_selfrepair_system.sv \
  --top-module tb_selfrepair_system -o sim && ./obj_dir/sim
```

The block testbenches (`tb_tmr_voter`, `tb_rc_output_voter`,
`tb_fault_detection`, `tb_gpdrc`, `tb_rc_module`) build the same way, with
the files the block uses. They run at smaller sizes (8-bit payload, 8 or 16
words per bitstream). The end-to-end test injects controller faults with
`force` on nets inside the top's hierarchy (`dut.g_rc[m].u_rc.err`,
`dut.g_rc[m].u_rc.u_gpdrc.flash_data_i`, `...flash_valid_i`), so renaming
those breaks the end-to-end tests.
