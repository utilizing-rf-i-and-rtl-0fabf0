# Power-aware GPU memory channel with per-bank RF logical channels

A mobile GPU talks to a single LPDDR DRAM chip over one narrow channel. Two
things waste DRAM power there: page activates (every switch to a new row
costs an activate), and time spent in standby instead of power-down (the
chip can only drop to its lowest-power state when *all* banks are
precharged). This RTL implements a memory channel that attacks both:

* **Hold until full.** The controller does not issue anything until its
  transaction queue is full. The scheduler then sees the widest possible
  window of requests and groups more requests to the same page, so fewer
  activates are needed.
* **Burst groups.** Requests are served in *burst groups*: for every bank,
  one page is opened, all queued requests to that page are served, and the
  page is closed. The next group starts only after every bank is closed
  again, so between groups the DRAM sits with all banks precharged and
  CKE low (precharge power-down).
* **One logical channel per bank.** Waiting costs bandwidth. To win it
  back, a multi-band RF interconnect (MRF-I) carries one independent
  logical channel per bank over the same wires, each on its own RF band.
  All four banks are commanded and return data concurrently, with no
  arbitration for a shared bus.

The approach is the one described in "Utilizing RF-I and Intelligent
Scheduling for Better Throughput/Watt in a Mobile GPU Memory System"
(ACM TACO, 2011). That work evaluates it with a simulator. The
microarchitecture, interfaces, encodings and timing here are this
implementation's own; the section "What is assumed" lists them.

## Structure

```
             GPU requests                                   read responses (per bank)
                  |                                                  ^
   +--------------v--------------------------------------------------+------+
   | intelligent_mc                                                         |
   |  address split -> transaction_queue (8 slots, age matrix)              |
   |                         |                                              |
   |                  burst_group_scheduler --wake/ready-- power_mode_ctrl -+--> CKE
   |                    | start/row, next member per bank                   |
   |   bank_cmd_engine x4  (ACT -> RD/WR ... -> PRE, read-tag FIFO)         |
   +------|-----------------------------------------------^-----------------+
          | 4 command words                               | 4 read words
   mrfi_link (down): 4 RF bands per line           mrfi_link (up)
          |                                               |
   +------v-----------------------------------------------+-----------------+
   | dram_bank_control: 4 independent bank decoders, CAS-latency pipelines  |
   +------|-----------------------------------------------^-----------------+
          | per-bank row decoder / row buffer / column mux strobes
                          DRAM bank arrays (outside the RTL)
```

`rfi_gpu_mem_system` is the top and contains all of the above. The DRAM cell
arrays, sense amplifiers and pads are analog and are not part of the RTL; the
top brings their strobes out on the `bk_*` ports.

| Module | Role |
|---|---|
| `mc_pkg` | sizes, `txn_t`, `chan_word_t`, `rd_word_t`, command and power-state enums |
| `transaction_queue` | 8-slot queue, lowest-free allocation, age matrix, free of any slot set per cycle |
| `burst_group_scheduler` | hold-until-full, group formation, oldest-first member hand-out |
| `bank_cmd_engine` | one per bank: ACT / RD / WR / PRE with DRAM timing; read-tag FIFO |
| `power_mode_ctrl` | CKE control and power-state report |
| `intelligent_mc` | GPU-side controller: the five blocks above |
| `mrfi_link` | behavioural model of the multi-band RF link (one per direction) |
| `dram_bank_control` | DRAM-side bank control that drives all banks at once |
| `rfi_gpu_mem_system` | top |

## How a burst group runs

The scheduler (`burst_group_scheduler`) has three states.

1. **COLLECT.** Transactions enter the queue. Nothing is issued, and the DRAM
   stays in power-down. When the queue becomes full, or `flush` is high with
   anything queued, the scheduler moves on.
2. **WAKE.** `wake` goes to `power_mode_ctrl`, which raises CKE. `ready`
   follows after the power-down exit time `T_XP`.
3. **Group formation and RUN.** On `ready`, the group is formed in one
   clock. For each bank *b*, the scheduler finds the oldest queued
   transaction of *b* using the age matrix. Its row is the page for *b*.
   Every queued transaction to bank *b* and that row gets a member bit. One
   clock later, `start[b]` pulses for every bank that has members. The bank
   engines then run concurrently. Each engine asks for its oldest remaining
   member through `has_next[b]`/`next_idx[b]`. When it issues that member, it
   frees the slot through `free_vec`, which also clears the member bit.
   Once no members are left and every engine is idle (all banks precharged),
   the scheduler returns to COLLECT. With `wake` low and no bank open or
   precharging, `power_mode_ctrl` drops CKE on the next clock.

The example below shows why holding helps. Take an 8-entry queue holding,
oldest first: b0/r0, b1/r0, b1/r0, b0/r1, b0/r0, b0/r0, b0/r0, b0/r0. The
first group opens b0/r0 (5 members) and b1/r0 (2 members) at the same time
on two channels. b0/r1 stays in the queue until the queue fills again, or
until a flush. Three activates serve all eight requests. Issuing each
request as it arrives would take four.

Membership is fixed when the group forms. Transactions that arrive during a
group fill the freed slots and wait for the next group. As a result, each
group is bounded, and every group ends with all banks precharged.

Per-address order is preserved. Two requests to the same address are in the
same page, so they are members of the same group or both wait. Inside a
burst, members are served oldest first.

### Engine timing (`bank_cmd_engine`)

The engine's commands leave on `tx` one clock after the decision. Let ACT be
at cycle *a*:

| event | earliest cycle |
|---|---|
| first RD/WR | a + T_RCD |
| next RD/WR | previous + T_BURST |
| PRE | max(a + T_RAS, last RD + T_RTP, last WR + T_BURST + T_WR) |
| engine idle again | PRE + T_RP |

Defaults are typical LPDDR-400 values at a 200 MHz DRAM clock. One
controller clock equals one DRAM clock. Values: T_RCD = T_RP = 3,
T_RAS = 8, T_BURST = 2 (burst of 4 beats), T_WR = 3, T_RTP = 2, T_XP = 2,
CL = 3.

A read returns on `resp_*[b]` 1 + LINK_LAT + CL + LINK_LAT + 1 = 7 clocks
after the clock in which the engine takes it (`issue` high). Read tags wait in an 8-deep FIFO per bank.
A bank returns its data in order, so no tag needs to cross the link.

## Per-bank logical channels

Each bank has its own command word (`chan_word_t`: command, row, column,
write burst) and its own read word (`rd_word_t`: valid, read burst). No bank
address is sent: the RF band that a word travels on selects the bank. On
the DRAM side, `dram_bank_control` decodes all four words in the same
cycle. It drives each bank's row decoder (`bk_act`, `bk_row`), row-buffer
precharge (`bk_pre`) and column mux (`bk_rd`, `bk_wr`, `bk_col`,
`bk_wdata`). There is no data multiplexer between banks. Each bank's read
data goes through its own CL-stage pipeline back onto its own band.
`protocol_err` is sticky. It is set by any of these:

* a column command to a closed bank;
* an ACT to an open bank;
* any command while CKE is low.

`mrfi_link` is a **behavioural model**. It abstracts the analog link:

* **Transmit.** Bit *p* of channel *k*'s word sets the amplitude of band *k*
  on line *p* to `AMP_ON` or 0 (amplitude-shift keying).
* **Line.** The line delays all band amplitudes by `LATENCY` clocks and
  scales them by `ATTEN`/8.
* **Receive.** Each band's receiver compares that band's envelope with half
  the received on-level.

Band separation is ideal. The model shows how the logical channels are
assigned to bands. It does not predict analog behaviour. In silicon, each
band needs its own carrier. One VCO per band can feed up to eight
transmitters of that band.

## Top-level interface (`rfi_gpu_mem_system`)

| port | dir | width | meaning |
|---|---|---|---|
| `req_valid`, `req_ready` | in, out | 1 | request handshake; ready while a queue slot is free |
| `req_addr` | in | 29 | byte address: [2:0] byte, [12:3] column, [14:13] bank, [28:15] row |
| `req_we`, `req_wdata`, `req_tag` | in | 1, 256, 8 | write flag, one 4 x 8-byte burst, tag |
| `flush` | in | 1 | release a partly filled queue |
| `resp_valid[b]`, `resp_data[b]`, `resp_tag[b]` | out | 4 x (1, 256, 8) | read return per bank, in order per bank |
| `bk_act/pre/rd/wr[b]`, `bk_row/col/wdata[b]` | out | per bank | strobes to the bank arrays |
| `bk_rdata[b]` | in | 4 x 256 | word at the open row and `bk_col`, valid in the `bk_rd` cycle |
| `cke` | out | 1 | DRAM clock enable |
| `pwr_state` | out | 2 | P_PRE_PDN, P_PRE_STBY, P_ACT_PDN, P_ACT_STBY |
| `group_active`, `group_formed`, `q_full`, `protocol_err` | out | 1 | status |

Tags must be unique among the reads in flight. The address split keeps
consecutive addresses in one 8 KiB page.

## What is assumed

The following are not fixed by the approach. They are the choices of this
RTL.

* **Sizes.** Queue depth is 8. Burst length is 4 beats of 8 bytes, so one
  transaction is 32 bytes. All DRAM timing values are assumed; see the
  engine timing section.
* **Address map.** Low to high: byte, column, bank, row. A transaction's
  column names the first beat of its burst. The evaluation used a
  simulator's "high-performance" mapping whose bit order is not spelled
  out. This map keeps the property that matters here: consecutive
  addresses stay in one page, and the page after that is on the next bank.
  The map is one slice in `intelligent_mc` and is easy to change.
* **Page choice.** Each bank's page in a group is the page of that bank's
  oldest request.
* **Group membership.** Membership is frozen when the group forms.
* **`flush` input.** Without it, a queue that never fills would never
  drain. The approach itself only waits for a full queue; it has no timeout.
* **Power-down policy.** CKE drops as soon as all banks are precharged and
  no group is pending. It rises on `wake`. `P_ACT_PDN` is reported but never
  entered, since CKE only drops with every bank closed.
* **Link.** One clock of flight time is assumed in each direction. CKE is a
  plain wire, not sent over the RF link.
* **RF bands.** Four RF bands per line give four logical channels, one for
  each of the four banks.

Not included: the baseline first-ready/first-come scheduler and the
single-channel configuration used for comparison; DRAM refresh (not
modelled, so long simulations do not issue REF); the analog DRAM arrays,
VCOs, ASK circuits and pads.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_transaction_queue` | contents, full/ready, age matrix and multi-slot free against a reference model (random traffic) |
| `tb_burst_group_scheduler` | no group before full/flush; group = oldest page per bank; oldest-first members; next group only after all engines idle |
| `tb_bank_cmd_engine` | command order and exact cycle spacing (tRCD, burst spacing, earliest legal PRE), read tags and data |
| `tb_power_mode_ctrl` | immediate power-down, T_XP exit delay, state classification |
| `tb_mrfi_link` | four independent random words per cycle recovered per band after LATENCY |
| `tb_dram_bank_control` | concurrent strobes on all banks, CL return timing per bank, protocol errors |
| `tb_intelligent_mc` | controller against a testbench DRAM: protocol, hold, power-down, read data, concurrency |
| `tb_rfi_gpu_mem_system` | whole system at default sizes (see below) |
| `tb_frame_workload` | one synthetic 640x480 frame (153,600 bursts) through the whole system |

`tb_rfi_gpu_mem_system` runs three phases.

* **Phase 1: the 8-entry queue example.** It checks that nothing is issued
  before the queue is full, that the first group opens exactly two pages
  and that three activates serve the eight requests in total.
* **Phase 2: six reads to bank 0 and two to bank 1.** It checks that bank
  0's six column commands are back to back and that bank 1's reads overlap
  them on the other channel. The eight reads take six column slots instead
  of eight.
* **Phase 3: a random stream with page locality.** It uses 30 % writes and
  ends with a flush.

Each of these mechanisms is counted and must occur:

* hold while filling;
* burst groups;
* concurrent column commands;
* page hits;
* power-down entries;
* time in precharge power-down;
* a flush-released group.

`tb/dram_bank_model.sv` stands in for the DRAM arrays. It holds sparse
contents and checks tRCD, tRAS and tRP.

The frame workload is a raster sweep. Each 32-byte span reads and writes
depth, writes colour and reads a texture burst. At the defaults it reports
about 1.3 GB/s, a 69 % page-hit rate and 4 % of cycles in precharge
power-down. These figures come from this synthetic stream, not from
recorded game traces.

Run a testbench with Verilator 5 from the folder that holds `rtl/` and `tb/`.
For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mc_pkg.sv rtl/*.sv \
    tb/dram_bank_model.sv tb/tb_rfi_gpu_mem_system.sv \
    --top-module tb_rfi_gpu_mem_system -Mdir obj
obj/Vtb_rfi_gpu_mem_system
```

Leave out `tb/dram_bank_model.sv` for the unit testbenches, which do not
use it. The frame run takes about half a minute; all others finish in
seconds.

## Changing it

* Queue depth: `QDEPTH` on the top. A deeper queue gives a wider window but
  longer holds.
* Timing: the `T_*` parameters of `intelligent_mc`, `CL` on the top. Keep
  `CL` of the top and the testbench bank model in step.
* Number of banks and bands: `NUM_BANKS`/`BANK_W` in `mc_pkg`. Keep `NB` and
  the band count equal: each bank needs its own band.
* Burst size: `BURST_LEN` in `mc_pkg`. `T_BURST` should equal
  `BURST_LEN`/2 for a DDR interface.
