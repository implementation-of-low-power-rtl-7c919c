# Multi-coded AMBA AHB write bus

Dynamic power on a wide on-chip bus is mostly the charging and discharging of
its lines, so it follows the number of lines that toggle from one transfer to
the next. This design puts a *multi-coding* encoder on the write data bus of a
three-master, four-slave AMBA 2.0 AHB system. The encoder does not send each
32-bit word as it is. It computes four reversible codings of the word, counts
for each how many lines would toggle against the word the bus currently
carries, and sends the coding with the fewest toggles. Two extra lines carry
which coding was used, so the write bus is 34 bits wide. A decoder in front of
each slave undoes the coding.

The scheme and the bus structure follow the paper *Implementation of Low Power
AMBA-AHB Bus Utilizing the Multi-Coding Technique*. Whatever the paper leaves
open was decided here, for example the memory map, the arbitration policy,
where the coder sits and the tie rule. Those choices are marked as such below
and in the opening comment of each source file.

## The four codings

Bit 0 is the least significant bit.

| code | coding | what happens to the word | example |
|------|--------|--------------------------|---------|
| `00` | invert | every bit inverted | `01101011100` → `10010100011` |
| `01` | swap | bits 2k and 2k+1 exchanged | `011010111000` → `100101110100` |
| `10` | invert even | bits 0, 2, 4, … inverted | `001101011100` → `011000001001` |
| `11` | invert odd | bits 1, 3, 5, … inverted | `001101011100` → `100111110110` |

The code numbers are the low two bits of the labels 000–011 that the paper
gives the four coding blocks. Each coding is its own inverse. That is why one
module, `mc_code_unit`, does the coding in the encoder (with a constant code)
and the decoding in `mc_decoder` (with the received code). If the width is odd,
the top bit has no partner and the swap coding leaves it unchanged.

Sending the word unchanged is **not** one of the options. The paper describes
the invert coding in two ways. In one it is classic bus-invert (invert only if
more than half the lines would toggle). In the other it is simply one of four
candidates handed to the comparator. This design follows the second reading:
the four codings above are the only choices.

## Choosing a coding (mc_encoder)

```
            +-- mc_group (invert, swap) -------------+
 data_i --->|  code unit -> hd_estimator --\          |
            |  code unit -> hd_estimator ---> compare |--\
            +-----------------------------------------+   \
            +-- mc_group (inv even, inv odd) ---------+    > mc_comparator --> {code, word} = bus_o
            |  ... same ...                          |--/
            +-----------------------------------------+
                      ^ prev_q (previous bus word, register)
```

* **Hamming-distance estimator** (`hd_estimator`). XORs a candidate with the
  previous bus word and counts the ones. The count is built from 1-bit full
  adders, as the paper specifies. Here they form a chain: each stage adds two
  difference bits into a running total through a ripple of full adders. The
  paper does not say how the adders are arranged.
* **Groups and comparators** (`mc_group`, `mc_comparator`). As in the paper's
  block diagram, the candidates are paired: (invert, swap) and (invert even,
  invert odd). Each pair is reduced to its better member, then a final
  comparator picks the better group. The tree is two levels deep.
* **Tie rule** (this design's choice). On equal distances the lower code wins.
  This matters for AHB wait states. The register holding the previous word
  loads on every clock. Suppose a word is held on the bus for several cycles.
  In the next cycle its own coded form has distance 0, and no lower code can
  produce the same coded word: if one could, that lower code would have been
  chosen the first time. So the bus value stays the same while the data is
  held, without needing a load-enable tied to HREADY.
* **What is counted.** Only the 32 data lines. The paper does not say whether
  the two code lines count, and here they do not.
* **Worst case.** The invert-even and invert-odd codings toggle complementary
  sets of lines, so their two distances add up to 32. The chosen coding
  therefore never toggles more than 16 data lines, however the data changes.
  The raw bus can toggle all 32. An assertion in `mc_encoder` checks this.
* **Timing.** `bus_o` is combinational from `data_i` and the register, so
  coding adds no cycle to the AHB data phase. The register resets to zero
  (active-low asynchronous reset).

The widest logic path runs through a 32-bit coding, the estimator chain and two
comparators. The chain is slow in gate depth. If timing matters, the obvious
change is a Wallace-style tree of the same full adders; the interface stays the
same.

## The AHB system (ahb_mc_top)

```
 master0..2 --ctrl--> ahb_addr_mux --ctrl--> slaves 0..3
     |                     ^   \--haddr--> ahb_addr_decoder --hsel-->
     |                 HMASTER
     +--hbusreq--> ahb_arbiter --HMASTER(data phase)--> ahb_wdata_mux
     +--hwdata--------------------------------------------^   |
                                                          mc_encoder (34-bit bus)
                                                              |
                                         mc_decoder per slave --> slave HWDATA
 slaves --hrdata/hreadyout/hresp--> ahb_rdata_mux --> HRDATA/HREADY/HRESP to all
```

* **Arbiter** (`ahb_arbiter`). The paper leaves the scheme open and names
  round robin as one choice; this design uses round robin. While the owner
  keeps HBUSREQ high it keeps the bus, so a burst is never split. When the
  owner drops HBUSREQ, the next requester after it takes over. With no
  requests, the grant stays parked on the last owner. HGRANT is registered.
  HMASTER follows at the next HREADY edge, which is also the edge where the new
  master starts its first address phase. A second register delays HMASTER into
  the data phase to steer the write data mux.
* **Hand-over timing.** A master drops HBUSREQ during the second-to-last
  address phase of its burst. The arbiter can then move the grant while the
  last phase is still on the bus. The next master starts its NONSEQ in the
  very next cycle, so after a burst the bus changes hands with no idle cycle.
  After a single transfer there is one idle cycle.
* **Address decoder** (`ahb_addr_decoder`). HADDR[31:30] selects the slave:
  slave 0 at `0x0000_0000`, slave 1 at `0x4000_0000`, slave 2 at `0x8000_0000`
  and slave 3 at `0xC000_0000`. The map is full, so there is no default slave.
  This map is this design's choice.
* **Muxes.** Address and control are selected by HMASTER. Write data is
  selected by the data-phase master. Read data, HREADY and HRESP are selected
  by the slave chosen in the previous address phase.
* **Masters** (`ahb_master`). The paper only says what a master does, so this
  is a simple command-driven master. A command gives the direction, the start
  address and HBURST. The master then requests the bus, issues NONSEQ followed
  by SEQ beats of word size, and supports SINGLE, INCR (one beat), INCR4/8/16
  and WRAP4/8/16. It drops HBUSREQ one address phase before the last. Write
  data is fetched one beat at a time: `wbeat_o` names the beat and `wdata_i` supplies
  it in the same cycle. Read beats come back on `rvalid_o`/`rdata_o`, and the
  master raises `done_o`/`err_o` at the end of the command.
* **Slaves** (`ahb_slave`). Each is a word memory (default 1024 words) with a
  configurable number of wait states. The top gives slaves 0–3 wait states of
  0, 0, 1 and 2. A transfer that is beyond the memory, misaligned or not
  word-sized gets the two-cycle AHB ERROR response. The memory is not reset.
* **Coder placement** (this design's choice). There is one encoder after the
  write data mux, so the "previous word" is that of the shared bus whichever
  master wrote it. A decoder sits in front of each slave. Read data is not
  coded, in line with the paper, which codes only the write path.

## Departures and limits

* The transfer encodings are those of AMBA 2.0: HTRANS NONSEQ = 10,
  SEQ = 11; HRESP OKAY = 00, ERROR = 01.
* SPLIT and RETRY responses, locked transfers (HLOCK), sub-word transfers and
  a default slave are not implemented.
* The paper's power figures (0.690 W for a reference encoder against 0.659 W,
  on a Spartan-3E) cannot be reproduced from RTL. The reference encoder itself
  is not described. As a proxy, the testbenches count toggling data lines. On
  1000 random 32-bit words the coded bus toggles about 19 % fewer lines than
  the raw data (about 11 700 against 14 500). The end-to-end bus test shows
  about 23 % fewer (about 35 000 against 46 000). The code lines are not
  included in these counts.
* The paper's data width is 32 bits on the AHB and 8 bits in its summary. The
  default is 32, and `W` can be set to any width; the encoder test also runs
  at 8 bits.

## Files

| file | contents |
|------|----------|
| `rtl/mc_pkg.sv` | code enum, 1-bit full adder function |
| `rtl/ahb_pkg.sv` | AHB encodings, address/control struct, bus widths |
| `rtl/mc_code_unit.sv` | the four codings (and their inverses) |
| `rtl/hd_estimator.sv` | toggle counter built from full adders |
| `rtl/mc_comparator.sv` | min-distance select, lower code on ties |
| `rtl/mc_group.sv` | two codings + estimators + comparator |
| `rtl/mc_encoder.sv` | full encoder with previous-word register |
| `rtl/mc_decoder.sv` | receiver-side decoder |
| `rtl/ahb_arbiter.sv`, `ahb_addr_decoder.sv`, `ahb_addr_mux.sv`, `ahb_wdata_mux.sv`, `ahb_rdata_mux.sv` | AHB interconnect |
| `rtl/ahb_master.sv`, `rtl/ahb_slave.sv` | bus master and memory slave |
| `rtl/ahb_mc_top.sv` | the whole system |
| `tb/mc_ref_pkg.sv` | independent reference model of the coding, used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_incr4_write_burst.sv` | a single INCR4 write and read-back through the whole system |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv rtl/ahb_pkg.sv tb/mc_ref_pkg.sv tb/tb_ahb_mc_top.sv \
    --top-module tb_ahb_mc_top -o sim && ./obj_dir/sim
```

Replace `tb_ahb_mc_top` with any other `tb_*` name to test one block.
`tb_ahb_mc_top` runs the system at its default parameters:

* Three masters issue 120 random commands each, with every burst type, to all
  four slaves. About one command in twenty goes outside the slave memory and
  must end with an error.
* Every cycle, the coded bus is compared with the reference coder.
* Read-back of every written word checks the decoders.
* The test counts, and requires at least one of each: bus hand-overs
  (including ones with no idle cycle), concurrent requests, wait states,
  ERROR responses, every code and every burst type.

It runs in a few seconds. `tb_mc_encoder` checks the encoder cycle by cycle
against the reference model at 32 and 8 bits. It also checks that a word held
on the bus keeps its coded value. The unit testbenches include the worked
examples of the four codings and the distance values of the paper's 10-bit
example: 7, 8, 7 and 6, where invert odd wins.

`tb_incr4_write_burst` runs one complete operation on the default system:
master 0 writes a four-beat INCR4 burst of the words `02030405`, `06070809`,
`0A0B0C0D` and `0E0F1011` to slave 0, then reads them back. It checks the
address and control of each beat, one data beat per cycle, and the decoded
word at the slave for every beat.
