# Lightweight AXI Protection Unit

Several applications of different criticality often share one low-cost SoC-FPGA
(Zynq-7000 class), and each must be kept away from the memory and peripherals of
the others. The hard processing system of such chips has no protection hardware
of its own. This RTL provides a small **Protection Unit (PU)** for that: it sits
in one AXI4 connection and lets a transaction through only if a run-time policy
allows the issuing master to touch the addressed range.

The main idea is to split the decision into a part fixed at synthesis and a part
that can change at run time:

* **Protection domains (PDs)** group masters by their AXI ID. They are fixed at
  synthesis.
* **Memory regions (MRs)** group addresses into aligned blocks. They are fixed at
  synthesis.
* **Access policies (APs)** say which domain may read, and which may write, which
  region. They are the only run-time state.

Because domains and regions are constants, the whole grant decision is a small
block of combinational logic. It needs no table lookup and no memory, and it
adds no clock cycle to a granted transaction.

## Domains, regions and policies

### Protection domain

A domain is a pair of design-time constants, a domain ID and a domain mask. An
AXI ID belongs to the domain when every ID bit selected by the mask equals the
corresponding bit of the domain ID (`pd_matcher`). For example, with 4-bit IDs:

| domain | mask | ID   | contains IDs   |
|--------|------|------|----------------|
| 0      | 1100 | 1000 | 10xx           |
| 1      | 1110 | 1000 | 100x           |
| 2      | 1110 | 1010 | 101x           |

Here ID `1011` is in domains 0 and 2. A master can be in several domains, and a
domain can hold several masters. If a master's IDs do not share bits that could
define a domain, place an `axi_id_manipulator` in front of it. It forces chosen
ID bits to a fixed value.

### Memory region

A region is a base address plus an LSB position. The region covers the
2<sup>LSB</sup> bytes that share the base's address bits from the MSB down to
bit LSB (`mr_matcher`). A request matches a region only if the **whole burst**
lies inside it. The matcher checks both of these addresses:

    first = AxADDR
    last  = AxADDR + (AxLEN + 1) * 2^AxSIZE - 1

A burst that starts inside a region but runs past its end therefore does not
match. A burst whose end wraps past the top of the address space never matches.
The burst type is not examined: every burst is sized as INCR. For a WRAP burst,
or an unaligned start, this can only over-estimate the end, so it never grants
more than the region.

### Access policy

There is one read policy and one write policy, each a `NUM_PD x NUM_MR` bit
matrix. A request is granted when **any** matched domain has its bit set for
**any** matched region:

    granted = OR over d, m of ( pd_match[d] & mr_match[m] & policy[d][m] )

A master that matches no domain is always denied, and so is an address that
matches no region. After reset every policy bit is 0, so the PU denies
everything until software has set it up.

**Worked example.** Take two masters and two slaves:

* master 1 is in domain 1, master 2 is in domain 2, and both are in domain 0;
* slave 1 is region 1, slave 2 is region 2, and both together are region 0.

The read policy sets (D0, MR0), so both masters may read both slaves. The write
policy sets (D1, MR1) and (D2, MR2). Now consider two writes by master 1:

* To slave 1, it matches D0 and D1, and MR0 and MR1. The set bit (D1, MR1) grants
  the write.
* To slave 2, it matches D0 and D1, and MR0 and MR2. No write bit is set in that
  sub-matrix, so the write is denied.

## Inside the Protection Unit

```
            +------------------------------------------------------+
 AXI4 ----->|--+-----------------------------> demux port 0 ------>|----> AXI4
 (from      |  | ID ADDR LEN SIZE    ^                             |    (to
  master)   |  v                     | select = !granted           |     slave)
            | policy_check (AW, write policy) ---+                 |
            | policy_check (AR, read policy)  ---+   port 1        |
            |        ^ policies                      v             |
 AXI-Lite ->| pu_config                          pu_axi_err_slv    |
            +------------------------------------------------------+
```

`protection_unit` has three ports:

* an AXI4 slave port facing the master;
* an AXI4 master port facing the slave, with the same parameters;
* an AXI4-Lite configuration port.

It contains the following blocks:

* **`pu_config`** holds the two policies, which it drives to the checks on every
  cycle, plus control and status registers. A policy write takes effect in the
  cycle in which its write response is presented.
* **`policy_check`**, two instances: one judges AW with the write policy, the
  other judges AR with the read policy. Each has one domain matcher per domain
  and one region matcher per region. It has no flip-flops.
* **`pu_axi_demux`** sends a granted request to port 0, which is the downstream
  slave. It sends a denied request to port 1, the error slave.
* **`pu_axi_err_slv`** completes each denied transaction with an AXI error
  (SLVERR by default), so the master is never left waiting:
  * a write: it accepts and drops all W beats, then returns one B;
  * a read: it returns LEN+1 R beats, with RLAST on the last.

### Timing

* A granted AW or AR leaves the PU in the **same cycle** it arrives. The path
  through the PU is combinational.
* W beats are forwarded from the cycle after their AW has been accepted. W never
  runs ahead of AW on either output.
* B and R pass back combinationally.

### How the demultiplexer keeps responses in order

Granted and denied transactions end at two different slaves. Their responses
could therefore come back in the wrong order.

The demultiplexer tracks each direction (write, read) separately. For each it
keeps a count of open transactions and the port they went to. A request for the
other port waits until that count has drained to zero. So all open transactions
of one direction always sit on one port, and B and R are simply taken from that
port.

This costs a few cycles only when grants and denials alternate while
transactions are still open. There are two limits:

* at most `MAX_TRANS` (8) transactions per direction can be open;
* a downstream slave must accept AW without waiting for W.

### Register map (`pu_config`, 32-bit registers, offsets within a 4 KiB window)

| offset      | name      | access | content |
|-------------|-----------|--------|---------|
| 0x000       | CTRL      | W      | write 1 to bit 0: clear STATUS and DENY_ADDR |
| 0x004       | STATUS    | R      | bit 0: a read was denied; bit 1: a write was denied (sticky) |
| 0x008       | DENY_ADDR | R      | address of the most recent denied request |
| 0x00C       | INFO      | R      | [7:0] NUM_PD, [15:8] NUM_MR |
| 0x100 + 4*d | RD_POLICY | R/W    | bit m: domain d may read region m |
| 0x200 + 4*d | WR_POLICY | R/W    | bit m: domain d may write region m |

* Unmapped offsets, and policy rows with d ≥ NUM_PD, answer SLVERR.
* Writes to the read-only registers are ignored and answer OKAY.
* Byte strobes are honoured.
* A write is taken when AW and W are both valid. B and R each follow one cycle
  after the request is taken.

In a system, connect the configuration ports of all PUs to a separate control
bus. Only the master that boots the system, and later manages the policies,
should reach that bus.

## Helpers around the PU

* **`axi_id_manipulator`** forces the ID bits in `ID_MASK` to `ID_VALUE` on
  every AW and AR, and restores the original ID on B and R.
  * It tracks IDs with one small table per direction (`id_restore_table`). Each
    table entry holds a rewritten ID in flight, the original ID behind it, and a
    count of open transactions.
  * A request waits in two cases: its rewritten ID is already in flight for a
    *different* original ID (the responses could not be told apart), or the
    table is full.
  * No cycle is added.
* **`axi_addr_translator`** takes an address in the 2<sup>WIN_LSB</sup>-byte
  window at `VIRT_BASE` and replaces its upper bits with those of `PHYS_BASE`.
  Everything else passes unchanged.
  * Use it when the APU must reach PS peripherals through its PL master port
    instead of directly. With that path, a PU can guard peripherals that the APU
    and PL masters share.
  * The defaults map 64 KiB at 0x4100_0000 onto 0xE000_0000, the Zynq-7000 I/O
    peripherals.

## The two-master system (`pu_system_top`)

The top module is the PL side of a Zynq-7000 system in which the APU and a
MicroBlaze share a BRAM and a peripheral. Each master has its own PU on the
master side of the shared interconnect, so a denied request never reaches the
interconnect.

```
 APU GP master --> axi_addr_translator --> protection_unit --> apu_ic_* (to interconnect)
 MicroBlaze    --> axi_id_manipulator  --> protection_unit --> mb_ic_*  (to interconnect)
 control bus   --> apu_pu_cfg_*, mb_pu_cfg_*  (AXI-Lite, one per PU)
```

Each PU has 1 domain and 2 regions. With the default parameters:

* **Region 0** is the BRAM: 8 KiB at 0x4000_0000.
* **Region 1** is a 4 KiB UART page at 0xE000_0000. The APU reaches it through
  the window at 0x4100_0000.
* **The APU's PU** has a domain mask of 0, so it matches any ID. On the master
  side the port alone identifies the master.
* **The MicroBlaze's IDs** get bits [11:10] forced to `01`. Its PU's domain is
  exactly those IDs.

The following parts are not in this RTL: the processors, the AXI interconnect,
the BRAM, the peripheral and the control-bus interconnect. The top brings their
connections out as ports.

PUs can also go in front of each slave, after the interconnect. A single PU can
also sit between a master-side and a slave-side interconnect, guarding all
domains and regions at once. `protection_unit` is the same in every placement;
only its domain and region tables change.

## What follows the published design and what is this design's own

**Follows the published design:**

* the domain, region and policy scheme;
* the masked-ID domain rule;
* aligned regions given by an LSB position, checked with the burst's start and
  end computed from ADDR, LEN and SIZE;
* the OR-of-rules decision;
* separate read and write policies;
* two combinational policy checks feeding a demultiplexer and an error slave;
* the AXI-Lite configuration port;
* the maximum of 16 domains and 16 regions per PU (the defaults of
  `protection_unit`);
* the test system with 1 domain and 2 regions per PU;
* an ID manipulator that adds or overwrites ID bits and restores them;
* an address translator on the APU's path to the PS peripherals.

**This design's own choices:**

* bus widths: 32-bit address and data, 12-bit ID;
* the exact end-address formula and the INCR treatment of all bursts;
* the register map, the status contents and the reset value (all denied);
* SLVERR as the error code, with one transaction at a time in the error slave;
* the demultiplexer's ordering rule and its W-after-AW forwarding;
* the ID manipulator's table mechanism;
* the translator's window scheme;
* all default addresses and ID values;
* the placement of the address translator ahead of the APU's PU in the top.

The demultiplexer and the error slave are written from their function; no
third-party library is used.

## Size

From coarse, technology-independent synthesis (word-level cells and flip-flop
bits, not FPGA LUTs):

| module                          | flip-flop bits | word-level cells |
|---------------------------------|----------------|------------------|
| `protection_unit`, 16 PD x 16 MR | 642           | 615              |
| `pu_system_top` (2 PUs of 1 PD x 2 MR, ID manipulator) | 490 | 832 |
| `axi_id_manipulator`            | 224            | 315              |
| `policy_check`, 16 x 16         | 0              | 178              |

Most flip-flops sit in the configuration block: 2 x NUM_PD x NUM_MR policy bits,
plus the AXI-Lite and status registers.

## Simulating

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. They share these
helper models:

* `axi_tb_master`: AXI4 burst tasks;
* `axil_tb_master`: AXI-Lite tasks;
* `axi_tb_mem`: a behavioural AXI4 memory that also counts what reached it;
* `axi_tb_mux2`: a behavioural two-master interconnect.

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/axi_pu_pkg.sv \
          tb/pu_system_top_tb.sv --top-module pu_system_top_tb
./obj_dir/Vpu_system_top_tb
```

Replace `pu_system_top_tb` with any other testbench name:

| testbench | what it covers |
|-----------|----------------|
| `pd_matcher_tb`, `mr_matcher_tb` | the 4-bit domain table above; a small 8-bit-address region (0110xxxx, LSB 4) exhaustively; random bursts at page edges |
| `policy_check_tb` | the worked example, including which domains and regions match; random rules against a rule-list model |
| `pu_config_tb` | policy read/write, strobes, INFO, SLVERR decode, status flags and clear |
| `pu_axi_err_slv_tb`, `pu_axi_demux_tb` | error-slave beat counts, RLAST and IDs; demux routing, same-cycle forwarding, W after AW, waiting when switching ports |
| `protection_unit_tb` | the worked example end to end over AXI-Lite and AXI; deny-all after reset; burst crossing a region; run-time revoke and restore; same-cycle forwarding; random traffic against a model |
| `pu_scaling_tb` | the PU at 1x1, 1x16, 16x1 and 16x16 domains x regions with random policies and traffic |
| `pu_shared_tb` | one PU shared by two masters behind a behavioural interconnect (2 domains, 2 slaves), concurrent random traffic |
| `axi_id_manipulator_tb`, `axi_addr_translator_tb` | ID rewrite and restore, holding a conflicting ID; window translation |
| `pu_system_top_tb` | the whole system at its default parameters: boot lock-out, configuration by the APU, traffic from both masters (also concurrent), the run-time revoke. It counts every mechanism it exercises. |

The simulator is two-state, so all state the design reads is reset.

## Changing it

* **Domains and regions:** set `NUM_PD`, `NUM_MR` (1 to 16) and the tables
  `PD_ID`, `PD_MASK`, `MR_BASE` and `MR_LSB`. The tables are packed arrays of 16
  entries, of which only the first `NUM_PD` / `NUM_MR` are used. Entry 0 is the
  least significant.
* **Bus widths:** change the constants in `axi_pu_pkg`.
* **Error response:** `ERR_RESP` on `protection_unit`.
* **Open transactions:** `MAX_TRANS` on the PU (the demultiplexer) and on the
  ID manipulator.
* **Clock frequency:** the grant path is combinational between the PU's input
  and output ports. If it does not fit one clock period on a given device, put
  register slices in front of the PU, or pipeline the checks.
