# SecWalk: fault-protected page table walks in SystemVerilog

A fault attack (a glitch, a laser pulse, a rowhammer flip) can change where a
memory access goes without changing any data: a pointer loses a bit, an
address adder is skipped, the page table walker reads the wrong entry, or a
TLB entry is looked up with a faulted tag. The loaded value is genuine, but it
comes from the wrong place. SecWalk makes such redirections detectable
end to end, from the pointer in a register, through virtual-to-physical
translation, to the bytes in the data cache:

* every address, virtual or physical, carries a **multi-residue code** in its
  upper bits, and all address arithmetic is done and checked in the code;
* every page table entry is **linked** to the part of the virtual address that
  is supposed to reach it, with a keyed diffusing permutation. Unlinking with
  any other key scrambles the encoded PPN inside the entry, and its residue
  check fails;
* TLB entries are linked the same way with the whole encoded VPN;
* data in memory is xor-scrambled byte by byte with the **encoded physical
  byte address**, so a load from the wrong location returns garbage that the
  software's own data code rejects.

The RTL here is the SecWalk hardware an application-class RV64 core (CVA6-like)
needs for this: a residue ALU for the new pointer instructions, an address
mux that lets encoded pointer arithmetic bypass the ordinary address adder,
the `satp_enc` CSR, a memory management unit with linked TLBs, a page table
walker and its residue datapath, and the byte link of the load/store path.
The core itself, its decoder, load/store unit and caches are not included.
Their connections are ports of `secwalk_top`.

## Encoded addresses

An Sv39 address has 39 bits. The 25 bits above them hold the residues of the
address modulo 5, 7, 17, 31 and 127:

```
 63        62 61    55 54    50 49    45 44  42 41  39 38             0
 +-----------+--------+--------+--------+------+------+----------------+
 |  0   0    | mod127 | mod31  | mod17  | mod7 | mod5 |   address      |
 +-----------+--------+--------+--------+------+------+----------------+
```

The residues take 3+3+5+5+7 = 23 bits. The two top bits of the field are
zero in every codeword. The code is separable: the plain address is the low
39 bits, so no decode step sits in front of a TLB lookup or a cache access.
With these moduli, any one to four flipped bits give a non-codeword
(`tb_code_distance` checks this). `secwalk_pkg` holds the definitions:
`residues()`, `encode()` and `is_codeword()`.

**Encoded add/subtract** (`res_adder`) adds or subtracts the payloads. It also
adds or subtracts each residue modulo its modulus. The result is then
re-encoded and compared with the computed redundancy. `fault_o` is raised
when any of these hold:

* the result fails that compare;
* either operand is not a codeword;
* the payload overflows or underflows 39 bits.

So a fault on an input, in the adder or on its output is reported by the
same unit that computes the address.

**PTEs** carry the encoded page address: PTE[61:10] = PPN_enc (52 bits = 44-bit
PPN field widened by 8, of which 27 bits are the physical page number and 25
the redundancy), so `{PTE[61:10], 12'b0}` must be a codeword. PTE[63:62] are
reserved, PTE[9:8] RSW and PTE[7:0] the usual Sv39 V/R/W/X/U/G/A/D bits.

## The linking function

`prince_link` computes P_x(y, k) and its inverse. It is a two-round version of
the PRINCE block cipher, used as a keyed diffusion rather than as a cipher:

1. whitening: `s = y ^ k`;
2. two forward rounds, each: 4-bit S-box on every nibble, linear layer M'
   (PRINCE's M^0, M^1, M^1, M^0 blocks), ShiftRows nibble permutation,
   then `^ k ^ RC_r`.

Linking is the forward direction and unlinking the inverse. The key is the
short linking key, zero-extended. There is no key schedule. S-box, M-blocks,
ShiftRows and round constants are PRINCE's.

Two widths are used:

* **P64** links whole PTEs (key: the encoded 9-bit VPN field of the level) and
  TLB entries (key: VPN_enc).
* **P52** links the encoded PPN of a leaf a second time (key: upper 52 bits of
  VPN_enc), so the final translation depends on the whole encoded virtual
  page, including its redundancy. PRINCE has no 13-nibble form. This design
  uses:
  * M^0, M^1, M^0 on nibbles 0–11;
  * an xor of those twelve nibbles into nibble 12 (invertible);
  * the nibble permutation i → 5·i mod 13;
  * round constants truncated to 52 bits.

What matters is diffusion. A single flipped bit anywhere in a linked 64-bit PTE
must change the PPN field after unlinking, so that even a faulted status bit
breaks the residue check. `tb_prince_link` checks this for all 64 positions.

## The secure walk

`secwalk_ptw` (control) and `res_ptw` (residue datapath) translate
VA_enc → PA_enc. The root is `satp_enc.ppn_enc`. Steps:

| step | operation | check |
|---|---|---|
| 1 | a = {root PPN_enc, 12'b0}, i = 2 | root is a codeword (adder operand check) |
| 2 | VPN_enc = VA_enc ⊟ Enc(PO) | result is a codeword, low 12 bits zero |
| 3 | PTE address = a ⊞ Enc(vpn[i]·8) | checked addition; checks a as well |
| 4 | read PTE_l at that address, remove the byte link of memory, PTE = P64⁻¹(PTE_l, Enc(vpn[i])) | – |
| 5 | V = 0: page fault. R or X: leaf, go to 7 | – |
| 6 | a = {PTE.ppn_enc, 12'b0}, i −= 1, back to 3 (i < 0, W set or reserved bits set: page fault if the PPN is a codeword, residue fault if not) | PPN checked by the next step-3 addition |
| 7 | PPN_enc = P52⁻¹(PTE.ppn_enc, VPN_enc[63:12]) | checked in step 8 |
| 8 | PA_enc = {PPN_enc, 12'b0} ⊞ Enc(PO) | checked addition |

A residue failure sets `res_fault` (an attack: the core must trap). Sv39 rule
violations set `page_fault`. Residues are checked before the PTE's other bits
are trusted: a leaf whose PPN fails the check is a residue fault even if its
scrambled permission bits would also give a page fault, and a pointer entry
with W or reserved bits set is only a page fault if its PPN is a codeword.

Page tables live in ordinary linked memory. A PTE word is stored xor-scrambled
with the key of its own physical address (see *Linked data*), so the walker
removes that scramble first. The correction key comes from the PTE address
that the checked adder produced. Software builds the tables with `vpnlink1`
(P64 of each entry) and `vpnlink2` (P52 of leaf PPNs).

**Timing.** The memory port is req/gnt followed by rvalid with the data. With
d cycles from grant to data, a three-level walk raises `done_o`
3·(3+d)+2 cycles after `start_i`.

## Linked TLBs

`secure_tlb` is fully associative. It has 16 entries and round-robin
replacement, and fills invalid entries first. It is looked up with the plain
VPN. It stores P64(leaf PTE with the already-unlinked PPN_enc, VPN_enc). On a
hit, the MMU has `res_ptw` unlink the entry with the VPN_enc of the current
request. It then checks the PPN and adds Enc(PO).

A TLB tag that matched because of a fault, or a faulted VA_enc, gives the
wrong key. The unlinked PPN is then not a codeword. The linked form is
computed once, at fill time, by the TLB's own P64 instance.

`secwalk_mmu` has one request port and picks the ITLB for instruction fetches
and the DTLB for data. Latency:

* 3 cycles from request to response on a TLB hit;
* 2 cycles in bare mode, where the checked VA_enc is returned as PA_enc;
* walk + 3 cycles on a miss.

The permissions of a TLB hit are checked on the unlinked entry. `sfence_i`
flushes both TLBs.

## Linked data

For a load or store at PA_enc, `ptr_reduce` builds one key byte per byte lane:

1. Form the encoded address of byte lane j. Its payload is `{pa[38:3], j}`.
   Its residues are carried from PA_enc by ±(j − pa[2:0]), not recomputed,
   so a faulted address gives wrong keys.
2. Fold that 64-bit word to 8 bits by xor.

`link_xor` xors store data with these keys on the way to the cache. It xors
load data with them on the way back. `en_linking_i` = 0 bypasses the link.

Shared memory needs nothing extra. The data link depends only on the physical
address, so two virtual pages that map one physical page see the same data.
`secwalk_top` holds the PA_enc of the last successful translation and uses it
for the next data access. This is a simplification of the core's load and
store units.

## Pointer instructions and the satp_enc CSR

`res_alu` executes, in one combinational step:

| op | result |
|---|---|
| ENC | rd = Enc(rs1) (faults if rs1 ≥ 2^39) |
| DEC | rd = rs1[38:0] (faults on a non-codeword) |
| ADD / SUB | rd = rs1 ⊞/⊟ rs2, checked |
| LINK1 (`vpnlink1`) | rd = P64(rs1, rs2) |
| LINK2 (`vpnlink2`) | rd = {P52(rs1[63:12], rs2[63:12]), 12'b0} |

`agu_res_mux` chooses the virtual address of a load or store:
* `res_agu_valid_i` = 1: the residue ALU result, i.e. a pointer formed as
  base ⊞ offset in the code;
* `res_agu_valid_i` = 0: the core's plain base + immediate, which would
  destroy the residues of an encoded pointer and so is used only by
  unprotected code.

In `secwalk_top` the mux output is the VA_enc of the MMU request.

`satp_enc_csr` sits at CSR address 0x5c0. It holds MODE in [63:60] (0 bare,
8 Sv39; other values are ignored on write) and the encoded root PPN in
[51:0]. It has CSRRW/CSRRS/CSRRC semantics (`csr_op_i` = 1/2/3) and resets
to bare mode. `ppn_enc_valid_o` tells whether the root is a codeword. A walk
from a faulted root ends in a residue fault.

## Files

| file | contents |
|---|---|
| `rtl/secwalk_pkg.sv` | widths, code functions, operation enums |
| `rtl/res_encode.sv` | encoder |
| `rtl/res_adder.sv` | checked encoded add/subtract |
| `rtl/prince_link.sv` | P64 / P52 link and unlink (parameter `BLOCK_W`, `ROUNDS`) |
| `rtl/res_alu.sv` | pointer and link instructions |
| `rtl/agu_res_mux.sv` | virtual address source: residue ALU or base + immediate |
| `rtl/satp_enc_csr.sv` | encoded page table root |
| `rtl/res_ptw.sv` | residue walker datapath |
| `rtl/secwalk_ptw.sv` | walk controller |
| `rtl/secure_tlb.sv` | linked TLB (parameter `ENTRIES`) |
| `rtl/secwalk_mmu.sv` | MMU: TLBs, walker, bare mode |
| `rtl/ptr_reduce.sv`, `rtl/link_xor.sv` | byte link of data |
| `rtl/secwalk_top.sv` | everything above, core and cache as ports |
| `tb/secwalk_ref_pkg.sv` | independent reference model for the benches |
| `tb/tb_<module>.sv` | one self-checking bench per module |
| `tb/tb_code_distance.sv` | 1–4 bit fault detection of the code |

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog. With Verilator 5, from the top of the tree (packages first):

```
verilator --binary -j 0 -Wno-fatal --top-module tb_secwalk_top \
  rtl/secwalk_pkg.sv tb/secwalk_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/tb_secwalk_top.sv
obj_dir/Vtb_secwalk_top
```

For another bench, change the top module and the bench file.

The reference package computes residues by digit sums, not by division. It
implements the link from PRINCE tables written out separately. It also builds
linked page tables the way system software would. The benches therefore do
not reuse the RTL's functions.

`tb_secwalk_top` runs the whole design at its default sizes:

* it programs `satp_enc` and builds three-level linked page tables in a memory
  model;
* it translates and accesses data through walks, TLB hits, fetches,
  bare mode and shared pages, with addresses that come at random from the
  residue ALU (base ⊞ offset) or from base + immediate.

It then attacks the design:

* flipped pointer bits;
* a flipped PTE in memory;
* a corrupted root;
* a wrong data location;
* bad ALU operands.

It counts each mechanism and fails if any never happened. The MMU bench
(`tb_secwalk_mmu`) also corrupts the DTLB directly. It makes one tag match
the wrong address and flips bits in a stored entry. Both must end in a
residue fault, never in a translation.

## Where this design departs from the SecWalk description

* **4 KiB pages only.** A leaf found at level 2 or 1 (a superpage) is reported
  as a page fault after its residue check. The description allows early ends
  of the walk for large pages, but not how their leaf PPN is linked.
* **Redundancy width.** The field is 25 bits wide as in the address layout,
  but the five residues fill 23 of them. The top two bits must be zero.
* **Linking function details.** The description names a two-round PRINCE
  and a 52-bit variant but not how rounds, keys and the 52-bit layers are
  built. Those choices (above) are this design's.
* **Key of the per-level unlink.** It is Enc(vpn[i]), the encoded 9-bit index,
  following the residue walker's register naming. The step list writes the
  plain VA.vpn[i].
* **Checks merged.** The separate PPN check of an intermediate PTE (step 6)
  and of the leaf (step 7) are done by the operand check of the next checked
  addition. The adder's operand and overflow checks go beyond "check the
  result".
* **MMU.** It has one shared request port and serves one translation at a
  time. There is no ASID, no PMP, and no A/D update, U/SUM or MXR handling.
  The core's own PMP and physical-access checks are outside this RTL.
* **Data path.** The byte link key compression (per-lane encoded byte address,
  folded by xor) is this design's. The load/store unit, store buffer, data
  cache and decoder are not included. The last translated PA_enc stands in
  for the load/store unit's address.
* **Sizes not given.** These were chosen: TLB size 16, CSR address 0x5c0,
  the CSR layout, the memory handshake and all latencies.

## Lint notes

Verilator reports a few unused-signal warnings for bits that are deliberately
not read:

* the upper payload bits of a plain page offset;
* the ignored bits of a CSR write;
* the redundancy field of a VA where only the VPN is needed;
* the unused top of a 32-bit intermediate.

It also reports unused package constants that document the Sv39 layout. The
assertions use the asynchronous reset in `disable iff`, which Verilator
notes as a mixed synchronous/asynchronous use of `rst_ni`.
