# ZTCAM: a ternary CAM built from ordinary memories

A ternary content-addressable memory (TCAM) stores words whose bits are
0, 1 or x (don't care). It answers a search with the address of the
first stored word that matches the key. Dedicated TCAM cells are large and
power hungry. They are also hard to move into an FPGA.

This design gets the same behaviour from small RAMs addressed by the search
key. It uses no comparators and no ternary storage cells. The table is cut
twice:

* **Horizontally into layers.** Layer *l* holds the *K* consecutive entries
  *l·K … l·K+K−1*. All *L* layers are searched in parallel.
* **Vertically into subwords.** Each *C*-bit word is split into
  *N = C / W* subwords of *W* bits. Subword 1 is the most significant one.

Each (layer, subword) cell of this grid is a *hybrid partition*. It owns
two memories, and both are addressed by the subword's value:

| memory | size | row *r* holds |
|---|---|---|
| validation memory (VM) | 2^W × 1 | 1 if any entry of the layer can have the value *r* in this subword |
| original address table (OAT) | 2^W × K | bit *k* = 1 if entry *k* of the layer can have the value *r* in this subword |

An x bit cannot be stored in a RAM. So an entry's ternary subword is
*expanded*: every binary value it covers gets its OAT bit set. The subword
`0x`, for example, sets rows `00` and `01`.

## Search path

Everything below happens combinationally inside one clock cycle. The
result is registered at the next rising edge.

1. The key is split into subwords sw1 … swN. Every layer receives all of them.
2. In each layer, subword *n* reads VM*n*. The 1-bit AND of the *N* VM
   bits gives the **activation signal**. If it is 0, some subword value
   appears nowhere in this layer, and the layer has already mismatched.
3. Subword *n* also addresses OAT*n* directly. The activation signal is
   the OAT read enable: a rejected key reads all zeros, so the rest of the
   layer does not switch. This routing is the area-saving arrangement the
   design is built on. In it, the OAT does not wait for a "validated"
   subword from the VM path.
4. The **K-bit AND** combines the *N* OAT rows bit by bit. Bit *k* survives
   only if entry *k* matches in every subword, which means it matches the
   whole key. Because of x bits, several entries can survive.
5. The **layer priority encoder** (LPE) picks the lowest surviving index.
   That index is the layer's potential match address (PMA).
6. The **CAM priority encoder** (CPE) takes the lowest-numbered layer that
   has a PMA. It returns the match address `ma = layer·K + PMA`, the
   entry's position in the original table. `hit` = 0 means nothing matched.

A layer can therefore miss in two ways:

* the activation is low (step 2), or
* the activation is high but the K-bit AND is all zeros (step 4). This
  happens when each subword occurs in the layer, but never all in the same
  entry.

### Worked example (default size)

With 4-bit words, 2-bit subwords and two layers of two entries:

| address | sw1 | sw2 | layer |
|---|---|---|---|
| 0 | 00 | 11 | 0 |
| 1 | 01 | 01 | 0 |
| 2 | 0x | 11 | 1 |
| 3 | 11 | 1x | 1 |

After mapping, layer 0 holds:

* VM for sw1: rows 00 and 01 set.
* VM for sw2: rows 01 and 11 set.
* OAT for sw1: row 00 → address 0, row 01 → address 1.
* OAT for sw2: row 01 → address 1, row 11 → address 0.

Sample searches:

* Key `1110`: layer 0 is rejected by its VM for sw1. Layer 1 reads row 11
  (entry 3) and row 10 (entry 3), so `ma = 3`.
* Key `0011`: matches entries 0 and 2. Layer 0 wins, so `ma = 0`.
* Key `0001`: every subword is present in layer 0, but the two OAT rows
  have no bit in common. This is a K-bit AND miss.

The top-level testbench checks exactly these memory contents and results.

## Interface and timing (`ztcam_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all tables) |
| `clk_en` | in | 1 | clock enable; while low, the core's clock is stopped |
| `sel` | in | 1 | 0 = operate, 1 = deselected |
| `r_wb` | in | 1 | 1 = search (read), 0 = write (load the table) |
| `c` | in | C | search key |
| `tbl_valid`, `tbl_value`, `tbl_care` | in | L·K, L·K×C, L·K×C | ternary table for a load (`care` bit 0 = x) |
| `ma` | out | ⌈log2(L·K)⌉ | match address |
| `hit` | out | 1 | `ma` is a real match |
| `ma_oe` | out | 1 | output enable (sel was 0 at the last edge) |
| `busy`, `done` | out | 1 | load in progress / one-cycle end-of-load pulse |

The inputs are sampled on the rising edge of the gated clock:

* **Search** (`sel=0`, `r_wb=1`, not busy): `ma` and `hit` show the result
  for `c` after that edge. The latency is one clock, and one search is
  accepted per clock.
* **Write** (`sel=0`, `r_wb=0`): starts a load. The mapper copies `tbl_*`
  into a holding register. It then writes one OAT row, with its VM bit,
  per clock, *L·N·2^W* clocks in all. That is 16 clocks at the default
  size. `busy` is high during these writes, and `done` pulses one clock
  later. Search and write requests are ignored while `busy` is high.
* **Deselect** (`sel=1`): nothing is started. From the next edge,
  `ma_oe` is low and `ma` reads 0. This stands for the high-impedance
  output of a real device; a chip would drive a tri-state pad from
  `ma_oe`.
* **Clock enable low**: the latch-based clock gate holds the core clock
  low. No input is sampled, no load advances, and all flip-flops keep
  their value.

## Modules

| file | role |
|---|---|
| `ztcam_pkg.sv` | default sizes, mapper state type, `idx_w()` helper |
| `ztcam_top.sv` | subword split, L layers, CPE, output register, control |
| `ztcam_layer.sv` | N VM/OAT pairs, 1-bit AND, K-bit AND, LPE |
| `ztcam_vm.sv` / `ztcam_oat.sv` | the two memories of a pair (register arrays, asynchronous read) |
| `ztcam_and1.sv` / `ztcam_kand.sv` | activation AND / bitwise AND of OAT rows |
| `ztcam_lpe.sv` / `ztcam_cpe.sv` | layer and CAM priority encoders (lowest index wins) |
| `ztcam_mapper.sv` | loads a ternary table into the VMs and OATs, expanding x bits |
| `ztcam_clock_gate.sv` | latch + AND clock gate |

The parameters are `C` (key width, default 4), `W` (subword width, 2),
`L` (layers, 2) and `K` (entries per layer, 2). *C* must be a multiple of
*W*; elaboration stops otherwise. The storage is `L·N·2^W·(K+1)` bits:
48 at the defaults. Storage grows with 2^W, so *W* sets the cost. Wide
keys should use more subwords, not wider ones.

## How far to trust it, and where it is this implementation's own

The following follow the source description:

* the layer/subword partitioning;
* the VM and OAT sizes and addressing;
* the activation signal enabling the OATs;
* the two ANDs and the two priority encoders;
* the lowest-layer-first rule;
* the x expansion;
* the `c`/`sel`/`r_wb`/`ma`/`clk_en` interface.

These choices are this implementation's own, because the description
leaves them open:

* **Search timing.** The search is combinational with a registered
  `ma`: one clock of latency.
* **Priority inside a layer.** The lowest entry wins, which matches the
  rule used between layers.
* **How a write reaches the memories.** The ternary table is presented
  on the `tbl_*` port and written row by row by a sequencer, instead of
  the memory contents being driven in directly. The VM bit of a row is
  derived as the OR of its OAT row.
* **Extra outputs.** The `hit`, `busy`, `done` and `ma_oe` outputs are
  additions.
* **Reset.** The asynchronous reset and the zero `ma` on a miss are
  additions.
* **Deselected output.** It is modelled as an output enable instead of a
  tri-state output.
* **Clock gate.** The gating cell is a latch plus an AND gate. Lint and
  synthesis report this latch, and it is intended: it is the gating cell.
* **Memories.** They are flip-flop arrays with asynchronous read. A
  larger instance would map them to RAM macros. Those macros would need
  a synchronous read, which adds one cycle of latency.

What is not built:

* The earlier ZTCAM variant with an extra address-translation memory
  behind the OATs, which this design removes.
* Support for x bits in the search key.
* Updating a single entry. A load always rewrites every row.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl rtl/ztcam_pkg.sv \
    tb/tb_ztcam_top.sv --top-module tb_ztcam_top -o sim && obj_dir/sim
```

The testbenches use sub-nanosecond delays, hence `--timescale 1ns/1ps`. Each one is two-state safe: everything it reads is reset or initialised.

| testbench | what it checks |
|---|---|
| `tb_ztcam_top` | default size; the example table above with its exact VM/OAT contents, an overlapping table and 30 random tables, all 16 keys each; load time, deselect, clock enable, and requests during a load. It counts every search outcome and mechanism and fails if one never occurs. |
| `tb_ztcam_top_scaled` | 8-bit keys, four 2-bit subwords, 3 layers of 3 entries; 20 random tables × 256 keys |
| `tb_ztcam_layer` | one layer against a direct ternary compare, including activation and both kinds of miss |
| `tb_ztcam_mapper` | write count, order, timing and row contents; ignored start while busy |
| `tb_ztcam_clock_gate` | enable changes in either clock phase never shorten or create a pulse |
| `tb_ztcam_vm`, `_oat`, `_and1`, `_kand`, `_lpe`, `_cpe` | unit checks, exhaustive where small |
