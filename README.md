# IP-Split-Bucket: a memory-less longest-prefix-match engine

An IPv4 router has to find, for every packet, the route in its forwarding
table (FIB) with the longest prefix that matches the destination address,
and return that route's next hop (the output port). This engine does that
lookup without storing the table in a memory. Each route is compiled into a
constant AND gate. All routes are compared in parallel, and a new address is
accepted every clock cycle. The result comes out six cycles later, whatever
the address and the table.

The design follows the IP-Split-Bucket architecture, proposed for FPGAs
as an alternative to TCAMs and trie-based lookup. Because the table is
compiled into logic, changing the FIB means regenerating and
re-synthesizing the comparator logic. A FIB of 524 k routes is the target
size.

## The three ideas

**1. Decode once, compare with single wires (IP-Split).** The 32-bit address
is cut into `v = 32/k` segments of `k` bits. Each segment goes through a
`k`-to-`2^k` decoder, so for every possible segment value there is one wire
that is 1 exactly when the address has that value. A route of length `len`
then needs only one wire per whole segment inside its prefix. Its last
`len mod k` bits are compared directly with the address bits. So a route
is an AND of `floor(len/k) + len mod k` inputs. With the default `k = 8`, a
/24 route is a 3-input AND. Thousands of routes that share a first byte all
read the same decoder output. The segment comparison is done once, not once
per route.

**2. Sort by length, take the first match.** The AND terms are ordered by
decreasing prefix length. The first term that fires is therefore the
longest match, and a plain priority encoder finds it.

**3. Buckets keep the priority encoder small (Bucket).** A priority encoder
over the whole FIB would be the critical path and the largest block. The
routes are therefore split into `2^n` buckets by an `n`-bit field of the
address, the *bucket identifier*. With the defaults this is bits 9..16,
counted from 1 at the most significant end. An address can only match
routes of its own bucket. A multiplexer keeps that bucket's results, and the
priority encoder needs only `m` inputs, where `m` is the size of the largest
bucket. For 524,287 routes, `m` is about 3.4 k. The identifier bits need no
comparison at all. With the defaults they form the whole second segment, so
its decoder is left out.

A route shorter than the identifier's last bit does not fix the whole
identifier. It is copied into every bucket it covers. A /12 route covers
4 of the 8 identifier bits, so it gets 2^4 = 16 copies. A route shorter than
/9, including the default route 0.0.0.0/0, goes into all 256 buckets.
Copies sit after a bucket's long routes, still by decreasing length. For
the synthetic 524,287-route table this adds 25,405 slots, giving 549,692
AND terms in all.

The match position inside the bucket (`Addr_Local`) is turned into a
position in the whole table:
`Addr_Global = Addr_Local + BaseAddr_b`. Here `BaseAddr_b` is the total size
of buckets `0 .. b-1`, stored in a constant table. `Addr_Global` then
indexes the next-hop table.

## Pipeline

| stage | block | module | registered result |
|---|---|---|---|
| 1 | decoder block (DB) | `ipsb_decoder_block`, `ipsb_decoder` | one-hot segments, address |
| 2 | comparator block (CB), 2^n buckets | `ipsb_comparator_block`, `ipsb_cbucket` | one bit per slot, per bucket |
| 3 | bucket multiplexer | `ipsb_bucket_mux` (in `ipsb_peb`) | the `m` bits of the address's bucket |
| 4 | priority encoder | `ipsb_priority_encoder` (in `ipsb_peb`) | `Addr_Local`, found |
| 5 | base address table + adder | `ipsb_global_addr` (in `ipsb_peb`) | `Addr_Global` |
| 6 | next-hop table (NHIB) | `ipsb_nhib` | next hop |

`ipsb_ale` is the top. It accepts one address per clock when `in_valid` is
high. Exactly six clock edges later it raises `out_valid` with:

- `out_nhi`: the 8-bit next hop;
- `out_found`: 0 only if no route matched, which cannot happen while the
  table has a default route;
- `out_addr`: the global slot address of the match.

There is no back-pressure: the pipeline never stalls. Only the valid bits
are reset, asynchronously and active low.

The source gives six pipeline stages and a latency of about six cycles
(57.9 ns at 103 MHz for 524 k routes). It does not say where the stage
boundaries lie. The split above is this design's choice.

## The forwarding table

The routes live in `rtl/ipsb_pkg.sv`. A real deployment would generate the
constants of that package from its routing table. This package instead
holds a deterministic *synthetic* IPv4 table of any size `N`, defined by
closed-form functions, so nothing has to be read from files:

- Prefix lengths follow a weight table shaped like a backbone table. About
  54 % of routes are /24, about 44 % are /16 to /23, a few per mille are
  /8 to /15, and there is one default route.
- Per bucket, the number of long routes is `N/2^n` plus or minus up to 5/8
  of that mean. This makes the buckets unequal, as real tables are. At the
  table sizes reported for the original design, the largest bucket `m` comes out close to the reported
  values: 57 against 59 at 8 k, 857 against 846 at 131 k, and 3413 against
  3316 at 524 k.
- Inside a bucket, routes 16 apart share their leading byte. Shorter routes
  therefore often contain longer ones, so lookups with several matching
  prefixes are common.
- The next hop of a route is a hash of (prefix, length). Copies and
  duplicates of a prefix therefore always agree.

Slot `j` of bucket `b` is defined by the package functions. The comparator
buckets (`ipsb_cbucket`) and the next-hop table (`ipsb_nhib`) walk the
slots in the same order: long routes by decreasing length, then short-route
copies by decreasing length.

### How the table becomes logic

`ipsb_cbucket` is written as a loop over the slots of its bucket. Each
iteration evaluates the package functions for one route and forms that
route's AND term from the decoder outputs. The bucket number is an input,
tied to a constant by `ipsb_comparator_block`, so all buckets share one
module body. Once the hierarchy is flattened, every route value is constant
and each iteration reduces to one AND gate. Synthesize `ipsb_ale` flattened;
a bucket synthesized on its own would keep the route arithmetic as logic.
The next-hop table is an array initialised from the same functions. Which
primitive it maps to (block RAM or LUT ROM) is left to the tool.

To use a real FIB, replace the route functions in `ipsb_pkg`. The
functions to replace are `long_count`, `long_ip`/`long_route`,
`short_count`, `short_route` and the weight table. The bucket order and
the sort by length must be kept.

## Parameters (top `ipsb_ale`)

| parameter | default | meaning |
|---|---|---|
| `N` | 524287 | routes in the FIB, before copies |
| `K` | 8 | decoder size `k`; `v = 32/K` segments |
| `BI_S` | 9 | first bit of the bucket identifier (1 = MSB) |
| `NB` | 8 | identifier width `n`; 2^n buckets |
| `NHI_W` | 8 | next-hop width |

The identifier may sit anywhere and cut across segments. A segment that
overlaps the identifier gets no decoder, and its remaining bits are
compared directly. `m`, the slot count and the address widths are derived
from the table at elaboration.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=F`.
The end-to-end bench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ipsb_pkg.sv tb/ipsb_ref_pkg.sv tb/tb_ipsb_ale.sv --top-module tb_ipsb_ale
./obj_dir/Vtb_ipsb_ale
```

For the per-block benches, replace `tb_ipsb_ale` with one of the following:

- `tb_ipsb_decoder`
- `tb_ipsb_decoder_block`
- `tb_ipsb_cbucket`
- `tb_ipsb_comparator_block`
- `tb_ipsb_bucket_mux`
- `tb_ipsb_priority_encoder`
- `tb_ipsb_global_addr`
- `tb_ipsb_peb`
- `tb_ipsb_nhib`

`tb/ipsb_ref_pkg.sv` is the reference model. It searches the route list one
route at a time, without decoders, buckets, copies or sorting, and it
draws test addresses inside long routes, inside short routes, or at random.

`tb_ipsb_ale` runs two engines side by side on the same address stream. The
first has N = 2048, identifier bits 9..12. The second has N = 1024, bits
10..12. In both, the identifier cuts a segment in part. The bench sends 600
lookups back to back with a few idle cycles. It checks each result against
the reference, and checks the six-cycle latency. It also counts lookups with
several matching routes, lookups decided by a short-route copy, by the
default route and by a long route, idle cycles and buckets visited, and it
fails if any count is zero.

Simulation cost grows with the number of buckets, mostly in the C++ build,
because Verilator inlines the route functions. The full default instance
(524,287 routes, 256 buckets) passes Verilator lint and slang elaboration.
It has not been simulated. The largest configurations simulated are those
in the benches.

## How far to trust it

- The end-to-end and per-block benches pass. Each bench also fails against
  a deliberately broken copy of its block.
- The FIB is synthetic. Lookup correctness is checked against an
  independent search over the same route list. Resource and timing figures
  of a real table are not reproduced.
- Not measured here: clock frequency, LUT/FF counts, and whether the
  524 k-route instance fits a given FPGA. The original work reports
  282 k LUTs and 550 k FFs at 103 MHz on a Virtex-7 XC7V2000T.

## Departures and omissions

- **Short prefixes.** A prefix shorter than the identifier's first bit is
  copied into all `2^n` buckets. The cost formula of the original work,
  `2^(BI_e - len)` copies, would count more.
- **Next-hop table.** The architecture is described as memory-less, yet its
  next-hop block is described as a RAM. Here it is an initialised read-only
  array with a registered read, one entry per slot.
- **Equal decoder sizes only.** The unequal decoder series found by the
  original random search (for example 5,4,4,4,3,2,3 bits) is a design-space
  exploration and is not supported.
- **Priority encoder.** It is a plain linear chain. Its internal structure
  is not given, and for large `m` a tree would be faster.
- **Update-enabled variant not built.** This variant handles additions,
  modifications and deletions. It adds a prefix memory next to the next-hop
  table and a small side engine for new routes. An arbiter picks the longer
  of the two matches. Two engine copies let one be rebuilt while the other
  serves lookups. It is only proposed in outline and is not included.
- The predecessor architectures (full-serial, full-parallel, IP-Split
  without buckets) are not included.
