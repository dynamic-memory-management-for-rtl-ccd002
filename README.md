# DOMMU: a dynamic on-chip memory management unit for FPGA block RAM

Processing elements (PEs) on an FPGA usually get their block RAM (BRAM) statically,
sized for the worst case, although they seldom need that much at the same time.
The DOMMU instead keeps a shared pool of BRAM elements and lends them out at run time.
It gives each PE memory port a *logical page* that grows and shrinks on request, or on its
own when the port is about to run out of space or sits idle. To the PE the page looks like
an ordinary block RAM: a linear word address, two independent access channels and read data
one clock cycle after the request. The unit translates every access to a physical element and
offset, enforces access rights, and refuses accesses outside the page.

This RTL is a synthesizable SystemVerilog implementation of that architecture. The block
structure, the request set, the page-table translation, the arbitration rules and the automatic
(de)allocation criteria follow the published description of the DOMMU. The description gives no
sizes, encodings, handshakes or cycle timing, so all of those are this implementation's own
choices; the section "Where this implementation decides" lists them.

## Structure

```
 PE memory port p ──ctl──> port_manager[p] ──> arbiter ──> access_controller ──> translator (BRAT)
                  <──rsp── port_manager[p] <── arbiter <── access_controller <── (ACK/NACK)
                                                                 │ free_map (stock)
 PE memory port p ──acc (2 channels)──> translator ──> xbar_controller ──> dommu_xbar ──> bram_space
                  <──rdata, err (t+1)─────────────────────────────────── dommu_xbar <──┘
```

| module | role |
|---|---|
| `dommu_top` | wires everything; ports of all PE memory ports |
| `port_manager` | one per memory port: request decoding, BRAM type matching, automatic (de)allocation |
| `arbiter` | picks one control request at a time: allocations first, then by priority with aging |
| `access_controller` | owns the stock of free elements, runs a request as element-by-element table updates |
| `translator` | the BRAM address translator (BRAT): page table, logical→physical mapping, access checks |
| `xbar_controller` | sets the crossbar for the current cycle, resolves collisions, registers the read return |
| `dommu_xbar` | write crossbar (ports → elements) and read crossbar (elements → ports), all multiplexers |
| `bram_space`, `bram_element` | the pool: N true dual-port elements of several width × depth types |
| `dommu_pkg` | shared types, request/response codes, the BRAM type table |

Default sizes: 4 memory ports, 16 elements, at most 8 elements per page, 32-bit data bus.

Parameters of `dommu_top`: `N_PORTS`, `N_BRAM`, `MAX_BRAMS` (size of the page table rows), and
per port `PAGE_MAX` (the page's allowed maximum, at most `MAX_BRAMS`), `DEF_PRIO` and `DEF_DYN`
(priority level and static/dynamic mode after reset).

## The BRAM pool and its types

Each element is a true dual-port RAM with a registered read (one-cycle latency, read-first).
Element *b* has type *b* mod 3. All three types hold 16 Kbit, like an 18 Kbit FPGA block RAM:

| type | width × depth | elements (of 16) |
|---|---|---|
| 0 | 32 × 512 | PIDs 0, 3, 6, 9, 12, 15 |
| 1 | 16 × 1024 | PIDs 1, 4, 7, 10, 13 |
| 2 | 8 × 2048 | PIDs 2, 5, 8, 11, 14 |

Narrow elements return zeros above their width. To change the types, edit `type_width`,
`type_depth_log2` and `pid_type` in `dommu_pkg`; `OFF_W` must cover the deepest type.

## Pages and address translation

This is the core of the design. A page is an ordered list of up to `MAX_BRAMS` physical
element IDs (PIDs), all of one type. The position of an element in the list is its logical
ID (LID). Page *p* belongs to port *p*. For every port, the translator also stores which page
the port is mapped to (normally its own) and the port's credentials for it: RD, WR or RD|WR.

For an access with logical word address *a* on a page of depth *D* = 2^k:

```
LID    = a >> k            offset = a & (D-1)
legal  = LID < page size  and  (write ? WR : RD) in the port's credentials
PID    = page[LID]
```

Because depth differs per type, the LID/offset split depends on the page's type. The logical
address is `$clog2(MAX_BRAMS) + 11` = 14 bits wide. The lookup is combinational, so a legal
access reaches its element in the same cycle. The element's output register then gives the PE
its data one cycle later, as with a plain block RAM. An illegal access is dropped and reported
on `acc_err` in the same cycle as the read data would have been. Illegal means out of the page,
missing credentials, or no page at all.

Control commands change the table one element at a time. The translator answers each command
one cycle later with ACK or a NACK reason:

| command | effect | NACK |
|---|---|---|
| ADD | append a PID; the first ADD sets the page's type and the port's credentials | PAGE_FULL (page at `PAGE_MAX`), TYPE_MISM, BAD_REQ (port is attached to another page) |
| REMOVE | drop the last LID and return its PID | PAGE_EMPTY, BAD_REQ |
| ATTACH | map the port onto another port's non-empty page, with its own credentials | BAD_REQ |
| DETACH | map an attached port back onto its own page | BAD_REQ |

## Sharing and the crossbar

Every memory port has two access channels. Channel A of every port is switched to side A of the
elements and channel B to side B. A PE can therefore use both sides of its elements at once, for
twice the bandwidth. Two PEs sharing a page can also use it at the same time, one on each
channel; this is how PEs communicate. A port joins another port's page with ALLOC_SHARED, for
example read-only, and leaves it with DEALLOC_PAGE.

Each cycle, `xbar_controller` selects, for each element side, the channel whose translated
access targets it. Only a shared page can make two channels hit the same side of the same
element. Then the lower port number wins, and the other access is dropped and flagged on
`acc_err`. The write crossbar routes enable, write enable, offset and data to the elements. The
read crossbar returns to each channel the data of the element it used in the previous cycle,
or zero.

## Control requests

A PE talks to its port manager with a valid/ready request (`ctl_*`). Each request gets exactly
one `rsp_valid` pulse. The response `ctl_rsp_t` carries the status, the elements granted or
released, the page size and type afterwards, and whether the port is attached to a shared page.

| code | fields used | meaning |
|---|---|---|
| ALLOC | width, words, cred, optional type | create or grow the port's own page |
| ALLOC_SHARED | partner, cred | attach to `partner`'s page |
| DEALLOC_PAGE | – | detach, or release every element of the own page |
| DEALLOC_WORDS | words | release floor(words / depth) elements from the end of the page |
| SET_PRIO | prio, prio_dyn | set the port's arbitration level (low/medium/high) and static/dynamic mode |

Status codes: ACK, NO_STOCK (no free element of the type), PAGE_FULL, PAGE_EMPTY,
TYPE_MISM (page holds another type), BAD_REQ. An ALLOC is granted element by element. If it
stops early, the elements already added stay in the page and `count` says how many were added.

**Type matching.** For an ALLOC the port manager considers every type at least as wide as the
requested word width. It takes the one needing the fewest elements, ceil(words / depth); on a
tie it takes the narrower type. If the port already owns a page whose type is wide enough, that
type is kept. A PE that wants a particular type sets `ctl_type_fix` and names it in `ctl_btype`.
That type is then used as it is. It must exist and be wide enough, else BAD_REQ. On a page of
another type the request gets TYPE_MISM. A width above 32 or a word count of zero is refused by
the port manager itself.

## Automatic (de)allocation

With `auto_en` set for a port, its manager watches the port's accesses. It treats every write
as a new address, since the unit cannot know which addresses are new.

* **Grow:** when capacity − writes ≤ `cfg_wr_headroom`, it requests one more element of the
  page's type. It asks only after a write, so a failed request is not retried until the next
  write, and a release never sets off an allocation.
* **Shrink:** when the port has made no access for more than `cfg_idle_thresh` cycles, it
  releases one element. Repeated idleness empties the page.

The new element must be in place before the writes overrun the page. Choose the headroom
larger than the words the port can write during the allocation time: up to 2 per cycle with
both channels. The allocation time is 8 cycles on an idle unit, plus the service time of any
requests ahead of it (see Timing).

Automatic requests go through the arbiter like any other. Their responses reach the PE with
`rsp_auto` set, so the PE always knows its current depth. Only an owned page is managed this
way, never a shared one.

## Arbitration

Only one control request is served at a time, because the requests update shared tables. When
the access controller is idle, the arbiter grants among pending requests by:

1. allocations (ALLOC, ALLOC_SHARED) before deallocations, whatever the priorities;
2. higher priority (high > medium > low);
3. lower port number.

A *dynamic* priority rises one level each time its pending request has waited more than
`cfg_up_thresh` cycles since the last rise. It falls one level when a request is granted
after waiting fewer than `cfg_down_thresh` cycles. A *static* priority changes only through
SET_PRIO. After reset each port has its `DEF_PRIO` level and `DEF_DYN` mode; the defaults
are medium and dynamic.

## Access statistics

`use_cnt[b]` counts the accesses element *b* has served on either side since it was last
allocated. It saturates at 65535 and is held at zero while the element is free. Automatic
(de)allocation does not use it; it uses its own per-port counts of writes and idle cycles.

## Timing

* Access: request in cycle *t*, write done at the end of *t*, read data and `acc_err` in *t*+1.
  Every channel can do one access per cycle, with no stalls.
* Control: an ALLOC of *n* elements that meets an idle arbiter is answered 5 + 3*n* cycles
  after the port manager accepts it. The access controller takes 3*n* + 2 of those cycles;
  each element costs one command cycle, one table-update cycle and one cycle to take the
  answer. A DEALLOC_PAGE of *n* elements costs a DETACH attempt, *n* + 1 REMOVEs and a
  response.
* Queued control: requests that wait are served back to back. Each one served takes 3*n* + 4
  cycles of the unit, with *n* its elements. The *k*-th request served in a group accepted together
  is answered 1 + (sum over the first *k* served of 3*n* + 4) cycles after acceptance. With every port asking for
  `MAX_BRAMS` elements at once, the last answer comes after 1 + `N_PORTS` · (3 · `MAX_BRAMS` + 4)
  cycles: 113 at the default sizes. This bound covers one request per port. A port whose request
  keeps losing (a deallocation behind new allocations, or a static low priority behind
  re-issued requests) can wait longer. Dynamic priorities let a waiting request climb.

## Where this implementation decides

The published description fixes none of the following; each is a choice made here:

* all sizes: ports, elements, page limit, element types, bus and field widths;
* the encodings in `dommu_pkg`, the valid/ready control handshake, and responses as single pulses;
* the timing above (the description asks only for one-cycle BRAM access);
* asynchronous active-low reset, after which all pages are empty and all elements free;
* how sharing works (attach to another port's page with its own credentials), the binding of
  channel A/B to element side A/B, and the collision rule;
* tie-breaking in arbitration and in type matching, and the aging counter restarting after
  each upgrade;
* partial grants, lowest-free-PID selection, rounding of DEALLOC_WORDS down to whole
  elements, and one element per automatic request;
* how a PE names a BRAM type, and the width and placement of the access counters.

Known departures and limits:

* One translator holds the table for all ports, with an independent combinational lookup per
  port channel, instead of one translator per port. The behaviour is the same.
* The crossbar uses plain multiplexers. A crossbar made by partially reconfiguring the FPGA
  routing, which the description mentions as an original idea, is not attempted.
* When an owner releases a page that other ports are attached to, those ports stay mapped to
  the now empty page. All their accesses are then illegal until they detach.
* The thresholds are run-time inputs shared by all ports; `auto_en` is per port.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by printing
`TB_RESULT checks=N failures=M`. `tb_dommu_top` runs the whole unit at its default sizes. It
allocates, grows, shares, collides, exhausts the stock, releases, auto-grows, auto-shrinks,
arbitrates, ages priorities, counts accesses per element, and checks the 5 + 3*n* allocation
latency and the latencies of four allocations queued behind each other. Every data word read
is compared with a reference copy of the page. The testbench counts each mechanism and fails
if any of them never happened.

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dommu_pkg.sv tb/tb_dommu_top.sv --top tb_dommu_top -o sim
./obj_dir/sim
```

Replace `tb_dommu_top` with any other testbench name to run a unit test. `tb_access_controller`
uses 32 elements so that a page can be filled to its limit; the other testbenches run at the
default sizes. All of them pass, and each one fails when a deliberate error is put into the
module it tests.
