# ECDR2 — an error-correcting network-on-chip router without an error-correction stage

Hop-to-hop error correction in a network-on-chip router normally costs a pipeline stage. A
full-width ECC corrector is about as slow as the rest of the routing stage, so conventional
designs give it a stage of its own: buffer → **correct** → route/allocate → switch. ECDR2
("error corrector and detector relocation router") avoids that stage by treating the bits
of a flit differently:

* **Critical bits** steer the packet: the flit type, the destination and the output
  direction/VC. They are few, so they get strong but *fast* codes, and their checkers sit
  directly in front of the routing logic in the same cycle.
* **Non-critical bits** are only carried: the 64-bit payload and the head flit's 45 reserved
  bits. They get an efficient but *slow* code (Hamming 71,64). Nothing in the router
  depends on them, so their corrector runs in parallel with routing and only feeds the
  output register.

The result is a two-stage router that corrects errors at every hop: (1) correct/detect +
route + allocate, then (2) crossbar + link. It is as fast as a router without protection,
except in one rare case. When the one-hot direction field of a head flit is corrupted, the
router spends one extra cycle recomputing it.

This repository holds synthesizable SystemVerilog for that router and for an 8 × 8 mesh
built from it, with network-interface encoders and decoders, plus self-checking testbenches.

## Flit format and codes

Every flit is 77 bits. Fields, most significant first:

| flit | bits 76:73 | 72:71 | 70:65 | 64:59 | 58:54 | 53:52 | 51:45 | 44:0 |
|---|---|---|---|---|---|---|---|---|
| head | FT copies | FT | RI parity | RI = {dst_y, dst_x} | DIR (one-hot) | VC_ID (one-hot) | RB parity | RB (45) |

| flit | bits 76:73 | 72:71 | 70:64 | 63:0 |
|---|---|---|---|---|
| body / tail | FT copies | FT | payload parity | payload (64) |

| field | code | corrector / checker | what it protects against |
|---|---|---|---|
| FT (2 bits: 01 head, 10 body, 11 tail) | triple modular redundancy | `ft_ecc_corrector`, bitwise 2-of-3 vote | a body taken for a head, lost tails |
| RI (destination, 3 + 3 bits) | two HM(6,3) codes (p0=d0^d1, p1=d0^d2, p2=d1^d2) | `ri_ecc_corrector` | misrouting |
| DIR (5 bits, N E S W L) and VC_ID (2 bits) | one-hot, no redundancy | `onehot_checker`: detection only | wrong allocation requests |
| payload / RB | HM(71,64), parity at positions 1,2,4…64 | `payload_ecc_corrector` | data corruption |

The RB is corrected by the same HM(71,64) logic as the payload. It is padded with 19 zero bits
to form a 64-bit word. All codes correct (or, for the one-hot fields, detect) a single bit
error per code word. Corrected flits are forwarded as corrected *code words*: correctors fix
the redundancy too. So errors do not build up from hop to hop, and only the destination
interface strips the codes.

## The router pipeline

`ecdr2_router` has five ports (N, E, S, W, Local), two virtual channels per input port,
4-flit buffers per VC and credit-based flow control.

```
 edge c          cycle c+1 (stage 1)                               edge c+1     cycle c+2 (stage 2)   edge c+2
 flit written -> FT-ECC ----------> VC controller, VA, SSA/SA  --\
 into VC buffer  RI-ECC + OHC ----> LRC (next-hop DIR/VC_ID)   ---> flit register -> crossbar -> link -> downstream buffer
                 Payload-ECC -----------------------------------/
```

A flit written into a buffer at edge *c* is in the flit register at edge *c+1* and in the
next router's buffer at edge *c+2*. That makes two cycles per hop for every flit type. A
packet crossing *R* routers has its head at the destination interface 2·R + 1 cycles after
injection (the +1 is the decoder's output register). The mesh testbench measures 31 cycles
corner to corner on the 8 × 8 mesh.

### Head flits and the one-hot failure path (the subtle part)

Routing is *lookahead*. A head flit arrives carrying the DIR and VC_ID that *this* router
must use, computed one hop earlier. These feed VC allocation and the speculative switch
request at once, with no decoding. In parallel, the LRC unit computes DIR/VC_ID for the
*next* router from the corrected destination. The result is written into the outgoing head
flit.

DIR and VC_ID are only protected by being one-hot. If the one-hot checker fails:

1. **Cycle 1** — the allocators have already run on the bad DIR/VC_ID. Their grants are
   *abandoned*: the VC raises `va_kill`, so no output VC is reserved, no arbiter pointer
   moves and the switch grant is not used. The LRC unit switches to *standard RC*: it runs
   XY routing at this router's own coordinates instead of the neighbour's. It stores the
   rebuilt DIR, and VC_ID = the VC the packet is sitting in, in the **RC result register**.
2. **Cycle 2** — a 2-to-1 multiplexer in front of the checker now selects the RC result
   register instead of the flit's fields. The head proceeds exactly like a clean head:
   VA + speculative SA, and LRC computing the next hop from the rebuilt DIR.

The RC result register stays selected until the head flit leaves the buffer. This matters
when VA succeeds but the speculative switch request loses: the head then waits, and the LRC
must still see the rebuilt DIR. The same LRC hardware serves both modes. Only the
coordinate fed to the XY logic changes: this router's position for RC, the neighbour in
direction DIR for lookahead.

### Virtual channel controller

Each `input_vc` is in one of two states:

* **idle** — waiting for a head flit. A head flit at the front of the buffer issues a VA
  request for (DIR, VC_ID) and a *speculative* switch request, both gated by a credit being
  available for that downstream VC. If both are granted, the head leaves in that cycle. If
  only VA is granted, the VC becomes active and retries the switch non-speculatively.
* **active** — a downstream VC is held. Every flit issues non-speculative switch requests
  when a credit is available. When the tail leaves, the output VC is released and the VC
  returns to idle.

A body or tail flit found in an idle VC can only come from an uncorrectable flit-type
error. It is dropped and its credit returned, so the VC cannot lock up. Such drops appear on
the `ev.drop` monitor bit.

### Allocation and flow control

* `vc_allocator` — one round-robin arbiter per output VC (5 × 2) over the 10 input VCs, and
  a busy flag per output VC. The flag is set by an accepted grant and cleared when the
  holder's tail flit leaves.
* `switch_allocator` — separable, input first: each input port picks one VC, then each
  output port picks one input port. At both steps non-speculative requests win over
  speculative ones. A failed speculation therefore never delays a packet that already holds
  a VC; it can only waste a switch slot that nobody else asked for.
* Credits — one counter per output VC, reset to the buffer depth. A counter is decremented
  when a flit is granted and incremented by the downstream credit pulse. A VC buffer returns
  a credit one cycle after a flit leaves it. The round trip is short enough that a single
  VC can stream at one flit per cycle with 4-flit buffers.

### VC_ID policy

The source interface chooses a VC for each packet. The packet keeps that VC number on every
hop: LRC copies VC_ID forward, and standard RC rebuilds it from the index of the VC holding
the packet. With deterministic XY routing this is deadlock free. It is also what lets RC
rebuild a corrupted VC_ID without any extra information.

## The mesh and its network interfaces

`ecdr2_mesh` (the top) places MESH_X × MESH_Y routers (default 8 × 8). Node *n* sits at
x = n mod MESH_X, y = n div MESH_X, and y grows towards South. Each node has:

* an `ni_encoder` that turns raw fields into a coded flit. The raw fields are flit type,
  destination, VC and 64-bit data (payload, or RB in bits 44:0). For a head flit it also
  computes the DIR for the first router, by XY routing at the source. The flit enters the
  local input VC in the same cycle, so the source must respect `inj_credit`: each VC starts
  with 4 credits and gets one back per freed slot.
* an `ni_decoder` on the Local output. It corrects and decodes every flit and presents it
  on `ej_*` one cycle later. It flags corrected words, uncorrectable payload syndromes and
  heads delivered to the wrong node. It always accepts flits and returns their credits.

`err_flip[n][p]` is XORed into the flit entering input port *p* of router *n*. It exists to
inject bit flips on links and at injection; tie it to zero in normal use. `ev[n]` carries
one-cycle pulses from each router: corrections, one-hot failures, VA failures,
speculation won/lost, credit stalls and drops.

The 6-bit destination field limits the mesh to 8 × 8. Larger meshes would need a wider RI
and a different RI code.

## Verification

Each block has a self-checking testbench in `tb/`. Reference values come from
`tb/tb_ref_pkg.sv`, a separate encoder and XY-routing model, not from the RTL's own
functions.

| testbench | what it shows |
|---|---|
| `tb_ft_ecc_corrector` | all FT values × all 64 error patterns against a 2-of-3 count |
| `tb_ri_ecc_corrector` | all 64 RI values × every single error in each HM(6,3) word |
| `tb_onehot_checker` | all 128 DIR/VC_ID combinations |
| `tb_payload_ecc_corrector` | random words, every one of the 71 single flips, double flips flagged |
| `tb_lrc_unit` | lookahead and standard RC against the reference XY router |
| `tb_vc_fifo`, `tb_crossbar` | queue model; random permutations |
| `tb_vc_allocator`, `tb_switch_allocator` | hold/release, kill, rotation; one grant per port, non-speculative priority |
| `tb_input_vc` | 1-cycle stage for a clean head, corrections in the flit register, abandoned allocation + RC cycle, lost speculation, credit stall |
| `tb_ecdr2_router` | 2-cycle hop, 3-cycle hop after a DIR error, VA and SA conflicts, back-pressure, every field corrected |
| `tb_ni_encoder`, `tb_ni_decoder` | coded flits vs. the reference; decode with single errors, flags, credits |
| `tb_ecdr2_mesh` (4 × 4) and `tb_ecdr2_mesh_full` (8 × 8, default parameters) | end to end (details below) |

The two mesh testbenches run end-to-end traffic: zero-load latency, then uniform, hotspot,
transpose, bit-reversal, shuffle and butterfly traffic, then uniform traffic with random
link bit flips (a quarter of them aimed at DIR/VC_ID). Every packet must arrive exactly
once, intact, at the right node. Each router mechanism must occur at least once.

Measured on the 8 × 8 mesh at 0.1 flit/cycle/node (5-flit packets): average packet latency
(head injection to tail ejection) is about 19 cycles for uniform traffic, with or without
bit flips. The permutation patterns are 17–22 cycles and hotspot about 30.

### Running a testbench

```
verilator --binary --timing --assert -Irtl -Itb rtl/ecdr2_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_ecdr2_router.sv --top-module tb_ecdr2_router -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M` and has a cycle watchdog. The
8 × 8 mesh testbench takes a few minutes to compile and seconds to run. The 4 × 4 one
compiles in about a minute and a half.

## How far this follows the original ECDR2 description

These follow the ECDR2 description:

* the field widths and codes: TMR FT, 2 × HM(6,3) RI, one-hot DIR/VC_ID, HM(71,64) for the
  payload and the zero-padded RB;
* the checker positions and the two-stage pipeline;
* the extra RC cycle with the RC result register, reusing the LRC unit;
* abandoning the allocation results in that cycle;
* speculative switch allocation with non-speculative priority;
* XY routing, 2 VCs × 4 slots, the 8 × 8 mesh.

These are choices of this implementation:

* the order of the fields inside the flit, the FT code values and the parity-check matrices;
* the port numbering, and y growing southwards;
* the VC_ID policy (keep the injection VC);
* credit-based flow control and its timing, round-robin separable allocation, and releasing
  an output VC when the tail leaves;
* dropping orphan body/tail flits;
* the NI computing the first DIR;
* the fault-injection port, which flips bits only on router inputs, not inside buffers.

Not included:

* the 3-stage baseline router and the unprotected 2-stage router, which are comparison
  designs only;
* the processors, caches and memory controllers of a full system, and the benchmark traces;
* any timing or area claims. The 45 nm delay figures that motivate the design (≈30 ps TMR,
  126 ps HM(6,3), 55 ps one-hot check, 324 ps HM(71,64)) were not reproduced here.

## Files

`rtl/ecdr2_pkg.sv` (flit types and code functions), the correctors and checker, `lrc_unit`,
`vc_fifo`, `rr_arbiter`, `vc_allocator`, `switch_allocator`, `crossbar`, `input_vc`,
`ecdr2_router`, `ni_encoder`, `ni_decoder` and the top, `ecdr2_mesh`. Every file opens with
a description of its function, interface and timing.
