# Parity Product Code link with Razor-parity registers

This is SystemVerilog RTL for an on-chip link that detects and corrects soft
errors using only parity. Every flit of N data bits carries one parity bit.
After every M flits the sender adds a parity flit, the XOR of the M flits.
Together these form a small product code: a single flipped bit shows up in
exactly one flit's parity (the row) and one bit index of the packet parity
(the column), and the bit where they cross is flipped back.

Flit parity is also checked on the way, at every hop. The receiving register
of each hop is a Razor-style double register: a main copy and a shadow copy
taken a little later, each with its own parity check. A transient upset is
fixed there with no retransmission at all.

When two bits flip in one flit, flit parity cannot see it, but the packet
parity can: it names the bad bit indexes. The receiver then asks for just
those bit indexes across the whole packet. The sender can read its buffer by
column because the buffer is a transposable FIFO.

Default size: N = 32 data bits (33-bit flits), M = 4 flits per packet, a
4-slot FIFO in the intermediate node.

## The code

A packet is a matrix of M+1 rows of N+1 bits:

```
          bit 0   bit 1  ...  bit N-1   bit N (p)
flit 0    b0,0    b0,1        b0,N-1    p0  = XOR of the row
 ...
flit M-1
F_P       pb0     pb1         pbN-1     pp  = XOR of the column
```

- `p` of a flit is the XOR of its data bits (even parity).
- `F_P` is the XOR of the M flits, parity bits included. So `F_P` is itself a
  valid flit with even parity.
- At the receiver, `SEU_F` of a flit is the XOR of all N+1 bits (1 = odd
  number of flips).
- `SEU_P` is the XOR of all M+1 received flits (bit b = 1: odd number of flips
  in bit index b).

How the two syndromes are read:

| SEU_F set bits | SEU_P set bits | reading | action |
|---|---|---|---|
| 0 | 0 | clean | deliver |
| 1 | 1 | one flip, at the crossing | deliver through the Mask, which flips that bit |
| any | 2 or more | two or more bad bit indexes | row ARQ: resend those bit indexes |
| 1 or more | 0 | even number of flips in one bit index | flit ARQ: resend the flagged flits |
| 0 | 1 | several flips, ambiguous | row ARQ on that index |

Four flips on the corners of a rectangle cancel in both syndromes and cannot
be seen. This is a property of the code.

## Where an error gets fixed

Protection is layered. Each layer handles what the one before it could not:

1. **Shadow register (every hop, no cost in cycles).** `ppc_rff_w_p` takes the
   flit into a main register on `clk` and a shadow register on `s_clk`. If the
   main copy fails parity and the shadow copy passes, the shadow copy goes on.
2. **Hop-level ARQ.** If both copies fail, the stage discards the flit and
   raises `arq` for one cycle. The sender goes back one flit.
3. **Forward with a flag.** If the resent flit fails again, the sender's own
   copy is assumed corrupt. The flit goes on with its `SEU_F` flag set, and
   later stages do not ask for it again.
4. **Mask (receiving terminal).** A single error in the packet is corrected
   while the packet is read out.
5. **Selective ARQ.** The receiver sends a list of bit indexes (row ARQ) or of
   flits (flit ARQ) back to the sender. The sender resends only those. The
   receiver writes them into its T-FIFO by column or by row, updates `SEU_F`
   and `SEU_P` in place, and decides again.
6. **Give up.** After `MAX_RETRY` rounds (default 2) the packet is delivered
   anyway. `out_err` is 1 unless only a single, maskable error is left.

### Hop-level ARQ timing

This is the least obvious part of the design. Every stage boundary is a
valid/ready handshake on the rising edge of `clk`. Flit k is taken at edge t.
The parity checks run during cycle t, and `arq` is raised in that same cycle
if both copies fail. Meanwhile the sender is already offering flit k+1:

```
cycle     t-1        t              t+1        t+2
sender    offers k   offers k+1     offers k   offers k+1
stage                holds k        (empty)    holds k (retry)
                     arq = 1
                     k+1 is dropped
```

The rules, for both sides:

- **Sender.** At an edge where `arq` is 1, go back to the flit sent in the
  previous cycle. The flit offered in the `arq` cycle counts as not sent.
- **Receiving stage.** Take nothing at the edge that ends an `arq` cycle. The
  flit that arrives next is the retry.
- **`ppc_tx`.** It keeps the whole packet anyway, so it just marks the item as
  pending again.
- **`ppc_link_fifo`.** It frees an entry only one edge after sending it, and
  only if no `arq` came.

A stage never raises `arq` twice in a row. There is an assertion for this.

### Clocking and the channel

`s_clk` is `clk` delayed by a delay cell. That cell is not in the RTL: `s_clk`
is an input.

The shadow register works only if its data stays stable from the `clk` edge
until the `s_clk` edge. This is the usual Razor hold constraint: wire delay
must be longer than the `s_clk` delay. The shadow register loads only if the
main register loaded at the edge before, so the two copies always hold the
same flit, even while the stage is stalled.

The two channel segments (TX to node, node to RX) are ports of `ppc_top`
(`ch0_tx_*` / `ch0_rx_*`, `ch1_tx_*` / `ch1_rx_*`):

- In silicon, connect each driving end to its receiving end with a wire.
- In simulation, put a delay and a fault injector in between. This is what
  `tb_ppc_top` does.

The ready, arq and `fp_req` return signals are wired inside `ppc_top`.

## Feedback from receiver to sender

After each packet, and after each round of retransmission, the receiver sends
one message (`fb_valid`, `fb_kind`, `fb_mask`). The kinds are defined in
`ppc_pkg::fb_kind_e`:

| kind | fb_mask | sender answers with |
|---|---|---|
| `FB_ACK` | - | releases the packet and fills the next one |
| `FB_FP_REQ` | - | `F_P` (adaptive mode, fallback to `fp_req`) |
| `FB_FLIT_ARQ` | bit i = flit i, bit M = `F_P` | those flits, in index order |
| `FB_ROW_ARQ` | bit b = bit index b (0..N) | one column flit per index, in order |
| `FB_FULL_ARQ` | - | the whole packet (go-back mode) |

A column flit for bit index b has this layout:

- bits M-1..0: bit b of flits 0..M-1;
- bit M: bit b of `F_P`;
- bits N-1..M+1: zero;
- bit N: the column flit's own parity.

Column N is the parity column. The sender keeps it in a small register,
because its T-FIFO holds only data bits. So a row ARQ needs M < N. There is
an assertion for this.

The sender keeps each packet until `FB_ACK`. This costs one round trip per
packet. The receiver does not take new flits while it is delivering.

## Modes

- **Adaptive parity flit (`cfg_adaptive_fp = 1`).** The sender leaves out `F_P`.
  Whichever RFF-w-P stage gives up on a flit (the node or the receiver's
  front end) raises `fp_req` to the sender in the cycle the flit goes on
  flagged. The sender then adds `F_P` to the end of the packet, once. If no
  flit reached the receiver with `SEU_F` set, the packet is delivered without
  `F_P`. Otherwise the receiver waits for `F_P` and then decodes as usual. If
  it still finds `F_P` missing when it decides, it sends `FB_FP_REQ` as a
  fallback.
  This is worthwhile only at low error rates. A flip that parity cannot see
  goes through undetected in this mode.
- **Go-back M (`cfg_go_back = 1`).** Any error leads to a full retransmission,
  with no masking and no selective ARQ. In this design the receiver still
  buffers the whole packet, so the mode covers M up to the T-FIFO depth.
  Streaming packets longer than the receiver can buffer, where go-back is the
  only choice, is not built.

Change a mode only while the link is idle: `tx_busy` is 0 and the receiver has
delivered everything.

## Modules

| file | role |
|---|---|
| `ppc_pkg.sv` | feedback message kinds |
| `ppc_flit_par.sv` | XOR tree: parity bit at the sender, `SEU_F` at a receiver |
| `ppc_pack_par.sv` | packet-parity register: `F_P` at the sender, `SEU_P` at the receiver; also has an in-place update port |
| `ppc_rff_w_p.sv` | Razor register with parity and hop-level ARQ |
| `ppc_tfifo.sv` | DFF transposable FIFO: push/pop, plus row and column read/write; addresses count from the head |
| `ppc_link_fifo.sv` | node FIFO with go-back-one replay; one extra bit carries `SEU_F` |
| `ppc_mask.sv` | `dout = row ^ (seu_f[i] ? seu_p : 0)`, parity bit dropped |
| `ppc_tx.sv` | sending terminal: T-FIFO (N bits wide), FLIT PAR, PACK. PAR, controller |
| `ppc_rx.sv` | receiving terminal: RFF-w-P, T-FIFO (N+1 bits wide), PACK. PAR, `SEU_F` register, controller, Mask |
| `ppc_hop.sv` | intermediate node: RFF-w-P followed by the node FIFO |
| `ppc_top.sv` | TX, one node and RX |

Parameters of `ppc_top`:

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | data bits per flit |
| `M` | 4 | flits per packet, at least 2 and less than N |
| `DEPTH` | 4 | node FIFO slots |
| `MAX_RETRY` | 2 | retransmission rounds before giving up |
| `SHADOW` | 1 | 0 builds plain parity registers instead of RFF-w-P |

With `SHADOW = 0` there is no shadow register, so a flit that fails parity
always costs a hop-level ARQ, and a flit that fails twice goes on flagged.
The packet code at the receiver works the same way.

For a longer path, chain more `ppc_hop` instances.

Latency:

- Each RFF-w-P stage adds one cycle, repaired or not.
- A hop-level ARQ costs two cycles.
- The receiver needs the whole packet before it delivers. Its decision takes
  one cycle. After that it delivers one word per cycle while `out_ready` is 1.

## Simulating

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ppc_pkg.sv tb/tb_ppc_top.sv \
          --top-module tb_ppc_top -o sim && ./obj_dir/sim
```

Replace `tb_ppc_top` with any testbench in `tb/`. Each one tests the module
whose name it carries:

- `tb_ppc_top` runs the whole link at default size for about 500 cycles. It
  sends random packets through faults timed against `clk` and `s_clk`: a
  transient, a fault on both samples, a flit corrupt on both attempts, two
  flips in one flit, the same bit index in two flits, the parity bit itself,
  faults on either segment, adaptive mode clean and faulty, and go-back mode.
  Every delivered word is checked. Each mechanism is counted, and the test
  fails if one never happens: shadow repair at node and at RX, both ARQ
  directions, flagged forwarding, Mask, row, flit and full ARQ, `F_P` request
  and skip, node FIFO stall.
- `tb_ppc_widths` runs the whole link at 16 and at 64 data bits, and at 32
  bits with `SHADOW = 0`. It applies random single-bit faults on both
  segments and checks every word.
- `tb_ppc_rx` plays the sender against the receiver. It also covers the retry
  limit with `out_err`.
- `tb_ppc_rff_w_p` also checks that a repaired flit costs no extra cycle.

All testbenches pass. None checks a throughput figure, because no cycle-level
performance target is set for this link.

## How far to trust it, and what is this design's own

These parts are fixed by the scheme:

- the code, both syndromes and the Mask rule;
- the two-register parity stage and its ARQ-then-forward rule;
- the transposable FIFOs at both ends;
- column retransmission of the bit indexes named by `SEU_P`;
- the adaptive `F_P` and go-back modes;
- the 32-bit width and the 4-slot node FIFO;
- the node asking the sender for `F_P` in adaptive mode.

These parts are choices made here:

- **Packet length.** M = 4 matches a 4-slot T-FIFO.
- **Protocol details.** The acknowledge and message encoding, the column-flit
  layout, and the one-cycle ARQ timing with the drop rule.
- **Flag transport.** The `SEU_F` side-band bit that travels with a flit.
- **Decision order.** Go-back, then single correction, then row ARQ, then flit
  ARQ, as in the table above.
- **Retries.** The retry limit and `out_err`, and updating `SEU_P` and `SEU_F`
  in place.
- **FIFO addressing.** T-FIFO addresses count from the head.
- **Topology.** One intermediate node, and a direct feedback path. The
  `fp_req` request is a direct wire as well.

Known limits:

- Three or more flips spread over flits and bit indexes can be misread as a
  single error and "corrected" wrongly. This is a limit of the code at this
  error rate.
- The decoder corrects one flip per packet and retransmits for two.
- Go-back for packets longer than the receiver buffer is not built.
- When both copies fail twice, the flagged flit that goes on is the shadow
  copy, because the mux select is the main copy's parity check alone. A
  description that forwards the main copy in this case would differ here.
  Both copies are known to be bad, and the flag makes the receiver fix it
  with the packet code either way.
- Row ARQ column flits need M < N, so square packets (M = N) cannot use it.
- Only the link logic is built. Area, power and gate counts of the parts,
  and statistical studies of the code, are not reproduced.

Coding rate at the defaults:

- normal: NM / ((N+1)(M+1)) = 128/165 ≈ 0.78;
- adaptive mode with no errors: 128/132 ≈ 0.97.
