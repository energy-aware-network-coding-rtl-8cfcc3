# Low-power random linear network coding encoder, GF(2^8)

In random linear network coding (RLNC), a sender does not transmit its
packets as they are. It sends linear combinations of them, each with random
coefficients. A receiver that collects enough independent combinations
recovers the originals by solving a linear system, whichever combinations it
happened to get. That makes the sender's work a matrix product. For one coded
packet, every symbol position `j` needs

    coded[j] = c_0*p_0[j] + c_1*p_1[j] + ... + c_{n-1}*p_{n-1}[j]

over the finite field GF(2^8). `p_k` are the `n` source packets (the
*generation*), and `c_k` are nonzero field elements drawn at random for this
coded packet.

This RTL is a small, fully parallel encoder for that computation, meant for
sensor nodes with tight energy budgets (body-area networks). It does all the
work for one symbol position in a single clock cycle:

* one memory per source packet;
* one LFSR per packet for the coefficient;
* one single-cycle GF multiplier per packet;
* an XOR tree that adds the products.

It is therefore built for a slow clock and a low supply voltage. Peak speed is
not the goal.

## Datapath

```
              lane k (k = 0..7)
  wr port --> nc_ram k (1024 x 8, one port) --data--> AND --> gf_mult k --+
                                                        ^        ^         |
  lane_en[k], dat_valid ---------------------------------+        |        |
  coef_lfsr k (8-bit, own polynomial) --coef--> AND (lane_en) ----+        |
                                                                           v
                                         gf_adder_tree (4 + 2 + 1 XORs) --> out_data
  nc_ctrl: start -> lfsr_step, lane_en, rd_addr sweep, valid/first/last
```

The encoder has eight identical lanes. Lane `k` holds source packet `k` and
supplies `c_k * p_k[j]` each cycle. The adder tree sums the eight products. A
GF(2^8) addition is a plain 8-bit XOR, with no carries. So the tree is three
levels of XOR gates: four adders, then two, then one.

### Timing of one coded packet

A coded packet takes `pkt_len` symbol cycles, plus three cycles of latency. It
is followed by one idle cycle before the next address sweep.

| cycle            | what happens                                                   |
|------------------|----------------------------------------------------------------|
| S                | `start` accepted (`ready` high). Active LFSRs step once.        |
| S+1 .. S+len     | Read address 0 .. len-1 goes to all active RAMs.               |
| S+2 .. S+len+1   | RAM data arrives. It is multiplied and summed in the same cycle. |
| S+3 .. S+len+2   | `out_valid` is high and `out_data` holds a coded symbol. |
| S+len+1          | `ready` is high again, so the next `start` can be taken. |

The last symbols of one packet are still in the pipeline when the next packet
starts. This is safe for two reasons:

* The LFSRs step at the end of the cycle that accepts the new start. In that
  cycle the old packet's last symbol is multiplied by the old coefficients and
  registered.
* The lane enables change at the same edge.

Within a packet, throughput is one coded symbol per cycle, which means eight
source bytes consumed per cycle. At 10 MHz that is 80 MB/s of source data. At
250 MHz it is 2 GB/s.

## Coefficients: one LFSR per lane, and why its form matters

Each lane has an 8-bit maximal-length LFSR in Fibonacci form: a shift
register whose new bit 0 is the XOR of a few tapped bits, so all the extra
gates sit in the feedback path. With a primitive feedback polynomial
`x^8 + p_7 x^7 + ... + p_0` the register holds eight consecutive elements of a
binary m-sequence (`a_{t+7}` in bit 0, `a_t` in bit 7), the new element is
`a_{t+8} = XOR of p_k a_{t+k}`, so the tap on bit `7-k` is `p_k`. The register
cycles through all 255 nonzero values and a coefficient is never zero. Each
active lane's LFSR steps exactly once per coded packet, and the lanes use
eight different primitive polynomials (`nc_pkg::LFSR_POLYS`) and seeds.

The coefficient vectors of the coded packets a receiver collects must be
linearly independent over GF(2^8), and with only 64 bits of LFSR state
behind them that is not automatic. Two pitfalls were measured. (In Galois
form the shifted-out bit is XORed into several register positions, which is
a multiplication by x in the field of the polynomial.)

* Lanes sharing one polynomial in Galois form: every lane's coefficient is
  its seed times the same power of x, every coefficient vector is a scalar
  multiple of the first, and nothing beyond one packet can be decoded.
* Galois form with distinct polynomials, one step per packet: a field
  multiplication per step keeps the vectors strongly structured; a model of
  it needed about 9.8 coded packets on average (up to 14) to decode a
  generation of 8.

The Fibonacci form used here needed about 8.01 on average (never more than
9) in the same model, against about 8.004 for an ideal random source at
GF(2^8). In simulation every tested generation (8 x 1 KB, and 5 packets of
32 to 256 bytes) decoded from exactly `n` coded packets. A receiver should
still accept coded packets until it reaches full rank, as any RLNC receiver
does.

Each coded packet carries its coefficients. `out_coef` shows the coefficient
vector next to every symbol, with zeros for idle lanes. The coefficients can
be sent with the packet as a header, so the receiver does not need to model
the LFSRs.

## GF(2^8) multiplier

`gf_mult` computes `a*b mod p(x)` with `p(x) = x^8 + x^4 + x^3 + x^2 + 1`
(0x11D). It is the shift-and-add (Rijndael-style) algorithm, fully unrolled
into combinational logic:

* For bit `i` of `b`, the partial product `a*x^i` is XORed into the result
  when that bit is set.
* `a*x^(i+1)` is formed from `a*x^i` by a shift and a conditional XOR with
  0x11D.

The result is available in one cycle. An iterative multiplier would need
eight cycles. The unrolled form has a longer path per cycle, but at a low
clock rate it costs less energy per product than iterating would.

## Idle lanes and energy scaling

A generation may have fewer than eight packets. `num_pkts` (1..8) selects how
many lanes take part. Lanes `num_pkts..7` stay idle:

* their RAM is not enabled, so its output register holds and does not toggle;
* their LFSR does not step, so its state is kept for later generations;
* AND gates force their multiplier operands to zero.

The same AND gates on the coefficient and data paths also block transitions
(glitches) from reaching the multipliers outside valid cycles. In this RTL
the idle-lane gating is written as enables. A gate-level flow would turn them
into clock-gating cells. The RTL has no gated clock nets.

## Interface (`nc_encoder`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | synchronous, active-low reset. It clears control and outputs and reloads the LFSR seeds. RAM contents are kept. |
| `wr_en`     | in  | 1     | writes `wr_data` to symbol `wr_addr` of packet `wr_pkt`. It is only performed while `ready` is high. |
| `wr_pkt`    | in  | 3     | source packet (lane) index |
| `wr_addr`   | in  | 10    | symbol index in the packet |
| `wr_data`   | in  | 8     | source symbol |
| `start`     | in  | 1     | produces one coded packet. It is taken when `ready` is high. |
| `num_pkts`  | in  | 4     | generation size, 1..8 |
| `pkt_len`   | in  | 11    | symbols per packet, 1..1024 |
| `ready`     | out | 1     | idle: accepts `start` or a write |
| `bad_start` | out | 1     | `start` with an illegal size was seen and refused |
| `out_valid` | out | 1     | a coded symbol is on `out_data` |
| `out_first` | out | 1     | first symbol of a coded packet |
| `out_last`  | out | 1     | last symbol of a coded packet |
| `out_data`  | out | 8     | coded symbol |
| `out_coef`  | out | 8 x 8 | the packet's coefficients, zero for idle lanes |

The output has no back-pressure. The consumer must take one symbol per cycle
for `pkt_len` cycles. If the host writes while a packet is being encoded, the
write is ignored, and a simulation assertion warns about it.

Parameters of `nc_encoder`:

* `N` (lanes, default 8);
* `L` (symbols per packet, default 1024).

The field size, the field polynomial, the lane polynomials and the seeds are
in `nc_pkg`. `LFSR_POLYS` has eight entries, so lanes beyond eight would reuse
polynomials and generate dependent coefficients. Keep `N` at 8 or below unless
you extend the list.

## Files

| file | contents |
|------|----------|
| `rtl/nc_pkg.sv` | field size, lane count, packet size, polynomials, seeds, symbol type |
| `rtl/nc_encoder.sv` | top level: lanes, gating, adder tree, output registers |
| `rtl/nc_ctrl.sv` | command FSM, address counter, lane enables, LFSR step pulse |
| `rtl/nc_ram.sv` | one-port 1024 x 8 RAM with registered read |
| `rtl/coef_lfsr.sv` | 8-bit Fibonacci LFSR |
| `rtl/gf_mult.sv` | combinational GF(2^8) multiplier |
| `rtl/gf_adder_tree.sv` | balanced XOR tree |
| `tb/gf_ref_pkg.sv` | reference GF arithmetic for testbenches (carry-less multiply plus long division, brute-force inverse) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_nc_workloads` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5 (the testbenches pass integer widths freely, hence `-Wno-fatal`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/nc_pkg.sv tb/gf_ref_pkg.sv tb/tb_nc_encoder.sv \
    --top-module tb_nc_encoder -Mdir obj -o sim -y rtl +libext+.sv
./obj/sim
```

Replace `tb_nc_encoder` with any other testbench name. For lint only, use
`verilator --lint-only -Wall -Irtl rtl/nc_pkg.sv rtl/nc_encoder.sv -y rtl`.

What the testbenches check:

* `tb_gf_mult`: all 65,536 operand pairs against an independent reference, plus hand-worked products.
* `tb_gf_adder_tree`: an 8-input tree and a padded 5-input tree against a sequential XOR.
* `tb_coef_lfsr`: the first states worked out by hand, then a full 255-step period for all eight lane polynomials against a model written from the sequence recurrence. Each value must be nonzero and visited once. Also checked: hold while `step` is low, and reset.
* `tb_nc_ram`: every word written and read back, the one-cycle read latency, and hold while disabled.
* `tb_nc_ctrl`: cycle-exact address sweep, lane enables, the LFSR step pulse, data flags and `ready` timing, and refusal of illegal sizes.
* `tb_nc_encoder` runs the full size, with no parameters overridden:
  * loads 8 x 1 KB packets;
  * encodes coded packets back to back and checks every symbol and coefficient;
  * decodes the generation with a Gauss-Jordan reference receiver;
  * exercises idle lanes, illegal starts and writes during encoding;
  * checks the 3-cycle latency and that output is gap-free.

  Every mechanism must occur at least once.
* `tb_nc_workloads`: encodes and decodes a generation of 8 x 1 KB, then
  generations of 5 packets of 32, 64, 128 and 256 bytes. It prints how many
  coded packets each one needed.

## Design choices not fixed by the architecture

These parts come from the architecture: GF(2^8) arithmetic; eight lanes;
1 KB, byte-wide, one-port memories; one maximal-length 8-bit LFSR per lane; a
single-cycle multiplier; an adder tree; clock gating of idle lanes; AND gating
between the coefficient sources and the arithmetic; and a variable number of
packets per generation.

These are choices made for this RTL:

* the field polynomial 0x11D;
* the lane polynomials, the seeds and the exact tap arrangement;
* one LFSR step per coded packet;
* the start/ready command interface and one coded packet per command;
* the registered RAM read and the three-stage pipeline;
* refusal of illegal sizes;
* the absence of output back-pressure;
* synchronous active-low reset.

## Not included

* **Decoder.** It would need Gauss-Jordan elimination with a 256-entry inverse table. Decoding exists here only as testbench code.
* **Partial-packet recovery.** The receiver-side process that checks and corrects corrupted coded packets against each other is not implemented.
* **Physical design.** Voltage scaling, clock-gating cells and the physical memory macros belong to the implementation flow, not to this RTL.
