# Pipelined multipliers with intra-unit forwarding

A pipelined multiplier normally makes a dependent multiply wait. If
`R2 = C x R1` follows `R1 = A x B`, the second multiply cannot start until
the first product has left the last stage. This design removes most of that
wait. The carry-save stages produce the product from its low end up, one
slice per stage, so the low bits of `R1` are final long before the multiply
ends. A dependent multiply starts right away. Each of its stages takes the
one slice of `R1` it needs from the pipeline register where `R1` now sits.
Dependent multiplies can therefore be issued every cycle.

Two architectures are provided:

* **Arch1** forwards into one operand, the Booth-recoded multiplier B. A
  multiply whose first operand (type 10) or second operand (type 01) depends
  on an earlier product issues without a bubble. If both operands depend on
  products still in flight (type 11), the multiply waits until one of them
  is complete.
* **Arch2** forwards into both operands, so no dependency ever stalls it.

Both are signed N x N multipliers with S pipeline stages, a 2N-bit product
and radix-4 Booth partial products. Default size: N = 64, S = 5. N/(S-1)
must be even, which covers 32 and 64 bits at 2, 3 and 5 stages.

## Pipeline organisation

Let W = N/(S-1). Stages 1 to S-1 are carry-save stages. Stage S is a
carry-propagate stage.

| stage | operand bits used | work | product bits finished |
|---|---|---|---|
| k = 1..S-1 | slice k-1, `[kW-1:(k-1)W]` | MUX, Booth PPG, Wallace tree, W-bit Kogge-Stone adder | `[kW-1:(k-1)W]` |
| S | none | N-bit Kogge-Stone adder on the upper sum and carry vectors | `[2N-1:N]` |

Each carry-save stage adds its new partial products to the sum and carry
vectors it receives. Its narrow adder then resolves the lowest W bits that
are still open. No later partial product can change those bits: every later
product term is a multiple of 2^(kW). The adder's carry goes on to the next
stage. The finished bits travel down the pipeline in the `m` field of the
stage registers. That field is the *partial result* that other multiplies
forward from. Because the low half is already resolved, the final adder is
only N bits wide.

The sum and carry vectors are kept at their absolute bit positions in a
2N-bit frame. All arithmetic is modulo 2^(2N). Partial-product rows are
fully sign-extended. A negative Booth digit is formed as the one's
complement of its row. The +1 that completes the negation goes into one
shared correction row.

### What each stage multiplies

* **Arch1.** The multiplicand A must be complete when the multiply issues.
  Stage k multiplies A by the Booth digits of B's slice k-1. Radix-4 Booth
  digits depend only on three adjacent bits: the slice itself and the bit
  below it. So a slice can be recoded as soon as it arrives.
* **Arch2.** Neither operand has to be complete. Stage k adds the L-shaped
  band of the product square that becomes computable once slice k-1 of both
  operands is known:

      band(k) = digits(A slice k-1) x B[kW-1:0]  +  digits(B slice k-1) x A[(k-1)W-1:0]

  Both low parts are read as *signed* numbers. The sum of the Booth digits
  below a bit position equals the low bits read as a signed number. So the
  bands add up exactly to the signed product, with no sign fix-up at the
  end. Arch2 generates twice as many partial-product rows per stage as
  Arch1.

## Forwarding

Every multiply carries its operands through the pipeline. Each operand has a
*pending* flag and an *offset* p. The offset is the pipeline position of the
producer when this multiply was issued: the producer was then in stage
register p.

In stage k, the producer of a pending operand is in register q = p + k - 1.

* **q < S.** Register q holds product bits `[qW-1:0]`. Because q >= k, this
  includes slice k-1, which the stage takes.
* **q = S.** The producer is in the output register with its whole product.
  The stage copies the whole operand and clears the pending flag.

q grows by one per stage, so it reaches S before it could pass it. The MUX in
each stage therefore reads stage registers 1..S-1 and the output register.
These are the D1..D(S-1) paths together ("full" forwarding).

**Issue control** (`fwd_ctrl`) keeps a window of the last S-1 accepted
multiplies. Each entry holds that multiply's position and, once it has left
the output register, its low N product bits. For an operand with dependency
distance d:

| producer position | operand becomes |
|---|---|
| below S | pending, offset = position |
| S | value taken from the output register |
| above S | value taken from the window |

Distance 0, or a distance of S or more, means the value is on the port. A
multiply issued S or more instructions earlier is always complete, so the
caller has its value.

Arch1 rules:

* A lone pending OP1 is swapped into B. Multiplication commutes.
* If both operands are pending, `in_ready` stays low. It rises when the
  older producer reaches the output register. That operand then becomes
  the complete multiplicand A.

## Interface and timing (`ifwd_mul`)

| port | width | meaning |
|---|---|---|
| `in_valid`, `in_ready` | 1 | a multiply is accepted when both are high |
| `op1`, `op2` | N | signed operands; ignored when the matching `dist` is non-zero |
| `dist1`, `dist2` | clog2(S) | dependency distance: 0 = port value, d = low N bits of the product of the multiply accepted d multiplies earlier, read as signed |
| `out_valid`, `out_prod` | 1, 2N | signed product, registered, exactly S cycles after acceptance, in order |
| `in_dtype` | 2 | dependency type of the offered multiply (`ifwd_pkg::dep_type_e`) |
| `ev_*` | 1 each | pulses: forwarded slice, whole operand from the output register, operand from the window, Arch1 swap, Arch1 stall |

* Throughput is one multiply per cycle.
* Reset is synchronous and active low. It clears the valid bits and the
  window. Datapath registers are not reset.
* `ifwd_mul_top` instantiates one Arch1 unit and one Arch2 unit side by
  side. They have separate ports, prefixed `a1_` and `a2_`. The Arch2
  unit's `in_ready` is always 1, and its stall and swap events are always 0.

Example with S = 5: `R1 = A x B`, `R2 = A2 x R1` (d = 1),
`R3 = A3 x R2` (d = 1), `R4 = A4 x R1` (d = 3).
All four issue on consecutive cycles. The last product is out 8 cycles after
the first one entered the pipeline.

## Files

| file | contents |
|---|---|
| `rtl/ifwd_pkg.sv` | dependency-type enum and helper |
| `rtl/booth_r4_ppg.sv` | radix-4 Booth partial-product generator |
| `rtl/csa_tree.sv` | Wallace tree (levels of full adders) |
| `rtl/ksa_adder.sv` | Kogge-Stone adder |
| `rtl/fwd_operand_mux.sv` | per-stage forwarding MUX |
| `rtl/cs_stage.sv` | one carry-save stage (MUX, PPG, tree, narrow adder) |
| `rtl/cp_stage.sv` | final carry-propagate stage |
| `rtl/fwd_ctrl.sv` | dependency window, operand resolution, Arch1 swap/stall |
| `rtl/ifwd_mul.sv` | the S-stage multiplier (`ARCH` = 1 or 2) |
| `rtl/ifwd_mul_top.sv` | Arch1 and Arch2 units side by side |
| `tb/mul_driver.sv` | stimulus and reference model shared by the unit testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workload_dep` |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes. For
example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ifwd_pkg.sv \
        tb/tb_ifwd_mul_top.sv --top-module tb_ifwd_mul_top
    ./obj_dir/Vtb_ifwd_mul_top

* `tb_ifwd_mul_top` runs the top at its default size (64 bits, 5 stages).
  It sends 2,000 multiplies to each unit. Each mechanism must occur at
  least once.
* `tb_ifwd_mul` covers both architectures at 32 and 64 bits with 2, 3 and
  5 stages, plus three narrower units.
* `tb_workload_dep` streams 10,000 multiplies with 0, 25, 50, 75 and 100 %
  dependent instructions through 64-bit, 5-stage units. It reports the
  cycle count of each run:

| dependent | Arch1 cycles | Arch2 cycles |
|---|---|---|
| 0 % | 10,007 | 10,004 |
| 25 % | 11,820 | 10,004 |
| 50 % | 13,186 | 10,004 |
| 75 % | 14,464 | 10,004 |
| 100 % | 15,477 | 10,004 |

Each run starts with the directed examples, including one type-11 multiply.
That multiply is where Arch1's three extra cycles at 0 % come from. The
Arch1 counts depend on the random stream and move by a few percent when
the stream changes. The Arch2 counts do not.
In this stream a dependent multiply is randomly of type 01, 10 or 11, with
distances from 1 to 4. A third of the dependent multiplies are type 11, so
Arch1 stalls often. With only type 01/10 dependences, Arch1 issues every
cycle as well.

To change the size, set `N` and `S` on `ifwd_mul` or `ifwd_mul_top`. The
stage count sets the slice width.

## How far to trust it, and where it departs

What the tests establish:

* Every module has a self-checking testbench, run against a model written
  separately from the RTL.
* The full unit is checked product by product, latency included. The
  directed cases cover the dependent chain above and the Arch1 type-11 wait.
* Each testbench was also run against a deliberately broken copy of its
  module, and it reported failures.

Choices of this design that the architecture does not fix:

* **Signed operands.** The slice-per-stage scheme is often shown with
  unsigned AND-gate partial products. Here it is built for signed operands
  with radix-4 Booth digits. The Arch2 band formula with signed low parts is
  this design's own.
* **Dependent operand.** It is the low N bits of the earlier product, read
  as signed.
* **Arch1 handling of types 10 and 11.** The operand swap for type 10 and
  the wait for type 11 are this design's own.
* **Longest forwarding distances.** These are served from the output
  register and from a small window of completed results.
* **Port protocol.** The valid/ready handshake, the distance fields and the
  event outputs are this design's own.
* **Adder tree and sign extension.** The Wallace tree uses only full adders,
  at row level; no half adders. Sign extension is done in full, with no
  sign-extension trick. Synthesis may trim the constant bits.

Not provided:

* **Radix-16 redundant-binary datapaths.** The forwarding scheme also
  applies to radix-16 redundant-binary Booth multipliers, ordinary and
  "covalent". Those partial-product generators and carry-free adders are
  not included here. Only the radix-4 normal-binary datapath is.
* **Reference designs.** No non-pipelined multiplier and no pipeline without
  forwarding are provided for comparison.
* **Timing, area and power.** These are not characterised. The W-bit adder
  in every carry-save stage and the MUX in front of the PPG both add to the
  stage delay.
