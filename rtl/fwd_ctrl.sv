// Issue and dependency control of the forwarding multiplier.
//
// Keeps a window of the last S-1 issued multiplies (slot d = the multiply
// issued d instructions ago). Each slot holds the pipeline position of that
// multiply (1 = in the first stage register, S = in the output register,
// saturating above S) and, once it has left the output register, its low N
// product bits. For each operand of a new multiply with dependency distance
// d (1..S-1; 0 or larger values mean "value on the port"):
//   - producer at position >= S: its full result is known and is used as an
//     ordinary operand (from the output register, or from the slot);
//   - producer at position p < S: the operand is marked pending with offset
//     p, and the stages fetch its slices as they need them.
// Arch2 forwards into both operands and never stalls. Arch1 forwards only
// into the multiplier B: an operand of type 10 is swapped into B; a type 11
// multiply whose two operands are both still in flight is held (in_ready low)
// until one of them completes, and the one completed becomes A.
//
// Interface: valid/ready on the input side; `fire` is the cycle in which the
// multiply enters carry-save stage 1 with operands a/b and their pending
// flags and offsets. res_low/res_valid is the output register of the
// pipeline. Synchronous active-low reset clears the window.
//
// The dependency types and which of them each architecture resolves follow
// the described design; how a type-11 multiply is held back in Arch1 and how
// the window is kept are this design's own choices.
module fwd_ctrl
  import ifwd_pkg::*;
#(
  parameter int unsigned ARCH = 2,
  parameter int unsigned N    = 64,
  parameter int unsigned S    = 5,
  parameter int unsigned PB   = $clog2(S + 2),
  parameter int unsigned DB   = $clog2(S)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  op1,
  input  logic [N-1:0]  op2,
  input  logic [DB-1:0] dist1,
  input  logic [DB-1:0] dist2,
  input  logic [N-1:0]  res_low,     // low N bits held in the output register
  output logic          fire,
  output logic [N-1:0]  a,
  output logic [N-1:0]  b,
  output logic          a_pend,
  output logic          b_pend,
  output logic [PB-1:0] a_off,
  output logic [PB-1:0] b_off,
  output dep_type_e     dtype,       // dependency type of the input multiply
  output logic          ev_stall,    // a type-11 multiply is held this cycle
  output logic          ev_swap,     // operands were exchanged (Arch1)
  output logic          ev_window    // an operand was read from the window
);

  localparam int unsigned D = S - 1;   // deepest forwarding distance

  typedef struct packed {
    logic          valid;
    logic [PB-1:0] pos;
    logic [N-1:0]  res;
  } slot_t;

  slot_t [D:1] slot;
  slot_t [D:1] aged;

  // Slots one cycle older, with a result captured when it is in the output register.
  always_comb begin
    for (int unsigned d = 1; d <= D; d++) begin
      aged[d] = slot[d];
      if (slot[d].pos <= PB'(S)) aged[d].pos = slot[d].pos + 1'b1;
      if (slot[d].pos == PB'(S)) aged[d].res = res_low;
    end
  end

  // Operand resolution.
  logic [N-1:0]  v1, v2;
  logic          p1, p2;
  logic [PB-1:0] o1, o2;
  logic          w1, w2;

  function automatic void resolve(input logic [N-1:0] op, input logic [DB-1:0] dst,
                                  output logic [N-1:0] val, output logic pend,
                                  output logic [PB-1:0] off, output logic from_window);
    val = op; pend = 1'b0; off = '0; from_window = 1'b0;
    for (int unsigned d = 1; d <= D; d++) begin
      if (dst == DB'(d) && slot[d].valid) begin
        if (slot[d].pos < PB'(S)) begin
          val  = '0;
          pend = 1'b1;
          off  = slot[d].pos;
        end else begin
          val = (slot[d].pos == PB'(S)) ? res_low : slot[d].res;
          from_window = 1'b1;
        end
      end
    end
  endfunction

  always_comb begin
    resolve(op1, dist1, v1, p1, o1, w1);
    resolve(op2, dist2, v2, p2, o2, w2);
  end

  logic stall, swap;

  if (ARCH == 1) begin : g_arch1
    assign stall = p1 & p2;
    assign swap  = p1 & ~p2;
  end else begin : g_arch2
    assign stall = 1'b0;
    assign swap  = 1'b0;
  end

  assign in_ready = ~stall;
  assign fire     = in_valid & in_ready;
  assign a        = swap ? v2 : v1;
  assign b        = swap ? v1 : v2;
  assign a_pend   = swap ? p2 : p1;
  assign b_pend   = swap ? p1 : p2;
  assign a_off    = swap ? o2 : o1;
  assign b_off    = swap ? o1 : o2;
  assign dtype    = dep_type(dist1 != '0, dist2 != '0);
  assign ev_stall = in_valid & stall;
  assign ev_swap  = fire & swap;
  assign ev_window = fire & (w1 | w2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned d = 1; d <= D; d++) slot[d] <= '0;
    end else if (fire) begin
      slot[1] <= '{valid: 1'b1, pos: PB'(1), res: '0};
      for (int unsigned d = 2; d <= D; d++) slot[d] <= aged[d-1];
    end else begin
      for (int unsigned d = 1; d <= D; d++) slot[d] <= aged[d];
    end
  end

  // In Arch1 the multiplicand is never forwarded.
  assert property (@(posedge clk) disable iff (!rst_n) fire && ARCH == 1 |-> !a_pend);

endmodule
