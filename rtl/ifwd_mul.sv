// S-stage pipelined signed N x N multiplier with intra-unit forwarding.
//
// Stages 1..S-1 are carry-save stages (cs_stage); stage K handles operand
// slice K-1 (W = N/(S-1) bits, lowest first) and finishes product bits
// [K*W-1:(K-1)*W] with a narrow adder. Stage S (cp_stage) adds the upper half.
// Because the low product bits come out one slice per stage, a multiply that
// uses an earlier product as an operand does not wait for it: each of its
// stages takes the slice it needs from the pipeline register in which the
// producer currently sits (forwarding paths D1..D(S-1), all present). Back to
// back dependent multiplies therefore issue every cycle.
//   ARCH = 1: forwarding into one operand. Types 01 and 10 issue without a
//             bubble; type 11 with both producers in flight waits.
//   ARCH = 2: forwarding into both operands; no dependency ever stalls.
//
// Interface: a multiply is accepted when in_valid && in_ready. dist1/dist2
// give the dependency distance of OP1/OP2 (0: use the port value). The
// product of the operands, as signed numbers, appears on out_prod with
// out_valid exactly S cycles after it was accepted; products leave in issue
// order. A dependent operand uses the low N bits of the earlier product,
// read as a signed number. The ev_* outputs pulse for the mechanisms:
// forwarded slice, operand taken whole from the output register, operand
// read from the result window, Arch1 operand swap and Arch1 stall.
// Synchronous active-low reset clears the valid bits and the window.
//
// Parameter defaults are the 5-stage 64-bit configuration used for the
// execution-time results. The interface and event outputs are this design's
// own.
module ifwd_mul
  import ifwd_pkg::*;
#(
  parameter int unsigned ARCH = 2,
  parameter int unsigned N    = 64,
  parameter int unsigned S    = 5,
  localparam int unsigned PB  = $clog2(S + 2),
  localparam int unsigned DB  = $clog2(S)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   op1,
  input  logic [N-1:0]   op2,
  input  logic [DB-1:0]  dist1,
  input  logic [DB-1:0]  dist2,
  output logic           out_valid,
  output logic [2*N-1:0] out_prod,
  output dep_type_e      in_dtype,
  output logic           ev_fwd_slice,
  output logic           ev_fwd_whole,
  output logic           ev_window,
  output logic           ev_swap,
  output logic           ev_stall
);

  localparam int unsigned CS = S - 1;   // number of carry-save stages

  initial begin
    assert (S >= 2 && N % (S - 1) == 0 && (N / (S - 1)) % 2 == 0)
      else $error("ifwd_mul: N/(S-1) must be an even integer");
    assert (ARCH == 1 || ARCH == 2) else $error("ifwd_mul: ARCH must be 1 or 2");
  end

  typedef struct packed {
    logic           valid;
    logic [N-1:0]   a;
    logic [N-1:0]   b;
    logic           a_pend;
    logic           b_pend;
    logic [PB-1:0]  a_off;
    logic [PB-1:0]  b_off;
    logic [2*N-1:0] s;
    logic [2*N-1:0] c;
    logic           cin;
    logic [N-1:0]   m;
  } stage_t;

  // st_in[k]: inputs of carry-save stage k; st_q[k]: its output register.
  stage_t [CS:1]  st_in;
  stage_t [CS:1]  st_d;
  stage_t [CS:1]  st_q;
  logic           out_v;
  logic [2*N-1:0] out_p;

  // Partial results visible to the forwarding MUXes.
  logic [N-1:0] pr_m [S-1];
  for (genvar q = 1; q <= int'(CS); q++) begin : g_pr
    assign pr_m[q-1] = st_q[q].m;
  end

  // --- issue -----------------------------------------------------------------
  logic          fire;
  logic [N-1:0]  ia, ib;
  logic          ia_p, ib_p;
  logic [PB-1:0] ia_o, ib_o;

  fwd_ctrl #(.ARCH(ARCH), .N(N), .S(S), .PB(PB), .DB(DB)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .op1, .op2, .dist1, .dist2,
    .res_low(out_p[N-1:0]), .fire, .a(ia), .b(ib), .a_pend(ia_p), .b_pend(ib_p),
    .a_off(ia_o), .b_off(ib_o), .dtype(in_dtype), .ev_stall, .ev_swap, .ev_window
  );

  always_comb begin
    st_in[1]        = '0;
    st_in[1].valid  = fire;
    st_in[1].a      = ia;
    st_in[1].b      = ib;
    st_in[1].a_pend = ia_p;
    st_in[1].b_pend = ib_p;
    st_in[1].a_off  = ia_o;
    st_in[1].b_off  = ib_o;
    for (int unsigned k = 2; k <= CS; k++) st_in[k] = st_q[k-1];
  end

  // --- carry-save stages -------------------------------------------------------
  logic [CS-1:0] hit_slice, hit_whole;

  for (genvar k = 1; k <= int'(CS); k++) begin : g_cs
    logic fs, fw;
    cs_stage #(.ARCH(ARCH), .N(N), .S(S), .K(k), .PB(PB)) u_stage (
      .a_in(st_in[k].a), .b_in(st_in[k].b),
      .a_pend_in(st_in[k].a_pend), .b_pend_in(st_in[k].b_pend),
      .a_off_in(st_in[k].a_off), .b_off_in(st_in[k].b_off),
      .s_in(st_in[k].s), .c_in(st_in[k].c), .cin_in(st_in[k].cin), .m_in(st_in[k].m),
      .pr_m(pr_m), .pr_res(out_p[N-1:0]),
      .a_out(st_d[k].a), .b_out(st_d[k].b),
      .a_pend_out(st_d[k].a_pend), .b_pend_out(st_d[k].b_pend),
      .s_out(st_d[k].s), .c_out(st_d[k].c), .cin_out(st_d[k].cin), .m_out(st_d[k].m),
      .fwd_slice(fs), .fwd_whole(fw)
    );
    assign st_d[k].valid = st_in[k].valid;
    assign st_d[k].a_off = st_in[k].a_off;
    assign st_d[k].b_off = st_in[k].b_off;
    assign hit_slice[k-1] = st_in[k].valid & fs;
    assign hit_whole[k-1] = st_in[k].valid & fw;

    stage_t q_r;
    always_ff @(posedge clk) begin
      if (!rst_n) q_r.valid <= 1'b0;
      else        q_r.valid <= st_d[k].valid;
      q_r.a      <= st_d[k].a;
      q_r.b      <= st_d[k].b;
      q_r.a_pend <= st_d[k].a_pend;
      q_r.b_pend <= st_d[k].b_pend;
      q_r.a_off  <= st_d[k].a_off;
      q_r.b_off  <= st_d[k].b_off;
      q_r.s      <= st_d[k].s;
      q_r.c      <= st_d[k].c;
      q_r.cin    <= st_d[k].cin;
      q_r.m      <= st_d[k].m;
    end
    assign st_q[k] = q_r;
  end

  assign ev_fwd_slice = |hit_slice;
  assign ev_fwd_whole = |hit_whole;

  // --- carry-propagate stage -------------------------------------------------
  logic [2*N-1:0] prod_d;

  cp_stage #(.N(N)) u_cp (
    .s_hi(st_q[CS].s[2*N-1:N]), .c_hi(st_q[CS].c[2*N-1:N]), .cin(st_q[CS].cin), .m(st_q[CS].m), .prod(prod_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_v <= 1'b0;
    else        out_v <= st_q[CS].valid;
    out_p <= prod_d;
  end

  assign out_valid = out_v;
  assign out_prod  = out_p;

endmodule
