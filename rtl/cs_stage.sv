// Carry-save addition stage K of the forwarding multiplier (K = 1..S-1).
//
// Each of the S-1 carry-save stages handles one W-bit slice of the operands,
// W = N/(S-1), lowest slice first:
//   1. MUX   - fwd_operand_mux fills in the slice of an operand that is still
//              being produced by an earlier multiply (Arch1: multiplier B
//              only; Arch2: both A and B).
//   2. PPG   - radix-4 Booth partial products.
//        Arch1: A (complete) x B slice K.
//        Arch2: the L-shaped band of the product square that becomes
//               computable once slice K of both operands is known:
//               A slice K x B[K*W-1:0] plus B slice K x A[(K-1)*W-1:0].
//               Both low parts are read as signed numbers, which is exactly
//               the value of the Booth digits below them, so the bands of all
//               stages add up to the signed product.
//   3. PPR   - a Wallace tree adds the new rows to the incoming sum and carry
//              vectors.
//   4. CPA   - a narrow W-bit Kogge-Stone adder resolves product bits
//              [K*W-1:(K-1)*W], which can no longer change, and passes its
//              carry to the next stage. These finished bits form the partial
//              result (PR) that later multiplies can forward from.
// All vectors are kept at absolute bit positions in a 2N-bit frame.
//
// The slice-per-stage schedule, the MUX placement, the band shape of Arch2
// and the narrow adder per stage follow the described architectures. The
// absolute-position frame and the signed treatment of the low parts (needed
// for signed operands, which the worked examples do not show) are this
// design's choices. Purely combinational; the caller registers the outputs.
module cs_stage #(
  parameter int unsigned ARCH = 2,               // 1: Arch1, 2: Arch2
  parameter int unsigned N    = 64,
  parameter int unsigned S    = 5,
  parameter int unsigned K    = 1,
  parameter int unsigned PB   = $clog2(S + 2),
  localparam int unsigned W   = N / (S - 1)
) (
  input  logic [N-1:0]   a_in,
  input  logic [N-1:0]   b_in,
  input  logic           a_pend_in,
  input  logic           b_pend_in,
  input  logic [PB-1:0]  a_off_in,
  input  logic [PB-1:0]  b_off_in,
  input  logic [2*N-1:0] s_in,
  input  logic [2*N-1:0] c_in,
  input  logic           cin_in,
  input  logic [N-1:0]   m_in,
  input  logic [N-1:0]   pr_m [S-1],
  input  logic [N-1:0]   pr_res,
  output logic [N-1:0]   a_out,
  output logic [N-1:0]   b_out,
  output logic           a_pend_out,
  output logic           b_pend_out,
  output logic [2*N-1:0] s_out,
  output logic [2*N-1:0] c_out,
  output logic           cin_out,
  output logic [N-1:0]   m_out,
  output logic           fwd_slice,
  output logic           fwd_whole
);

  localparam int unsigned LO    = (K - 1) * W;
  localparam int unsigned PROWS = W / 2 + 1;
  localparam int unsigned NT    = 2 + ARCH * PROWS;

  logic [N-1:0] a_op, b_op;
  logic         a_hs, a_hw, b_hs, b_hw;

  // --- MUX ------------------------------------------------------------------
  fwd_operand_mux #(.N(N), .S(S), .K(K), .PB(PB)) u_mux_b (
    .op_in(b_in), .pend_in(b_pend_in), .off_in(b_off_in), .pr_m(pr_m), .pr_res(pr_res),
    .op_out(b_op), .pend_out(b_pend_out), .hit_slice(b_hs), .hit_whole(b_hw)
  );

  if (ARCH == 2) begin : g_mux_a
    fwd_operand_mux #(.N(N), .S(S), .K(K), .PB(PB)) u_mux_a (
      .op_in(a_in), .pend_in(a_pend_in), .off_in(a_off_in), .pr_m(pr_m), .pr_res(pr_res),
      .op_out(a_op), .pend_out(a_pend_out), .hit_slice(a_hs), .hit_whole(a_hw)
    );
  end else begin : g_no_mux_a
    // Arch1 has no MUX on the multiplicand: it is complete at issue.
    assign a_op       = a_in;
    assign a_pend_out = a_pend_in;
    assign a_hs       = 1'b0;
    assign a_hw       = 1'b0;
    logic unused_a_off;
    assign unused_a_off = ^a_off_in;
  end

  assign fwd_slice = a_hs | b_hs;
  assign fwd_whole = a_hw | b_hw;

  // --- PPG ------------------------------------------------------------------
  logic [2*N-1:0] tree_in [NT];
  logic [2*N-1:0] rows_1 [PROWS];
  logic           b_below, a_below;

  assign b_below = (LO == 0) ? 1'b0 : b_op[(LO == 0) ? 0 : LO-1];
  assign a_below = (LO == 0) ? 1'b0 : a_op[(LO == 0) ? 0 : LO-1];

  if (ARCH == 2) begin : g_ppg2
    logic [N-1:0]   b_low, a_low;
    logic [2*N-1:0] rows_2 [PROWS];

    // B[LO+W-1:0] and A[LO-1:0] as signed numbers, sign-extended to N bits.
    localparam int unsigned SHB = N - LO - W;
    localparam int unsigned SHA = (LO == 0) ? 0 : N - LO;
    logic signed [N-1:0] b_top, a_top, a_shr;
    assign b_top = b_op << SHB;
    assign a_top = a_op << SHA;
    assign b_low = b_top >>> SHB;
    assign a_shr = a_top >>> SHA;
    assign a_low = (LO == 0) ? '0 : a_shr;

    booth_r4_ppg #(.N(N), .W(W), .SHIFT(LO), .PW(2*N)) u_ppg_a (
      .mcand(b_low), .slice(a_op[LO+:W]), .below(a_below), .rows(rows_1)
    );
    booth_r4_ppg #(.N(N), .W(W), .SHIFT(LO), .PW(2*N)) u_ppg_b (
      .mcand(a_low), .slice(b_op[LO+:W]), .below(b_below), .rows(rows_2)
    );
    for (genvar r = 0; r < int'(PROWS); r++) begin : g_rows
      assign tree_in[2+r]       = rows_1[r];
      assign tree_in[2+PROWS+r] = rows_2[r];
    end
  end else begin : g_ppg1
    logic unused_a_below;
    assign unused_a_below = a_below;
    booth_r4_ppg #(.N(N), .W(W), .SHIFT(LO), .PW(2*N)) u_ppg (
      .mcand(a_op), .slice(b_op[LO+:W]), .below(b_below), .rows(rows_1)
    );
    for (genvar r = 0; r < int'(PROWS); r++) begin : g_rows
      assign tree_in[2+r] = rows_1[r];
    end
  end

  assign tree_in[0] = s_in;
  assign tree_in[1] = c_in;

  // --- PPR: Wallace tree ----------------------------------------------------
  logic [2*N-1:0] t_sum, t_carry;

  csa_tree #(.ROWS(NT), .W(2*N)) u_tree (.rows(tree_in), .sum(t_sum), .carry(t_carry));

  // --- narrow CPA: finish product bits [LO+W-1:LO] ---------------------------
  logic [W-1:0] slice_sum;

  ksa_adder #(.W(W)) u_cpa (
    .a(t_sum[LO+:W]), .b(t_carry[LO+:W]), .cin(cin_in), .sum(slice_sum), .cout(cin_out)
  );

  always_comb begin
    s_out = t_sum;
    c_out = t_carry;
    s_out[LO+W-1:0] = '0;
    c_out[LO+W-1:0] = '0;
    m_out = m_in;
    m_out[LO+:W] = slice_sum;
  end

  assign a_out = a_op;
  assign b_out = b_op;

endmodule
