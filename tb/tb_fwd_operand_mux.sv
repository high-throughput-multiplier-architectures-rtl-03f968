// Testbench of fwd_operand_mux (N = 16, S = 5, slices of 4 bits), stages 2
// and 4. Random operands, pending flags, offsets and partial results; the
// expected output is worked out from the rule: producer register
// q = offset + K - 1; q < S takes slice K-1 from register q, q == S takes the
// whole output-register value and clears the pending flag.
module tb_fwd_operand_mux;
  localparam int unsigned N = 16, S = 5, PB = 3, W = 4;
  int checks = 0, failures = 0;

  logic [N-1:0]  op_in, pr_res;
  logic          pend_in;
  logic [PB-1:0] off_in;
  logic [N-1:0]  pr_m [S-1];
  logic [N-1:0]  op2, op4;
  logic          pe2, pe4, hs2, hs4, hw2, hw4;

  fwd_operand_mux #(.N(N), .S(S), .K(2), .PB(PB)) u_k2 (
    .op_in, .pend_in, .off_in, .pr_m, .pr_res, .op_out(op2), .pend_out(pe2), .hit_slice(hs2), .hit_whole(hw2));
  fwd_operand_mux #(.N(N), .S(S), .K(4), .PB(PB)) u_k4 (
    .op_in, .pend_in, .off_in, .pr_m, .pr_res, .op_out(op4), .pend_out(pe4), .hit_slice(hs4), .hit_whole(hw4));

  task automatic expect_k(input int k, input logic [N-1:0] o, input logic p, input logic hs, input logic hw);
    logic [N-1:0] eo; logic ep, ehs, ehw; int q;
    eo = op_in; ep = pend_in; ehs = 0; ehw = 0;
    q = int'(off_in) + k - 1;
    if (pend_in) begin
      if (q == S) begin eo = pr_res; ep = 0; ehw = 1; end
      else begin eo[(k-1)*W+:W] = pr_m[q-1][(k-1)*W+:W]; ehs = 1; end
    end
    checks++;
    if ({o, p, hs, hw} !== {eo, ep, ehs, ehw}) begin
      failures++;
      if (failures < 10) $display("FAIL K=%0d off=%0d pend=%b: %h %b%b%b vs %h %b%b%b", k, off_in, pend_in, o, p, hs, hw, eo, ep, ehs, ehw);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      op_in = 16'($urandom); pr_res = 16'($urandom); pend_in = 1'($urandom);
      foreach (pr_m[i]) pr_m[i] = 16'($urandom);
      // offsets that can occur: 1..S-1, and for K = 4 only up to S-K+1 = 2
      off_in = PB'(1 + $urandom % 2);
      #1;
      expect_k(4, op4, pe4, hs4, hw4);
      off_in = PB'(1 + $urandom % (S - 1));
      #1;
      expect_k(2, op2, pe2, hs2, hw2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
