// Testbench of cp_stage at the default 64-bit size: the product must be the
// finished low half with, above it, the sum of the upper sum vector, the
// upper carry vector and the carry in.
module tb_cp_stage;
  int checks = 0, failures = 0;
  logic [63:0]  s_hi, c_hi, m;
  logic         cin;
  logic [127:0] prod;

  cp_stage #(.N(64)) u_dut (.s_hi, .c_hi, .cin, .m, .prod);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [63:0] e;
      s_hi = {$urandom, $urandom}; c_hi = {$urandom, $urandom}; m = {$urandom, $urandom};
      cin = 1'($urandom);
      if (t % 9 == 0) begin s_hi = '1; c_hi = '0; cin = 1'b1; end
      #1;
      e = s_hi + c_hi + 64'(cin);
      checks++;
      if (prod !== {e, m}) begin failures++; if (failures < 10) $display("FAIL: %h vs %h", prod, {e, m}); end
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
