// Testbench of booth_r4_ppg: the rows of the generator must add up, modulo
// 2^PW, to mcand * (signed value of the slice + the bit below) * 2^SHIFT,
// which is the value of the Booth digits. Two configurations (a 16-bit
// multiplicand with an 8-bit slice at bit 4, and the default-size 64-bit
// multiplicand with a 16-bit slice at bit 48), random and corner operands.
module tb_booth_r4_ppg;
  int checks = 0, failures = 0;

  logic [15:0] mc_s;  logic [7:0]  sl_s;  logic bl_s;  logic [31:0]  rows_s [5];
  logic [63:0] mc_l;  logic [15:0] sl_l;  logic bl_l;  logic [127:0] rows_l [9];

  booth_r4_ppg #(.N(16), .W(8),  .SHIFT(4),  .PW(32))  u_small (.mcand(mc_s), .slice(sl_s), .below(bl_s), .rows(rows_s));
  booth_r4_ppg #(.N(64), .W(16), .SHIFT(48), .PW(128)) u_large (.mcand(mc_l), .slice(sl_l), .below(bl_l), .rows(rows_l));

  function automatic logic [63:0] r64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [31:0]  sum_s, exp_s;
      logic [127:0] sum_l, exp_l;
      mc_s = 16'($urandom); sl_s = 8'($urandom); bl_s = 1'($urandom);
      mc_l = r64();         sl_l = 16'($urandom); bl_l = 1'($urandom);
      if (t % 7 == 0) begin mc_s = 16'h8000; mc_l = 64'h8000_0000_0000_0000; end
      if (t % 11 == 0) begin sl_s = 8'hff; sl_l = 16'h8000; end
      #1;
      sum_s = '0; foreach (rows_s[i]) sum_s += rows_s[i];
      sum_l = '0; foreach (rows_l[i]) sum_l += rows_l[i];
      exp_s = 32'(($signed({{16{mc_s[15]}}, mc_s}) * ($signed({{24{sl_s[7]}}, sl_s}) + 32'(bl_s))) <<< 4);
      exp_l = 128'(($signed({{64{mc_l[63]}}, mc_l}) * ($signed({{112{sl_l[15]}}, sl_l}) + 128'(bl_l))) <<< 48);
      checks += 2;
      if (sum_s !== exp_s) begin failures++; if (failures < 10) $display("FAIL small %h %h %b: %h vs %h", mc_s, sl_s, bl_s, sum_s, exp_s); end
      if (sum_l !== exp_l) begin failures++; if (failures < 10) $display("FAIL large %h %h %b: %h vs %h", mc_l, sl_l, bl_l, sum_l, exp_l); end
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
