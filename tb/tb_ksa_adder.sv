// Testbench of ksa_adder: widths 64, 16 and 5 (not a power of two); random
// operands plus carry-chain corner cases (all ones plus one, alternating
// bits). Sum and carry out are compared with a + b + cin.
module tb_ksa_adder;
  int checks = 0, failures = 0;

  logic [63:0] a64, b64, s64; logic c64i, c64o;
  logic [15:0] a16, b16, s16; logic c16i, c16o;
  logic [4:0]  a5,  b5,  s5;  logic c5i,  c5o;

  ksa_adder #(.W(64)) u64 (.a(a64), .b(b64), .cin(c64i), .sum(s64), .cout(c64o));
  ksa_adder #(.W(16)) u16 (.a(a16), .b(b16), .cin(c16i), .sum(s16), .cout(c16o));
  ksa_adder #(.W(5))  u5  (.a(a5),  .b(b5),  .cin(c5i),  .sum(s5),  .cout(c5o));

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [64:0] e64; logic [16:0] e16; logic [5:0] e5;
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; c64i = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); c16i = 1'($urandom);
      a5 = 5'($urandom); b5 = 5'($urandom); c5i = 1'($urandom);
      case (t % 10)
        0: begin a64 = '1; b64 = '0; c64i = 1'b1; a16 = '1; b16 = '0; c16i = 1'b1; end
        1: begin a64 = {32{2'b10}}; b64 = {32{2'b01}}; c64i = 1'b1; a16 = 16'haaaa; b16 = 16'h5555; end
        2: begin a64 = '1; b64 = '1; c64i = 1'b1; a5 = '1; b5 = '1; c5i = 1'b1; end
        default: ;
      endcase
      #1;
      e64 = 65'(a64) + 65'(b64) + 65'(c64i);
      e16 = 17'(a16) + 17'(b16) + 17'(c16i);
      e5  = 6'(a5) + 6'(b5) + 6'(c5i);
      checks += 3;
      if ({c64o, s64} !== e64) begin failures++; if (failures < 10) $display("FAIL 64: %h+%h+%b", a64, b64, c64i); end
      if ({c16o, s16} !== e16) begin failures++; if (failures < 10) $display("FAIL 16: %h+%h+%b", a16, b16, c16i); end
      if ({c5o, s5} !== e5)    begin failures++; if (failures < 10) $display("FAIL 5: %h+%h+%b", a5, b5, c5i); end
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
