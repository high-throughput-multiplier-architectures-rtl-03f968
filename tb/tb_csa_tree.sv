// Testbench of csa_tree: for several row counts (1, 2, 3, 4, 7, 11 and 19),
// sum + carry must equal the sum of all input rows modulo 2^W.
module tb_csa_tree;
  localparam int unsigned W = 40;
  localparam int unsigned NC = 7;
  localparam int unsigned RC [NC] = '{1, 2, 3, 4, 7, 11, 19};
  int checks = 0, failures = 0;

  logic [W-1:0] rows [NC][19];
  logic [W-1:0] s [NC];
  logic [W-1:0] c [NC];

  for (genvar i = 0; i < int'(NC); i++) begin : g_t
    logic [W-1:0] r [RC[i]];
    for (genvar j = 0; j < int'(RC[i]); j++) begin : g_r
      assign r[j] = rows[i][j];
    end
    csa_tree #(.ROWS(RC[i]), .W(W)) u_dut (.rows(r), .sum(s[i]), .carry(c[i]));
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < int'(NC); i++)
        for (int j = 0; j < 19; j++)
          rows[i][j] = (t % 5 == 0) ? '1 : W'({$urandom, $urandom});
      #1;
      for (int i = 0; i < int'(NC); i++) begin
        logic [W-1:0] e;
        e = '0;
        for (int j = 0; j < int'(RC[i]); j++) e += rows[i][j];
        checks++;
        if (W'(s[i] + c[i]) !== e) begin
          failures++;
          if (failures < 10) $display("FAIL rows=%0d: %h + %h != %h", RC[i], s[i], c[i], e);
        end
      end
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
