// Testbench of cs_stage: the four carry-save stages of a 16-bit, 5-stage
// unit are chained combinationally, for Arch1 and Arch2, and their outputs
// completed by the reference addition of the upper half. The result must be
// the signed product of the two operands. Forwarding is exercised at the
// same time: an operand is randomly marked pending with a random offset, its
// port copy is replaced by garbage, and every partial-result input holds the
// true operand value, so the product is right only if each stage takes
// exactly its own slice (or the whole value) from the forwarding inputs.
// The low product bits finished by stage K must already be final.
module tb_cs_stage;
  localparam int unsigned N = 16, S = 5, CS = 4, PB = 3, W = 4;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic [N-1:0]   a, b;
    logic           ap, bp;
    logic [2*N-1:0] s, c;
    logic           cin;
    logic [N-1:0]   m;
  } st_t;

  logic [N-1:0]  av, bv;             // true operand values
  logic [N-1:0]  pr_m [S-1];
  logic [N-1:0]  pr_res;
  logic [PB-1:0] aoff, boff;
  st_t           st [2][CS+1];
  logic [1:0]    fs [CS], fw [CS];

  for (genvar x = 0; x < 2; x++) begin : g_arch
    for (genvar k = 1; k <= int'(CS); k++) begin : g_k
      cs_stage #(.ARCH(x + 1), .N(N), .S(S), .K(k), .PB(PB)) u_dut (
        .a_in(st[x][k-1].a), .b_in(st[x][k-1].b), .a_pend_in(st[x][k-1].ap), .b_pend_in(st[x][k-1].bp),
        .a_off_in(aoff), .b_off_in(boff),
        .s_in(st[x][k-1].s), .c_in(st[x][k-1].c), .cin_in(st[x][k-1].cin), .m_in(st[x][k-1].m),
        .pr_m(pr_m), .pr_res(pr_res),
        .a_out(st[x][k].a), .b_out(st[x][k].b), .a_pend_out(st[x][k].ap), .b_pend_out(st[x][k].bp),
        .s_out(st[x][k].s), .c_out(st[x][k].c), .cin_out(st[x][k].cin), .m_out(st[x][k].m),
        .fwd_slice(fs[k-1][x]), .fwd_whole(fw[k-1][x])
      );
    end
  end

  initial begin
    int slices;
    slices = 0;
    for (int t = 0; t < 4000; t++) begin
      logic ap, bp;
      av = 16'($urandom); bv = 16'($urandom);
      if (t % 13 == 0) av = 16'h8000;
      if (t % 17 == 0) bv = 16'h8000;
      ap = 1'($urandom); bp = 1'($urandom);
      aoff = PB'(1 + $urandom % (S - 1)); boff = PB'(1 + $urandom % (S - 1));
      foreach (pr_m[i]) pr_m[i] = (t % 2 == 0) ? av : bv;
      pr_res = (t % 2 == 0) ? av : bv;
      if (t % 2 == 0) bp = 1'b0; else ap = 1'b0;   // one source value per run
      for (int x = 0; x < 2; x++) begin
        st[x][0] = '0;
        st[x][0].ap = (x == 1) ? ap : 1'b0;
        st[x][0].bp = (x == 1) ? bp : (ap | bp);
        // Arch1 forwards into B only: put the forwarded value there
        st[x][0].a = (x == 0) ? ((ap | bp) ? ((t % 2 == 0) ? bv : av) : av) : (ap ? 16'($urandom) : av);
        st[x][0].b = (x == 0) ? ((ap | bp) ? 16'($urandom) : bv) : (bp ? 16'($urandom) : bv);
      end
      #1;
      for (int x = 0; x < 2; x++) begin
        logic [2*N-1:0] e, got;
        logic [N-1:0]   hi;
        e = 32'($signed({{16{av[15]}}, av}) * $signed({{16{bv[15]}}, bv}));
        hi = st[x][CS].s[2*N-1:N] + st[x][CS].c[2*N-1:N] + 16'(st[x][CS].cin);
        got = {hi, st[x][CS].m};
        checks++;
        if (got !== e) begin
          failures++;
          if (failures < 10) $display("FAIL arch%0d a=%h b=%h ap=%b bp=%b: %h vs %h", x + 1, av, bv, ap, bp, got, e);
        end
        for (int k = 1; k <= int'(CS); k++) begin
          checks++;
          if (((st[x][k].m ^ e[N-1:0]) & N'((32'd1 << (k * W)) - 1)) != '0) begin
            failures++;
            if (failures < 10) $display("FAIL arch%0d stage %0d low bits", x + 1, k);
          end
          if (fs[k-1][x]) slices++;
        end
      end
    end
    checks++;
    if (slices == 0) begin failures++; $display("FAIL: no slice was forwarded"); end
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
