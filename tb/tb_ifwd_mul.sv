// Testbench of ifwd_mul: both architectures at 5, 3 and 2 stages.
//
// Eighteen units each run a program from mul_driver: the six evaluated
// sizes (32 and 64 bits at 2, 3 and 5 stages) and three small ones (16 bits
// at 5 and 3 stages, 8 bits at 2 stages), each as Arch1 and Arch2. The
// program consists of: the directed forwarding examples, then random
// multiplies with 60% dependent instructions and issue gaps. Products are
// checked against a reference model, together with the S-cycle latency, the
// back-to-back issue of a dependent chain, the Arch1 type-11 wait and the
// occurrence of every forwarding mechanism.
module tb_ifwd_mul;
  localparam int unsigned NCFG = 18;
  localparam int unsigned CFG_ARCH [NCFG] = '{1, 2, 1, 2, 1, 2, 1, 2, 1, 2, 1, 2, 1, 2, 1, 2, 1, 2};
  localparam int unsigned CFG_N    [NCFG] = '{16, 16, 16, 16, 8, 8, 32, 32, 32, 32, 32, 32, 64, 64, 64, 64, 64, 64};
  localparam int unsigned CFG_S    [NCFG] = '{5, 5, 3, 3, 2, 2, 5, 5, 3, 3, 2, 2, 5, 5, 3, 3, 2, 2};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int              c [NCFG];
  int              f [NCFG];
  int              checks, failures;

  for (genvar i = 0; i < int'(NCFG); i++) begin : g_cfg
    localparam int unsigned A = CFG_ARCH[i];
    localparam int unsigned N = CFG_N[i];
    localparam int unsigned S = CFG_S[i];
    localparam int unsigned DB = $clog2(S);
    logic           in_valid, in_ready, out_valid;
    logic [N-1:0]   op1, op2;
    logic [DB-1:0]  dist1, dist2;
    logic [2*N-1:0] out_prod;
    logic [4:0]     ev;
    ifwd_pkg::dep_type_e dt;
    longint         cyc;

    ifwd_mul #(.ARCH(A), .N(N), .S(S)) u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .op1, .op2, .dist1, .dist2,
      .out_valid, .out_prod, .in_dtype(dt),
      .ev_fwd_slice(ev[0]), .ev_fwd_whole(ev[1]), .ev_window(ev[2]),
      .ev_swap(ev[3]), .ev_stall(ev[4])
    );

    mul_driver #(.ARCH(A), .N(N), .S(S), .NUM(600), .DEP_PCT(60), .GAP_PCT(15)) u_drv (
      .clk, .rst_n, .in_valid, .in_ready, .op1, .op2, .dist1, .dist2,
      .out_valid, .out_prod, .events(ev), .done(done[i]), .checks(c[i]),
      .failures(f[i]), .cycles(cyc)
    );

    // The dependency type reported for the port must match the distances.
    always @(posedge clk) begin
      if (rst_n && in_valid && dt != ifwd_pkg::dep_type(dist1 != '0, dist2 != '0)) begin
        $display("FAIL: dependency type %s", dt.name());
        g_cfg[i].u_drv.failures <= g_cfg[i].u_drv.failures + 1;
      end
    end
  end

  task automatic finish();
    checks = 0; failures = 0;
    for (int i = 0; i < int'(NCFG); i++) begin checks += c[i]; failures += f[i]; end
    if (done != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done == '1);
    @(posedge clk);
    finish();
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired, done=%b", done);
    finish();
  end
endmodule
