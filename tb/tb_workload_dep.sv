// Execution-time workload Dep(r): 10,000 multiplies of which r percent are
// dependent, r = 0, 25, 50, 75 and 100, on 64-bit, 5-stage Arch1 and Arch2
// units (the configuration of the execution-time comparison). Multiplies are
// offered back to back; a dependent one has a random type (01, 10 or 11) and
// random distances 1..4. Every product is checked, and the number of clock
// cycles from the first issue to the last result (N_clk) is printed for each
// unit. With no stall N_clk = 10,000 + 4; Arch2 must reach that for every r.
module tb_workload_dep;
  localparam int unsigned N = 64, S = 5, DB = 3, NUM = 10000, NR = 5;
  localparam int unsigned R [NR] = '{0, 25, 50, 75, 100};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2*NR-1:0] done;
  int              c [2*NR];
  int              f [2*NR];
  longint          cyc [2*NR];

  for (genvar i = 0; i < int'(2 * NR); i++) begin : g_u
    localparam int unsigned A = (i % 2) + 1;
    localparam int unsigned DEP = R[i / 2];
    logic           in_valid, in_ready, out_valid;
    logic [N-1:0]   op1, op2;
    logic [DB-1:0]  dist1, dist2;
    logic [2*N-1:0] out_prod;
    logic [4:0]     ev;
    ifwd_pkg::dep_type_e dt;

    ifwd_mul #(.ARCH(A), .N(N), .S(S)) u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .op1, .op2, .dist1, .dist2,
      .out_valid, .out_prod, .in_dtype(dt),
      .ev_fwd_slice(ev[0]), .ev_fwd_whole(ev[1]), .ev_window(ev[2]),
      .ev_swap(ev[3]), .ev_stall(ev[4])
    );
    mul_driver #(.ARCH(A), .N(N), .S(S), .NUM(NUM), .DEP_PCT(DEP), .GAP_PCT(0),
                 .CHECK_EVENTS(1'b0)) u_drv (
      .clk, .rst_n, .in_valid, .in_ready, .op1, .op2, .dist1, .dist2,
      .out_valid, .out_prod, .events(ev), .done(done[i]), .checks(c[i]),
      .failures(f[i]), .cycles(cyc[i])
    );
  end

  task automatic finish();
    int checks, failures;
    checks = 0; failures = 0;
    for (int i = 0; i < int'(2 * NR); i++) begin checks += c[i]; failures += f[i]; end
    if (done != '1) failures++;
    for (int i = 0; i < int'(NR); i++) begin
      $display("Dep(%0d%%): N_clk Arch1 = %0d, Arch2 = %0d", R[i], cyc[2*i], cyc[2*i+1]);
      checks++;
      if (cyc[2*i+1] != longint'(int'(NUM + S - 1))) begin
        failures++;
        $display("FAIL: Arch2 needed %0d cycles", cyc[2*i+1]);
      end
    end
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
    repeat (60000) @(posedge clk);
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
