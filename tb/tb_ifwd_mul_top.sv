// End-to-end testbench of ifwd_mul_top at its default size (64 x 64 bits,
// 5 stages), both units running at once.
//
// Each unit gets a mul_driver program: the directed forwarding examples
// (a four-multiply dependent chain that must issue back to back; a type-11
// multiply that Arch2 issues at once and Arch1 holds until one producer is
// complete), then random multiplies, 60% of them dependent, with issue gaps.
// Every 128-bit product is compared with a reference, with its 5-cycle
// latency. Each mechanism (slice forwarding, whole-operand forwarding from
// the output register, operand from the result window, Arch1 swap and
// Arch1 stall) is counted and must occur; Arch2 must never stall.
module tb_ifwd_mul_top;
  localparam int unsigned N  = 64;
  localparam int unsigned S  = 5;
  localparam int unsigned DB = $clog2(S);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           a1_in_valid, a1_in_ready, a1_out_valid;
  logic [N-1:0]   a1_op1, a1_op2;
  logic [DB-1:0]  a1_dist1, a1_dist2;
  logic [2*N-1:0] a1_out_prod;
  logic [4:0]     a1_events;
  logic           a2_in_valid, a2_in_ready, a2_out_valid;
  logic [N-1:0]   a2_op1, a2_op2;
  logic [DB-1:0]  a2_dist1, a2_dist2;
  logic [2*N-1:0] a2_out_prod;
  logic [4:0]     a2_events;

  ifwd_mul_top u_top (.*);

  logic [1:0] done;
  int         c1, f1, c2, f2;
  longint     cyc1, cyc2;

  mul_driver #(.ARCH(1), .N(N), .S(S), .NUM(2000), .DEP_PCT(60), .GAP_PCT(15)) u_drv1 (
    .clk, .rst_n, .in_valid(a1_in_valid), .in_ready(a1_in_ready), .op1(a1_op1), .op2(a1_op2),
    .dist1(a1_dist1), .dist2(a1_dist2), .out_valid(a1_out_valid), .out_prod(a1_out_prod),
    .events(a1_events), .done(done[0]), .checks(c1), .failures(f1), .cycles(cyc1)
  );
  mul_driver #(.ARCH(2), .N(N), .S(S), .NUM(2000), .DEP_PCT(60), .GAP_PCT(15)) u_drv2 (
    .clk, .rst_n, .in_valid(a2_in_valid), .in_ready(a2_in_ready), .op1(a2_op1), .op2(a2_op2),
    .dist1(a2_dist1), .dist2(a2_dist2), .out_valid(a2_out_valid), .out_prod(a2_out_prod),
    .events(a2_events), .done(done[1]), .checks(c2), .failures(f2), .cycles(cyc2)
  );

  task automatic finish();
    int failures;
    failures = f1 + f2 + ((done != 2'b11) ? 1 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done == 2'b11);
    @(posedge clk);
    finish();
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired, done=%b", done);
    finish();
  end
endmodule
