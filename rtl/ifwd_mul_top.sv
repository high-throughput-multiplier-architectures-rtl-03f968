// Top level: the two proposed forwarding multipliers side by side.
//
// u_arch1 forwards finished product slices into one operand (dependency
// types 01 and 10 never stall), u_arch2 into both (types 01, 10 and 11 never
// stall). Both are N x N signed, S-stage units; each has its own instruction
// and result ports, prefixed a1_ and a2_, with the timing of ifwd_mul:
// accept on valid && ready, product S cycles later, in order. Defaults are
// the 5-stage, 64-bit configuration.
module ifwd_mul_top
  import ifwd_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned S = 5,
  localparam int unsigned DB = $clog2(S)
) (
  input  logic           clk,
  input  logic           rst_n,
  // Arch1 unit
  input  logic           a1_in_valid,
  output logic           a1_in_ready,
  input  logic [N-1:0]   a1_op1,
  input  logic [N-1:0]   a1_op2,
  input  logic [DB-1:0]  a1_dist1,
  input  logic [DB-1:0]  a1_dist2,
  output logic           a1_out_valid,
  output logic [2*N-1:0] a1_out_prod,
  output logic [4:0]     a1_events,   // {stall, swap, window, whole, slice}
  // Arch2 unit
  input  logic           a2_in_valid,
  output logic           a2_in_ready,
  input  logic [N-1:0]   a2_op1,
  input  logic [N-1:0]   a2_op2,
  input  logic [DB-1:0]  a2_dist1,
  input  logic [DB-1:0]  a2_dist2,
  output logic           a2_out_valid,
  output logic [2*N-1:0] a2_out_prod,
  output logic [4:0]     a2_events    // {stall, swap, window, whole, slice}
);

  dep_type_e a1_dtype, a2_dtype;
  logic      unused_dtype;
  assign unused_dtype = ^{a1_dtype, a2_dtype};

  ifwd_mul #(.ARCH(1), .N(N), .S(S)) u_arch1 (
    .clk, .rst_n, .in_valid(a1_in_valid), .in_ready(a1_in_ready),
    .op1(a1_op1), .op2(a1_op2), .dist1(a1_dist1), .dist2(a1_dist2),
    .out_valid(a1_out_valid), .out_prod(a1_out_prod), .in_dtype(a1_dtype),
    .ev_fwd_slice(a1_events[0]), .ev_fwd_whole(a1_events[1]), .ev_window(a1_events[2]),
    .ev_swap(a1_events[3]), .ev_stall(a1_events[4])
  );

  ifwd_mul #(.ARCH(2), .N(N), .S(S)) u_arch2 (
    .clk, .rst_n, .in_valid(a2_in_valid), .in_ready(a2_in_ready),
    .op1(a2_op1), .op2(a2_op2), .dist1(a2_dist1), .dist2(a2_dist2),
    .out_valid(a2_out_valid), .out_prod(a2_out_prod), .in_dtype(a2_dtype),
    .ev_fwd_slice(a2_events[0]), .ev_fwd_whole(a2_events[1]), .ev_window(a2_events[2]),
    .ev_swap(a2_events[3]), .ev_stall(a2_events[4])
  );

endmodule
