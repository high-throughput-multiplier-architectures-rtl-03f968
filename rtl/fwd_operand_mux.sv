// Forwarding MUX of one operand in carry-save stage K.
//
// Carry-save stage K (1..S-1) consumes operand bits [K*W-1:(K-1)*W], with
// W = N/(S-1). When the operand is the product of an earlier multiply that is
// still in the pipeline ("pending"), those bits are taken from that multiply's
// partial result (PR): the product bits it has already finished. The producer
// was OFF pipeline positions ahead when this multiply issued, so it now sits
// in pipeline register q = OFF + K - 1:
//   q <  S : register q holds finished product bits [q*W-1:0], which include
//            the needed slice; only that slice is taken (partial forwarding);
//   q == S : the producer is in the output register with its full product;
//            the whole low N bits are taken and the operand stops pending.
// q only grows by one per stage, so it reaches S before it could pass it.
// Operand bits already collected by earlier stages are kept. A non-pending
// operand passes through.
//
// The forwarding sources (one per pipeline register, i.e. the D1..D(S-1)
// paths) follow the described design; the output-register case is this
// design's way of closing the longest paths. Purely combinational.
module fwd_operand_mux #(
  parameter int unsigned N  = 64,
  parameter int unsigned S  = 5,
  parameter int unsigned K  = 1,                 // stage index, 1..S-1
  parameter int unsigned PB = $clog2(S + 2),     // width of the offset
  localparam int unsigned W = N / (S - 1)
) (
  input  logic [N-1:0]  op_in,            // operand bits collected so far
  input  logic          pend_in,          // operand still being forwarded
  input  logic [PB-1:0] off_in,           // producer's position at issue (>= 1)
  input  logic [N-1:0]  pr_m [S-1],       // finished low bits of registers 1..S-1
  input  logic [N-1:0]  pr_res,           // low N product bits of the output register
  output logic [N-1:0]  op_out,
  output logic          pend_out,
  output logic          hit_slice,        // a slice was forwarded from a stage register
  output logic          hit_whole         // the whole operand was taken from the output
);

  localparam int unsigned LO = (K - 1) * W;

  logic [PB:0] q;
  assign q = {1'b0, off_in} + (PB + 1)'(K - 1);

  always_comb begin
    op_out    = op_in;
    pend_out  = pend_in;
    hit_slice = 1'b0;
    hit_whole = 1'b0;
    if (pend_in) begin
      if (q == (PB + 1)'(S)) begin
        op_out    = pr_res;
        pend_out  = 1'b0;
        hit_whole = 1'b1;
      end else begin
        for (int unsigned r = 1; r < S; r++) begin
          if (q == (PB + 1)'(r)) op_out[LO+:W] = pr_m[r-1][LO+:W];
        end
        hit_slice = 1'b1;
      end
    end
  end

endmodule
