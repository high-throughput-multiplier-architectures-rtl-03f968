// Carry-propagate stage (stage S): finishes the upper half of the product.
//
// After the last carry-save stage the low N product bits are final and the
// upper half is still in redundant form: a sum vector, a carry vector and
// the carry out of the last narrow adder. One N-bit Kogge-Stone adder adds
// them; the result is concatenated with the finished low half. Only N bits
// wide, since the low half was resolved piecewise in the carry-save stages.
// Purely combinational; the caller registers the product.
module cp_stage #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   s_hi,    // upper half of the sum vector
  input  logic [N-1:0]   c_hi,    // upper half of the carry vector
  input  logic           cin,     // carry into bit N
  input  logic [N-1:0]   m,       // finished low product bits
  output logic [2*N-1:0] prod
);

  logic [N-1:0] hi;
  logic         unused_cout;

  ksa_adder #(.W(N)) u_cpa (
    .a(s_hi), .b(c_hi), .cin(cin), .sum(hi), .cout(unused_cout)
  );

  assign prod = {hi, m};

endmodule
