// Radix-4 Booth partial product generator (the PPG step of a carry-save
// stage).
//
// Recodes a W-bit slice of the multiplier, together with the multiplier bit
// just below the slice, into W/2 Booth digits in {-2,-1,0,+1,+2} and forms one
// partial-product row per digit from the signed N-bit multiplicand. Rows are
// produced at their absolute bit position (slice offset SHIFT plus 2 per
// digit) in a PW-bit two's-complement frame, fully sign-extended. A negative
// digit is formed as the one's complement of the magnitude; the missing +1 of
// each such row is collected, one bit per digit, in an extra last row. The
// sum of all ROWS rows modulo 2^PW equals mcand * (signed value of the digits)
// * 2^SHIFT.
//
// Because every digit only looks at three adjacent multiplier bits, a slice
// can be recoded as soon as it and the bit below it are known; this is what
// lets a pipeline stage work on multiplier bits that are still being produced
// by an earlier multiply.
//
// Radix-4 Booth recoding is named for the normal-binary multiplier; the row
// layout, the full sign extension (instead of a sign-extension trick) and the
// separate correction row are this design's choices. Purely combinational.
module booth_r4_ppg #(
  parameter int unsigned N     = 64,      // multiplicand width, two's complement
  parameter int unsigned W     = 16,      // multiplier slice width, even
  parameter int unsigned SHIFT = 0,       // bit position of the slice
  parameter int unsigned PW    = 2 * N,   // width of the output frame
  localparam int unsigned ROWS = W / 2 + 1
) (
  input  logic [N-1:0]  mcand,   // signed multiplicand
  input  logic [W-1:0]  slice,   // multiplier bits [SHIFT+W-1:SHIFT]
  input  logic          below,   // multiplier bit SHIFT-1 (0 when SHIFT == 0)
  output logic [PW-1:0] rows [ROWS]
);

  logic [PW-1:0] mc_ext;
  assign mc_ext = {{(PW - N){mcand[N-1]}}, mcand};

  always_comb begin
    logic [PW-1:0] neg_row;
    logic [PW-1:0] mag;
    logic          b2, b1, b0, one, two;
    neg_row = '0;
    for (int unsigned j = 0; j < W / 2; j++) begin
      b2  = slice[2*j+1];
      b1  = slice[2*j];
      b0  = (j == 0) ? below : slice[2*j-1];
      one = b1 ^ b0;
      two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      mag = one ? mc_ext : (two ? (mc_ext << 1) : '0);
      rows[j] = (b2 ? ~mag : mag) << (SHIFT + 2 * j);
      neg_row[SHIFT+2*j] = b2;
    end
    rows[ROWS-1] = neg_row;
  end

endmodule
