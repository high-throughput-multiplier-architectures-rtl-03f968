// Wallace tree: reduces ROWS addends of W bits to a sum and a carry vector.
//
// Each level groups the rows in threes and replaces every group by the sum
// and the (left-shifted) carry of a row of full adders; one or two leftover
// rows pass to the next level unchanged. Levels repeat until two rows remain
// (LEVELS of them, about log_1.5(ROWS/2)); those are the sum and the carry.
// All arithmetic is modulo 2^W, so sum + carry equals the sum of the inputs
// modulo 2^W.
//
// A Wallace tree of full and half adders is named for the partial-product
// reduction step; this row-level form with full adders only is this design's
// choice. Purely combinational.
module csa_tree #(
  parameter int unsigned ROWS = 11,
  parameter int unsigned W    = 128
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Number of rows after one level of 3:2 reduction.
  function automatic int unsigned reduce(input int unsigned n);
    return (n > 2) ? 2 * (n / 3) + n % 3 : n;
  endfunction

  // Number of rows at level l.
  function automatic int unsigned rows_at(input int unsigned l);
    int unsigned n;
    n = ROWS;
    for (int unsigned i = 0; i < l; i++) n = reduce(n);
    return n;
  endfunction

  function automatic int unsigned num_levels(input int unsigned n);
    int unsigned l;
    l = 0;
    for (int unsigned i = 0; i < 64; i++) begin
      if (n > 2) begin
        n = reduce(n);
        l++;
      end
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(ROWS);

  // Level l reads the rows of level l-1 (the inputs for l = 0) and drives
  // its own NO output rows.
  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_lvl
    localparam int unsigned NI = rows_at(l);
    localparam int unsigned G  = NI / 3;
    localparam int unsigned NO = reduce(NI);
    logic [W-1:0] in_r [NI];
    logic [W-1:0] out_r [NO];
    if (l == 0) begin : g_first
      assign in_r = rows;
    end else begin : g_next
      assign in_r = g_lvl[l-1].out_r;
    end
    for (genvar g = 0; g < int'(G); g++) begin : g_fa
      assign out_r[2*g]   = in_r[3*g] ^ in_r[3*g+1] ^ in_r[3*g+2];
      assign out_r[2*g+1] = ((in_r[3*g] & in_r[3*g+1]) | (in_r[3*g] & in_r[3*g+2])
                           | (in_r[3*g+1] & in_r[3*g+2])) << 1;
    end
    for (genvar r = 2 * G; r < int'(NO); r++) begin : g_pass
      assign out_r[r] = in_r[r+G];
    end
  end

  if (LEVELS == 0) begin : g_short
    assign sum = rows[0];
    if (ROWS >= 2) begin : g_carry
      assign carry = rows[ROWS-1];
    end else begin : g_no_carry
      assign carry = '0;
    end
  end else begin : g_tree
    assign sum   = g_lvl[LEVELS-1].out_r[0];
    assign carry = g_lvl[LEVELS-1].out_r[1];
  end

endmodule
