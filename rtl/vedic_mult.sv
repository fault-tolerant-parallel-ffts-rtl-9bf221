// Unsigned W x W multiplier in the Urdhva Tiryakbhyam ("vertically and
// crosswise") style, used for the squares inside the Parseval check.
//
// How it works: product bit column k collects every partial product
// a[i] & b[j] with i + j = k. Column 0 is the vertical product a[0]b[0],
// column 1 the crosswise pair a[1]b[0] + a[0]b[1], and so on, widening to
// the middle column and narrowing again. Each column's sum, plus the carry
// handed on from the column before, gives one product bit; the remaining
// bits of that sum are the carry into the next column. All columns are
// formed in parallel; only the carries ripple from column to column.
//
// The Vedic multiplier is named as the multiplier of the magnitude-square
// block; this column-by-column form of the sutra is this design's choice.
//
// Interface: a, b unsigned W bits; p = a*b, 2W bits. Purely combinational.
module vedic_mult #(
  parameter int W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // A column holds at most W ones; with the carry it stays below 2^CW.
  localparam int CW = $clog2(W + 1) + 2;

  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2 * W - 1; k++) begin
      col = carry;
      for (int i = 0; i < W; i++)
        if (k - i >= 0 && k - i < W)
          col += CW'(a[i] & b[k-i]);
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*W-1] = carry[0];
  end

endmodule
