// Magnitude square |z|^2 = re^2 + im^2 of one complex sample: the basic cell
// of the Parseval (sum-of-squares) check.
//
// The absolute value of each signed part is squared with a Vedic multiplier
// (vedic_mult) and the two squares are added. Squaring the absolute value
// gives the same result as a signed square and lets the multiplier be
// unsigned. The use of a Vedic multiplier here follows the design
// description; the absolute-value step is this design's choice.
//
// Interface: re, im signed W bits; mag2 unsigned 2W+1 bits. Combinational.
module mag_square #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic [2*W:0]        mag2
);

  logic [W-1:0]   abs_re, abs_im;
  logic [2*W-1:0] sq_re, sq_im;

  always_comb begin
    abs_re = re[W-1] ? W'(-re) : W'(re);
    abs_im = im[W-1] ? W'(-im) : W'(im);
  end

  vedic_mult #(.W(W)) u_sq_re (.a(abs_re), .b(abs_re), .p(sq_re));
  vedic_mult #(.W(W)) u_sq_im (.a(abs_im), .b(abs_im), .p(sq_im));

  assign mag2 = {1'b0, sq_re} + {1'b0, sq_im};

endmodule
