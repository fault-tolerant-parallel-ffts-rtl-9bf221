// Locates a single error from the three check results c1 c2 c3 of the
// Parity-SOS-ECC scheme, using the Hamming-code table of the design:
//
//   c1 c2 c3 | location
//   0  0  0  | no error
//   1  1  1  | FFT 1      (FFT 1 is in all three checked sums)
//   1  1  0  | FFT 2      (in sums 1 and 2)
//   1  0  1  | FFT 3      (in sums 1 and 3)
//   0  1  1  | FFT 4      (in sums 2 and 3)
//   1  0  0, 0  1  0, 0  0  1 | the check itself (a parity position)
//
// A pattern with a single failing check points at a parity position, not at
// an FFT: the data are left as they are and check_only is raised. Reporting
// those patterns on a separate flag is this design's choice.
//
// Interface: c = {c1, c2, c3}; loc and check_only are combinational.
module syndrome_decoder
  import ft_fft_pkg::*;
(
  input  logic [2:0] c,
  output err_loc_e   loc,
  output logic       check_only
);

  always_comb begin
    check_only = 1'b0;
    unique case (c)
      3'b000: loc = LOC_NONE;
      3'b111: loc = LOC_FFT1;
      3'b110: loc = LOC_FFT2;
      3'b101: loc = LOC_FFT3;
      3'b011: loc = LOC_FFT4;
      default: begin
        loc        = LOC_NONE;
        check_only = 1'b1;
      end
    endcase
  end

endmodule
