// Rebuilds the output of the FFT found in error from the parity FFT.
//
// The parity FFT transforms x1 + x2 + x3 + x4, so by linearity its output is
// X = X1 + X2 + X3 + X4 and a faulty output is replaced by, for FFT 1,
//     X1c = X - X2 - X3 - X4
// and likewise for the others. The other three outputs pass unchanged. When
// loc is LOC_NONE or LOC_UNCORR nothing is replaced. The rebuilt value
// carries the rounding errors of all five FFTs (a few LSBs) and is saturated
// to the output width. The equation follows the design description;
// saturation and the output register are this design's choices.
//
// Timing: inputs with in_valid at cycle t, outputs with out_valid at t+1.
module fft_corrector
  import ft_fft_pkg::*;
#(
  parameter int N  = 8,
  parameter int OW = 16,   // width of the protected FFT outputs
  localparam int PW = OW + 2,   // width of the parity FFT output
  localparam int SW = OW + 4    // width of the rebuilding sum
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  err_loc_e             loc,
  input  logic signed [OW-1:0] xr [N_FFT][N],
  input  logic signed [OW-1:0] xi [N_FFT][N],
  input  logic signed [PW-1:0] pr [N],
  input  logic signed [PW-1:0] pi [N],
  output logic                 out_valid,
  output logic                 corrected,      // an output was rebuilt
  output logic signed [OW-1:0] yr [N_FFT][N],
  output logic signed [OW-1:0] yi [N_FFT][N]
);

  localparam logic signed [SW-1:0] MAXV = SW'((1 << (OW - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 << (OW - 1));

  function automatic logic signed [OW-1:0] sat(logic signed [SW-1:0] v);
    if (v > MAXV) return OW'(MAXV);
    if (v < MINV) return OW'(MINV);
    return OW'(v);
  endfunction

  logic signed [OW-1:0] cr [N_FFT][N];
  logic signed [OW-1:0] ci [N_FFT][N];
  logic                 fix;

  always_comb begin
    logic signed [SW-1:0] sr, si;
    sr  = '0;
    si  = '0;
    cr  = xr;
    ci  = xi;
    fix = 1'b0;
    for (int f = 0; f < N_FFT; f++) begin
      if (loc == err_loc_e'(f + 1)) begin
        fix = 1'b1;
        for (int n = 0; n < N; n++) begin
          sr = SW'(pr[n]);
          si = SW'(pi[n]);
          for (int g = 0; g < N_FFT; g++) begin
            if (g != f) begin
              sr -= SW'(xr[g][n]);
              si -= SW'(xi[g][n]);
            end
          end
          cr[f][n] = sat(sr);
          ci[f][n] = sat(si);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      corrected <= 1'b0;
      for (int f = 0; f < N_FFT; f++)
        for (int n = 0; n < N; n++) begin
          yr[f][n] <= '0;
          yi[f][n] <= '0;
        end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        corrected <= fix;
        yr        <= cr;
        yi        <= ci;
      end
    end
  end

endmodule
