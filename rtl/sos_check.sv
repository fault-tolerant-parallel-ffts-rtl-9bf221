// Parseval (sum-of-squares, SOS) check of one FFT.
//
// For an unscaled N-point DFT, Parseval's relation gives
//     sum_k |X[k]|^2 = N * sum_n |x[n]|^2 .
// The check forms both energies with magnitude-square cells (mag_square,
// built on Vedic multipliers) and flags an error when they differ by more
// than THRESH. The tolerance absorbs the rounding of the FFT's twiddle
// products; an upset that moves the output energy by more than THRESH is
// detected, smaller ones are within tolerance and pass.
//
// The same module checks a single FFT (Parity-SOS scheme) or a sum of FFTs
// (Parity-SOS-ECC scheme): by linearity the sum of several outputs is the DFT
// of the sum of their inputs, so the caller just feeds the summed frames.
//
// Comparing input and output energy follows the design description; the
// two-stage pipeline, the absolute-difference test and the THRESH value are
// this design's choices.
//
// Timing: x_re/x_im is sampled with in_valid at cycle t, the FFT output
// y_re/y_im at cycle t+1 (one-cycle FFT latency); err and chk_valid are
// registered at cycle t+2. Synchronous active-low reset.
module sos_check #(
  parameter int N  = 8,
  parameter int TW = 12,   // width of the time-domain parts
  parameter int FW = 16,   // width of the frequency-domain parts
  parameter longint unsigned THRESH = 64'd1 << 20,
  localparam int LOG2N = $clog2(N),
  localparam int ET    = 2 * TW + 1 + LOG2N,   // time-domain energy width
  localparam int EF    = 2 * FW + 1 + LOG2N    // frequency-domain energy width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [TW-1:0] x_re [N],
  input  logic signed [TW-1:0] x_im [N],
  input  logic signed [FW-1:0] y_re [N],
  input  logic signed [FW-1:0] y_im [N],
  output logic                 chk_valid,
  output logic                 err,
  output logic        [ET-1:0] e_time,    // sum |x|^2 of the checked frame
  output logic        [EF-1:0] e_freq     // sum |X|^2 of the checked frame
);

  localparam int DW = ((EF > ET + LOG2N) ? EF : ET + LOG2N) + 2;

  logic [2*TW:0] m_x [N];
  logic [2*FW:0] m_y [N];

  for (genvar n = 0; n < N; n++) begin : g_sq
    mag_square #(.W(TW)) u_mx (.re(x_re[n]), .im(x_im[n]), .mag2(m_x[n]));
    mag_square #(.W(FW)) u_my (.re(y_re[n]), .im(y_im[n]), .mag2(m_y[n]));
  end

  logic [ET-1:0] sum_x;
  logic [EF-1:0] sum_y;
  logic          v1;
  logic [ET-1:0] e_time_q;

  always_comb begin
    sum_x = '0;
    sum_y = '0;
    for (int n = 0; n < N; n++) begin
      sum_x += ET'(m_x[n]);
      sum_y += EF'(m_y[n]);
    end
  end

  // Stage 1: input energy, aligned with the FFT output of the same frame.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1       <= 1'b0;
      e_time_q <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) e_time_q <= sum_x;
    end
  end

  // Stage 2: compare N * input energy against output energy.
  logic signed [DW-1:0] diff;
  logic        [DW-1:0] adiff;
  always_comb begin
    diff  = DW'(sum_y) - (DW'(e_time_q) <<< LOG2N);
    adiff = diff[DW-1] ? DW'(-diff) : DW'(diff);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chk_valid <= 1'b0;
      err       <= 1'b0;
      e_time    <= '0;
      e_freq    <= '0;
    end else begin
      chk_valid <= v1;
      if (v1) begin
        err    <= 128'(adiff) > 128'(THRESH);
        e_time <= e_time_q;
        e_freq <= sum_y;
      end
    end
  end

endmodule
