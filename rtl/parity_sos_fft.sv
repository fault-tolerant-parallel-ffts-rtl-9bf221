// Parity-SOS protection of four parallel FFTs (the first of the two schemes).
//
// Four FFTs transform four independent frames x1..x4. A fifth, parity FFT
// transforms x1 + x2 + x3 + x4. Each of the four FFTs has its own Parseval
// check (P1..P4). When exactly one check fails, that FFT's output is rebuilt
// from the parity FFT and the other three outputs (X1c = X - X2 - X3 - X4);
// when several fail the frame is passed on uncorrected and flagged. The
// parity FFT itself is not checked: an error there is harmless unless another
// FFT fails in the same frame. This structure follows the design description;
// widths, the tolerance and the pipeline are this design's choices.
//
// Pipeline (one frame per cycle):
//   t    frames in, parity input sum formed, FFTs compute
//   t+1  FFT outputs registered, input energies registered
//   t+2  check results registered, FFT outputs delayed to match
//   t+3  corrected outputs, out_valid
//
// fault_re/fault_im are XOR masks applied to the output registers of FFT 1..4
// (index 0..3, low OW bits used) and of the parity FFT (index 4), in the
// cycle the frame enters. They model soft errors; tie them to zero in use.
module parity_sos_fft
  import ft_fft_pkg::*;
#(
  parameter int N    = N_POINTS,
  parameter int IW   = IN_W,
  parameter int TWF  = TW_F,
  parameter longint unsigned THRESH = 64'd1 << 20,
  localparam int LOG2N = $clog2(N),
  localparam int OW    = IW + LOG2N + 1,   // protected FFT output width
  localparam int PW    = OW + 2            // parity FFT output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x_re [N_FFT][N],
  input  logic signed [IW-1:0] x_im [N_FFT][N],
  input  logic        [PW-1:0] fault_re [N_FFT+1][N],
  input  logic        [PW-1:0] fault_im [N_FFT+1][N],
  output logic                 out_valid,
  output logic signed [OW-1:0] y_re [N_FFT][N],
  output logic signed [OW-1:0] y_im [N_FFT][N],
  output logic [N_FFT-1:0]     chk_fail,       // P1..P4 of the frame on the outputs
  output err_loc_e             err_loc,
  output logic                 corrected,
  output logic                 uncorrectable
);

  // ---- parity input: x1 + x2 + x3 + x4 ----
  logic signed [IW+1:0] xp_re [N];
  logic signed [IW+1:0] xp_im [N];
  always_comb begin
    for (int n = 0; n < N; n++) begin
      xp_re[n] = '0;
      xp_im[n] = '0;
      for (int f = 0; f < N_FFT; f++) begin
        xp_re[n] += (IW+2)'(x_re[f][n]);
        xp_im[n] += (IW+2)'(x_im[f][n]);
      end
    end
  end

  // ---- FFTs ----
  logic signed [OW-1:0] fr [N_FFT][N];
  logic signed [OW-1:0] fi [N_FFT][N];
  logic signed [PW-1:0] pr [N];
  logic signed [PW-1:0] pi [N];
  logic [N_FFT-1:0]     fv;
  logic                 pv;
  logic [OW-1:0]        fm_re [N_FFT][N];
  logic [OW-1:0]        fm_im [N_FFT][N];
  logic [N_FFT-1:0]     cv;
  logic [N_FFT-1:0]     chk_fail_d;   // P1..P4 at cycle t+2

  for (genvar f = 0; f < N_FFT; f++) begin : g_fft
    for (genvar n = 0; n < N; n++) begin : g_fm
      assign fm_re[f][n] = fault_re[f][n][OW-1:0];
      assign fm_im[f][n] = fault_im[f][n][OW-1:0];
    end
    fft_core #(.N(N), .IW(IW), .TW_F(TWF)) u_fft (
      .clk, .rst_n, .in_valid,
      .x_re(x_re[f]), .x_im(x_im[f]),
      .fault_re(fm_re[f]), .fault_im(fm_im[f]),
      .out_valid(fv[f]), .y_re(fr[f]), .y_im(fi[f]));

    sos_check #(.N(N), .TW(IW), .FW(OW), .THRESH(THRESH)) u_sos (
      .clk, .rst_n, .in_valid,
      .x_re(x_re[f]), .x_im(x_im[f]),
      .y_re(fr[f]), .y_im(fi[f]),
      .chk_valid(cv[f]), .err(chk_fail_d[f]),
      .e_time(), .e_freq());
  end

  fft_core #(.N(N), .IW(IW + 2), .TW_F(TWF)) u_parity_fft (
    .clk, .rst_n, .in_valid,
    .x_re(xp_re), .x_im(xp_im),
    .fault_re(fault_re[N_FFT]), .fault_im(fault_im[N_FFT]),
    .out_valid(pv), .y_re(pr), .y_im(pi));

  // ---- align the FFT outputs with the check results (cycle t+2) ----
  logic signed [OW-1:0] fr_d [N_FFT][N];
  logic signed [OW-1:0] fi_d [N_FFT][N];
  logic signed [PW-1:0] pr_d [N];
  logic signed [PW-1:0] pi_d [N];

  always_ff @(posedge clk) begin
    if (fv[0]) begin
      fr_d <= fr;
      fi_d <= fi;
    end
    if (pv) begin
      pr_d <= pr;
      pi_d <= pi;
    end
  end

  // ---- error location: exactly one failing check names the FFT ----
  err_loc_e loc;
  always_comb begin
    unique case (chk_fail_d)
      4'b0000: loc = LOC_NONE;
      4'b0001: loc = LOC_FFT1;
      4'b0010: loc = LOC_FFT2;
      4'b0100: loc = LOC_FFT3;
      4'b1000: loc = LOC_FFT4;
      default: loc = LOC_UNCORR;
    endcase
  end

  fft_corrector #(.N(N), .OW(OW)) u_corr (
    .clk, .rst_n, .in_valid(cv[0]), .loc,
    .xr(fr_d), .xi(fi_d), .pr(pr_d), .pi(pi_d),
    .out_valid, .corrected, .yr(y_re), .yi(y_im));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chk_fail      <= '0;
      err_loc       <= LOC_NONE;
      uncorrectable <= 1'b0;
    end else if (cv[0]) begin
      chk_fail      <= chk_fail_d;
      err_loc       <= loc;
      uncorrectable <= (loc == LOC_UNCORR);
    end
  end

endmodule
