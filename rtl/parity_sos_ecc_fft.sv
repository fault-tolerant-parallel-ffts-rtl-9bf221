// Parity-SOS-ECC protection of four parallel FFTs (the second scheme).
//
// Instead of one Parseval check per FFT, three Parseval checks are placed on
// sums of FFTs chosen by a single-error-correcting Hamming code:
//     c1 checks X1 + X2 + X3  against  x1 + x2 + x3
//     c2 checks X1 + X2 + X4  against  x1 + x2 + x4
//     c3 checks X1 + X3 + X4  against  x1 + x3 + x4
// By linearity of the DFT each sum of outputs is the DFT of the sum of
// inputs, so Parseval's relation holds for it. The pattern c1 c2 c3 names the
// FFT in error (syndrome_decoder), and, as in the Parity-SOS scheme, a parity
// FFT on x1 + x2 + x3 + x4 rebuilds it (fft_corrector). Three checks replace
// four. The check sums and the location table follow the design description;
// widths, tolerance and pipeline are this design's choices.
//
// Pipeline and fault-injection ports are the same as in parity_sos_fft:
// frames in at cycle t, corrected outputs with out_valid at t+3.
module parity_sos_ecc_fft
  import ft_fft_pkg::*;
#(
  parameter int N    = N_POINTS,
  parameter int IW   = IN_W,
  parameter int TWF  = TW_F,
  parameter longint unsigned THRESH = 64'd1 << 23,
  localparam int LOG2N = $clog2(N),
  localparam int OW    = IW + LOG2N + 1,
  localparam int PW    = OW + 2
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
  output logic [2:0]           syndrome,       // {c1, c2, c3} of the frame on the outputs
  output err_loc_e             err_loc,
  output logic                 corrected,
  output logic                 check_only      // one check failed: error in a check, data kept
);

  localparam int N_CHK = 3;
  // Members of each checked sum (bit f set: FFT f+1 is in the sum).
  localparam logic [N_FFT-1:0] MEMBERS [N_CHK] = '{4'b0111, 4'b1011, 4'b1101};

  // ---- input sums: parity input and the three check inputs ----
  logic signed [IW+1:0] xp_re [N];
  logic signed [IW+1:0] xp_im [N];
  logic signed [IW+1:0] xc_re [N_CHK][N];
  logic signed [IW+1:0] xc_im [N_CHK][N];
  always_comb begin
    for (int n = 0; n < N; n++) begin
      xp_re[n] = '0;
      xp_im[n] = '0;
      for (int f = 0; f < N_FFT; f++) begin
        xp_re[n] += (IW+2)'(x_re[f][n]);
        xp_im[n] += (IW+2)'(x_im[f][n]);
      end
      for (int c = 0; c < N_CHK; c++) begin
        xc_re[c][n] = '0;
        xc_im[c][n] = '0;
        for (int f = 0; f < N_FFT; f++)
          if (MEMBERS[c][f]) begin
            xc_re[c][n] += (IW+2)'(x_re[f][n]);
            xc_im[c][n] += (IW+2)'(x_im[f][n]);
          end
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
  end

  fft_core #(.N(N), .IW(IW + 2), .TW_F(TWF)) u_parity_fft (
    .clk, .rst_n, .in_valid,
    .x_re(xp_re), .x_im(xp_im),
    .fault_re(fault_re[N_FFT]), .fault_im(fault_im[N_FFT]),
    .out_valid(pv), .y_re(pr), .y_im(pi));

  // ---- output sums and the three Parseval checks ----
  logic signed [PW-1:0] yc_re [N_CHK][N];
  logic signed [PW-1:0] yc_im [N_CHK][N];
  logic [N_CHK-1:0]     cv;
  logic [N_CHK-1:0]     c_fail;   // c_fail[0] = c1

  always_comb begin
    for (int c = 0; c < N_CHK; c++)
      for (int n = 0; n < N; n++) begin
        yc_re[c][n] = '0;
        yc_im[c][n] = '0;
        for (int f = 0; f < N_FFT; f++)
          if (MEMBERS[c][f]) begin
            yc_re[c][n] += PW'(fr[f][n]);
            yc_im[c][n] += PW'(fi[f][n]);
          end
      end
  end

  for (genvar c = 0; c < N_CHK; c++) begin : g_chk
    sos_check #(.N(N), .TW(IW + 2), .FW(PW), .THRESH(THRESH)) u_sos (
      .clk, .rst_n, .in_valid,
      .x_re(xc_re[c]), .x_im(xc_im[c]),
      .y_re(yc_re[c]), .y_im(yc_im[c]),
      .chk_valid(cv[c]), .err(c_fail[c]),
      .e_time(), .e_freq());
  end

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

  // ---- locate and correct ----
  logic [2:0] syn;
  err_loc_e   loc;
  logic       chk_only;
  assign syn = {c_fail[0], c_fail[1], c_fail[2]};

  syndrome_decoder u_dec (.c(syn), .loc, .check_only(chk_only));

  fft_corrector #(.N(N), .OW(OW)) u_corr (
    .clk, .rst_n, .in_valid(cv[0]), .loc,
    .xr(fr_d), .xi(fi_d), .pr(pr_d), .pi(pi_d),
    .out_valid, .corrected, .yr(y_re), .yi(y_im));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      syndrome   <= '0;
      err_loc    <= LOC_NONE;
      check_only <= 1'b0;
    end else if (cv[0]) begin
      syndrome   <= syn;
      err_loc    <= loc;
      check_only <= chk_only;
    end
  end

endmodule
