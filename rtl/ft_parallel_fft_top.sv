// Fault-tolerant parallel FFTs: both protection schemes side by side.
//
// Four FFTs process four independent frames per cycle (as the parallel
// FFTs of a MIMO-OFDM receiver would). The same frames feed two protected
// implementations so that they can be compared on identical traffic:
//   ps_*   Parity-SOS:     one Parseval check per FFT plus a parity FFT
//   pse_*  Parity-SOS-ECC: three Parseval checks on Hamming-code sums of the
//                          FFTs plus a parity FFT
// Each scheme has its own fault-injection masks and its own corrected
// outputs and error reports. Feeding both from one input and bringing out
// both results is this design's arrangement; each scheme on its own is the
// complete protected system.
//
// Timing: frames with in_valid at cycle t, outputs with *_out_valid at t+3,
// one frame per cycle. Synchronous active-low reset.
module ft_parallel_fft_top
  import ft_fft_pkg::*;
#(
  parameter int N   = N_POINTS,
  parameter int IW  = IN_W,
  parameter int TWF = TW_F,
  parameter longint unsigned PS_THRESH  = 64'd1 << 20,
  parameter longint unsigned PSE_THRESH = 64'd1 << 23,
  localparam int OW = IW + $clog2(N) + 1,
  localparam int PW = OW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x_re [N_FFT][N],
  input  logic signed [IW-1:0] x_im [N_FFT][N],
  // Parity-SOS scheme
  input  logic        [PW-1:0] ps_fault_re [N_FFT+1][N],
  input  logic        [PW-1:0] ps_fault_im [N_FFT+1][N],
  output logic                 ps_out_valid,
  output logic signed [OW-1:0] ps_y_re [N_FFT][N],
  output logic signed [OW-1:0] ps_y_im [N_FFT][N],
  output logic [N_FFT-1:0]     ps_chk_fail,
  output err_loc_e             ps_err_loc,
  output logic                 ps_corrected,
  output logic                 ps_uncorrectable,
  // Parity-SOS-ECC scheme
  input  logic        [PW-1:0] pse_fault_re [N_FFT+1][N],
  input  logic        [PW-1:0] pse_fault_im [N_FFT+1][N],
  output logic                 pse_out_valid,
  output logic signed [OW-1:0] pse_y_re [N_FFT][N],
  output logic signed [OW-1:0] pse_y_im [N_FFT][N],
  output logic [2:0]           pse_syndrome,
  output err_loc_e             pse_err_loc,
  output logic                 pse_corrected,
  output logic                 pse_check_only
);

  parity_sos_fft #(.N(N), .IW(IW), .TWF(TWF), .THRESH(PS_THRESH)) u_parity_sos (
    .clk, .rst_n, .in_valid, .x_re, .x_im,
    .fault_re(ps_fault_re), .fault_im(ps_fault_im),
    .out_valid(ps_out_valid), .y_re(ps_y_re), .y_im(ps_y_im),
    .chk_fail(ps_chk_fail), .err_loc(ps_err_loc),
    .corrected(ps_corrected), .uncorrectable(ps_uncorrectable));

  parity_sos_ecc_fft #(.N(N), .IW(IW), .TWF(TWF), .THRESH(PSE_THRESH)) u_parity_sos_ecc (
    .clk, .rst_n, .in_valid, .x_re, .x_im,
    .fault_re(pse_fault_re), .fault_im(pse_fault_im),
    .out_valid(pse_out_valid), .y_re(pse_y_re), .y_im(pse_y_im),
    .syndrome(pse_syndrome), .err_loc(pse_err_loc),
    .corrected(pse_corrected), .check_only(pse_check_only));

endmodule
