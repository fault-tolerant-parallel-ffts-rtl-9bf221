// Fault-injection campaign on ft_parallel_fft_top at its default parameters.
//
// For every output bit position b of the protected FFTs (0..15), FRAMES_PER_BIT
// random frames are sent, each with one bit flip in a random FFT (1..4),
// bin and part. For each scheme the outcome of a frame is classified:
//   corrected  the error was located and the output rebuilt correctly
//   wrong      an output was rebuilt, but the result is wrong (misplaced)
//   masked     not detected, but every output is still within TOL_C of the DFT
//   flagged    detected but not corrected (uncorrectable / check-only)
//   silent     the delivered output is wrong and nothing was reported
// and a table of the rates per bit is printed, showing how coverage grows
// with the size of the upset.
//
// Counted as failures: a Parity-SOS frame that was rebuilt wrongly (with one
// faulty FFT its check can only point at that FFT), a silent error in the
// Parity-SOS scheme for b >= 13 (such a flip changes the energy by at least
// about 2^26, far above its 2^20 tolerance), any report on the fault-free
// frames interleaved with the faulty ones, and frames that do not come out.
module tb_fault_campaign;
  import ft_fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int N = N_POINTS, IW = IN_W;
  localparam int OW = IW + $clog2(N) + 1, PW = OW + 2;
  localparam real TOL_C = 6.0;
  localparam int FRAMES_PER_BIT = 48;
  localparam int TOTAL = 2 * OW * FRAMES_PER_BIT;   // every other frame is fault-free

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IW-1:0] x_re [N_FFT][N], x_im [N_FFT][N];
  logic [PW-1:0] ps_fault_re [N_FFT+1][N], ps_fault_im [N_FFT+1][N];
  logic [PW-1:0] pse_fault_re [N_FFT+1][N], pse_fault_im [N_FFT+1][N];
  logic ps_out_valid, ps_corrected, ps_uncorrectable;
  logic signed [OW-1:0] ps_y_re [N_FFT][N], ps_y_im [N_FFT][N];
  logic [N_FFT-1:0] ps_chk_fail;
  err_loc_e ps_err_loc;
  logic pse_out_valid, pse_corrected, pse_check_only;
  logic signed [OW-1:0] pse_y_re [N_FFT][N], pse_y_im [N_FFT][N];
  logic [2:0] pse_syndrome;
  err_loc_e pse_err_loc;

  ft_parallel_fft_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real er [TOTAL][N_FFT][N], ei [TOTAL][N_FFT][N];
  int  bitpos [TOTAL];            // -1: fault-free frame
  int  n_recv = 0;
  // outcome counters [scheme][bit][class]: 0 corrected, 1 masked, 2 flagged, 3 silent, 4 wrong
  int  cnt [2][OW][5];

  initial begin
    repeat (TOTAL * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic all_near(logic signed [OW-1:0] yr [N_FFT][N],
                                    logic signed [OW-1:0] yi [N_FFT][N], int fr);
    for (int f = 0; f < N_FFT; f++)
      for (int n = 0; n < N; n++)
        if (absr(real'(yr[f][n]) - er[fr][f][n]) > TOL_C ||
            absr(real'(yi[f][n]) - ei[fr][f][n]) > TOL_C) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) begin
    if (rst_n && ps_out_valid) begin
      int fr, b, cls_ps, cls_pse;
      logic ok_ps, ok_pse, rep_ps, rep_pse;
      fr = n_recv;
      b  = bitpos[fr];
      n_recv++;
      ok_ps  = all_near(ps_y_re, ps_y_im, fr);
      ok_pse = all_near(pse_y_re, pse_y_im, fr);
      rep_ps  = ps_corrected || ps_uncorrectable || ps_chk_fail != '0;
      rep_pse = pse_corrected || pse_check_only || pse_syndrome != '0;
      if (b < 0) begin
        checks++;
        if (rep_ps || rep_pse || !ok_ps || !ok_pse) begin
          failures++;
          $display("fault-free frame %0d reported or wrong", fr);
        end
      end else begin
        cls_ps  = ps_corrected  ? (ok_ps  ? 0 : 4) : (!rep_ps  && ok_ps)  ? 1 : rep_ps  ? 2 : 3;
        cls_pse = pse_corrected ? (ok_pse ? 0 : 4) : (!rep_pse && ok_pse) ? 1 : rep_pse ? 2 : 3;
        cnt[0][b][cls_ps]++;
        cnt[1][b][cls_pse]++;
        checks++;
        if (ps_corrected && !ok_ps) begin
          failures++;
          $display("frame %0d bit %0d: Parity-SOS rebuilt a wrong output", fr, b);
        end
        checks++;
        if (b >= 13 && cls_ps == 3) begin
          failures++;
          $display("frame %0d bit %0d: Parity-SOS missed a large upset", fr, b);
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < 2; s++) for (int b = 0; b < OW; b++) for (int c = 0; c < 5; c++) cnt[s][b][c] = 0;
    for (int f = 0; f <= N_FFT; f++)
      for (int n = 0; n < N; n++) begin
        ps_fault_re[f][n] = '0; ps_fault_im[f][n] = '0;
        pse_fault_re[f][n] = '0; pse_fault_im[f][n] = '0;
      end
    for (int f = 0; f < N_FFT; f++)
      for (int n = 0; n < N; n++) begin x_re[f][n] = '0; x_im[f][n] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr < TOTAL; fr++) begin
      vec_t xr, xi, yr, yi;
      @(negedge clk);
      for (int f = 0; f < N_FFT; f++) begin
        for (int n = 0; n < MAXN; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
        for (int n = 0; n < N; n++) begin
          int a, c;
          a = rand_s(IW);
          c = rand_s(IW);
          x_re[f][n] = IW'(a);
          x_im[f][n] = IW'(c);
          xr[n] = real'(a);
          xi[n] = real'(c);
        end
        dft(N, xr, xi, yr, yi);
        for (int n = 0; n < N; n++) begin
          er[fr][f][n] = yr[n];
          ei[fr][f][n] = yi[n];
        end
      end
      for (int f = 0; f <= N_FFT; f++)
        for (int n = 0; n < N; n++) begin
          ps_fault_re[f][n] = '0; ps_fault_im[f][n] = '0;
          pse_fault_re[f][n] = '0; pse_fault_im[f][n] = '0;
        end
      if (fr % 2 == 1) bitpos[fr] = -1;
      else begin
        int f, n, b;
        b = (fr / 2) % OW;
        f = int'($urandom % N_FFT);
        n = int'($urandom % N);
        bitpos[fr] = b;
        if ($urandom % 2 == 0) begin
          ps_fault_re[f][n] = PW'(1) << b;
          pse_fault_re[f][n] = PW'(1) << b;
        end else begin
          ps_fault_im[f][n] = PW'(1) << b;
          pse_fault_im[f][n] = PW'(1) << b;
        end
      end
      in_valid = 1'b1;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (n_recv != TOTAL) begin
      failures++;
      $display("%0d of %0d frames came out", n_recv, TOTAL);
    end
    $display("bit | Parity-SOS: corrected masked flagged silent wrong | Parity-SOS-ECC: corrected masked flagged silent wrong");
    for (int b = 0; b < OW; b++)
      $display("%3d | %4d %4d %4d %4d %4d | %4d %4d %4d %4d %4d", b,
               cnt[0][b][0], cnt[0][b][1], cnt[0][b][2], cnt[0][b][3], cnt[0][b][4],
               cnt[1][b][0], cnt[1][b][1], cnt[1][b][2], cnt[1][b][3], cnt[1][b][4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
