// Testbench of parity_sos_fft (the Parity-SOS scheme on its own), with the
// same traffic and fault kinds as the end-to-end test of the top level:
//
// Frame kinds:
//   NONE     no fault
//   FFT1..4  one large upset (bit 13 or 14) in one bin of FFT 1..4: both
//            schemes must locate and rebuild it. The bin and bit are chosen so
//            that every check that contains the FFT sees an energy change
//            of at least 4x its tolerance, whatever the sign of the flip.
//   PARITY   large upset in the parity FFT: nothing is checked or changed
//   SMALL    upset in bit 0 or 1: within tolerance, no check fires
//   DOUBLE   x1 = x3 = x4 = 0, x2 = -impulse, bit 13 of bin 0 flipped in
//            FFT 1 and FFT 2: the two changes cancel in checks c1 and c2 of
//            the ECC scheme, which must report a check-only pattern (001),
//            while the per-FFT scheme must report an uncorrectable frame.
// Each kind must occur at least once.
module tb_parity_sos_fft;
  import ft_fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int N = N_POINTS, IW = IN_W;
  localparam int OW = IW + $clog2(N) + 1, PW = OW + 2;
  localparam real TOL = 1.5, TOL_C = 6.0, TOL_S = 4.0;
  localparam real PS_T = real'(64'd1 << 20), PSE_T = real'(64'd1 << 23);
  localparam int FRAMES = 600;
  localparam int LAT = 3;
  localparam bit CHECK_PS = 1'b1, CHECK_PSE = 1'b0;   // which schemes the DUT holds

  typedef enum int {K_NONE, K_FFT1, K_FFT2, K_FFT3, K_FFT4, K_PARITY, K_SMALL, K_DOUBLE, K_NUM} kind_e;
  localparam logic [3:0] MEMBERS [3] = '{4'b0111, 4'b1011, 4'b1101};

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

  parity_sos_fft dut (
    .clk, .rst_n, .in_valid, .x_re, .x_im,
    .fault_re(ps_fault_re), .fault_im(ps_fault_im),
    .out_valid(ps_out_valid), .y_re(ps_y_re), .y_im(ps_y_im),
    .chk_fail(ps_chk_fail), .err_loc(ps_err_loc),
    .corrected(ps_corrected), .uncorrectable(ps_uncorrectable));
  // the other scheme is not present here
  assign pse_out_valid = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  real   er [FRAMES][N_FFT][N], ei [FRAMES][N_FFT][N];
  kind_e kind [FRAMES];
  int    sent_cyc [FRAMES];
  int    n_recv = 0;
  int    seen [K_NUM];

  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (FRAMES * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  function automatic logic clear_margin(real v, int b, real thr);
    // energy change of flipping bit b of a part whose value is v, either sign
    real d = real'(1 << b);
    return absr(2.0 * v * d + d * d) > 4.0 * thr && absr(-2.0 * v * d + d * d) > 4.0 * thr;
  endfunction

  task automatic clear_faults();
    for (int f = 0; f <= N_FFT; f++)
      for (int n = 0; n < N; n++) begin
        ps_fault_re[f][n] = '0; ps_fault_im[f][n] = '0;
        pse_fault_re[f][n] = '0; pse_fault_im[f][n] = '0;
      end
  endtask

  task automatic inject(int f, int n, logic im, int b);
    if (im) begin
      ps_fault_im[f][n] ^= PW'(1) << b;
      pse_fault_im[f][n] ^= PW'(1) << b;
    end else begin
      ps_fault_re[f][n] ^= PW'(1) << b;
      pse_fault_re[f][n] ^= PW'(1) << b;
    end
  endtask

  task automatic send(int fr, kind_e k);
    vec_t xr, xi, yr, yi;
    for (int f = 0; f < N_FFT; f++) begin
      for (int n = 0; n < MAXN; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
      for (int n = 0; n < N; n++) begin
        int a, b;
        a = rand_s(IW);
        b = rand_s(IW);
        if (k == K_DOUBLE) begin
          a = (f == 1 && n == 0) ? -1 : 0;
          b = 0;
        end
        x_re[f][n] = IW'(a);
        x_im[f][n] = IW'(b);
        xr[n] = real'(a);
        xi[n] = real'(b);
      end
      dft(N, xr, xi, yr, yi);
      for (int n = 0; n < N; n++) begin
        er[fr][f][n] = yr[n];
        ei[fr][f][n] = yi[n];
      end
    end
    clear_faults();
    case (k)
      K_FFT1, K_FFT2, K_FFT3, K_FFT4: begin
        int f, n, b;
        logic im, ok;
        f = int'(k) - 1;
        ok = 1'b0;
        for (int tries = 0; tries < 200 && !ok; tries++) begin
          n  = int'($urandom % N);
          im = 1'($urandom);
          b  = 13 + int'($urandom % 2);
          ok = clear_margin(im ? ei[fr][f][n] : er[fr][f][n], b, PS_T);
          for (int c = 0; c < 3; c++)
            if (MEMBERS[c][f]) begin
              real v = 0.0;
              for (int g = 0; g < N_FFT; g++)
                if (MEMBERS[c][g]) v += im ? ei[fr][g][n] : er[fr][g][n];
              ok &= clear_margin(v, b, PSE_T);
            end
        end
        if (!ok) k = K_NONE;
        else inject(f, n, im, b);
      end
      K_PARITY: inject(N_FFT, int'($urandom % N), 1'($urandom), 13 + int'($urandom % 3));
      K_SMALL:  inject(int'($urandom % N_FFT), int'($urandom % N), 1'($urandom), int'($urandom % 2));
      K_DOUBLE: begin
        inject(0, 0, 1'b0, 13);
        inject(1, 0, 1'b0, 13);
      end
      default: ;
    endcase
    kind[fr] = k;
    sent_cyc[fr] = cyc;
    in_valid = 1'b1;
  endtask

  // ---------------- checking ----------------
  function automatic logic near(logic signed [OW-1:0] v, real e, real tol);
    return absr(real'(v) - e) <= tol;
  endfunction

  always @(posedge clk) begin
    if (rst_n && ((CHECK_PS && ps_out_valid) || (CHECK_PSE && pse_out_valid))) begin
      int fr;
      kind_e k;
      logic [3:0] exp_fail;
      logic [2:0] exp_syn;
      err_loc_e   exp_loc;
      fr = n_recv;
      k  = kind[fr];
      n_recv++;
      checks++;
      if ((CHECK_PS && !ps_out_valid) || (CHECK_PSE && !pse_out_valid) || cyc - sent_cyc[fr] != LAT) begin
        failures++;
        $display("frame %0d: valid %b%b latency %0d", fr, ps_out_valid, pse_out_valid, cyc - sent_cyc[fr]);
      end
      exp_fail = '0;
      exp_syn  = '0;
      exp_loc  = LOC_NONE;
      if (k inside {K_FFT1, K_FFT2, K_FFT3, K_FFT4}) begin
        int f;
        f = int'(k) - 1;
        exp_fail = 4'(1 << f);
        exp_syn  = {MEMBERS[0][f], MEMBERS[1][f], MEMBERS[2][f]};
        exp_loc  = err_loc_e'(f + 1);
      end
      if (k == K_DOUBLE) begin
        exp_fail = 4'b0011;
        exp_syn  = 3'b001;
      end
      // error reports
      checks += 2;
      if (CHECK_PS && (ps_chk_fail != exp_fail || ps_err_loc != (k == K_DOUBLE ? LOC_UNCORR : exp_loc) ||
          ps_uncorrectable != (k == K_DOUBLE) || ps_corrected != (exp_loc != LOC_NONE))) begin
        failures++;
        $display("frame %0d kind %0d: Parity-SOS fail %b loc %0d corr %b unc %b", fr, k,
                 ps_chk_fail, ps_err_loc, ps_corrected, ps_uncorrectable);
      end
      if (CHECK_PSE && (pse_syndrome != exp_syn || pse_err_loc != exp_loc ||
          pse_check_only != (k == K_DOUBLE) || pse_corrected != (exp_loc != LOC_NONE))) begin
        failures++;
        $display("frame %0d kind %0d: Parity-SOS-ECC syn %b loc %0d corr %b co %b", fr, k,
                 pse_syndrome, pse_err_loc, pse_corrected, pse_check_only);
      end
      // data
      if (k != K_DOUBLE)
        for (int f = 0; f < N_FFT; f++)
          for (int n = 0; n < N; n++) begin
            real tol;
            tol = (exp_loc == err_loc_e'(f + 1)) ? TOL_C : (k == K_SMALL) ? TOL_S : TOL;
            checks += 2;
            if (CHECK_PS && (!near(ps_y_re[f][n], er[fr][f][n], tol) || !near(ps_y_im[f][n], ei[fr][f][n], tol))) begin
              failures++;
              $display("frame %0d kind %0d PS fft %0d bin %0d: %0d,%0d expected %f,%f", fr, k, f + 1, n,
                       ps_y_re[f][n], ps_y_im[f][n], er[fr][f][n], ei[fr][f][n]);
            end
            if (CHECK_PSE && (!near(pse_y_re[f][n], er[fr][f][n], tol) || !near(pse_y_im[f][n], ei[fr][f][n], tol))) begin
              failures++;
              $display("frame %0d kind %0d PSE fft %0d bin %0d: %0d,%0d expected %f,%f", fr, k, f + 1, n,
                       pse_y_re[f][n], pse_y_im[f][n], er[fr][f][n], ei[fr][f][n]);
            end
          end
      seen[k]++;
    end
  end

  initial begin
    for (int f = 0; f < N_FFT; f++)
      for (int n = 0; n < N; n++) begin x_re[f][n] = '0; x_im[f][n] = '0; end
    clear_faults();
    for (int k = 0; k < K_NUM; k++) seen[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      kind_e k;
      @(negedge clk);
      k = (fr < K_NUM) ? kind_e'(fr) : kind_e'($urandom % K_NUM);
      send(fr, k);
    end
    @(negedge clk) in_valid = 1'b0;
    clear_faults();
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_recv != FRAMES) begin
      failures++;
      $display("%0d of %0d frames came out", n_recv, FRAMES);
    end
    for (int k = 0; k < K_NUM; k++) begin
      checks++;
      $display("frame kind %0d occurred %0d times", k, seen[k]);
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
