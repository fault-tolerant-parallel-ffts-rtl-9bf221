// Testbench of fft_corrector: four spectra and their exact sum (the parity
// spectrum) are generated; the spectrum named by loc is replaced by garbage
// and must come out rebuilt exactly, the others unchanged, one cycle later.
// LOC_NONE and LOC_UNCORR must pass all four through, and a rebuilt value
// beyond the output range must saturate.
module tb_fft_corrector;
  import ft_fft_pkg::*;
  localparam int N = 8, OW = 16, PW = OW + 2;
  localparam int FRAMES = 400;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  err_loc_e loc;
  logic signed [OW-1:0] xr [N_FFT][N], xi [N_FFT][N];
  logic signed [PW-1:0] pr [N], pi [N];
  logic out_valid, corrected;
  logic signed [OW-1:0] yr [N_FFT][N], yi [N_FFT][N];

  fft_corrector #(.N(N), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int good_r [N_FFT][N], good_i [N_FFT][N];
  err_loc_e sent_loc;
  logic sat_case;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv;
    for (int f = 0; f < N_FFT; f++) for (int n = 0; n < N; n++) begin xr[f][n] = '0; xi[f][n] = '0; end
    for (int n = 0; n < N; n++) begin pr[n] = '0; pi[n] = '0; end
    loc = LOC_NONE;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      @(negedge clk);
      sat_case = (fr == FRAMES - 1);
      lv = int'($urandom % 6);
      sent_loc = (lv == 5) ? LOC_UNCORR : err_loc_e'(lv);
      if (sat_case) sent_loc = LOC_FFT2;
      for (int n = 0; n < N; n++) begin
        int sr, si;
        sr = 0;
        si = 0;
        for (int f = 0; f < N_FFT; f++) begin
          good_r[f][n] = sat_case ? 20000 : int'($urandom % 40000) - 20000;
          good_i[f][n] = sat_case ? -20000 : int'($urandom % 40000) - 20000;
          sr += good_r[f][n];
          si += good_i[f][n];
          xr[f][n] = OW'(good_r[f][n]);
          xi[f][n] = OW'(good_i[f][n]);
        end
        if (sat_case) begin   // parity implies X2 = 60000, -60000: out of range
          sr += 40000;
          si -= 40000;
        end
        pr[n] = PW'(sr);
        pi[n] = PW'(si);
        if (sent_loc inside {LOC_FFT1, LOC_FFT2, LOC_FFT3, LOC_FFT4}) begin
          xr[int'(sent_loc) - 1][n] = OW'($urandom);
          xi[int'(sent_loc) - 1][n] = OW'($urandom);
        end
      end
      loc = sent_loc;
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || corrected != (sent_loc inside {LOC_FFT1, LOC_FFT2, LOC_FFT3, LOC_FFT4})) begin
        failures++;
        $display("frame %0d: out_valid %b corrected %b loc %0d", fr, out_valid, corrected, sent_loc);
      end
      for (int f = 0; f < N_FFT; f++)
        for (int n = 0; n < N; n++) begin
          int er, ei;
          er = good_r[f][n];
          ei = good_i[f][n];
          if (sat_case && f == 1) begin er = 32767; ei = -32768; end
          else if (sent_loc == LOC_UNCORR || sent_loc == LOC_NONE) begin
            er = int'(xr[f][n]);
            ei = int'(xi[f][n]);
          end
          checks++;
          if (int'(yr[f][n]) != er || int'(yi[f][n]) != ei) begin
            failures++;
            $display("frame %0d fft %0d bin %0d: got %0d,%0d expected %0d,%0d", fr, f + 1, n,
                     yr[f][n], yi[f][n], er, ei);
          end
        end
    end
    @(negedge clk) in_valid = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
