// Testbench of sos_check. Frames are sent back to back: the time-domain
// frame at cycle t and, one cycle later, its spectrum from a real-valued DFT
// rounded to integers, optionally disturbed in one bin. The test checks both
// energies exactly, that an undisturbed or slightly disturbed spectrum
// passes, that a large disturbance is flagged, and that results arrive two
// cycles after the frame.
module tb_sos_check;
  import fft_tb_pkg::*;
  localparam int N = 8, TW = 12, FW = 16;
  localparam longint unsigned THRESH = 64'd1 << 20;
  localparam int FRAMES = 400;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [TW-1:0] x_re [N], x_im [N];
  logic signed [FW-1:0] y_re [N], y_im [N];
  logic chk_valid, err;
  logic [2*TW+1+$clog2(N)-1:0] e_time;
  logic [2*FW+1+$clog2(N)-1:0] e_freq;

  sos_check #(.N(N), .TW(TW), .FW(FW), .THRESH(THRESH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int yr_q [FRAMES+1][N], yi_q [FRAMES+1][N];
  longint et_q [FRAMES], ef_q [FRAMES];
  logic exp_err [FRAMES];
  int cyc = 0, sent_cyc [FRAMES];
  int n_sent = 0, n_recv = 0, n_flagged = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && chk_valid) begin
      checks += 4;
      if (cyc - sent_cyc[n_recv] != 2) begin
        failures++;
        $display("frame %0d: latency %0d", n_recv, cyc - sent_cyc[n_recv]);
      end
      if (longint'(e_time) != et_q[n_recv] || longint'(e_freq) != ef_q[n_recv]) begin
        failures++;
        $display("frame %0d: energies %0d %0d expected %0d %0d", n_recv, e_time, e_freq,
                 et_q[n_recv], ef_q[n_recv]);
      end
      if (err != exp_err[n_recv]) begin
        failures++;
        $display("frame %0d: err %b expected %b", n_recv, err, exp_err[n_recv]);
      end
      n_flagged += int'(err);
      n_recv++;
    end
  end

  initial begin
    vec_t xr, xi, yr, yi;
    for (int n = 0; n < N; n++) begin x_re[n] = '0; x_im[n] = '0; y_re[n] = '0; y_im[n] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr <= FRAMES; fr++) begin
      @(negedge clk);
      // spectrum of the previous frame
      if (fr > 0)
        for (int n = 0; n < N; n++) begin
          y_re[n] = FW'(yr_q[fr-1][n]);
          y_im[n] = FW'(yi_q[fr-1][n]);
        end
      if (fr == FRAMES) begin
        in_valid = 1'b0;
        break;
      end
      for (int n = 0; n < MAXN; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
      et_q[fr] = 0;
      for (int n = 0; n < N; n++) begin
        int a, b;
        a = rand_s(TW);
        b = rand_s(TW);
        x_re[n] = TW'(a);
        x_im[n] = TW'(b);
        xr[n] = real'(a);
        xi[n] = real'(b);
        et_q[fr] += longint'(a) * a + longint'(b) * b;
      end
      dft(N, xr, xi, yr, yi);
      ef_q[fr] = 0;
      for (int n = 0; n < N; n++) begin
        yr_q[fr][n] = $rtoi($floor(yr[n] + 0.5));
        yi_q[fr][n] = $rtoi($floor(yi[n] + 0.5));
      end
      case (fr % 3)
        1: yr_q[fr][fr % N] += 1;                 // within tolerance
        2: yi_q[fr][fr % N] += ((fr % 2) != 0) ? 12000 : -12000;   // upset
        default: ;
      endcase
      for (int n = 0; n < N; n++)
        ef_q[fr] += longint'(yr_q[fr][n]) * yr_q[fr][n] + longint'(yi_q[fr][n]) * yi_q[fr][n];
      begin
        longint d;
        d = ef_q[fr] - N * et_q[fr];
        if (d < 0) d = -d;
        exp_err[fr] = d > longint'(THRESH);
      end
      // the spec rounding alone must stay within tolerance
      if (fr % 3 == 0) begin
        checks++;
        if (exp_err[fr]) begin failures++; $display("reference rounding beyond tolerance"); end
      end
      sent_cyc[fr] = cyc;
      in_valid = 1'b1;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (n_recv != FRAMES || n_flagged == 0) begin
      failures++;
      $display("received %0d of %0d frames, %0d flagged", n_recv, FRAMES, n_flagged);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
