// Testbench of fft_core: random and extreme frames are sent back to back and
// every spectrum is compared with a real-valued DFT; the output must appear
// exactly one cycle after its frame. A fault mask must flip exactly the
// selected output bits.
module tb_fft_core;
  import fft_tb_pkg::*;

  localparam int N  = 8;
  localparam int IW = 12;
  localparam int OW = IW + $clog2(N) + 1;
  localparam real TOL = 1.5;   // LSB: rounding of the twiddle products
  localparam int FRAMES = 300;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IW-1:0] x_re [N], x_im [N];
  logic [OW-1:0] f_re [N], f_im [N];
  logic out_valid;
  logic signed [OW-1:0] y_re [N], y_im [N];

  fft_core #(.N(N), .IW(IW), .TW_F(14)) dut (.*, .fault_re(f_re), .fault_im(f_im));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vec_t rr [FRAMES], ri [FRAMES];
  int   fmask_q [FRAMES];   // index of flipped bit per frame (-1: none), flipped in bin 3 real part
  int   cyc = 0, sent_cyc [FRAMES];
  int   n_sent = 0, n_recv = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int mode);
    vec_t xr, xi, yr, yi;
    int fb;
    for (int n = 0; n < MAXN; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
    for (int n = 0; n < N; n++) begin
      int a, b;
      case (mode)
        0: begin a = rand_s(IW); b = rand_s(IW); end
        1: begin a = -(1 << (IW - 1)); b = -(1 << (IW - 1)); end          // largest negative
        2: begin a = (n % 2) ? -(1 << (IW - 1)) : (1 << (IW - 1)) - 1; b = 0; end
        default: begin a = (n == 0) ? 100 : 0; b = 0; end             // impulse
      endcase
      x_re[n] = IW'(a);
      x_im[n] = IW'(b);
      xr[n] = real'(a);
      xi[n] = real'(b);
    end
    fb = ($urandom % 4 == 0) ? int'($urandom % OW) : -1;
    for (int n = 0; n < N; n++) begin
      f_re[n] = '0;
      f_im[n] = '0;
    end
    if (fb >= 0) f_re[3] = OW'(1) << fb;
    dft(N, xr, xi, yr, yi);
    rr[n_sent] = yr;
    ri[n_sent] = yi;
    fmask_q[n_sent] = fb;
    sent_cyc[n_sent] = cyc;
    n_sent++;
    in_valid = 1'b1;
  endtask

  // Checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      vec_t er, ei;
      int fb, sc;
      er = rr[n_recv];
      ei = ri[n_recv];
      fb = fmask_q[n_recv];
      sc = sent_cyc[n_recv];
      n_recv++;
      checks++;
      if (cyc - sc != 1) begin
        failures++;
        $display("latency %0d, expected 1", cyc - sc);
      end
      for (int n = 0; n < N; n++) begin
        logic signed [OW-1:0] gr;
        gr = y_re[n];
        if (n == 3 && fb >= 0) gr = gr ^ (OW'(1) << fb);   // undo the injected flip
        checks += 2;
        if (absr(real'(gr) - er[n]) > TOL || absr(real'(y_im[n]) - ei[n]) > TOL) begin
          failures++;
          $display("bin %0d: got %0d,%0d expected %f,%f", n, gr, y_im[n], er[n], ei[n]);
        end
        if (n == 3 && fb >= 0) begin
          checks++;
          if (absr(real'(y_re[n]) - er[n]) <= TOL && fb > 1) begin
            failures++;
            $display("injected flip of bit %0d not visible", fb);
          end
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      x_re[n] = '0; x_im[n] = '0; f_re[n] = '0; f_im[n] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < FRAMES; i++) begin
      @(negedge clk);
      send(i < 4 ? i : 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    if (n_recv != FRAMES) begin
      failures++;
      $display("%0d frames never came out", FRAMES - n_recv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
