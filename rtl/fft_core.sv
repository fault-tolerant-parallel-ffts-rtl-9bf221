// N-point radix-2 decimation-in-time FFT that takes a whole frame per clock.
//
// One instance is one of the parallel FFT units, or the parity FFT that
// transforms the sum of their inputs. The frame x[0..N-1] enters in parallel;
// log2(N) butterfly stages are unrolled as combinational logic and the
// spectrum X[0..N-1] is registered, so the unit accepts a new frame every
// cycle and its latency is one cycle.
//
// Arithmetic: the input is sign-extended to OW = IW + log2(N) + 1 bits, which
// holds the largest possible output (|X| <= N * sqrt(2) * max|x|), so nothing
// is scaled or saturated. Multiplications by 1 and by -j are plain wiring. The
// other twiddle factors exp(-2*pi*j*k/N) are rounded to TW_F fractional bits,
// computed at elaboration, and each product is rounded back to an integer.
// These roundings are why the Parseval check needs a tolerance.
//
// Soft-error model: fault_re/fault_im are XOR masks applied to the output
// register when the frame is captured. They model an upset in this unit and
// are used to inject faults; tie them to zero in normal use.
//
// The FFT architecture, sizes and fault port are this design's own choices;
// the protection schemes only need a linear N-point DFT.
//
// Interface: in_valid with x_re/x_im (cycle t) -> out_valid with y_re/y_im
// (cycle t+1). Synchronous active-low reset clears out_valid and the outputs.
module fft_core #(
  parameter int N    = 8,
  parameter int IW   = 12,
  parameter int TW_F = 14,
  localparam int LOG2N = $clog2(N),
  localparam int OW    = IW + LOG2N + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x_re [N],
  input  logic signed [IW-1:0] x_im [N],
  input  logic        [OW-1:0] fault_re [N],
  input  logic        [OW-1:0] fault_im [N],
  output logic                 out_valid,
  output logic signed [OW-1:0] y_re [N],
  output logic signed [OW-1:0] y_im [N]
);

  localparam real PI = 3.14159265358979323846;
  localparam int  PW = OW + TW_F + 2;  // product width before rounding

  function automatic int bit_rev(int v);
    int r = 0;
    for (int b = 0; b < LOG2N; b++) if (v[b]) r |= 1 << (LOG2N - 1 - b);
    return r;
  endfunction

  typedef int tw_tab_t [N/2];

  // Twiddle table: W^k = exp(-2*pi*j*k/N) rounded to TW_F fractional bits.
  function automatic tw_tab_t tw_table(bit imag);
    tw_tab_t t;
    for (int k = 0; k < N / 2; k++) begin
      real a = 2.0 * PI * k / N;
      t[k] = $rtoi($floor((imag ? -$sin(a) : $cos(a)) * (2.0 ** TW_F) + 0.5));
    end
    return t;
  endfunction

  localparam tw_tab_t WR = tw_table(1'b0);
  localparam tw_tab_t WI = tw_table(1'b1);

  logic signed [OW-1:0] fr [N];  // spectrum before the output register
  logic signed [OW-1:0] fi [N];

  always_comb begin
    logic signed [OW-1:0] ar [N];
    logic signed [OW-1:0] ai [N];
    logic signed [OW-1:0] tr, ti;
    logic signed [PW-1:0] pr, pi;
    int half, i0, i1, tw;
    for (int n = 0; n < N; n++) begin
      ar[n] = OW'(x_re[bit_rev(n)]);
      ai[n] = OW'(x_im[bit_rev(n)]);
    end
    for (int s = 1; s <= LOG2N; s++) begin
      half = 1 << (s - 1);
      for (int k = 0; k < N / 2; k++) begin
        i0 = (k / half) * 2 * half + (k % half);
        i1 = i0 + half;
        tw = (k % half) * (N >> s);
        if (tw == 0) begin                 // W = 1
          tr = ar[i1];
          ti = ai[i1];
        end else if (4 * tw == N) begin    // W = -j
          tr = ai[i1];
          ti = -ar[i1];
        end else begin                     // general twiddle, rounded product
          pr = PW'(ar[i1]) * PW'(WR[tw]) - PW'(ai[i1]) * PW'(WI[tw]) + (PW'(1) <<< (TW_F - 1));
          pi = PW'(ar[i1]) * PW'(WI[tw]) + PW'(ai[i1]) * PW'(WR[tw]) + (PW'(1) <<< (TW_F - 1));
          tr = OW'(pr >>> TW_F);
          ti = OW'(pi >>> TW_F);
        end
        {ar[i0], ar[i1]} = {ar[i0] + tr, ar[i0] - tr};
        {ai[i0], ai[i1]} = {ai[i0] + ti, ai[i0] - ti};
      end
    end
    fr = ar;
    fi = ai;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int n = 0; n < N; n++) begin
        y_re[n] <= '0;
        y_im[n] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int n = 0; n < N; n++) begin
          y_re[n] <= fr[n] ^ fault_re[n];
          y_im[n] <= fi[n] ^ fault_im[n];
        end
      end
    end
  end

endmodule
