// Testbench of syndrome_decoder: all eight check patterns against the
// location table (Hamming code over the four checked FFTs).
module tb_syndrome_decoder;
  import ft_fft_pkg::*;
  logic [2:0] c;
  err_loc_e   loc;
  logic       check_only;
  int checks = 0, failures = 0;

  syndrome_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err_loc_e exp_loc;
    logic     exp_co;
    for (int p = 0; p < 8; p++) begin
      // FFT f is a member of check c1 (f in 1,2,3), c2 (1,2,4), c3 (1,3,4).
      exp_loc = LOC_NONE;
      exp_co  = 1'b0;
      for (int f = 1; f <= 4; f++) begin
        logic [2:0] pat;
        pat = {f != 4, f != 3, f != 2};
        if (pat == 3'(p)) exp_loc = err_loc_e'(f);
      end
      if (p == 1 || p == 2 || p == 4) exp_co = 1'b1;
      c = 3'(p);
      #1;
      checks++;
      if (loc != exp_loc || check_only != exp_co) begin
        failures++;
        $display("pattern %b: loc %0d co %b, expected %0d %b", c, loc, check_only, exp_loc, exp_co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
