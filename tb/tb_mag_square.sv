// Testbench of mag_square: re^2 + im^2 of signed 16-bit parts, including the
// most negative value, against integer arithmetic.
module tb_mag_square;
  localparam int W = 16;
  logic signed [W-1:0] re, im;
  logic [2*W:0] mag2;
  int checks = 0, failures = 0;

  mag_square #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int r, int i);
    longint exp_v = longint'(r) * r + longint'(i) * i;
    re = W'(r);
    im = W'(i);
    #1;
    checks++;
    if (longint'(mag2) != exp_v) begin
      failures++;
      $display("|%0d + %0dj|^2 = %0d, got %0d", r, i, exp_v, mag2);
    end
  endtask

  initial begin
    check(-32768, -32768);
    check(32767, -32768);
    check(0, 0);
    check(-1, 1);
    for (int k = 0; k < 5000; k++)
      check(int'($urandom % 65536) - 32768, int'($urandom % 65536) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
