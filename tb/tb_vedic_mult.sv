// Testbench of vedic_mult: a 16-bit and a 5-bit multiplier are compared with
// the * operator; the 5-bit one exhaustively, the 16-bit one on corner and
// random operands.
module tb_vedic_mult;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  int checks = 0, failures = 0;

  vedic_mult #(.W(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mult #(.W(5))  dut5  (.a(a5),  .b(b5),  .p(p5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(logic [15:0] x, logic [15:0] y);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      $display("16b: %0d * %0d = %0d, got %0d", x, y, 32'(x) * 32'(y), p16);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i);
        b5 = 5'(j);
        #1;
        checks++;
        if (p5 !== 10'(i * j)) begin
          failures++;
          $display("5b: %0d * %0d, got %0d", i, j, p5);
        end
      end
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h8000, 16'h8000);
    check16(16'h0000, 16'hFFFF);
    check16(16'h00FF, 16'hFF00);
    for (int i = 0; i < 5000; i++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
