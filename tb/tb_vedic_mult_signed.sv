// tb_vedic_mult_signed: all 65536 pairs of signed 8-bit operands, including
// the most negative value -128 on either side, compared with signed integer
// multiplication.
module tb_vedic_mult_signed;
  logic signed [7:0]  x, y;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  vedic_mult_signed dut (.x(x), .y(y), .p(p));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        x = 8'(i);
        y = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
