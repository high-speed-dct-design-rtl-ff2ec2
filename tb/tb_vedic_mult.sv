// tb_vedic_mult: checks the Urdhva-Tiryak multiplier against integer
// multiplication.
//  * W = 8 (the default): all 65536 operand pairs.
//  * W = 4 (the four-bit worked form): all 256 pairs, plus the decimal
//    example of the method, 12 x 13 = 156.
//  * W = 11: 20000 random pairs, to exercise a deeper compression tree.
module tb_vedic_mult;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [10:0] a11, b11;
  logic [21:0] p11;
  int checks = 0, failures = 0;

  vedic_mult              dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult #(.W(4))     dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mult #(.W(11))    dut11 (.a(a11), .b(b11), .p(p11));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (p8 != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 %0d*%0d got %0d", i, j, p8);
        end
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (p4 != 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL W=4 %0d*%0d got %0d", i, j, p4);
        end
      end
    end
    a4 = 4'd12; b4 = 4'd13; #1;
    checks++;
    if (p4 != 8'd156) begin
      failures++;
      $display("FAIL 12*13 got %0d", p4);
    end
    for (int n = 0; n < 20000; n++) begin
      a11 = 11'($urandom);
      b11 = 11'($urandom);
      if (n == 0) begin a11 = '1; b11 = '1; end
      #1;
      checks++;
      if (p11 != 22'(longint'(a11) * longint'(b11))) begin
        failures++;
        if (failures < 10) $display("FAIL W=11 %0d*%0d got %0d", a11, b11, p11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
