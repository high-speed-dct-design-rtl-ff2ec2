// tb_compressor42: exhaustive check of the 4:2 compressor cell.
// For all 32 input combinations it checks the weighted identity
// a+b+cin+d+e == sum + 2*(cout1+cout2), and that the first adder's outputs
// (sum1, cout1) are the sum and carry of a, b, cin alone.
module tb_compressor42;
  logic a, b, cin, d, e, sum1, sum, cout1, cout2;
  int   checks = 0, failures = 0;

  compressor42 dut (.a(a), .b(b), .cin(cin), .d(d), .e(e),
                    .sum1(sum1), .sum(sum), .cout1(cout1), .cout2(cout2));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, first;
    for (int v = 0; v < 32; v++) begin
      {a, b, cin, d, e} = 5'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin) + int'(d) + int'(e);
      first = int'(a) + int'(b) + int'(cin);
      checks++;
      if (int'(sum) + 2 * (int'(cout1) + int'(cout2)) != total) begin
        failures++;
        $display("FAIL total v=%b: sum=%0d cout1=%0d cout2=%0d", v[4:0], sum, cout1, cout2);
      end
      checks++;
      if ({cout1, sum1} != 2'(first)) begin
        failures++;
        $display("FAIL first stage v=%b: cout1=%0d sum1=%0d", v[4:0], cout1, sum1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
