// tb_pro_fa: exhaustive check of the one-bit full adder against integer
// addition: {carry, sum} = a + b + cin and f = a xor b for all 8 inputs.
module tb_pro_fa;
  logic a, b, cin, sum, carry, f;
  int checks = 0, failures = 0;

  pro_fa dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry), .f(f));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b) + int'(cin)) || f != (a != b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> carry=%0d sum=%0d f=%0d", a, b, cin, carry, sum, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
