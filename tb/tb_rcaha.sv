// tb_rcaha: exhaustive check of the 4-bit carry-in-zero ripple adder and of
// the 2- and 5-bit sizes used by the square-root adder.
module tb_rcaha;
  logic [3:0] x, y, s;
  logic       cout;
  logic [1:0] x2, y2, s2;
  logic       c2;
  logic [4:0] x5, y5, s5;
  logic       c5;
  int checks = 0, failures = 0;

  rcaha dut (.x(x), .y(y), .s(s), .cout(cout));
  rcaha #(.N(2)) dut2 (.x(x2), .y(y2), .s(s2), .cout(c2));
  rcaha #(.N(5)) dut5 (.x(x5), .y(y5), .s(s5), .cout(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      x = x5[3:0]; y = y5[3:0]; x2 = x5[1:0]; y2 = y5[1:0];
      #1;
      checks += 3;
      if ({cout, s} != 5'(int'(x) + int'(y))) begin
        failures++; $display("FAIL4 %0d+%0d -> %0d", x, y, {cout, s});
      end
      if ({c2, s2} != 3'(int'(x2) + int'(y2))) begin
        failures++; $display("FAIL2 %0d+%0d -> %0d", x2, y2, {c2, s2});
      end
      if ({c5, s5} != 6'(int'(x5) + int'(y5))) begin
        failures++; $display("FAIL5 %0d+%0d -> %0d", x5, y5, {c5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
