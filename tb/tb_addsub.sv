// tb_addsub: exhaustive check of the conditional inverter: y = b when
// cin = 0 and y = 15 - b (bitwise complement) when cin = 1.
module tb_addsub;
  logic       cin;
  logic [3:0] b, y;
  int checks = 0, failures = 0;

  addsub #(.N(4)) dut (.cin(cin), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, b} = 5'(v);
      #1;
      checks++;
      if (y != (cin ? 4'(15 - int'(b)) : b)) begin
        failures++;
        $display("FAIL cin=%0d b=%0d y=%0d", cin, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
