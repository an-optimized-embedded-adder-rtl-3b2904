// tb_bec: exhaustive check of the binary to excess-1 converter, x = b + 1
// modulo 2^N, for N = 5 and N = 3.
module tb_bec;
  logic [4:0] b, x;
  logic [2:0] b3, x3;
  int checks = 0, failures = 0;

  bec dut (.b(b), .x(x));
  bec #(.N(3)) dut3 (.b(b3), .x(x3));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      b = 5'(v); b3 = 3'(v);
      #1;
      checks += 2;
      if (x != 5'(v + 1)) begin failures++; $display("FAIL b=%0d x=%0d", b, x); end
      if (x3 != 3'(v + 1)) begin failures++; $display("FAIL3 b=%0d x=%0d", b3, x3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
