// tb_booth_decoder: every 8-bit y with every digit in {-2..2}. The expected
// 9-bit row is digit*y in two's complement minus neg (the ones' complement
// form), i.e. pp + neg must equal digit*y modulo 2^9.
module tb_booth_decoder;
  import booth_pkg::*;
  logic [7:0]   y;
  booth_digit_t dig;
  logic [8:0]   pp;
  int checks = 0, failures = 0;

  booth_decoder dut (.y(y), .dig(dig), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++) begin
      for (int v = 0; v < 256; v++) begin
        int ys;
        y = 8'(v);
        dig.neg = (d < 0);
        dig.one = (d == 1 || d == -1);
        dig.two = (d == 2 || d == -2);
        #1;
        ys = int'($signed(y));
        checks++;
        if (9'(int'(pp) + int'(dig.neg)) != 9'(d * ys)) begin
          failures++;
          $display("FAIL y=%0d d=%0d pp=%h", ys, d, pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
