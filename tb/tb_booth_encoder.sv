// tb_booth_encoder: all eight 3-bit groups. The expected digit is
// -2*g[2] + g[1] + g[0]; the encoded lines must give the same value, with
// exactly one of one/two set for a non-zero digit and neg clear for zero.
module tb_booth_encoder;
  import booth_pkg::*;
  logic [2:0]   grp;
  booth_digit_t dig;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .dig(dig));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int expd, got;
      grp = 3'(v);
      #1;
      expd = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got  = (dig.one ? 1 : 0) + (dig.two ? 2 : 0);
      if (dig.neg) got = -got;
      checks++;
      if (got != expd || (dig.one && dig.two) || (expd == 0 && dig.neg)) begin
        failures++;
        $display("FAIL grp=%b neg=%0d one=%0d two=%0d expected %0d", grp, dig.neg, dig.one, dig.two, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
