// tb_wallace_tree: random partial products and neg bits. The two output rows
// must add up, modulo 2^16, to the sum of the sign-extended rows weighted by
// 4^i plus the neg bits weighted by 4^i.
module tb_wallace_tree;
  import booth_pkg::*;
  logic [8:0]  pp [4];
  logic [3:0]  neg;
  logic [15:0] row_s, row_c;
  int checks = 0, failures = 0;

  wallace_tree dut (.pp(pp), .neg(neg), .row_s(row_s), .row_c(row_c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int acc;
      for (int i = 0; i < 4; i++) pp[i] = 9'($urandom);
      neg = 4'($urandom);
      if (n == 0) begin
        for (int i = 0; i < 4; i++) pp[i] = '1;
        neg = '1;
      end
      #1;
      acc = 0;
      for (int i = 0; i < 4; i++)
        acc += (int'($signed(pp[i])) + int'(neg[i])) * (4 ** i);
      checks++;
      if (16'(int'(row_s) + int'(row_c)) != 16'(acc)) begin
        failures++;
        if (failures < 10) $display("FAIL expected %h got %h + %h", 16'(acc), row_s, row_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
