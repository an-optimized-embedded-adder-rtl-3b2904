// tb_rca: exhaustive check of the 4-bit ripple carry adder (all x, y, cin)
// and a random check of an 11-bit instance.
module tb_rca;
  logic [3:0]  x, y, s;
  logic        cin, cout;
  logic [10:0] xw, yw, sw;
  logic        cinw, coutw;
  int checks = 0, failures = 0;

  rca dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));
  rca #(.N(11)) dutw (.x(xw), .y(yw), .cin(cinw), .s(sw), .cout(coutw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, x, y} = 9'(v);
      #1;
      checks++;
      if ({cout, s} != 5'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", x, y, cin, {cout, s});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      xw = 11'($urandom); yw = 11'($urandom); cinw = 1'($urandom);
      #1;
      checks++;
      if ({coutw, sw} != 12'(int'(xw) + int'(yw) + int'(cinw))) begin
        failures++;
        $display("FAIL wide %0d+%0d+%0d -> %0d", xw, yw, cinw, {coutw, sw});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
