// tb_tg_dff: an asynchronous reset between clock edges clears the register; afterwards q equals the d of the
// previous rising edge.
module tb_tg_dff;
  logic        clk = 0, rst_n = 1;
  logic [17:0] d, q, prev;
  int checks = 0, failures = 0;

  tg_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    #2;
    rst_n = 0;   // asynchronous: takes effect without a clock edge
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset q=%h", q); end
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      d = 18'($urandom);
      prev = d;
      @(negedge clk);
      checks++;
      if (q != prev) begin failures++; $display("FAIL q=%h expected %h", q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
