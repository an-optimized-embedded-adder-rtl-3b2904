// tb_fir4_lowpass: the filter used as a 4-tap low-pass filter. The
// coefficients (32, 96, 96, 32) are an example symmetric low-pass set chosen
// for this test, with a DC gain of 256 and a zero at half the sample rate.
// After the four-sample start-up, a constant input x must give 256*x, and an
// input alternating between +A and -A must give exactly 0. A two-tone input
// (DC plus the alternating tone) must keep only the DC part. Every output is
// also compared with the direct-form sum.
module tb_fir4_lowpass;
  logic        clk = 0, rst_n = 0;
  logic [7:0]  x_in;
  logic [7:0]  h [4];
  logic [17:0] y_out;
  int          hist [4];
  int checks = 0, failures = 0;
  int n_dc = 0, n_null = 0;

  fir4 dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .h(h), .y_out(y_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one sample; after start-up, compare with the expected steady-state
  // value when one is given.
  task automatic step(int xs, bit steady, int expect_y);
    int acc;
    @(negedge clk);
    x_in = 8'(xs);
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xs;
    #1;
    acc = 0;
    for (int k = 0; k < 4; k++) acc += int'($signed(h[k])) * hist[k];
    checks++;
    if ($signed(y_out) != 18'(acc)) begin
      failures++; $display("FAIL x=%0d y=%0d model=%0d", xs, $signed(y_out), acc);
    end
    if (steady) begin
      checks++;
      if ($signed(y_out) != 18'(expect_y)) begin
        failures++; $display("FAIL steady x=%0d y=%0d expected %0d", xs, $signed(y_out), expect_y);
      end
      if (expect_y == 0) n_null++; else n_dc++;
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) hist[k] = 0;
    x_in = '0;
    h = '{8'd32, 8'd96, 8'd96, 8'd32};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // DC levels, including the extremes.
    for (int lvl = -128; lvl <= 127; lvl += 17) begin
      for (int n = 0; n < 8; n++) step(lvl, n >= 3, 256 * lvl);
    end
    for (int n = 0; n < 8; n++) step(-128, n >= 3, -32768);
    // Tone at half the sample rate: rejected completely.
    for (int a = 1; a <= 127; a += 21) begin
      for (int n = 0; n < 12; n++) step((n % 2) ? a : -a, n >= 3, 0);
    end
    // DC plus the tone: only the DC part remains.
    for (int n = 0; n < 20; n++) step((n % 2) ? 40 + 50 : 40 - 50, n >= 3, 256 * 40);
    if (n_dc == 0 || n_null == 0) begin
      failures++; $display("FAIL: pass band or stop band never checked");
    end
    $display("pass-band checks=%0d stop-band checks=%0d", n_dc, n_null);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
