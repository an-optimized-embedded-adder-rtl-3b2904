// tb_fir4: the 4-tap transposed FIR filter against a direct-form model.
// Phase 1: an impulse must return h0, h1, h2, h3 on four consecutive cycles
// (one tap per clock, output in the same cycle as the input). Phase 2:
// random samples with several random coefficient sets, including -128 and
// 127, compared every cycle with y[n] = sum h_k x[n-k]. A reset in the
// middle must clear the filter's memory.
module tb_fir4;
  logic              clk = 0, rst_n = 0;
  logic [7:0]        x_in;
  logic [7:0]        h [4];
  logic [17:0]       y_out;
  int                hist [4];   // x[n], x[n-1], x[n-2], x[n-3]
  int                hh [4][4];  // hh[j][k]: coefficient k in force at sample n-j
  int checks = 0, failures = 0;

  fir4 dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .h(h), .y_out(y_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model();
    int acc = 0;
    // Transposed form: tap k of sample n-k was weighted when that sample
    // entered, with the coefficients then in force.
    for (int k = 0; k < 4; k++) acc += hh[k][k] * hist[k];
    return acc;
  endfunction

  // Drive a sample after the falling edge, check, then let the rising edge
  // take it into the filter.
  task automatic step(logic [7:0] xs);
    @(negedge clk);
    x_in = xs;
    for (int k = 3; k > 0; k--) begin
      hist[k] = hist[k-1];
      for (int j = 0; j < 4; j++) hh[k][j] = hh[k-1][j];
    end
    for (int k = 0; k < 4; k++) hh[0][k] = int'($signed(h[k]));
    hist[0] = int'($signed(xs));
    #1;
    checks++;
    if ($signed(y_out) != 18'(model())) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", $signed(xs), $signed(y_out), model());
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      hist[k] = 0;
      for (int j = 0; j < 4; j++) hh[k][j] = 0;
    end
    x_in = '0;
    h = '{8'd17, -8'sd45, 8'd99, -8'sd128};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Impulse response, one coefficient per clock.
    step(8'd1);
    if ($signed(y_out) != 18'($signed(h[0]))) failures++;
    checks++;
    for (int k = 1; k < 4; k++) begin
      step(8'd0);
      checks++;
      if ($signed(y_out) != 18'($signed(h[k]))) begin
        failures++; $display("FAIL impulse tap %0d y=%0d", k, $signed(y_out));
      end
    end
    for (int set = 0; set < 20; set++) begin
      @(posedge clk);  // the previous sample has been taken in
      #1;
      for (int k = 0; k < 4; k++) h[k] = 8'($urandom);
      if (set == 1) h = '{-8'sd128, -8'sd128, -8'sd128, -8'sd128};
      if (set == 2) h = '{8'd127, 8'd127, 8'd127, 8'd127};
      for (int n = 0; n < 200; n++)
        step((set < 3 && n % 2 == 0) ? 8'h80 : 8'($urandom));
      if (set == 10) begin
        @(negedge clk);
        rst_n = 0;
        x_in = 8'd0;  // the edge after reset then takes in a zero
        for (int k = 0; k < 4; k++) begin
          hist[k] = 0;
          for (int j = 0; j < 4; j++) hh[k][j] = 0;
        end
        @(posedge clk);  // hold reset across an edge
        #1;
        rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
