// tb_dsp_top: end-to-end test of the top at its default sizes (16-bit carry
// select adders, 18-bit filter sums). The filter is driven with random
// samples and coefficient sets and compared each cycle with a direct-form
// model; the linear and square-root adders get random additions and
// subtractions plus corner cases each cycle. It counts, and requires at
// least once each: additions, subtractions, a carry out, a borrow, a group
// carry selecting the excess-1 path in each adder, every Booth digit value
// -2..+2 in the coefficients, a filter output that needs more than 16 bits,
// and a filter reset.
module tb_dsp_top;
  logic        clk = 0, rst_n = 0;
  logic [7:0]  fir_x;
  logic [7:0]  fir_h [4];
  logic [17:0] fir_y;
  logic [15:0] lin_x, lin_b, lin_s, sq_x, sq_b, sq_s;
  logic        lin_cin, lin_carry, sq_cin, sq_carry;
  int hist [4];
  int hh [4][4];   // hh[j][k]: coefficient k in force at sample n-j
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_cout = 0, n_borrow = 0, n_sel_lin = 0, n_sel_sq = 0;
  int n_big = 0, n_reset = 0;
  int n_digit [5];   // Booth digits -2..2 seen in the coefficients

  dsp_top dut (
    .clk(clk), .rst_n(rst_n), .fir_x(fir_x), .fir_h(fir_h), .fir_y(fir_y),
    .lin_x(lin_x), .lin_b(lin_b), .lin_cin(lin_cin), .lin_s(lin_s), .lin_carry(lin_carry),
    .sq_x(sq_x), .sq_b(sq_b), .sq_cin(sq_cin), .sq_s(sq_s), .sq_carry(sq_carry)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic logic [16:0] ref_add(logic [15:0] a, logic [15:0] b, logic c);
    return {1'b0, a} + {1'b0, c ? ~b : b} + 17'(c);
  endfunction

  // Booth digits of a coefficient, from the recoding rule itself.
  task automatic count_digits(logic [7:0] c);
    logic [8:0] ce = {c, 1'b0};
    for (int i = 0; i < 4; i++) begin
      int d = -2 * int'(ce[2*i+2]) + int'(ce[2*i+1]) + int'(ce[2*i]);
      n_digit[d + 2]++;
    end
  endtask

  task automatic check_adders();
    logic [16:0] r;
    logic [4:0]  g;
    r = ref_add(lin_x, lin_b, lin_cin);
    checks++;
    if ({lin_carry, lin_s} != r) begin
      failures++; $display("FAIL lin x=%h b=%h cin=%0d", lin_x, lin_b, lin_cin);
    end
    g = {1'b0, lin_x[3:0]} + {1'b0, lin_cin ? ~lin_b[3:0] : lin_b[3:0]} + 5'(lin_cin);
    if (g[4]) n_sel_lin++;
    if (lin_cin) n_sub++; else n_add++;
    if (r[16] && !lin_cin) n_cout++;
    if (!r[16] && lin_cin) n_borrow++;
    r = ref_add(sq_x, sq_b, sq_cin);
    checks++;
    if ({sq_carry, sq_s} != r) begin
      failures++; $display("FAIL sqrt x=%h b=%h cin=%0d", sq_x, sq_b, sq_cin);
    end
    g = 5'({1'b0, sq_x[1:0]} + {1'b0, sq_cin ? ~sq_b[1:0] : sq_b[1:0]} + 3'(sq_cin));
    if (g[2]) n_sel_sq++;
    if (sq_cin) n_sub++; else n_add++;
  endtask

  task automatic step(logic [7:0] xs);
    int m;
    @(negedge clk);
    fir_x = xs;
    for (int k = 3; k > 0; k--) begin
      hist[k] = hist[k-1];
      for (int j = 0; j < 4; j++) hh[k][j] = hh[k-1][j];
    end
    for (int k = 0; k < 4; k++) hh[0][k] = int'($signed(fir_h[k]));
    hist[0] = int'($signed(xs));
    lin_x = 16'($urandom); lin_b = 16'($urandom); lin_cin = 1'($urandom);
    sq_x  = 16'($urandom); sq_b  = 16'($urandom); sq_cin  = 1'($urandom);
    #1;
    m = model();
    checks++;
    if ($signed(fir_y) != 18'(m)) begin
      failures++;
      if (failures < 10) $display("FAIL fir x=%0d y=%0d expected %0d", $signed(xs), $signed(fir_y), m);
    end
    if (m > 32767 || m < -32768) n_big++;
    check_adders();
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      hist[k] = 0;
      for (int j = 0; j < 4; j++) hh[k][j] = 0;
    end
    for (int k = 0; k < 5; k++) n_digit[k] = 0;
    fir_x = '0; lin_x = '0; lin_b = '0; lin_cin = 0; sq_x = '0; sq_b = '0; sq_cin = 0;
    fir_h = '{8'd3, 8'd6, -8'sd3, -8'sd6};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int set = 0; set < 30; set++) begin
      @(posedge clk);  // the previous sample has been taken in
      #1;
      if (set == 0) fir_h = '{-8'sd128, -8'sd128, -8'sd128, -8'sd128};
      else if (set == 1) fir_h = '{8'h5A, 8'hA5, 8'h33, 8'hCC};
      else for (int k = 0; k < 4; k++) fir_h[k] = 8'($urandom);
      for (int k = 0; k < 4; k++) count_digits(fir_h[k]);
      for (int n = 0; n < 100; n++) step(set == 0 ? 8'h80 : 8'($urandom));
      if (set == 15) begin
        @(negedge clk);
        rst_n = 0;
        fir_x = 8'd0;  // the edge after reset then takes in a zero
        for (int k = 0; k < 4; k++) begin
          hist[k] = 0;
          for (int j = 0; j < 4; j++) hh[k][j] = 0;
        end
        @(posedge clk);  // hold reset across an edge
        #1;
        rst_n = 1;
        n_reset++;
      end
    end
    // Corner cases of the adders: carry through every group.
    @(negedge clk);
    lin_x = '1; lin_b = 16'd1; lin_cin = 0; sq_x = '1; sq_b = 16'd1; sq_cin = 0;
    #1 check_adders();
    lin_x = 16'd0; lin_b = 16'd1; lin_cin = 1; sq_x = 16'd0; sq_b = 16'd1; sq_cin = 1;
    #1 check_adders();

    $display("adds=%0d subs=%0d carry_outs=%0d borrows=%0d sel_lin=%0d sel_sqrt=%0d wide_y=%0d resets=%0d",
             n_add, n_sub, n_cout, n_borrow, n_sel_lin, n_sel_sq, n_big, n_reset);
    $display("booth digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    if (n_add == 0 || n_sub == 0 || n_cout == 0 || n_borrow == 0 || n_sel_lin == 0 ||
        n_sel_sq == 0 || n_big == 0 || n_reset == 0) begin
      failures++; $display("FAIL: a mechanism was never exercised");
    end
    for (int k = 0; k < 5; k++)
      if (n_digit[k] == 0) begin failures++; $display("FAIL: Booth digit %0d never used", k - 2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
