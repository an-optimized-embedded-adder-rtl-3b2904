// tb_cslas_linear: random and corner-case check of the linear carry select
// adder/subtractor at 16 bits (default), 32 and 64 bits. The reference is
// plain integer arithmetic: {carry, s} = x + (cin ? ~b : b) + cin, so in
// subtraction s = x - b and carry = (x >= b). Corner cases (all-ones,
// zero, carries through every group) are mixed with random operands; it
// counts how often a group boundary received a carry (the excess-1 path was
// selected) and how often subtraction was exercised.
module tb_cslas_linear;
  logic [15:0] x16, b16, s16;
  logic [31:0] x32, b32, s32;
  logic [63:0] x64, b64, s64;
  logic        cin, c16, c32, c64;
  int checks = 0, failures = 0;
  int n_sel1 = 0, n_sub = 0;

  cslas_linear              dut16 (.x(x16), .b(b16), .cin(cin), .s(s16), .carry(c16));
  cslas_linear #(.WIDTH(32)) dut32 (.x(x32), .b(b32), .cin(cin), .s(s32), .carry(c32));
  cslas_linear #(.WIDTH(64)) dut64 (.x(x64), .b(b64), .cin(cin), .s(s64), .carry(c64));

  function automatic logic [64:0] ref_add(logic [63:0] x, logic [63:0] b, logic c, int w);
    logic [64:0] mask = (65'd1 << w) - 65'd1;
    logic [64:0] bb = c ? (~{1'b0, b} & mask) : {1'b0, b};
    logic [64:0] r = {1'b0, x} + bb + 65'(c);
    return r & ((65'd1 << (w + 1)) - 65'd1);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] xa, logic [63:0] ba, logic ca);
    logic [64:0] r;
    x64 = xa; b64 = ba; x32 = xa[31:0]; b32 = ba[31:0]; x16 = xa[15:0]; b16 = ba[15:0]; cin = ca;
    #1;
    r = ref_add(64'(x16), 64'(b16), cin, 16);
    checks++;
    if ({c16, s16} != r[16:0]) begin
      failures++; $display("FAIL16 x=%h b=%h cin=%0d -> %h/%0d", x16, b16, cin, s16, c16);
    end
    r = ref_add(64'(x32), 64'(b32), cin, 32);
    checks++;
    if ({c32, s32} != r[32:0]) begin
      failures++; $display("FAIL32 x=%h b=%h cin=%0d -> %h/%0d", x32, b32, cin, s32, c32);
    end
    r = ref_add(x64, b64, cin, 64);
    checks++;
    if ({c64, s64} != r) begin
      failures++; $display("FAIL64 x=%h b=%h cin=%0d -> %h/%0d", x64, b64, cin, s64, c64);
    end
    if (cin) n_sub++;
    // Carry into bit 4 of the 16-bit adder: a multiplexer took the +1 path.
    r = ref_add(64'(x16[3:0]), 64'(b16[3:0]), cin, 4);
    if (r[4]) n_sel1++;
  endtask

  initial begin
    apply('0, '0, 0);
    apply('1, 64'd1, 0);
    apply('1, '1, 0);
    apply('1, '1, 1);
    apply('0, '0, 1);
    apply(64'd5, 64'd7, 1);
    apply(64'h0123_4567_89AB_CDEF, 64'h0123_4567_89AB_CDEF, 1);
    for (int k = 0; k < 64; k++) begin
      apply(64'd1 << k, '1, 0);
      apply('1 >> k, 64'd1, 0);
      apply(64'd1 << k, 64'd1 << k, 1);
    end
    for (int i = 0; i < 20000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    if (n_sel1 == 0 || n_sub == 0) begin
      failures++; $display("FAIL: mechanism not exercised sel1=%0d sub=%0d", n_sel1, n_sub);
    end
    $display("excess-1 selections=%0d subtractions=%0d", n_sel1, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
