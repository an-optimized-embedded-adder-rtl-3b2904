// tb_cslas_mux: random check of the 10:5 selection: q = d1 when sel = 1,
// q = d0 when sel = 0.
module tb_cslas_mux;
  logic [4:0] d0, d1, q;
  logic       sel;
  int checks = 0, failures = 0;

  cslas_mux dut (.d0(d0), .d1(d1), .sel(sel), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d0 = 5'($urandom); d1 = 5'($urandom); sel = 1'(i % 2);
      #1;
      checks++;
      if (q != (sel ? d1 : d0)) begin
        failures++; $display("FAIL d0=%0d d1=%0d sel=%0d q=%0d", d0, d1, sel, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
