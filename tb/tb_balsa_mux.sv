// Self-checking testbench for balsa_mux at width 16: random data, both
// select values.
module tb_balsa_mux;
  logic [15:0] d0, d1, q;
  logic sel;
  int checks = 0, failures = 0;
  balsa_mux #(.WIDTH(16)) dut (.d0(d0), .d1(d1), .sel(sel), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      d0 = 16'($urandom); d1 = 16'($urandom); sel = 1'(n % 2);
      #1;
      checks++;
      if (q !== (sel ? d1 : d0)) begin failures++; $display("FAIL sel=%b q=%h", sel, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
