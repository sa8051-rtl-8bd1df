// Self-checking testbench for c_element: walks the inputs through all
// transitions and checks that the output changes only when both inputs
// agree and otherwise holds.
module tb_c_element;
  logic i0, i1, q;
  int checks = 0, failures = 0;
  c_element dut (.i0(i0), .i1(i1), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    i0 = 0; i1 = 0; model = 0;
    #1;
    for (int n = 0; n < 200; n++) begin
      if ($urandom % 2) i0 = !i0; else i1 = !i1;
      #1;
      if (i0 == i1) model = i0;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i0=%b i1=%b q=%b exp %b", i0, i1, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
