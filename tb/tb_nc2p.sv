// Self-checking testbench for nc2p: random input walks checked against the
// cell's truth table (i0=0 -> 1, i0=i1=1 -> 0, i0=1,i1=0 -> hold).
module tb_nc2p;
  logic i0, i1, q;
  int checks = 0, failures = 0, holds = 0;
  nc2p dut (.i0(i0), .i1(i1), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    i0 = 0; i1 = 0; model = 1;
    #1;
    for (int n = 0; n < 300; n++) begin
      if ($urandom % 2) i0 = !i0; else i1 = !i1;
      #1;
      if (!i0) model = 1'b1;
      else if (i1) model = 1'b0;
      else holds++;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i0=%b i1=%b q=%b exp %b", i0, i1, q, model); end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
