// Self-checking testbench for balsa_demux: all four input combinations,
// repeated in random order.
module tb_balsa_demux;
  logic d, sel, q0, q1;
  int checks = 0, failures = 0;
  balsa_demux dut (.d(d), .sel(sel), .q0(q0), .q1(q1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      {d, sel} = (n < 4) ? 2'(n) : 2'($urandom);
      #1;
      checks++;
      if (q0 !== (d && !sel) || q1 !== (d && sel)) begin
        failures++;
        $display("FAIL d=%b sel=%b q0=%b q1=%b", d, sel, q0, q1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
