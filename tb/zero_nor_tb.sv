// zero_nor_tb: exhaustive test of the all-zero NOR for M = 4.
module zero_nor_tb;
  logic [3:0] k;
  logic zero;
  int checks = 0, failures = 0;

  zero_nor #(.M(4)) dut (.*);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      k = 4'(v);
      #1;
      checks++;
      if (zero !== (v == 0)) begin failures++; $display("FAIL k=%0d zero=%b", v, zero); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
