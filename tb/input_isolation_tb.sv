// input_isolation_tb: checks that the CUT inputs follow the system inputs in
// normal mode and the TPG pattern in test mode, for random values.
module input_isolation_tb;
  logic test_mode;
  logic [3:0] sys_in, tpg_in, cut_in;
  int checks = 0, failures = 0;

  input_isolation #(.W(4)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      test_mode = 1'(i % 2);
      sys_in = 4'($urandom);
      tpg_in = 4'($urandom);
      #1;
      checks++;
      if (cut_in !== (test_mode ? tpg_in : sys_in)) begin
        failures++;
        $display("FAIL mode=%b sys=%h tpg=%h cut=%h", test_mode, sys_in, tpg_in, cut_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
