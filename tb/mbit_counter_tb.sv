// mbit_counter_tb: self-checking test of the m-bit counter.
//
// Checks the reset value, counting through all 2^M values with wrap-around,
// holding while en is low and the synchronous clear, against an integer
// model, for 200 cycles of random en/clr.
module mbit_counter_tb;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [M-1:0] k;
  int mk = 3, checks = 0, failures = 0;

  mbit_counter #(.M(M), .RESET_VAL(4'd3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (k !== M'(mk)) begin failures++; $display("FAIL k=%0d exp %0d", k, mk); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check();
    rst_n = 1;
    en = 1;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); mk = (mk + 1) % 16; #1 check();
    end
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom_range(0, 1));
      clr = ($urandom_range(0, 19) == 0);
      @(posedge clk);
      if (clr) mk = 3; else if (en) mk = (mk + 1) % 16;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
