// test_controller_tb: self-checking test of the BIST test controller.
//
// With NUM_PATTERNS = 10 it checks, cycle by cycle, the sequence
// IDLE -> INIT (one cycle, init high) -> RUN (exactly 10 cycles of
// tpg_en/ora_en) -> DONE (bist_done high until a new start), the test_mode
// output in each phase, and a restart from DONE.
module test_controller_tb;
  localparam int NP = 10;
  logic clk = 0, rst_n = 0, bist_start = 0;
  logic init, test_mode, tpg_en, ora_en, bist_done;
  int checks = 0, failures = 0;

  test_controller #(.NUM_PATTERNS(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_out(input logic ei, etm, een, edone, input string what);
    checks++;
    if ({init, test_mode, tpg_en, ora_en, bist_done} !== {ei, etm, een, een, edone}) begin
      failures++;
      $display("FAIL %s: init=%b tm=%b tpg_en=%b ora_en=%b done=%b", what,
               init, test_mode, tpg_en, ora_en, bist_done);
    end
  endtask

  task automatic run_once();
    bist_start = 1;
    @(posedge clk); #1 bist_start = 0;
    expect_out(1, 1, 0, 0, "INIT");
    for (int i = 0; i < NP; i++) begin
      @(posedge clk); #1 expect_out(0, 1, 1, 0, "RUN");
    end
    @(posedge clk); #1 expect_out(0, 0, 0, 1, "DONE");
    repeat (5) begin @(posedge clk); #1 expect_out(0, 0, 0, 1, "DONE hold"); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_out(0, 0, 0, 0, "IDLE after reset");
    repeat (3) begin @(posedge clk); #1 expect_out(0, 0, 0, 0, "IDLE"); end
    run_once();
    run_once();   // restart from DONE
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
