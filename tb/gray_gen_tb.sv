// gray_gen_tb: self-checking test of the clocked Gray code generator.
//
// Drives random counter values and checks that g holds the Gray code of the
// value present at the previous enabled edge, using a table-free model:
// bit i of the Gray code is k[i] XOR k[i+1]. Also checks that consecutive
// codes of a counting input differ in exactly one bit, and clear.
module gray_gen_tb;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [M-1:0] k, g, mg, prev;
  int checks = 0, failures = 0;

  gray_gen #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] gref(logic [M-1:0] b);
    logic [M-1:0] r;
    for (int i = 0; i < M; i++) r[i] = (i == M - 1) ? b[i] : b[i] ^ b[i + 1];
    return r;
  endfunction

  task automatic check();
    checks++;
    if (g !== mg) begin failures++; $display("FAIL g=%b exp %b", g, mg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mg = '0; k = '0;
    repeat (2) @(posedge clk);
    #1 check();
    rst_n = 1;
    en = 1;
    // counting input: one bit change per step
    for (int i = 0; i < 17; i++) begin
      k = 4'(i);
      prev = g;
      @(posedge clk); mg = gref(k); #1 check();
      if (i > 0) begin
        checks++;
        if ($countones(g ^ prev) != 1) begin failures++; $display("FAIL step %0d not one bit", i); end
      end
    end
    for (int i = 0; i < 200; i++) begin
      k = 4'($urandom);
      en = 1'($urandom_range(0, 1));
      clr = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (clr) mg = '0; else if (en) mg = gref(k);
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
