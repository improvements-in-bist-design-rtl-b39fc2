// ora_tb: self-checking test of the output response analyser.
//
// A bit-level model of the 4-bit MISR (x^4 + x + 1): new bit 0 = s3 ^ r0,
// bit 1 = s0 ^ s3 ^ r1, bit 2 = s1 ^ r2, bit 3 = s2 ^ r3. Random responses,
// enables and clears are applied and the signature is compared each cycle.
// The comparator is checked with the model's signature as golden value
// (match expected) and with a value that differs in one random bit
// (mismatch expected).
module ora_tb;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [3:0] resp, golden, sig, ms;
  logic match;
  int checks = 0, failures = 0;

  ora #(.W(4), .POLY(4'b0011)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ms = '0; golden = '0; resp = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      resp = 4'($urandom);
      en = 1'($urandom_range(0, 3) != 0);
      init = ($urandom_range(0, 49) == 0);
      @(posedge clk);
      if (init) ms = '0;
      else if (en) ms = {ms[2] ^ resp[3], ms[1] ^ resp[2], ms[0] ^ ms[3] ^ resp[1], ms[3] ^ resp[0]};
      #1;
      checks++;
      if (sig !== ms) begin failures++; $display("FAIL sig=%b exp %b", sig, ms); end
      golden = ms; #1;
      checks++;
      if (match !== 1'b1) begin failures++; $display("FAIL no match on equal signature"); end
      golden = ms ^ (4'b0001 << $urandom_range(0, 3)); #1;
      checks++;
      if (match !== 1'b0) begin failures++; $display("FAIL match on different signature"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
