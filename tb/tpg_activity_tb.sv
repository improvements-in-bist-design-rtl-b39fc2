// tpg_activity_tb: switching activity of the low power TPG over one full
// pass (240 patterns), the property the design is built for.
//
// It counts the bit transitions of the pattern x between consecutive
// patterns (cyclically, including the step from the last pattern back to
// the first), and checks them against
// values worked out by hand for the default configuration (seed register
// x^4 + x^3 + 1 from 0001, seed bits q[i] ^ q[i+1 mod 4]):
//   - 225 steps inside a seed, each of exactly one bit;
//   - 15 seed changes, costing 1 or 3 bits each, 31 in total;
//   - 256 pattern-bit transitions in all, about 1.07 per pattern, against an
//     average of 2 for uncorrelated random 4-bit patterns;
//   - every block of 16 patterns that share a seed applies all 16 input
//     vectors of a 4-input CUT.
module tpg_activity_tb;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [3:0] x, f, g, k, prevx, x0;
  logic seed_adv;
  int checks = 0, failures = 0;
  int n_inside = 0, boundary_bits = 0, total = 0, seed_changes = 0, max_boundary = 0;
  int hd;
  bit seen [16];
  bit all_seen;

  lp_tpg dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
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
    #1 rst_n = 1;
    en = 1;
    x0 = x;
    for (int p = 0; p < 240; p++) begin
      seen[x] = 1'b1;
      prevx = x;
      if (seed_adv) seed_changes++;
      @(posedge clk); #1;
      hd = $countones(x ^ prevx);
      total += hd;
      if (p % 16 == 15) begin
        boundary_bits += hd;
        if (hd > max_boundary) max_boundary = hd;
        all_seen = 1'b1;
        for (int v = 0; v < 16; v++) all_seen &= seen[v];
        chk(all_seen, $sformatf("seed block %0d applies all 16 vectors", p / 16));
        for (int v = 0; v < 16; v++) seen[v] = 1'b0;
      end else begin
        n_inside++;
        chk(hd == 1, $sformatf("pattern %0d: one-bit step", p));
      end
    end
    chk(x === x0, "sequence repeats after 240 patterns");
    chk(n_inside == 225, "225 steps inside seeds");
    chk(seed_changes == 15, $sformatf("15 seed changes (%0d)", seed_changes));
    chk(boundary_bits == 31, $sformatf("31 bits at seed changes (%0d)", boundary_bits));
    chk(max_boundary == 3, $sformatf("at most 3 bits at a seed change (%0d)", max_boundary));
    chk(total == 256, $sformatf("256 transitions per pass (%0d)", total));
    $display("pattern transitions per pass: %0d over 240 patterns (%0d.%02d per pattern)",
             total, total / 240, (total * 100 / 240) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
