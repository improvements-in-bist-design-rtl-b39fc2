// bist_top_tb: end-to-end test of the BIST wrapper at its default size
// (4-bit TPG, 240 patterns per run) with the small CUT of cut_model.
//
// The testbench keeps its own model of the whole test: the seed register
// (x^4 + x^3 + 1 shift register from 0001), seed bits s[i] ^ s[i+1 mod 4],
// Gray code p ^ (p >> 1) of the pattern number within a seed, the CUT's
// logic equations and the 4-bit MISR (x^4 + x + 1). It checks:
//   - normal mode: the CUT inputs follow the system inputs;
//   - a run: every pattern on cut_in, the cycle count from start to
//     bist_done (NUM_PATTERNS + 2), the final signature and pass = 1 when the
//     golden signature is the fault-free one;
//   - a run with a stuck-at fault in the CUT: pass = 0 and the signature the
//     model gives for the faulty circuit;
//   - a run with a wrong golden signature: pass = 0;
//   - a restart directly from the done state.
// Each mechanism (normal mode, seed step, one-bit pattern step, pass, fail,
// restart) is counted and a mechanism that never occurred is a failure.
module bist_top_tb;
  localparam int NP = 240;
  logic clk = 0, rst_n = 0, bist_start = 0, fault = 0;
  logic [3:0] golden_sig, sys_in, cut_in, cut_out, signature;
  logic test_mode, bist_done, pass;
  int checks = 0, failures = 0;
  int n_normal = 0, n_seed_steps = 0, n_onebit = 0, n_pass = 0, n_fail = 0, n_restart = 0;

  bist_top dut (.*);
  cut_model u_cut (.a(cut_in), .fault, .y(cut_out));

  always #5 clk = ~clk;

  function automatic logic [3:0] cut_fn(logic [3:0] a, logic flt);
    logic n12;
    n12 = flt ? 1'b0 : (a[1] & a[2]);
    return {a[0] ^ a[2] ^ a[3], ~(a[0] | a[3]), n12 | a[3], a[0] ^ a[1]};
  endfunction

  function automatic logic [3:0] misr(logic [3:0] s, logic [3:0] r);
    return {s[2] ^ r[3], s[1] ^ r[2], s[0] ^ s[3] ^ r[1], s[3] ^ r[0]};
  endfunction

  function automatic logic [3:0] pattern(int p);
    logic [3:0] s, f, c;
    s = 4'b0001;
    for (int j = 0; j < p / 16; j++) s = {s[2:0], s[3] ^ s[2]};
    for (int i = 0; i < 4; i++) f[i] = s[i] ^ s[(i + 1) % 4];
    c = 4'(p % 16);
    return f ^ (c ^ (c >> 1));
  endfunction

  function automatic logic [3:0] expected_sig(logic flt);
    logic [3:0] s = '0;
    for (int p = 0; p < NP; p++) s = misr(s, cut_fn(pattern(p), flt));
    return s;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One BIST run; bist_start is raised for one cycle (from IDLE or DONE).
  task automatic run_bist(input logic flt, input logic [3:0] golden, input bit exp_pass);
    logic [3:0] prev;
    int cycles = 0;
    fault = flt;
    golden_sig = golden;
    bist_start = 1;
    @(posedge clk); #1 bist_start = 0;
    cycles = 1;
    chk(test_mode === 1'b1 && bist_done === 1'b0, "INIT cycle: test mode, not done");
    @(posedge clk); #1 cycles++;
    for (int p = 0; p < NP; p++) begin
      chk(cut_in === pattern(p), $sformatf("pattern %0d: cut_in=%b exp %b", p, cut_in, pattern(p)));
      if (p > 0) begin
        if (p % 16 == 0) n_seed_steps++;
        else if ($countones(cut_in ^ prev) == 1) n_onebit++;
      end
      prev = cut_in;
      @(posedge clk); #1 cycles++;
    end
    chk(bist_done === 1'b1, "bist_done after NUM_PATTERNS + 2 cycles");
    chk(cycles == NP + 2, $sformatf("latency %0d", cycles));
    chk(test_mode === 1'b0, "normal mode after the run");
    chk(signature === expected_sig(flt), $sformatf("signature %b exp %b", signature, expected_sig(flt)));
    chk(pass === exp_pass, $sformatf("pass=%b exp %b", pass, exp_pass));
    if (pass) n_pass++; else n_fail++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] good, bad;
    good = expected_sig(1'b0);
    bad  = expected_sig(1'b1);
    golden_sig = '0; sys_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // normal mode
    for (int i = 0; i < 20; i++) begin
      sys_in = 4'($urandom);
      @(posedge clk); #1;
      chk(test_mode === 1'b0 && cut_in === sys_in && bist_done === 1'b0, "normal mode passes system inputs");
      n_normal++;
    end
    run_bist(1'b0, good, 1'b1);                    // fault-free CUT passes
    // normal mode again while done
    sys_in = 4'hA; #1;
    chk(cut_in === 4'hA, "normal mode after done");
    n_restart++;
    run_bist(1'b1, good, bad == good);             // stuck-at fault found
    chk(bad != good, "fault changes the signature");
    n_restart++;
    run_bist(1'b0, ~good, 1'b0);                   // wrong golden signature
    n_restart++;
    run_bist(1'b0, good, 1'b1);                    // passes again after restart
    $display("normal=%0d seed_steps=%0d onebit_steps=%0d pass=%0d fail=%0d restart=%0d",
             n_normal, n_seed_steps, n_onebit, n_pass, n_fail, n_restart);
    chk(n_normal > 0, "normal mode exercised");
    chk(n_seed_steps > 0, "seed steps exercised");
    chk(n_onebit > 0, "one-bit pattern steps exercised");
    chk(n_pass > 0, "pass verdict exercised");
    chk(n_fail > 0, "fail verdict exercised");
    chk(n_restart > 0, "restart from done exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
