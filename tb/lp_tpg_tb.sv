// lp_tpg_tb: self-checking test of the low power TPG.
//
// The model tracks the pattern number p and the seed register state s
// (s advances as a maximal-length x^4 + x^3 + 1 shift register). Pattern p
// must be  x = seed(s) ^ gray(p mod 16), where seed(s)[i] = s[i] ^ s[i+1 mod 4]
// and gray(b) = b ^ (b >> 1). Checked every cycle, for a run with en high,
// then with random en and init. It also checks that the seed changes
// exactly once every 16 patterns, that patterns inside one seed differ in
// exactly one bit, and that the sequence repeats after 240 patterns.
module lp_tpg_tb;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [M-1:0] x, f, g, k, ms, mx, prevx, x0;
  logic seed_adv;
  int p = 0, checks = 0, failures = 0, advs = 0, onebit = 0;

  lp_tpg #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] seedf(logic [M-1:0] s);
    logic [M-1:0] r;
    for (int i = 0; i < M; i++) r[i] = s[i] ^ s[(i + 1) % M];
    return r;
  endfunction

  task automatic check();
    mx = seedf(ms) ^ (4'(p % 16) ^ (4'(p % 16) >> 1));
    checks++;
    if (x !== mx || f !== seedf(ms)) begin
      failures++;
      $display("FAIL p=%0d x=%b exp %b f=%b exp %b", p, x, mx, f, seedf(ms));
    end
  endtask

  task automatic step(input bit do_en, input bit do_init);
    en = do_en; init = do_init;
    prevx = x;
    @(posedge clk);
    if (do_init) begin p = 0; ms = 4'b0001; end
    else if (do_en) begin
      if (seed_adv) advs++;
      p = p + 1;
      if (p % 16 == 0) ms = {ms[2:0], ms[3] ^ ms[2]};
    end
    #1 check();
    if (do_en && !do_init && p % 16 != 0) begin
      checks++;
      if ($countones(x ^ prevx) != 1) begin failures++; $display("FAIL p=%0d not one-bit step", p); end
      else onebit++;
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ms = 4'b0001;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check();
    x0 = x;
    for (int i = 0; i < 240; i++) step(1, 0);
    checks++;
    if (advs != 15 || ms !== 4'b0001 || x !== x0) begin
      failures++;
      $display("FAIL full pass: %0d seed steps, state %b, x %b vs %b", advs, ms, x, x0);
    end
    for (int i = 0; i < 600; i++) step(1'($urandom_range(0, 3) != 0), $urandom_range(0, 199) == 0);
    $display("seed steps=%0d one-bit steps=%0d", advs, onebit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
