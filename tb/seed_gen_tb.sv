// seed_gen_tb: self-checking test of the seed generator.
//
// A reference model keeps its own copy of the shift register (feedback
// q[3] ^ q[2] into q[0]) and computes each seed bit as q[i] XOR q[i+1 mod 4],
// which is what a Q/Qbar multiplexer selected by the adjacent flip-flop
// gives. The test first lets the register run freely and checks that it
// passes through all 15 non-zero states before it repeats, then drives
// random advance and init for 300 cycles, comparing state and seed every
// cycle.
module seed_gen_tb;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, init = 0, adv = 0;
  logic [N-1:0] state, seed, mq, mseed;
  int checks = 0, failures = 0;
  bit seen [16];

  seed_gen #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_seed(logic [N-1:0] q);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) s[i] = q[i] ^ q[(i + 1) % N];
    return s;
  endfunction

  task automatic check();
    mseed = ref_seed(mq);
    checks++;
    if (state !== mq || seed !== mseed) begin
      failures++;
      $display("FAIL state=%b exp %b seed=%b exp %b", state, mq, seed, mseed);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mq = 4'b0001;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check();
    // free run: the period must be 15 and cover every non-zero state
    adv = 1;
    for (int i = 0; i < 15; i++) begin
      seen[state] = 1'b1;
      @(posedge clk);
      mq = {mq[N-2:0], mq[3] ^ mq[2]};
      #1 check();
    end
    checks++;
    if (state !== 4'b0001) begin failures++; $display("FAIL period is not 15"); end
    for (int v = 1; v < 16; v++) begin
      checks++;
      if (!seen[v]) begin failures++; $display("FAIL state %0d never reached", v); end
    end
    // random advance / init
    for (int i = 0; i < 300; i++) begin
      adv = 1'($urandom_range(0, 1));
      init = ($urandom_range(0, 15) == 0);
      @(posedge clk);
      if (init) mq = 4'b0001;
      else if (adv) mq = {mq[N-2:0], mq[3] ^ mq[2]};
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
