// tb_tmr_counter: self-checking test of the triplicated counter.
//
// Two instances share the stimulus: the synchronized counter (default,
// voters in the feedback) and the unprotected form without them. A plain
// reference counter in the testbench gives the expected count. The test
// checks that
//  * both count by exactly one per enabled clock and hold when disabled;
//  * an upset held in one domain's counter logic never reaches the voted
//    outputs of the synchronized counter, and that one clock after the upset
//    is released (scrubbing) all three of its registers agree again;
//  * the unprotected counter shows the upset domain's error and keeps it
//    after the release (a persistent error) until it is reset;
//  * a reset pulse on a single domain is outvoted and repaired.
// Inputs change on the falling edge; outputs are checked just before it.
module tb_tmr_counter;
  import tmr_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic                          clk = 1'b0;
  logic [NUM_DOMAINS-1:0]        rst;
  logic [NUM_DOMAINS-1:0]        en;
  logic [NUM_DOMAINS-1:0][W-1:0] upset;
  logic [NUM_DOMAINS-1:0][W-1:0] xs;
  logic [NUM_DOMAINS-1:0][W-1:0] xn;
  logic [W-1:0]                  ref_cnt;

  tmr_counter dut_s (.clk_i(clk), .rst_i(rst), .en_i(en), .upset_i(upset), .x_o(xs));
  tmr_counter #(.WIDTH(W), .SYNC_VOTERS(1'b0)) dut_n (
    .clk_i(clk), .rst_i(rst), .en_i(en), .upset_i(upset), .x_o(xn));

  always #5 clk = ~clk;

  // Reference: follows the majority of the reset and enable inputs.
  always_ff @(posedge clk) begin
    if ($countones(rst) >= 2)     ref_cnt <= '0;
    else if ($countones(en) >= 2) ref_cnt <= ref_cnt + 1'b1;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s (ref %h sync %h %h %h raw %h %h %h / nosync %h %h %h)", $time, what,
               ref_cnt, xs[2], xs[1], xs[0], dut_s.count_q[2], dut_s.count_q[1],
               dut_s.count_q[0], xn[2], xn[1], xn[0]);
    end
  endtask

  // Run n clocks; after each, check the synchronized counter's outputs.
  task automatic run(input int n);
    repeat (n) begin
      @(posedge clk);
      #4;
      for (int k = 0; k < NUM_DOMAINS; k++) check(xs[k] == ref_cnt, $sformatf("sync x%0d", k));
      @(negedge clk);
    end
  endtask

  function automatic bit regs_agree();
    return dut_s.count_q[0] == ref_cnt && dut_s.count_q[1] == ref_cnt
        && dut_s.count_q[2] == ref_cnt;
  endfunction

  initial begin : watchdog
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    rst = '1; en = '0; upset = '0;
    @(negedge clk); @(negedge clk);
    rst = '0;
    run(2);
    check(xs[0] == 0 && xn[0] == 0, "count after reset is zero");

    // Counting: exactly one per clock, 300 clocks so the counter wraps.
    en = '1;
    prev = xs[0];
    run(300);
    check(xs[0] == W'(prev + 300), "rate: one count per enabled clock");
    for (int k = 0; k < NUM_DOMAINS; k++) check(xn[k] == ref_cnt, "unprotected counter counts");

    // Hold when disabled.
    en = '0;
    prev = xs[0];
    run(5);
    check(xs[0] == prev, "hold when disabled");
    en = '1;

    // Upset in domain 1's counter logic for 6 clocks.
    upset[1] = 8'h5a;
    run(6);
    check(dut_s.count_q[1] != ref_cnt, "upset reaches domain 1 register");
    check(xn[1] != ref_cnt, "unprotected domain 1 shows the error");
    upset[1] = '0;                                   // scrubbing repairs it
    @(posedge clk); #4;
    check(regs_agree(), "synchronized: registers agree one clock after repair");
    @(negedge clk);
    run(20);
    check(regs_agree(), "synchronized: registers still agree");
    check(xn[1] != ref_cnt, "unprotected: persistent error after repair");
    check(xn[0] == ref_cnt && xn[2] == ref_cnt, "unprotected: other domains fine");

    // Upsets in the other domains, one at a time.
    for (int d = 0; d < NUM_DOMAINS; d += 2) begin
      upset[d] = W'(8'h81 << d);
      run(3);
      upset[d] = '0;
      run(1);
      check(regs_agree(), $sformatf("synchronized: domain %0d resynchronized", d));
    end

    // A reset of one domain alone is outvoted.
    rst[2] = 1'b1;
    @(posedge clk); #4;
    check(dut_s.count_q[2] == 0, "single-domain reset clears domain 2");
    @(negedge clk);
    rst[2] = 1'b0;
    run(1);
    check(regs_agree(), "single-domain reset repaired");

    // Reset recovers the unprotected counter.
    rst = '1;
    run(1);
    rst = '0;
    run(10);
    for (int k = 0; k < NUM_DOMAINS; k++) check(xn[k] == ref_cnt, "unprotected recovered by reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
