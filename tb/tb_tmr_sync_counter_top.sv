// tb_tmr_sync_counter_top: end-to-end test of the voted TMR counter.
//
// Runs the top with all parameters at their defaults (8-bit counter,
// two-stage synchronizers). A reference model built from plain behaviour
// (majority of the enable copies, delayed by the synchronizer depth, then a
// counter) predicts the count; every clock the three voted domain outputs,
// the single reduced output and both DWC copies are compared with it.
// The stimulus makes each protection mechanism happen and counts it:
//  * enable crossing with all copies together (latency measured),
//  * enable copies skewed by a clock between domains (CDC voters),
//  * counter-logic upsets in each domain, masked while they last,
//  * resynchronization of an upset domain one clock after repair,
//  * a wrong enable copy in one domain while another domain's counter logic
//    is upset: two faults in separate partitions, both masked,
//  * a reset pulse on one domain only, outvoted,
//  * counter wrap-around and holding while disabled.
// A mechanism that never happened counts as a failure.
module tb_tmr_sync_counter_top;
  import tmr_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic                          clk = 1'b0;
  logic [NUM_DOMAINS-1:0]        rst;
  logic [NUM_DOMAINS-1:0]        en_async;
  logic [NUM_DOMAINS-1:0][W-1:0] upset;
  logic [NUM_DOMAINS-1:0][W-1:0] x_tmr;
  logic [W-1:0]                  x;
  logic [1:0][W-1:0]             x_dwc;

  tmr_sync_counter_top dut (
    .clk_i(clk), .rst_i(rst), .en_async_i(en_async), .upset_i(upset),
    .x_tmr_o(x_tmr), .x_o(x), .x_dwc_o(x_dwc)
  );

  always #5 clk = ~clk;

  // Reference model.
  logic         ref_en0, ref_en1;
  logic [W-1:0] ref_cnt;
  always_ff @(posedge clk) begin
    if ($countones(rst) >= 2) begin
      ref_en0 <= 1'b0; ref_en1 <= 1'b0; ref_cnt <= '0;
    end else begin
      ref_en0 <= ($countones(en_async) >= 2);
      ref_en1 <= ref_en0;
      if (ref_en1) ref_cnt <= ref_cnt + 1'b1;
    end
  end

  // Mechanism counters.
  int n_cdc_aligned = 0, n_cdc_skewed = 0, n_upset_masked = 0, n_resync = 0;
  int n_single_reset = 0, n_wrap = 0, n_hold = 0, n_partition = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s: ref %h x_tmr %h %h %h x %h dwc %h %h", $time, what, ref_cnt,
               x_tmr[2], x_tmr[1], x_tmr[0], x, x_dwc[1], x_dwc[0]);
    end
  endtask

  // One clock; then compare every output with the reference.
  task automatic step();
    @(posedge clk);
    #2;
    for (int k = 0; k < NUM_DOMAINS; k++) check(x_tmr[k] == ref_cnt, $sformatf("x_tmr[%0d]", k));
    check(x == ref_cnt, "reduced output");
    check(x_dwc[0] == ref_cnt && x_dwc[1] == ref_cnt, "DWC outputs");
    if (upset != '0) n_upset_masked++;
    @(negedge clk);
  endtask

  function automatic bit regs_agree();
    return dut.u_counter.count_q[0] == dut.u_counter.count_q[1]
        && dut.u_counter.count_q[1] == dut.u_counter.count_q[2];
  endfunction

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [W-1:0] prev;
    rst = '1; en_async = '0; upset = '0;
    @(negedge clk); @(negedge clk); @(negedge clk);
    rst = '0;
    repeat (3) step();
    check(x == 0, "zero after reset");

    // Enable, all copies together: first count after 3 edges
    // (2 synchronizer stages, then the counter register).
    en_async = '1;
    lat = 0;
    do begin step(); lat++; end while (x == 0 && lat < 10);
    check(lat == 3, $sformatf("enable-to-count latency %0d clocks", lat));
    n_cdc_aligned++;

    // Count past a wrap.
    prev = x;
    repeat (300) begin
      step();
      if (x == 0 && prev == '1) n_wrap++;
      prev = x;
    end

    // Disable with skewed copies: domain order 1, 0, 2 one clock apart.
    en_async[1] = 1'b0; step();
    en_async[0] = 1'b0; step();
    en_async[2] = 1'b0; step();
    n_cdc_skewed++;
    repeat (4) step();
    prev = x;
    repeat (5) step();
    if (x == prev) n_hold++;
    check(x == prev, "count holds while disabled");
    // Enable again with skewed copies.
    en_async[2] = 1'b1; step();
    en_async[0] = 1'b1; step();
    en_async[1] = 1'b1; step();
    n_cdc_skewed++;
    repeat (5) step();

    // Upset each domain's counter logic for a few clocks, then repair it.
    for (int d = 0; d < NUM_DOMAINS; d++) begin
      upset[d] = W'($urandom_range(1, 255));
      repeat (4) step();
      check(!regs_agree(), $sformatf("upset visible in domain %0d register", d));
      upset[d] = '0;
      step();
      if (regs_agree()) n_resync++;
      check(regs_agree(), $sformatf("domain %0d resynchronized after repair", d));
      repeat (3) step();
    end

    // Concurrent faults in separate partitions and separate domains: the
    // enable copy of domain 0 is wrong in the input partition (before the
    // crossing voters) while domain 2's counter logic is upset.
    en_async[0] = 1'b0;
    upset[2] = 8'h3c;
    repeat (6) step();
    if (x == ref_cnt && !regs_agree()) n_partition++;
    en_async[0] = 1'b1;
    upset[2] = '0;
    step();
    check(regs_agree(), "resynchronized after concurrent faults");
    repeat (3) step();

    // Reset one domain only.
    rst[1] = 1'b1;
    @(posedge clk); #2;
    check(dut.u_counter.count_q[1] == 0, "single-domain reset clears domain 1");
    check(x == ref_cnt, "single-domain reset masked");
    @(negedge clk);
    rst[1] = 1'b0;
    step();
    if (regs_agree()) n_single_reset++;
    check(regs_agree(), "single-domain reset repaired");
    repeat (10) step();

    // Every mechanism must have happened.
    check(n_cdc_aligned > 0, "enable crossing");
    check(n_cdc_skewed > 0,  "skewed enable crossing");
    check(n_upset_masked > 0, "upset masked");
    check(n_resync == NUM_DOMAINS, "resynchronization after repair");
    check(n_single_reset > 0, "single-domain reset outvoted");
    check(n_wrap > 0, "counter wrap");
    check(n_partition > 0, "concurrent faults in separate partitions");
    check(n_hold > 0, "hold while disabled");
    $display("mechanisms: cdc_aligned=%0d cdc_skewed=%0d upset_masked_cycles=%0d resync=%0d single_reset=%0d wrap=%0d hold=%0d partition=%0d",
             n_cdc_aligned, n_cdc_skewed, n_upset_masked, n_resync, n_single_reset, n_wrap, n_hold,
             n_partition);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
