// tb_tmr_cdc_sync: self-checking test of the triplicated CDC synchronizer.
//
// The three copies of an asynchronous input are driven with a skew of up to
// two destination clocks between domains, which is how differently resolving
// synchronizers look from the outside, and sometimes with one copy wrong.
// The testbench records what was applied at every clock edge and expects, at
// each clock, the majority of the copies applied STAGES edges earlier, on all
// three outputs. This checks the latency (STAGES clocks), that the three
// outputs always agree, and that one lagging or wrong copy is outvoted. The
// default instance (two stages, one bit) and a three-stage four-bit instance
// are tested.
module tb_tmr_cdc_sync;
  import tmr_pkg::*;

  localparam int unsigned W = 4;
  localparam int unsigned S3 = 3;

  int checks = 0;
  int failures = 0;

  logic                          clk = 1'b0;
  logic [NUM_DOMAINS-1:0]        rst;
  logic [NUM_DOMAINS-1:0][0:0]   d1;
  logic [NUM_DOMAINS-1:0][0:0]   q1;
  logic [NUM_DOMAINS-1:0][W-1:0] d4;
  logic [NUM_DOMAINS-1:0][W-1:0] q4;

  tmr_cdc_sync dut_def (.clk_i(clk), .rst_i(rst), .d_i(d1), .q_o(q1));
  tmr_cdc_sync #(.WIDTH(W), .STAGES(S3)) dut_3 (.clk_i(clk), .rst_i(rst), .d_i(d4), .q_o(q4));

  always #5 clk = ~clk;

  // hist1[n], hist4[n]: inputs seen at clock edge n since reset released.
  logic [NUM_DOMAINS-1:0][0:0]   hist1 [$];
  logic [NUM_DOMAINS-1:0][W-1:0] hist4 [$];

  function automatic logic [W-1:0] maj(input logic [NUM_DOMAINS-1:0][W-1:0] v);
    logic [W-1:0] r;
    for (int b = 0; b < W; b++) r[b] = ($countones({v[0][b], v[1][b], v[2][b]}) >= 2);
    return r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // One destination clock: record inputs at the edge, check just after.
  task automatic step();
    logic [NUM_DOMAINS-1:0][W-1:0] e1;
    logic [W-1:0] exp1;
    logic [W-1:0] exp4;
    @(posedge clk);
    hist1.push_back(d1);
    hist4.push_back(d4);
    #1;
    e1 = '0;
    if (hist1.size() >= 2) begin
      for (int k = 0; k < NUM_DOMAINS; k++) e1[k][0] = hist1[hist1.size()-2][k];
    end
    exp1 = maj(e1);
    exp4 = (hist4.size() >= S3) ? maj(hist4[hist4.size()-S3]) : '0;
    for (int k = 0; k < NUM_DOMAINS; k++) begin
      check(q1[k][0] == exp1[0], $sformatf("2-stage output %0d", k));
      check(q4[k] == exp4, $sformatf("3-stage output %0d got %h exp %h", k, q4[k], exp4));
    end
  endtask

  initial begin : watchdog
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    rst = '1; d1 = '0; d4 = '0;
    @(negedge clk); @(negedge clk);
    rst = '0;
    hist1.delete(); hist4.delete();
    @(negedge clk);
    hist1.push_back(d1); hist4.push_back(d4);   // edge while rst was falling
    repeat (3) step();

    // Latency: all copies change together.
    d1 = '1;
    lat = 0;
    do begin step(); lat++; end while (q1[0][0] != 1'b1 && lat < 10);
    check(lat == 2, $sformatf("2-stage latency %0d clocks", lat));
    check(q1[1][0] && q1[2][0], "all domains follow together");

    // Random stimulus with skew and single wrong copies.
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] v;
      int lag;
      @(negedge clk);
      v = W'($urandom);
      lag = $urandom_range(0, 2);
      for (int k = 0; k < NUM_DOMAINS; k++) d4[k] = v;
      if (i % 3 == 0) d4[lag] = ~v;                 // one copy wrong or late
      d1 = {1'($urandom), 1'($urandom), 1'($urandom)};
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
