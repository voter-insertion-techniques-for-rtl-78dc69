// tb_reducing_voter: self-checking test of the reducing voter.
//
// Checks the default single-output form exhaustively at one bit, and both a
// single-output and a two-output (duplication-with-compare) instance at eight
// bits with random inputs in which one domain is usually corrupted. Every
// output copy must equal the bitwise majority computed in the testbench, and
// the two DWC copies must agree with each other.
module tb_reducing_voter;
  import tmr_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic [NUM_DOMAINS-1:0][0:0]   e;
  logic [0:0][0:0]               f;
  logic [NUM_DOMAINS-1:0][W-1:0] d;
  logic [0:0][W-1:0]             q1;
  logic [1:0][W-1:0]             q2;

  reducing_voter dut_def (.d_i(e), .q_o(f));
  reducing_voter #(.WIDTH(W), .NUM_OUT(1)) dut_single (.d_i(d), .q_o(q1));
  reducing_voter #(.WIDTH(W), .NUM_OUT(2)) dut_dwc (.d_i(d), .q_o(q2));

  function automatic logic [W-1:0] ref_vote(input logic [NUM_DOMAINS-1:0][W-1:0] v);
    logic [W-1:0] r;
    for (int b = 0; b < W; b++) begin
      int ones = 0;
      for (int k = 0; k < NUM_DOMAINS; k++) ones += int'(v[k][b]);
      r[b] = (ones >= 2);
    end
    return r;
  endfunction

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      e = 3'(v);
      #1;
      check(W'(f[0]), W'($countones(3'(v)) >= 2), "default 1-bit");
    end
    for (int i = 0; i < 600; i++) begin
      logic [W-1:0] good;
      good = W'($urandom);
      for (int k = 0; k < NUM_DOMAINS; k++) d[k] = good;
      if (i % 4 != 3) d[i % 4] = good ^ W'($urandom);
      else for (int k = 0; k < NUM_DOMAINS; k++) d[k] = W'($urandom);
      #1;
      check(q1[0], ref_vote(d), "single output");
      check(q2[0], ref_vote(d), "DWC copy 0");
      check(q2[1], ref_vote(d), "DWC copy 1");
      if (i % 4 != 3) check(q1[0], good, "single upset masked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
