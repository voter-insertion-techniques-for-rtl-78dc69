// tb_tmr_voter: self-checking test of the triplicated voters.
//
// Random domain values are applied, often with one domain corrupted. Each of
// the three outputs must equal a bitwise majority computed in the testbench
// from a count of ones; when two domains agree, every output must equal that
// agreed value, i.e. the voted result is handed to all three domains.
module tb_tmr_voter;
  import tmr_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic [NUM_DOMAINS-1:0][W-1:0] d;
  logic [NUM_DOMAINS-1:0][W-1:0] q;

  tmr_voter #(.WIDTH(W)) dut (.d_i(d), .q_o(q));

  // Default-width instance, checked exhaustively.
  logic [NUM_DOMAINS-1:0][0:0] e;
  logic [NUM_DOMAINS-1:0][0:0] f;
  tmr_voter dut1 (.d_i(e), .q_o(f));

  function automatic logic [W-1:0] ref_vote(input logic [NUM_DOMAINS-1:0][W-1:0] v);
    logic [W-1:0] r;
    for (int b = 0; b < W; b++) begin
      int ones = 0;
      for (int k = 0; k < NUM_DOMAINS; k++) ones += int'(v[k][b]);
      r[b] = (ones >= 2);
    end
    return r;
  endfunction

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
      for (int k = 0; k < NUM_DOMAINS; k++) begin
        checks++;
        if (f[k] !== 1'($countones(3'(v)) >= 2)) begin
          failures++;
          $display("FAIL 1-bit inputs %b: domain %0d got %b", e, k, f[k]);
        end
      end
    end
    for (int i = 0; i < 600; i++) begin
      int bad;
      logic [W-1:0] good;
      good = W'($urandom);
      bad = i % 4;                     // 0,1,2: that domain is corrupted; 3: random
      for (int k = 0; k < NUM_DOMAINS; k++) d[k] = good;
      if (bad < 3) d[bad] = good ^ W'($urandom);
      else for (int k = 0; k < NUM_DOMAINS; k++) d[k] = W'($urandom);
      #1;
      for (int k = 0; k < NUM_DOMAINS; k++) begin
        checks++;
        if (q[k] !== ref_vote(d)) begin
          failures++;
          $display("FAIL in %h %h %h: domain %0d got %h", d[2], d[1], d[0], k, q[k]);
        end
        if (bad < 3) begin
          checks++;
          if (q[k] !== good) begin
            failures++;
            $display("FAIL single upset in domain %0d not masked at output %0d", bad, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
