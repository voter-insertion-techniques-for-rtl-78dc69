// tb_maj_voter: self-checking test of the majority voter.
//
// The one-bit voter at its default width is driven through all eight input
// combinations; an 8-bit instance gets random inputs. The expected output of
// every bit is found by counting the ones among the three domain bits (two or
// more gives 1), independently of the sum-of-products form in the RTL.
// A watchdog ends the run if it hangs.
module tb_maj_voter;
  import tmr_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [NUM_DOMAINS-1:0][0:0] d1;
  logic [0:0]                  y1;
  logic [NUM_DOMAINS-1:0][7:0] d8;
  logic [7:0]                  y8;

  maj_voter dut1 (.d_i(d1), .y_o(y1));
  maj_voter #(.WIDTH(8)) dut8 (.d_i(d8), .y_o(y8));

  function automatic logic [7:0] ref_vote(input logic [NUM_DOMAINS-1:0][7:0] d);
    logic [7:0] r;
    for (int b = 0; b < 8; b++) begin
      int ones = 0;
      for (int k = 0; k < NUM_DOMAINS; k++) ones += int'(d[k][b]);
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
      logic [NUM_DOMAINS-1:0][7:0] w;
      logic [7:0] exp8;
      d1 = 3'(v);
      #1;
      w = '0;
      for (int k = 0; k < NUM_DOMAINS; k++) w[k][0] = d1[k];
      exp8 = ref_vote(w);
      checks++;
      if (y1[0] !== exp8[0]) begin
        failures++;
        $display("FAIL 1-bit inputs %b: got %b", d1, y1);
      end
    end
    for (int i = 0; i < 500; i++) begin
      d8 = {8'($urandom), 8'($urandom), 8'($urandom)};
      // often make two domains equal and corrupt the third, the TMR case
      if (i % 2 == 0) begin
        d8[1] = d8[0];
        d8[2] = d8[0] ^ 8'($urandom);
      end
      #1;
      checks++;
      if (y8 !== ref_vote(d8)) begin
        failures++;
        $display("FAIL 8-bit inputs %h %h %h: got %h", d8[2], d8[1], d8[0], y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
