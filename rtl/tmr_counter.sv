// tmr_counter: triplicated counter with synchronization voters in its feedback.
//
// Each of the three TMR domains has its own counter registers and counter
// logic (an incrementer). With SYNC_VOTERS = 1, the default, the registers of
// all three domains pass through triplicated voters (tmr_voter) before they
// reach each domain's counter logic, and the voted value is also the domain's
// output x_o[k]. A wrong value written into one domain's registers is then
// outvoted on the next cycle and overwritten, so the domains never stay
// apart: an upset in a domain's counter logic can corrupt that domain's
// register only while the upset lasts, and one clock after the upset is
// repaired (by configuration scrubbing on an FPGA) all three registers agree
// again. This is the "synchronized" counter the document proposes; the voters
// sit directly after the flip-flops, so every register-to-register path holds
// exactly one voter.
//
// With SYNC_VOTERS = 0 each domain feeds its registers straight back to its
// own counter logic and x_o[k] is the raw register. That is the unprotected
// form the document uses to explain persistent errors: a domain hit by an
// upset keeps its wrong count after the upset is gone, until reset. It is
// kept only for comparison.
//
// upset_i is a test hook, not part of the counter: upset_i[k] is XORed onto
// the result of domain k's counter logic and stands for an upset in the
// configuration memory that holds that logic. Tie it to zero in use.
//
// Interface: clk_i is shared; rst_i, en_i and upset_i are per domain.
// rst_i[k] (synchronous, active high) clears domain k's register; en_i[k]
// lets domain k count by one per clock, otherwise it reloads the voted value.
// Timing: x_o follows the registers (through the voters when SYNC_VOTERS = 1),
// so it takes its new value right after the clock edge that loads them; the
// voters add one level of combinational delay to both the outputs and the
// feedback path. Reset value, enable and the upset
// hook are this design's own choices; the structure follows the document.
module tmr_counter
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH       = 8,
  parameter bit          SYNC_VOTERS = 1'b1
) (
  input  logic                              clk_i,
  input  logic [NUM_DOMAINS-1:0]            rst_i,
  input  logic [NUM_DOMAINS-1:0]            en_i,
  input  logic [NUM_DOMAINS-1:0][WIDTH-1:0] upset_i,
  output logic [NUM_DOMAINS-1:0][WIDTH-1:0] x_o
);

  logic [NUM_DOMAINS-1:0][WIDTH-1:0] count_q;    // counter registers
  logic [NUM_DOMAINS-1:0][WIDTH-1:0] fb;         // value fed back to the logic
  logic [NUM_DOMAINS-1:0][WIDTH-1:0] count_d;    // counter logic result

  if (SYNC_VOTERS) begin : g_sync
    tmr_voter #(.WIDTH(WIDTH)) u_sync_voters (
      .d_i(count_q),
      .q_o(fb)
    );
  end else begin : g_nosync
    assign fb = count_q;
  end

  always_comb begin
    for (int k = 0; k < NUM_DOMAINS; k++) begin
      count_d[k] = (en_i[k] ? fb[k] + WIDTH'(1) : fb[k]) ^ upset_i[k];
    end
  end

  for (genvar k = 0; k < NUM_DOMAINS; k++) begin : g_dom
    always_ff @(posedge clk_i) begin
      if (rst_i[k]) count_q[k] <= '0;
      else          count_q[k] <= count_d[k];
    end
  end

  assign x_o = fb;

endmodule : tmr_counter
