// tmr_sync_counter_top: a fully triplicated counter protected by voters.
//
// The design puts together the voter types a TMR (triple modular redundancy)
// FPGA design needs:
//  * clock-domain-crossing voters: the count enable arrives from another
//    clock domain, one copy per TMR domain, and passes through tmr_cdc_sync
//    (a flip-flop synchronizer per domain followed by triplicated voters);
//  * synchronization voters: tmr_counter, a WIDTH-bit counter per domain
//    whose feedback goes through triplicated voters, so that a domain upset
//    is flushed one clock after it is repaired;
//  * reducing voters: one reducing_voter reduces the three domains to a
//    single output x_o, another pair of voters to the two copies x_dwc_o a
//    duplicated-with-compare consumer would take.
// The three voted domain outputs are also brought out as x_tmr_o, for a
// receiver that votes externally. All inputs and outputs except the clock are
// triplicated. Each block's structure follows the document; the choice of a
// counter with an enable as the protected function, and the way the blocks
// are chained, are this design's own.
//
// upset_i is a test hook that emulates a configuration upset in one domain's
// counter logic (XOR mask, see tmr_counter); tie it to zero in use.
//
// Timing: single clock clk_i for everything after the synchronizers. A change
// of the enable reaches the counter SYNC_STAGES clocks after it is sampled;
// the counter then advances by one per clock. Reset (rst_i, per domain,
// synchronous, active high) clears synchronizers and counter registers.
module tmr_sync_counter_top
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH       = 8,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                              clk_i,
  input  logic [NUM_DOMAINS-1:0]            rst_i,
  input  logic [NUM_DOMAINS-1:0]            en_async_i,
  input  logic [NUM_DOMAINS-1:0][WIDTH-1:0] upset_i,
  output logic [NUM_DOMAINS-1:0][WIDTH-1:0] x_tmr_o,
  output logic [WIDTH-1:0]                  x_o,
  output logic [1:0][WIDTH-1:0]             x_dwc_o
);

  logic [NUM_DOMAINS-1:0][0:0] en_sync;   // enable after the crossing, voted
  logic [NUM_DOMAINS-1:0]      en;

  tmr_cdc_sync #(.WIDTH(1), .STAGES(SYNC_STAGES)) u_cdc (
    .clk_i(clk_i),
    .rst_i(rst_i),
    .d_i  (en_async_i),
    .q_o  (en_sync)
  );

  always_comb begin
    for (int k = 0; k < NUM_DOMAINS; k++) en[k] = en_sync[k][0];
  end

  tmr_counter #(.WIDTH(WIDTH), .SYNC_VOTERS(1'b1)) u_counter (
    .clk_i  (clk_i),
    .rst_i  (rst_i),
    .en_i   (en),
    .upset_i(upset_i),
    .x_o    (x_tmr_o)
  );

  // Reduce to one domain for a non-triplicated receiver.
  reducing_voter #(.WIDTH(WIDTH), .NUM_OUT(1)) u_reduce_single (
    .d_i(x_tmr_o),
    .q_o(x_o)
  );

  // Reduce to two copies for a duplicated-with-compare receiver.
  reducing_voter #(.WIDTH(WIDTH), .NUM_OUT(2)) u_reduce_dwc (
    .d_i(x_tmr_o),
    .q_o(x_dwc_o)
  );

endmodule : tmr_sync_counter_top
