// tmr_cdc_sync: triplicated clock-domain-crossing synchronizer with voters.
//
// A signal that comes from another clock domain reaches each TMR domain
// through its own chain of STAGES flip-flops clocked by the destination
// clock, the usual guard against metastability. The three chains can settle
// on different cycles, because each copy of the input has its own timing
// path and a metastable flop may resolve either way, so right after the
// crossing the domains may disagree for a cycle even without any upset.
// Triplicated voters (tmr_voter) after the last stage bring the domains back
// together: as long as two chains agree, all three outputs agree.
//
// The document says voters should resynchronize the domains after the
// synchronizers but leaves the exact strategy open; placing one set of
// triplicated voters directly after the last stage, two stages and a
// synchronous reset are this design's choices.
//
// Interface: clk_i is the destination clock; rst_i[k] (synchronous, active
// high) clears chain k; d_i[k] is the source-domain signal for domain k;
// q_o[k] is the voted, synchronized signal for domain k.
// Timing: an input change that meets setup appears at q_o STAGES clocks later
// (in at least two chains); the voters are combinational after the last flop.
module tmr_cdc_sync
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic                              clk_i,
  input  logic [NUM_DOMAINS-1:0]            rst_i,
  input  logic [NUM_DOMAINS-1:0][WIDTH-1:0] d_i,
  output logic [NUM_DOMAINS-1:0][WIDTH-1:0] q_o
);

  if (STAGES < 1) begin : g_bad_stages
    $error("tmr_cdc_sync: STAGES must be at least 1");
  end

  // sync_q[k][s]: stage s of domain k's chain, stage 0 takes the input
  logic [NUM_DOMAINS-1:0][STAGES-1:0][WIDTH-1:0] sync_q;
  logic [NUM_DOMAINS-1:0][WIDTH-1:0]             sync_out;

  for (genvar k = 0; k < NUM_DOMAINS; k++) begin : g_dom
    always_ff @(posedge clk_i) begin
      if (rst_i[k]) begin
        sync_q[k] <= '0;
      end else begin
        sync_q[k][0] <= d_i[k];
        for (int s = 1; s < STAGES; s++) sync_q[k][s] <= sync_q[k][s-1];
      end
    end
    assign sync_out[k] = sync_q[k][STAGES-1];
  end

  tmr_voter #(.WIDTH(WIDTH)) u_cdc_voters (
    .d_i(sync_out),
    .q_o(q_o)
  );

endmodule : tmr_cdc_sync
