// reducing_voter: reduces three TMR domains to fewer copies.
//
// With NUM_OUT = 1 (the default) a single majority voter turns the three
// domains into one signal, as needed at circuit outputs when there are not
// enough pins for triplicated outputs, or where a triplicated partition feeds
// one that is not triplicated. With NUM_OUT = 2 two voters work in parallel
// and feed a partition protected by duplication with compare (DWC); each copy
// has a voter of its own so that a single voter upset reaches only one copy,
// which the DWC comparison then detects. Values other than 1 or 2 are
// rejected at elaboration.
//
// Interface: d_i[k] is domain k; q_o[j] is reduced copy j.
// Timing: combinational.
module reducing_voter
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH   = 1,
  parameter int unsigned NUM_OUT = 1
) (
  input  logic [NUM_DOMAINS-1:0][WIDTH-1:0] d_i,
  output logic [NUM_OUT-1:0][WIDTH-1:0]     q_o
);

  if (NUM_OUT < 1 || NUM_OUT > 2) begin : g_bad_num_out
    $error("reducing_voter: NUM_OUT must be 1 (TMR to single) or 2 (TMR to DWC)");
  end

  for (genvar j = 0; j < NUM_OUT; j++) begin : g_out
    maj_voter #(.WIDTH(WIDTH)) u_vote (
      .d_i(d_i),
      .y_o(q_o[j])
    );
  end

endmodule : reducing_voter
