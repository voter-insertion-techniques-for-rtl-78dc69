// tmr_voter: triplicated majority voters.
//
// Three maj_voter instances, one per TMR domain. Every voter takes the value
// of all three domains and drives only its own domain's output, so the voter
// itself is not a single point of failure: an upset in one voter corrupts one
// domain, which the next voting stage masks again. This is the structure the
// document uses for synchronization voters (in feedback paths), for partition
// voters (between TMR partitions) and for voters after clock-domain-crossing
// synchronizers.
//
// Interface: d_i[k] is the value of domain k; q_o[k] is the voted value handed
// to domain k. With no fault all three q_o slices are equal.
// Timing: combinational.
module tmr_voter
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic [NUM_DOMAINS-1:0][WIDTH-1:0] d_i,
  output logic [NUM_DOMAINS-1:0][WIDTH-1:0] q_o
);

  for (genvar k = 0; k < NUM_DOMAINS; k++) begin : g_dom
    maj_voter #(.WIDTH(WIDTH)) u_vote (
      .d_i(d_i),
      .y_o(q_o[k])
    );
  end

endmodule : tmr_voter
