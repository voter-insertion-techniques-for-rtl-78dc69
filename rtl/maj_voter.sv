// maj_voter: bitwise two-out-of-three majority voter.
//
// Each output bit is 1 when at least two of the three domain inputs are 1,
// written as the sum of products a&b | a&c | b&c. One bit of this voter is
// exactly the function a single three-input look-up table (LUT3) holds on an
// FPGA, which is how the document expects voters to be built; a WIDTH-bit
// voter is WIDTH independent one-bit voters.
//
// Interface: d_i[k] is the value of domain k, y_o the voted value.
// Timing: purely combinational, no clock.
//
// The keep_hierarchy attribute stops synthesis from merging the three voters
// of a triplicated set, which compute the same function of the same inputs
// and would otherwise be shared, leaving one voter as a single point of
// failure. Vendor tools need their own equivalent (a KEEP or DONT_TOUCH
// constraint on these instances).
(* keep_hierarchy *)
module maj_voter
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic [NUM_DOMAINS-1:0][WIDTH-1:0] d_i,
  output logic [WIDTH-1:0]                  y_o
);

  always_comb begin
    y_o = (d_i[0] & d_i[1]) | (d_i[0] & d_i[2]) | (d_i[1] & d_i[2]);
  end

endmodule : maj_voter
