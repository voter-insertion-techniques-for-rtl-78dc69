// tmr_pkg: constants shared by the triple modular redundancy (TMR) blocks.
//
// A TMR circuit holds three redundant copies, or domains, of the same logic.
// Every triplicated signal in this design is carried as a packed array
// [NUM_DOMAINS-1:0][WIDTH-1:0], domain 0 in the lowest slice. The three-domain
// structure follows the document; the packed-array convention is this
// design's own.
package tmr_pkg;

  // Number of redundant copies of the circuit.
  localparam int unsigned NUM_DOMAINS = 3;

endpackage : tmr_pkg
