// hdb3_pkg -- constants and types shared by the two-line HDB3 encoder/decoder.
//
// The code replaces every run of RUN_LEN zeros in the serial stream with a
// fixed four-cycle pattern spread over the two lines: Tx0 = 1,0,0,1 and
// Tx1 = 0,1,1,0 (first bit sent first). Both patterns are palindromes, so the
// bit order of a 4-bit vector holding them does not matter. These numbers are
// the ones the design was specified with; the decoder error flags are grouped
// in one packed struct. A block that does not use the pattern words (a
// flip-flop, say) but is compiled together with this package will see lint
// report them as unused; that is expected.
package hdb3_pkg;

  // Length of a zero run that is replaced by the special pattern.
  localparam int unsigned RUN_LEN = 4;

  // Special pattern, one bit per clock, on each line.
  localparam logic [RUN_LEN-1:0] SPEC_TX0 = 4'b1001;
  localparam logic [RUN_LEN-1:0] SPEC_TX1 = 4'b0110;

  // Coding errors seen by the decoder (active high here; the pins are active low).
  typedef struct packed {
    logic both_2ones;  // Rx0 and Rx1 both '1' in the same cycle
    logic d0_2ones;    // two '1's in a row on Rx0 outside the special pattern
    logic d1_2ones;    // two '1's in a row on Rx1 outside the special pattern
    logic four_zeros;  // four cycles in a row with both lines '0'
  } dec_err_t;

endpackage
