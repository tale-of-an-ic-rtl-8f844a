// hdb3_ref_pkg -- cycle models of the encoder and decoder, for testbenches.
//
// enc_model follows the encoder rules bit by bit: a four-stage register of the
// serial input; when it holds four zeros and no pattern is being sent, the next
// four output cycles carry Tx0 = 1,0,0,1 / Tx1 = 0,1,1,0; otherwise each '1'
// leaving the register goes to Tx0 and Tx1 by turns (Tx0 first after reset).
// Outputs are registered: clock(d) returns what the lines show after that edge.
// dec_model follows the decoder rules: two four-stage line registers, pattern
// detection, four-cycle zero window, and the four error checks about the
// oldest stage. eval() gives the outputs for the current register contents;
// clock() advances one edge.
// The coding rules modelled here (pattern 1001/0110, alternation of '1's, the
// four error kinds) are those of the original specification; the window timing,
// the first '1' after clear going to line 0 and the exact exemption cycles are
// this design's own, so the models fix them as the RTL does.
package hdb3_ref_pkg;

  localparam logic [3:0] PAT0 = 4'b1001;  // Tx0 pattern, first bit sent = bit 3
  localparam logic [3:0] PAT1 = 4'b0110;

  class enc_model;
    bit [3:0] sr;      // sr[0] newest
    int       rem;     // pattern cycles still to send after this one
    bit       next_tx1;
    bit       tx0, tx1;
    bit       win;     // current cycle is a pattern cycle (spec_st)

    function void reset();
      sr = '0; rem = 0; next_tx1 = 0; tx0 = 0; tx1 = 0;
      eval();
    endfunction

    // Combinational view of the current state.
    int ph;
    function void eval();
      if (rem > 0) begin win = 1; ph = 4 - rem; end
      else if (sr == 4'b0000) begin win = 1; ph = 0; end
      else begin win = 0; ph = 0; end
    endfunction

    // One rising edge with serial input d.
    function void clock(bit d);
      eval();
      if (win) begin
        tx0 = PAT0[3 - ph];
        tx1 = PAT1[3 - ph];
        rem = (ph == 3) ? 0 : 3 - ph;
      end else begin
        tx0 = sr[3] && !next_tx1;
        tx1 = sr[3] &&  next_tx1;
        if (sr[3]) next_tx1 = !next_tx1;
      end
      sr = {sr[2:0], d};
      eval();
    endfunction
  endclass

  class dec_model;
    bit [3:0] a, b;
    int       rem;
    bit       prev_a, prev_b, prev_win;
    // outputs of eval()
    bit win, detect, main_out, both, d0, d1, fz, error;

    function void reset();
      a = '0; b = '0; rem = 0; prev_a = 0; prev_b = 0; prev_win = 0;
      eval();
    endfunction

    function void eval();
      detect   = (a == PAT0) && (b == PAT1);
      win      = (rem > 0) || detect;
      main_out = !win && (a[3] || b[3]);
      both     = a[3] && b[3];
      d0       = a[3] && prev_a && !win && !prev_win;
      d1       = b[3] && prev_b && !win && !prev_win;
      fz       = (a == 0) && (b == 0);
      error    = both || d0 || d1 || fz;
    endfunction

    function void clock(bit rx0, bit rx1);
      eval();
      if (rem > 0) rem--;
      else if (detect) rem = 3;
      prev_a = a[3]; prev_b = b[3]; prev_win = win;
      a = {a[2:0], rx0};
      b = {b[2:0], rx1};
      eval();
    endfunction
  endclass

endpackage
