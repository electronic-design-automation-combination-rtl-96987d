// Reference model of the combination lock for the testbenches, written without
// the lock's state table.
//
// The lock is a matcher for the combination 0110111 followed by a final 0. Its
// progress after any input history is the length k (0..7) of the longest tail
// of the history that equals the first k symbols of 0110111; state A..H is
// k = 0..7. The correct next symbol is symbol k of the combination, or 0 when
// k = 7, and the lock opens when k = 7 and the present input is 0.
package comb_lock_ref_pkg;

  localparam int unsigned CODE_LEN = 7;
  localparam logic [CODE_LEN-1:0] CODE = 7'b0110111;  // first symbol in the MSB

  // Symbol i (0 = first) of the combination.
  function automatic logic code_sym(int unsigned i);
    return CODE[CODE_LEN-1-i];
  endfunction

  // Progress after the history hist, whose bit 0 is the latest input, given
  // that nvalid inputs have been received since reset.
  function automatic int unsigned progress(logic [31:0] hist, int unsigned nvalid);
    for (int k = CODE_LEN; k > 0; k--) begin
      if (k <= nvalid) begin
        bit ok = 1'b1;
        // The tail of length k, oldest first, is hist[k-1] .. hist[0].
        for (int i = 0; i < k; i++)
          if (hist[k-1-i] != code_sym(i)) ok = 1'b0;
        if (ok) return k;
      end
    end
    return 0;
  endfunction

  // The input that moves the lock closer to opening, at progress k.
  function automatic logic right_symbol(int unsigned k);
    return (k == CODE_LEN) ? 1'b0 : code_sym(k);
  endfunction

  // Name of the lock state at progress k, as the enumeration spells it.
  function automatic string state_name(int unsigned k);
    string letters = "ABCDEFGH";
    return $sformatf("ST_%c", letters[k]);
  endfunction

endpackage
