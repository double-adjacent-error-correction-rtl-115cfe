// daec_module -- selective correction cell for one pair of adjacent data bits
// of the SEC-DAEC decoder.
//
// The SEC-DAEC code has Hamming distance 3, so a double adjacent error can
// also raise the correction signal of some unrelated data bit. The decoder
// therefore computes a global DAE flag (some pair of adjacent correction
// signals is active) and routes every correction through one of these cells:
//   * DAE = 0 (a2 = 1): single error case, both correction signals pass
//     unchanged (b2 = a3, b1 = a1 | ad);
//   * DAE = 1 (a2 = 0): only a cell whose own pair is active (a1 & a3) lets
//     corrections through; all other correction signals are masked.
// Cells are chained: b2 of cell i drives ad of cell i+1, whose b1 flips the
// data bit both cells share. The first cell has ad tied to 0 and b2 of the
// last cell flips the top data bit.
//
// Interface: a1 = correction signal of the lower bit, a3 = of the upper bit,
// a2 = inverted DAE, ad = b2 of the cell below; b1 = flip lower bit,
// b2 = flip upper bit. Purely combinational.
//
// The port names, the chaining through ad and the behaviour follow the
// published DAEC module; the logic is written here as the sum of three product
// terms of that behaviour.
module daec_module (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic ad,
  output logic b1,
  output logic b2
);

  logic pass_hi, pass_lo, pass_pair;

  always_comb begin
    pass_hi   = a3 & a2;        // single correction of the upper bit
    pass_lo   = a1 & a2;        // single correction of the lower bit
    pass_pair = a1 & a3 & ~a2;  // this cell owns the double adjacent error
    b2 = pass_hi | pass_pair;
    b1 = pass_lo | pass_pair | ad;
  end

endmodule
