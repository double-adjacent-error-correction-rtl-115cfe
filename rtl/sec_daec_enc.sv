// sec_daec_enc -- check bit generator of the SEC-DAEC (24,16) code.
//
// Each check bit is the XOR of the data bits marked in its row of the H
// matrix; with the default matrix this is exactly
//   p0 = d0^d6^d10^d13        p4 = d2^d4^d7^d10
//   p1 = d1^d7^d11^d14        p5 = d3^d5^d8^d11^d13
//   p2 = d0^d2^d8^d12         p6 = d4^d9^d12^d14
//   p3 = d1^d3^d6^d9^d15      p7 = d5^d15
// Every data bit enters exactly two equations (column weight 2), so the
// longest path is a five-input XOR.
//
// Interface: data_i (K bits) in, check_o (R bits, bit r = check bit p_r) out.
// Timing: purely combinational, no clock. The same block regenerates the check
// bits inside the decoder.
//
// Parameters: K data bits, R check bits, H the matrix (daec_pkg::hmat_t,
// row r holds the data mask of check bit r; only rows < R, columns < K used).
// The defaults are the published (24,16) code, whose equations are these.
// Passing the matrix as a parameter, so that daec_pkg::pro2_gen_h can supply
// one for 64- or 256-bit words, is this design's choice.
module sec_daec_enc #(
  parameter int unsigned K = daec_pkg::K,
  parameter int unsigned R = daec_pkg::PRO2_R,
  parameter daec_pkg::hmat_t H = daec_pkg::pro2_paper_h()
) (
  input  logic [K-1:0] data_i,
  output logic [R-1:0] check_o
);

  always_comb begin
    for (int r = 0; r < R; r++) check_o[r] = ^(data_i & H[r][K-1:0]);
  end

endmodule
