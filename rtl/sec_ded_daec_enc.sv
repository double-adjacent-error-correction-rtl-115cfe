// sec_ded_daec_enc -- check bit generator of the SEC-DED-DAEC (28,16) code.
//
// Check bit P_r (bit r-1 of check_o) is the XOR of the data bits marked with 1
// in row r of the H matrix. Every data bit takes part in three check bits,
// any two data bits share at most one check bit, and adjacent data bits share
// none; rows hold three to five data bits.
//
// Interface: data_i (K bits) in, check_o (R bits) out.
// Timing: purely combinational, no clock. The decoder instantiates this block
// to regenerate the check bits from the fetched data.
//
// Parameters: K data bits, R check bits, H the matrix (daec_pkg::hmat_t). The
// defaults are the published (28,16) code. Making the matrix a parameter, so
// that daec_pkg::pro1_gen_h can supply one for 64- or 256-bit words, is this
// design's choice.
module sec_ded_daec_enc #(
  parameter int unsigned K = daec_pkg::K,
  parameter int unsigned R = daec_pkg::PRO1_R,
  parameter daec_pkg::hmat_t H = daec_pkg::pro1_paper_h()
) (
  input  logic [K-1:0] data_i,
  output logic [R-1:0] check_o
);

  always_comb begin
    for (int r = 0; r < R; r++) check_o[r] = ^(data_i & H[r][K-1:0]);
  end

endmodule
