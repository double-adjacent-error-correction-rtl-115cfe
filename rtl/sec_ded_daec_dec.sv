// sec_ded_daec_dec -- decoder of the SEC-DED-DAEC (28,16) code.
//
// The check bits are regenerated from the fetched data and XORed with the
// stored ones to form the 12-bit syndrome. Each data bit has a 3-input AND of
// its three syndrome bits; when it fires the bit is flipped.
//   * single data error: three syndrome bits, the bit's AND fires;
//   * double adjacent data error: six syndrome bits (adjacent columns share no
//     row), both ANDs fire, and no third column can lie inside those six rows
//     because any two columns share at most one row;
//   * two non-adjacent data errors sharing a check bit: four syndrome bits,
//     no AND fires; sharing none: both are corrected;
//   * errors in check bits alone never fire an AND.
// ded_o flags an uncorrectable double error: the syndrome has an even,
// non-zero number of ones and no correction took place. A single check bit
// error raises one syndrome bit and is not flagged.
//
// Interface: data_i/check_i as read from memory, data_o corrected data,
// ded_o double error detected. Purely combinational.
//
// Parameters K, R, H as in sec_ded_daec_enc; the defaults are the published
// (28,16) code.
//
// Syndrome, 3-input ANDs and XOR correction follow the published decoder. The
// text gives the detection rule only in words ("even number of syndrome bits
// without any correction"); the reduction-XOR/OR form is this design's.
module sec_ded_daec_dec #(
  parameter int unsigned K = daec_pkg::K,
  parameter int unsigned R = daec_pkg::PRO1_R,
  parameter daec_pkg::hmat_t H = daec_pkg::pro1_paper_h()
) (
  input  logic [K-1:0] data_i,
  input  logic [R-1:0] check_i,
  output logic [K-1:0] data_o,
  output logic         ded_o
);

  logic [R-1:0] check_re, syn;
  logic [K-1:0] corr;

  sec_ded_daec_enc #(.K(K), .R(R), .H(H)) u_regen (
    .data_i  (data_i),
    .check_o (check_re)
  );

  always_comb begin
    syn = check_i ^ check_re;
    for (int j = 0; j < K; j++) begin
      corr[j] = 1'b1;
      for (int r = 0; r < R; r++) if (H[r][j]) corr[j] = corr[j] & syn[r];
    end
    data_o = data_i ^ corr;
    ded_o  = (|syn) & ~(^syn) & ~(|corr);
  end

endmodule
