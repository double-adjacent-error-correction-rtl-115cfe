// sec_daec_dec -- decoder of the SEC-DAEC (24,16) code.
//
// 1. Syndrome: the check bits are regenerated from the fetched data with the
//    encoder equations and XORed with the stored check bits.
// 2. Correction signals: data bit d_j owns a distinct pair of syndrome bits
//    (its two rows of the H matrix); c_j is the AND of that pair.
// 3. DAE detection: DAE is the OR of the K-1 products c_j & c_(j+1). Since
//    adjacent data columns share no row and every adjacent pair has its own
//    syndrome, at most one such product is active.
// 4. K-1 DAEC modules (daec_module): module j takes c_j, ~DAE and c_(j+1) and
//    passes single corrections when DAE = 0, and only the corrections of the
//    pair it owns when DAE = 1, which suppresses the miscorrections a distance
//    3 code would otherwise make on a double adjacent error.
// 5. Each data bit is XORed with its flip enable (Crr_d_j).
// A single error in a check bit raises one syndrome bit and no correction. A
// double adjacent error in the check bits raises two syndrome bits that are
// never the pair of a data bit, because no column has 1s in adjacent rows.
//
// Interface: data_i/check_i as read from memory (check bit r at check_i[r]),
// data_o corrected data, dae_o the DAE flag. Purely combinational.
//
// Parameters K, R, H as in sec_daec_enc; the defaults are the published
// (24,16) code. For a K-bit word there are K-1 DAEC modules. A matrix for
// another size must keep adjacent columns disjoint and give every adjacent
// pair a distinct union of rows (daec_pkg::pro2_gen_h does).
//
// The structure (syndrome, 2-input ANDs, the OR of adjacent pairs, the chain
// of DAEC modules, the output XORs) follows the published decoder. The dae_o
// status output is this design's addition.
module sec_daec_dec #(
  parameter int unsigned K = daec_pkg::K,
  parameter int unsigned R = daec_pkg::PRO2_R,
  parameter daec_pkg::hmat_t H = daec_pkg::pro2_paper_h()
) (
  input  logic [K-1:0] data_i,
  input  logic [R-1:0] check_i,
  output logic [K-1:0] data_o,
  output logic         dae_o
);

  logic [R-1:0] check_re, syn;
  logic [K-1:0] corr, flip;
  logic [K-2:0] b1, b2;
  logic         dae;

  sec_daec_enc #(.K(K), .R(R), .H(H)) u_regen (
    .data_i  (data_i),
    .check_o (check_re)
  );

  always_comb begin
    syn = check_i ^ check_re;
    for (int j = 0; j < K; j++) begin
      corr[j] = 1'b1;
      for (int r = 0; r < R; r++) if (H[r][j]) corr[j] = corr[j] & syn[r];
    end
    dae = |(corr[K-2:0] & corr[K-1:1]);
  end

  for (genvar i = 0; i < K - 1; i++) begin : g_daec
    daec_module u_daec (
      .a1 (corr[i]),
      .a2 (~dae),
      .a3 (corr[i+1]),
      .ad ((i == 0) ? 1'b0 : b2[(i == 0) ? 0 : i-1]),
      .b1 (b1[i]),
      .b2 (b2[i])
    );
  end

  always_comb begin
    flip = {b2[K-2], b1};
    data_o = data_i ^ flip;
    dae_o  = dae;
  end

endmodule
