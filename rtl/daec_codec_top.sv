// daec_codec_top -- both double adjacent error correcting codecs of a 16-bit
// cache word, side by side.
//
// Write path: the data word is encoded and the full codeword is driven out in
// its physical column order (data bits first, then the check bits in the
// order of the code's H matrix), ready to be stored in the cache array. Read
// path: a codeword fetched from the array is split into data and check bits
// and decoded.
//   * pro1_*: SEC-DED-DAEC (28,16). Corrects single and double adjacent
//     errors, flags other double errors on pro1_ded_o.
//   * pro2_*: SEC-DAEC (24,16). Corrects single and double adjacent errors
//     with fewer check bits and a shorter decoding path; pro2_dae_o reports
//     that a double adjacent data error was corrected.
// The cache array itself is outside this block: its write data are the
// *_wr_cw_o ports and its read data the *_rd_cw_i ports.
//
// Timing: purely combinational in both directions, as the codecs are meant to
// sit in the cache access path; registering is left to the surrounding cache.
//
// The two codes are the published ones; placing them in one block with
// separate ports is this design's choice.
module daec_codec_top
  import daec_pkg::*;
(
  input  logic [K-1:0]   pro1_wr_data_i,
  output pro1_codeword_t pro1_wr_cw_o,
  input  pro1_codeword_t pro1_rd_cw_i,
  output logic [K-1:0]   pro1_rd_data_o,
  output logic           pro1_ded_o,

  input  logic [K-1:0]   pro2_wr_data_i,
  output pro2_codeword_t pro2_wr_cw_o,
  input  pro2_codeword_t pro2_rd_cw_i,
  output logic [K-1:0]   pro2_rd_data_o,
  output logic           pro2_dae_o
);

  logic [PRO1_R-1:0] pro1_wr_check;
  logic [PRO2_R-1:0] pro2_wr_check;

  sec_ded_daec_enc u_pro1_enc (
    .data_i  (pro1_wr_data_i),
    .check_o (pro1_wr_check)
  );

  sec_ded_daec_dec u_pro1_dec (
    .data_i  (pro1_rd_cw_i.data),
    .check_i (pro1_rd_cw_i.check),
    .data_o  (pro1_rd_data_o),
    .ded_o   (pro1_ded_o)
  );

  sec_daec_enc u_pro2_enc (
    .data_i  (pro2_wr_data_i),
    .check_o (pro2_wr_check)
  );

  sec_daec_dec u_pro2_dec (
    .data_i  (pro2_rd_cw_i.data),
    .check_i (pro2_from_cols(pro2_rd_cw_i.check_col)),
    .data_o  (pro2_rd_data_o),
    .dae_o   (pro2_dae_o)
  );

  assign pro1_wr_cw_o = '{check: pro1_wr_check, data: pro1_wr_data_i};
  assign pro2_wr_cw_o = '{check_col: pro2_to_cols(pro2_wr_check), data: pro2_wr_data_i};

endmodule
