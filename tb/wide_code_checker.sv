// wide_code_checker -- drives one encoder/decoder pair of either code at a
// given word size and checks it; used by tb_daec_wide_words.
//
// DED = 1 selects the SEC-DED-DAEC code (weight-3 columns, ded flag), DED = 0
// the SEC-DAEC code (weight-2 columns, DAE flag). The stored word is laid out
// as data bits d0..d(K-1) followed by the check bits: in order 0..R-1 for
// SEC-DED-DAEC, rotated to start at daec_pkg::pro2_check_start for SEC-DAEC.
//
// Structure checks on the matrix: every data column has the right weight, two
// columns share at most one row, adjacent columns share none, SEC-DAEC
// columns never use two adjacent rows, and the number of ones in H (data part
// plus identity) and in its fullest row match ONES and MAX_ROW when those
// are non-zero.
// Decoding checks, for WORDS random data words: the encoder output against
// the check equations of H; no error; every single error; every double error
// in adjacent stored bits; for SEC-DED-DAEC also PAIRS random non-adjacent
// double errors. Expected outcomes come from the rows of the columns hit:
// corrected when the errors share no check row, flagged and left alone when
// they do (SEC-DED-DAEC); always corrected for single and adjacent errors.
module wide_code_checker #(
  parameter bit             DED     = 1'b0,
  parameter int unsigned    K       = 64,
  parameter int unsigned    R       = 13,
  parameter daec_pkg::hmat_t H      = daec_pkg::pro2_gen_h(64, 13),
  parameter int unsigned    ONES    = 0,
  parameter int unsigned    MAX_ROW = 0,
  parameter int unsigned    WORDS   = 40,
  parameter int unsigned    PAIRS   = 400
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = K + R;
  localparam int unsigned START = DED ? 0 : daec_pkg::pro2_check_start(H, K, R);

  logic [K-1:0] d_wr, d_rd, d_out;
  logic [R-1:0] p_wr, p_rd;
  logic         flag;

  if (DED) begin : g_ded
    sec_ded_daec_enc #(.K(K), .R(R), .H(H)) u_enc (.data_i(d_wr), .check_o(p_wr));
    sec_ded_daec_dec #(.K(K), .R(R), .H(H)) u_dec (
      .data_i(d_rd), .check_i(p_rd), .data_o(d_out), .ded_o(flag));
  end else begin : g_sec
    sec_daec_enc #(.K(K), .R(R), .H(H)) u_enc (.data_i(d_wr), .check_o(p_wr));
    sec_daec_dec #(.K(K), .R(R), .H(H)) u_dec (
      .data_i(d_rd), .check_i(p_rd), .data_o(d_out), .dae_o(flag));
  end

  task automatic expect_ok(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s K=%0d: %s", DED ? "SEC-DED-DAEC" : "SEC-DAEC", K, what);
    end
  endtask

  // Rows of stored bit b: a data column of H, or the single row of a check bit.
  function automatic logic [R-1:0] rows_of(int b);
    logic [R-1:0] m = '0;
    if (b < int'(K)) for (int r = 0; r < int'(R); r++) m[r] = H[r][b];
    else m[(b - K + START) % R] = 1'b1;
    return m;
  endfunction

  task automatic decode(logic [N-1:0] cw, logic [K-1:0] want, logic want_flag, string what);
    d_rd = cw[K-1:0];
    for (int i = 0; i < int'(R); i++) p_rd[(i + START) % R] = cw[K+i];
    #1;
    expect_ok(d_out == want, {what, " data"});
    expect_ok(flag == want_flag, {what, " flag"});
  endtask

  // Expected result of a double error at stored bits a < b.
  task automatic double_error(logic [N-1:0] cw, int a, int b);
    logic [N-1:0] bad = cw ^ (N'(1) << a) ^ (N'(1) << b);
    bit shared = (rows_of(a) & rows_of(b)) != '0;
    bit both_data = b < int'(K);
    bit both_check = a >= int'(K);
    string what = $sformatf("double %0d,%0d", a, b);
    if (DED) begin
      if (both_check || shared) decode(bad, bad[K-1:0], 1'b1, what);
      else decode(bad, cw[K-1:0], 1'b0, what);
    end else begin
      decode(bad, cw[K-1:0], both_data && b == a + 1, what);
    end
  endtask

  initial begin
    int ones, row_max, row_n, w;
    logic [R-1:0] ci, cj;
    logic [K-1:0] data;
    logic [R-1:0] pexp;
    logic [N-1:0] cw;
    int a, b;
    done = 1'b0; checks = 0; failures = 0;
    d_wr = '0; d_rd = '0; p_rd = '0;

    // Matrix structure.
    for (int i = 0; i < int'(K); i++) begin
      ci = rows_of(i);
      expect_ok($countones(ci) == (DED ? 3 : 2), $sformatf("column %0d weight", i));
      if (!DED) for (int r = 0; r + 1 < int'(R); r++)
        expect_ok(!(ci[r] && ci[r+1]), $sformatf("column %0d adjacent rows", i));
      for (int j = i + 1; j < int'(K); j++) begin
        cj = rows_of(j);
        if (j == i + 1) expect_ok((ci & cj) == '0, $sformatf("columns %0d,%0d share a row", i, j));
        else if ($countones(ci & cj) > 1) expect_ok(1'b0, $sformatf("columns %0d,%0d overlap", i, j));
      end
    end
    ones = 0; row_max = 0;
    for (int r = 0; r < int'(R); r++) begin
      row_n = $countones(H[r][K-1:0]) + 1;
      ones += row_n;
      if (row_n > row_max) row_max = row_n;
    end
    if (ONES != 0) expect_ok(ones == int'(ONES), $sformatf("%0d ones in H, expected %0d", ones, ONES));
    if (MAX_ROW != 0) expect_ok(row_max == int'(MAX_ROW),
                                $sformatf("max %0d ones in a row, expected %0d", row_max, MAX_ROW));
    $display("%s (%0d,%0d): %0d ones in H, at most %0d in a row",
             DED ? "SEC-DED-DAEC" : "SEC-DAEC", N, K, ones, row_max);

    for (int n = 0; n < int'(WORDS); n++) begin
      for (w = 0; w < int'(K); w += 32) data[w +: 32] = $urandom;
      if (n == 0) data = '0;
      d_wr = data;
      #1;
      for (int r = 0; r < int'(R); r++) pexp[r] = ^(data & H[r][K-1:0]);
      expect_ok(p_wr == pexp, "encoder");
      cw[K-1:0] = data;
      for (int i = 0; i < int'(R); i++) cw[K+i] = pexp[(i + START) % R];
      decode(cw, data, 1'b0, "no error");
      for (int e = 0; e < int'(N); e++)
        decode(cw ^ (N'(1) << e), data, 1'b0, $sformatf("single %0d", e));
      for (int e = 0; e + 1 < int'(N); e++) double_error(cw, e, e + 1);
      if (DED) for (int q = 0; q < int'(PAIRS); q++) begin
        a = $urandom_range(N - 3);
        b = $urandom_range(N - 1, a + 2);
        double_error(cw, a, b);
      end
    end
    done = 1'b1;
  end
endmodule
