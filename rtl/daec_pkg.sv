// daec_pkg -- constants and codeword layouts shared by the two double adjacent
// error correcting codecs of this design.
//
// Two codes protect a 16-bit cache word:
//   * SEC-DED-DAEC (28,16): 12 check bits, every data column of the H matrix
//     has weight 3, any two columns share at most one row and adjacent columns
//     share none. Corrects single and double adjacent errors and flags the
//     double errors it cannot correct.
//   * SEC-DAEC (24,16): 8 check bits, every data column has weight 2, rows are
//     orthogonal and adjacent columns share no row. Corrects single and double
//     adjacent errors; miscorrections are suppressed by the DAEC modules.
//
// H matrices are stored by row: bit j of row r is 1 when data bit d_j takes
// part in check bit r. Both matrices are the published ones, copied bit for
// bit; the row numbering (row r here is row r+1 of the printed matrix) and
// the packed representation are this design's choice.
//
// The codeword layouts put the data bits first (codeword bit j = d_j) and the
// check bits after them in the printed column order. For the (28,16) code the
// check columns form an identity, so check bit r sits at codeword bit 16+r.
// For the (24,16) code the check columns are printed in the order
// p2 p3 p4 p5 p6 p7 p0 p1, chosen so that two adjacent upset check bits never
// form the syndrome pair of a data bit.
//
// For 64- and 256-bit words the package also provides matrix builders
// (pro2_gen_h, pro1_gen_h) and the check-bit ordering rule pro2_check_start,
// evaluated at elaboration time; these are this design's own constructions.
package daec_pkg;

  localparam int unsigned K = 16;        // data bits per word

  // Largest code the generic encoders and decoders accept. Matrices are passed
  // to them in this fixed shape; only rows < R and columns < K are used.
  localparam int unsigned MAX_K = 256;
  localparam int unsigned MAX_R = 64;
  typedef logic [MAX_K-1:0] hmat_t [MAX_R];

  // ---------------------------------------------------------------- (28,16)
  localparam int unsigned PRO1_R = 12;   // check bits

  localparam logic [PRO1_R-1:0][K-1:0] PRO1_H = '{
    11: 16'h2042,   // row 12: d1 d6 d13
    10: 16'h0414,   // row 11: d2 d4 d10
     9: 16'ha104,   // row 10: d2 d8 d13 d15
     8: 16'h9440,   // row  9: d6 d10 d12 d15
     7: 16'h1112,   // row  8: d1 d4 d8 d12
     6: 16'h2288,   // row  7: d3 d7 d9 d13
     5: 16'h4a40,   // row  6: d6 d9 d11 d14
     4: 16'h0828,   // row  5: d3 d5 d11
     3: 16'h40a2,   // row  4: d1 d5 d7 d14
     2: 16'h8891,   // row  3: d0 d4 d7 d11 d15
     1: 16'h4509,   // row  2: d0 d3 d8 d10 d14
     0: 16'h1225    // row  1: d0 d2 d5 d9 d12
  };

  function automatic hmat_t pro1_paper_h();
    hmat_t h = '{default: '0};
    for (int r = 0; r < PRO1_R; r++) h[r] = MAX_K'(PRO1_H[r]);
    return h;
  endfunction

  // Codeword as stored: check bits P1..P12 above data bits d0..d15.
  typedef struct packed {
    logic [PRO1_R-1:0] check;
    logic [K-1:0]      data;
  } pro1_codeword_t;

  // ---------------------------------------------------------------- (24,16)
  localparam int unsigned PRO2_R = 8;

  localparam logic [PRO2_R-1:0][K-1:0] PRO2_H = '{
    7: 16'h8020,    // p7: d5 d15
    6: 16'h5210,    // p6: d4 d9 d12 d14
    5: 16'h2928,    // p5: d3 d5 d8 d11 d13
    4: 16'h0494,    // p4: d2 d4 d7 d10
    3: 16'h824a,    // p3: d1 d3 d6 d9 d15
    2: 16'h1105,    // p2: d0 d2 d8 d12
    1: 16'h4882,    // p1: d1 d7 d11 d14
    0: 16'h2441     // p0: d0 d6 d10 d13
  };

  function automatic hmat_t pro2_paper_h();
    hmat_t h = '{default: '0};
    for (int r = 0; r < PRO2_R; r++) h[r] = MAX_K'(PRO2_H[r]);
    return h;
  endfunction

  // Check bit held by each check column, in physical order (column 16+i).
  localparam int unsigned PRO2_CHK_ORDER [PRO2_R] = '{2, 3, 4, 5, 6, 7, 0, 1};

  // Codeword as stored: check columns (physical order) above d0..d15.
  typedef struct packed {
    logic [PRO2_R-1:0] check_col;  // check_col[i] holds p[PRO2_CHK_ORDER[i]]
    logic [K-1:0]      data;
  } pro2_codeword_t;

  // Check bits p0..p7 -> check columns in stored order.
  function automatic logic [PRO2_R-1:0] pro2_to_cols(logic [PRO2_R-1:0] p);
    logic [PRO2_R-1:0] c;
    for (int i = 0; i < PRO2_R; i++) c[i] = p[PRO2_CHK_ORDER[i]];
    return c;
  endfunction

  // Check columns in stored order -> check bits p0..p7.
  function automatic logic [PRO2_R-1:0] pro2_from_cols(logic [PRO2_R-1:0] c);
    logic [PRO2_R-1:0] p;
    for (int i = 0; i < PRO2_R; i++) p[PRO2_CHK_ORDER[i]] = c[i];
    return p;
  endfunction

  // ------------------------------------------------- larger word sizes
  // Matrices for the 64- and 256-bit words are built by the two functions
  // below. They are constructions of this design that obey the same rules as
  // the published 16-bit matrices; they are not the published 64/256-bit
  // matrices.

  // SEC-DAEC, weight-2 columns: (77,64) is pro2_gen_h(64, 13) and (281,256)
  // is pro2_gen_h(256, 25). Candidate columns {i, i+s} are tried by growing
  // distance s >= 2 (never two adjacent rows) and growing i; a candidate is
  // taken if it is unused, shares no row with the previous column, and the
  // union of the two columns differs from the union of every earlier adjacent
  // pair. The last rule makes the syndrome of each double adjacent data error
  // unique, so exactly one DAEC module claims it.
  function automatic hmat_t pro2_gen_h(int unsigned k, int unsigned r);
    hmat_t            h = '{default: '0};
    logic [MAX_R-1:0] used [MAX_R];
    logic [MAX_R-1:0] unions [MAX_K];
    logic [MAX_R-1:0] prev = '0, cur = '0;
    logic [$clog2(MAX_R)-1:0] pick_a = '0, pick_b = '0;
    bit               found, dup;
    for (int q = 0; q < MAX_R; q++) used[q] = '0;
    for (int q = 0; q < MAX_K; q++) unions[q] = '0;
    for (int col = 0; col < int'(k); col++) begin
      found = 1'b0;
      for (int s = 2; s < int'(r); s++) begin
        for (int a = 0; a + s < int'(r); a++) begin
          if (!found && !used[a][a+s]) begin
            cur = '0;
            cur[a] = 1'b1;
            cur[a+s] = 1'b1;
            dup = 1'b0;
            if (col > 0) begin
              if ((cur & prev) != '0) dup = 1'b1;
              for (int q = 0; q + 1 < col; q++) if (unions[q] == (cur | prev)) dup = 1'b1;
            end
            if (!dup) begin
              found = 1'b1;
              pick_a = $clog2(MAX_R)'(a);
              pick_b = $clog2(MAX_R)'(a + s);
            end
          end
        end
      end
      cur = '0;
      cur[pick_a] = 1'b1;
      cur[pick_b] = 1'b1;
      if (col > 0) unions[col-1] = cur | prev;
      used[pick_a] = used[pick_a] | (MAX_R'(1) << pick_b);
      h[pick_a] = h[pick_a] | (MAX_K'(1) << col);
      h[pick_b] = h[pick_b] | (MAX_K'(1) << col);
      prev = cur;
    end
    return h;
  endfunction

  // Stored order of the SEC-DAEC check bits: check column i holds check bit
  // (start + i) mod r. The start row is the first one that is not a row of
  // the last data bit and forms no data column together with a row of it, so
  // that an upset of the last data bit and the first check column neither
  // cancels the data bit's syndrome pair nor raises a foreign correction
  // signal. For the published (24,16) matrix this gives start 2,
  // the order p2..p7 p0 p1 of the published codeword.
  function automatic int unsigned pro2_check_start(hmat_t h, int unsigned k, int unsigned r);
    bit bad;
    for (int s0 = 0; s0 < int'(r); s0++) begin
      bad = h[s0][k-1];
      for (int j = 0; j + 1 < int'(k); j++)
        if (h[s0][j])
          for (int x = 0; x < int'(r); x++)
            if (x != s0 && h[x][j] && h[x][k-1]) bad = 1'b1;
      if (!bad) return s0;
    end
    return 0;
  endfunction

  // SEC-DED-DAEC, weight-3 columns: (87,64) is pro1_gen_h(64, 23) and
  // (300,256) is pro1_gen_h(256, 44). Row triples {a<b<c} are tried in
  // lexicographic order; a triple is taken if none of its three row pairs is
  // already covered by an earlier column (so any two columns share at most one
  // row) and it shares no row with the previous column.
  function automatic hmat_t pro1_gen_h(int unsigned k, int unsigned r);
    hmat_t            h = '{default: '0};
    logic [MAX_R-1:0] pair [MAX_R];
    logic [MAX_R-1:0] prev = '0;
    int unsigned      pa = 0, pb = 0, pc = 0;
    bit               found;
    for (int q = 0; q < MAX_R; q++) pair[q] = '0;
    for (int col = 0; col < int'(k); col++) begin
      found = 1'b0;
      for (int a = 0; a + 2 < int'(r); a++) begin
        if (!found && !prev[a]) begin
          for (int b = a + 1; b + 1 < int'(r); b++) begin
            if (!found && !prev[b] && !pair[a][b]) begin
              for (int c = b + 1; c < int'(r); c++) begin
                if (!found && !prev[c] && !pair[a][c] && !pair[b][c]) begin
                  found = 1'b1;
                  pa = a;
                  pb = b;
                  pc = c;
                end
              end
            end
          end
        end
      end
      pair[pa] = pair[pa] | (MAX_R'(1) << pb); pair[pb] = pair[pb] | (MAX_R'(1) << pa);
      pair[pa] = pair[pa] | (MAX_R'(1) << pc); pair[pc] = pair[pc] | (MAX_R'(1) << pa);
      pair[pb] = pair[pb] | (MAX_R'(1) << pc); pair[pc] = pair[pc] | (MAX_R'(1) << pb);
      h[pa] = h[pa] | (MAX_K'(1) << col);
      h[pb] = h[pb] | (MAX_K'(1) << col);
      h[pc] = h[pc] | (MAX_K'(1) << col);
      prev = '0;
      prev[pa] = 1'b1;
      prev[pb] = 1'b1;
      prev[pc] = 1'b1;
    end
    return h;
  endfunction

endpackage
