// tb_sec_ded_daec_dec -- SEC-DED-DAEC (28,16) decoder under every error of
// weight one and two in the stored 28-bit word (d0..d15 then P1..P12).
//
// The expected outcome of each pattern is worked out from the column table of
// the code (three check rows per data bit):
//   * no error, single error, two data bits that share no check row, a data
//     bit and a check bit outside its rows: corrected, no flag;
//   * two check bits, two data bits sharing a check row, a data bit and a
//     check bit inside its rows: flagged, and the data bits pass uncorrected
//     (a flagged word is never altered).
// Adjacent data bits never share a row, so every double adjacent error must be
// corrected. Each class is counted and must occur at least once.
module tb_sec_ded_daec_dec;
  logic        clk = 1'b0;
  logic [15:0] d_in, d_out;
  logic [11:0] p_in;
  logic        ded;
  int          checks = 0, failures = 0;
  int          n_single = 0, n_dae = 0, n_dd_corr = 0, n_dd_det = 0, n_cc = 0,
               n_dc_corr = 0, n_dc_det = 0;

  int unsigned col_rows [16][3] = '{
    '{0, 1, 2}, '{3, 7, 11}, '{0, 9, 10}, '{1, 4, 6},
    '{2, 7, 10}, '{0, 3, 4}, '{5, 8, 11}, '{2, 3, 6},
    '{1, 7, 9}, '{0, 5, 6}, '{1, 8, 10}, '{2, 4, 5},
    '{0, 7, 8}, '{6, 9, 11}, '{1, 3, 5}, '{2, 8, 9}
  };

  sec_ded_daec_dec dut (.data_i(d_in), .check_i(p_in), .data_o(d_out), .ded_o(ded));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [27:0] ref_encode(logic [15:0] x);
    logic [11:0] p = '0;
    for (int j = 0; j < 16; j++)
      if (x[j]) for (int k = 0; k < 3; k++) p[col_rows[j][k]] ^= 1'b1;
    return {p, x};
  endfunction

  function automatic bit in_rows(int j, int r);
    return col_rows[j][0] == r || col_rows[j][1] == r || col_rows[j][2] == r;
  endfunction

  function automatic bit share_row(int i, int j);
    return in_rows(j, col_rows[i][0]) || in_rows(j, col_rows[i][1]) || in_rows(j, col_rows[i][2]);
  endfunction

  task automatic apply(logic [27:0] cw, logic [15:0] want, logic want_ded, string what);
    {p_in, d_in} = cw;
    #1;
    checks += 2;
    if (d_out !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: data %h expected %h", what, d_out, want);
    end
    if (ded !== want_ded) begin
      failures++;
      if (failures < 20) $display("FAIL %s: ded %b expected %b", what, ded, want_ded);
    end
  endtask

  initial begin
    logic [15:0] data;
    logic [27:0] cw, bad;
    bit          detect;
    for (int n = 0; n < 200; n++) begin
      data = (n == 0) ? 16'h0000 : (n == 1) ? 16'hffff : 16'($urandom);
      cw = ref_encode(data);
      apply(cw, data, 1'b0, "no error");
      for (int a = 0; a < 28; a++) begin
        apply(cw ^ (28'd1 << a), data, 1'b0, $sformatf("single %0d", a));
        n_single++;
        for (int b = a + 1; b < 28; b++) begin
          bad = cw ^ (28'd1 << a) ^ (28'd1 << b);
          if (b < 16) begin
            detect = share_row(a, b);
            if (b == a + 1) n_dae++;
            else if (detect) n_dd_det++;
            else n_dd_corr++;
          end else if (a >= 16) begin
            detect = 1'b1;
            n_cc++;
          end else begin
            detect = in_rows(a, b - 16);
            if (detect) n_dc_det++; else n_dc_corr++;
          end
          apply(bad, detect ? bad[15:0] : data, detect, $sformatf("double %0d,%0d", a, b));
        end
      end
      @(posedge clk);
    end
    checks += 7;
    if (n_single == 0)  begin failures++; $display("FAIL no single error"); end
    if (n_dae == 0)     begin failures++; $display("FAIL no adjacent data error"); end
    if (n_dd_corr == 0) begin failures++; $display("FAIL no correctable non-adjacent pair"); end
    if (n_dd_det == 0)  begin failures++; $display("FAIL no detectable data pair"); end
    if (n_cc == 0)      begin failures++; $display("FAIL no check pair"); end
    if (n_dc_corr == 0) begin failures++; $display("FAIL no correctable data+check pair"); end
    if (n_dc_det == 0)  begin failures++; $display("FAIL no detectable data+check pair"); end
    $display("single=%0d adjacent=%0d dd_corr=%0d dd_det=%0d cc=%0d dc_corr=%0d dc_det=%0d",
             n_single, n_dae, n_dd_corr, n_dd_det, n_cc, n_dc_corr, n_dc_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
