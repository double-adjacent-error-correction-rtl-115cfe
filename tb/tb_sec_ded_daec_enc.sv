// tb_sec_ded_daec_enc -- exhaustive check of the SEC-DED-DAEC (28,16) check
// bit generator. The reference is built column by column: each data bit lists
// the three check bits it feeds, and every set data bit toggles those three.
module tb_sec_ded_daec_enc;
  logic        clk = 1'b0;
  logic [15:0] d;
  logic [11:0] p;
  logic [11:0] exp_p;
  int          checks = 0, failures = 0;

  // Rows (0-based) of the three check bits each data bit takes part in.
  int unsigned col_rows [16][3] = '{
    '{0, 1, 2}, '{3, 7, 11}, '{0, 9, 10}, '{1, 4, 6},
    '{2, 7, 10}, '{0, 3, 4}, '{5, 8, 11}, '{2, 3, 6},
    '{1, 7, 9}, '{0, 5, 6}, '{1, 8, 10}, '{2, 4, 5},
    '{0, 7, 8}, '{6, 9, 11}, '{1, 3, 5}, '{2, 8, 9}
  };

  sec_ded_daec_enc dut (.data_i(d), .check_o(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      #1;
      exp_p = '0;
      for (int j = 0; j < 16; j++)
        if (d[j]) for (int k = 0; k < 3; k++) exp_p[col_rows[j][k]] ^= 1'b1;
      checks++;
      if (p !== exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h check=%h expected=%h", d, p, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
