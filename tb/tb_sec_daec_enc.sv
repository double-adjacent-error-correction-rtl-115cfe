// tb_sec_daec_enc -- exhaustive check of the SEC-DAEC (24,16) check bit
// generator against its eight encoding equations, written out term by term.
// Also checks the matrix statistics of the code: 40 ones in the full H matrix
// (data part plus identity), at most 6 ones in a row.
module tb_sec_daec_enc;
  logic        clk = 1'b0;
  logic [15:0] d;
  logic [7:0]  p;
  logic [7:0]  exp_p;
  int          checks = 0, failures = 0;

  sec_daec_enc dut (.data_i(d), .check_o(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_check(logic [15:0] x);
    logic [7:0] r;
    r[0] = x[0] ^ x[6] ^ x[10] ^ x[13];
    r[1] = x[1] ^ x[7] ^ x[11] ^ x[14];
    r[2] = x[0] ^ x[2] ^ x[8]  ^ x[12];
    r[3] = x[1] ^ x[3] ^ x[6]  ^ x[9]  ^ x[15];
    r[4] = x[2] ^ x[4] ^ x[7]  ^ x[10];
    r[5] = x[3] ^ x[5] ^ x[8]  ^ x[11] ^ x[13];
    r[6] = x[4] ^ x[9] ^ x[12] ^ x[14];
    r[7] = x[5] ^ x[15];
    return r;
  endfunction

  initial begin
    int ones, row_max, row_ones;
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      #1;
      exp_p = ref_check(d);
      checks++;
      if (p !== exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h check=%h expected=%h", d, p, exp_p);
      end
    end
    // Matrix statistics of the instantiated code (data part plus identity).
    ones = 0; row_max = 0;
    for (int r = 0; r < 8; r++) begin
      row_ones = $countones(dut.H[r]) + 1;
      ones += row_ones;
      if (row_ones > row_max) row_max = row_ones;
    end
    checks++;
    if (ones != 40 || row_max != 6) begin
      failures++;
      $display("FAIL matrix has %0d ones, max %0d per row (expected 40, 6)", ones, row_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
