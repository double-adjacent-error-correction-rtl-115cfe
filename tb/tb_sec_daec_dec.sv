// tb_sec_daec_dec -- SEC-DAEC (24,16) decoder under every single error and
// every double adjacent error of the stored 24-bit word.
//
// Codewords are formed by a reference encoder written from the published
// equations and laid out in the stored column order (d0..d15, then
// p2 p3 p4 p5 p6 p7 p0 p1). For 600 data words (all-zero, all-one and random)
// the decoder must return the original data for: no error, each of the 24
// single errors and each of the 23 double errors in adjacent stored bits. The
// DAE flag must be raised exactly when both upset bits are data bits. The
// test also counts cases where a double adjacent error raised correction
// signals outside the pair, i.e. where the DAEC modules had to mask a
// miscorrection, and fails if that never happened.
module tb_sec_daec_dec;
  logic        clk = 1'b0;
  logic [15:0] d_in, d_out;
  logic [7:0]  p_in;
  logic        dae;
  int          checks = 0, failures = 0, masked = 0;

  localparam int unsigned ORDER [8] = '{2, 3, 4, 5, 6, 7, 0, 1};

  sec_daec_dec dut (.data_i(d_in), .check_i(p_in), .data_o(d_out), .dae_o(dae));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  function automatic logic [23:0] ref_encode(logic [15:0] x);
    logic [7:0]  p = ref_check(x);
    logic [23:0] cw;
    cw[15:0] = x;
    for (int i = 0; i < 8; i++) cw[16+i] = p[ORDER[i]];
    return cw;
  endfunction

  // Number of data bits whose syndrome pair is fully set by an error in the
  // adjacent data bits b and b+1, i.e. correction signals that would fire
  // without the DAEC modules.
  function automatic int raised(int b);
    logic [7:0] syn = ref_check(16'd1 << b) ^ ref_check(16'd1 << (b + 1));
    int n = 0;
    for (int j = 0; j < 16; j++) begin
      logic [7:0] col = ref_check(16'd1 << j);
      if ((col & syn) == col) n++;
    end
    return n;
  endfunction

  task automatic apply(logic [23:0] cw, logic [15:0] want, logic want_dae, string what);
    d_in = cw[15:0];
    for (int i = 0; i < 8; i++) p_in[ORDER[i]] = cw[16+i];
    #1;
    checks += 2;
    if (d_out !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: data %h expected %h", what, d_out, want);
    end
    if (dae !== want_dae) begin
      failures++;
      if (failures < 20) $display("FAIL %s: dae %b expected %b", what, dae, want_dae);
    end
  endtask

  initial begin
    logic [15:0] data;
    logic [23:0] cw;
    for (int n = 0; n < 600; n++) begin
      data = (n == 0) ? 16'h0000 : (n == 1) ? 16'hffff : 16'($urandom);
      cw = ref_encode(data);
      apply(cw, data, 1'b0, "no error");
      for (int b = 0; b < 24; b++)
        apply(cw ^ (24'd1 << b), data, 1'b0, $sformatf("single %0d", b));
      for (int b = 0; b < 23; b++) begin
        apply(cw ^ (24'd3 << b), data, b < 15, $sformatf("adjacent %0d,%0d", b, b + 1));
        if (b < 15 && raised(b) > 2) masked++;
      end
      @(posedge clk);
    end
    checks++;
    if (masked == 0) begin
      failures++;
      $display("FAIL no double adjacent error needed masking");
    end
    $display("masked miscorrections: %0d", masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
