// tb_daec_codec_top -- end-to-end test of both codecs with a cache array
// model between write and read path.
//
// Each pass writes WORDS random data words through both encoders into two
// behavioural arrays (one 28-bit and one 24-bit codeword per address, written
// on a clock edge), upsets stored bits in one of several patterns chosen by
// the address, then reads every address back through the decoders and checks
// the corrected data and the flags. Expected outcomes:
//   SEC-DED-DAEC (28,16):
//     single upset anywhere            -> corrected, no flag
//     two adjacent upsets in data bits -> corrected, no flag
//     d15 with the first check bit     -> corrected, no flag (no shared row)
//     two adjacent check bits          -> data intact, flagged
//     d0 with d13 (no shared row)      -> both corrected, no flag
//     d0 with d2 (share check bit P1)  -> flagged, data left as read
//   SEC-DAEC (24,16):
//     single upset anywhere            -> corrected, DAE low
//     two adjacent upsets in data bits -> corrected, DAE high
//     any other adjacent pair          -> data intact, DAE low
// Before that, the stored layout is checked on one word: stored bit 16 must
// be the first check bit of each code (P1 = d0^d2^d5^d9^d12 for the (28,16)
// code, p2 = d0^d2^d8^d12 for the (24,16) code, whose check columns start
// with p2). Every mechanism above is counted and must occur at least once.
// The codecs are combinational; read data are checked in the same cycle the
// codeword is presented.
module tb_daec_codec_top;
  import daec_pkg::*;

  localparam int WORDS  = 64;
  localparam int PASSES = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0]   pro1_wr_data, pro1_rd_data, pro2_wr_data, pro2_rd_data;
  pro1_codeword_t pro1_wr_cw, pro1_rd_cw;
  pro2_codeword_t pro2_wr_cw, pro2_rd_cw;
  logic           pro1_ded, pro2_dae;

  daec_codec_top dut (
    .pro1_wr_data_i (pro1_wr_data),
    .pro1_wr_cw_o   (pro1_wr_cw),
    .pro1_rd_cw_i   (pro1_rd_cw),
    .pro1_rd_data_o (pro1_rd_data),
    .pro1_ded_o     (pro1_ded),
    .pro2_wr_data_i (pro2_wr_data),
    .pro2_wr_cw_o   (pro2_wr_cw),
    .pro2_rd_cw_i   (pro2_rd_cw),
    .pro2_rd_data_o (pro2_rd_data),
    .pro2_dae_o     (pro2_dae)
  );

  // Cache array model: one codeword of each code per address.
  logic [27:0] mem1 [WORDS];
  logic [23:0] mem2 [WORDS];
  logic [15:0] golden [WORDS];
  logic [15:0] exp1 [WORDS];
  logic        exp1_ded [WORDS];
  logic        exp2_dae [WORDS];

  logic        we = 1'b0;
  int unsigned wr_addr = 0;
  always_ff @(posedge clk) begin
    if (we) begin
      mem1[wr_addr] <= pro1_wr_cw;
      mem2[wr_addr] <= pro2_wr_cw;
    end
  end

  int checks = 0, failures = 0;
  int n1_single = 0, n1_adj = 0, n1_edge = 0, n1_chkpair = 0, n1_far = 0, n1_det = 0;
  int n2_single = 0, n2_dae = 0, n2_chkpair = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Upset pattern for the SEC-DED-DAEC word at this address and pass.
  task automatic upset1(int a, int pass);
    int sel = (a + pass) % 6;
    int b;
    exp1[a] = golden[a];
    exp1_ded[a] = 1'b0;
    case (sel)
      0: begin b = $urandom_range(27); mem1[a][b] ^= 1'b1; n1_single++; end
      1: begin b = $urandom_range(14); mem1[a] ^= 28'd3 << b; n1_adj++; end
      2: begin mem1[a] ^= 28'd3 << 15; n1_edge++; end
      3: begin
           b = 16 + $urandom_range(10);
           mem1[a] ^= 28'd3 << b; exp1_ded[a] = 1'b1; n1_chkpair++;
         end
      4: begin mem1[a] ^= (28'd1 << 0) | (28'd1 << 13); n1_far++; end
      default: begin
           mem1[a] ^= (28'd1 << 0) | (28'd1 << 2);
           exp1[a] = mem1[a][15:0]; exp1_ded[a] = 1'b1; n1_det++;
         end
    endcase
  endtask

  // Upset pattern for the SEC-DAEC word at this address and pass.
  task automatic upset2(int a, int pass);
    int sel = (a + 3 * pass) % 3;
    int b;
    exp2_dae[a] = 1'b0;
    case (sel)
      0: begin b = $urandom_range(23); mem2[a][b] ^= 1'b1; n2_single++; end
      1: begin b = $urandom_range(14); mem2[a] ^= 24'd3 << b; exp2_dae[a] = 1'b1; n2_dae++; end
      default: begin b = 15 + $urandom_range(7); mem2[a] ^= 24'd3 << b; n2_chkpair++; end
    endcase
  endtask

  initial begin
    logic [15:0] d;
    pro1_wr_data = '0; pro2_wr_data = '0;
    pro1_rd_cw = '0;   pro2_rd_cw = '0;

    // Stored layout.
    d = 16'h1305;  // d0 d2 d8 d9 d12
    pro1_wr_data = d; pro2_wr_data = d;
    #1;
    check(pro1_wr_cw[15:0] == d && pro2_wr_cw[15:0] == d, "data bits stored first");
    check(pro1_wr_cw[16] == (d[0] ^ d[2] ^ d[5] ^ d[9] ^ d[12]), "(28,16) stored bit 16 is P1");
    check(pro2_wr_cw[16] == (d[0] ^ d[2] ^ d[8] ^ d[12]), "(24,16) stored bit 16 is p2");
    check(pro2_wr_cw[22] == (d[0] ^ d[6] ^ d[10] ^ d[13]), "(24,16) stored bit 22 is p0");

    for (int pass = 0; pass < PASSES; pass++) begin
      // Write phase.
      for (int a = 0; a < WORDS; a++) begin
        golden[a] = 16'($urandom);
        @(negedge clk);
        pro1_wr_data = golden[a];
        pro2_wr_data = golden[a];
        wr_addr = a;
        we = 1'b1;
        @(posedge clk);
      end
      @(negedge clk);
      we = 1'b0;
      // Upsets in the stored words.
      for (int a = 0; a < WORDS; a++) begin
        upset1(a, pass);
        upset2(a, pass);
      end
      // Read phase.
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        pro1_rd_cw = mem1[a];
        pro2_rd_cw = mem2[a];
        #1;
        check(pro1_rd_data == exp1[a],
              $sformatf("(28,16) addr %0d data %h expected %h", a, pro1_rd_data, exp1[a]));
        check(pro1_ded == exp1_ded[a],
              $sformatf("(28,16) addr %0d flag %b expected %b", a, pro1_ded, exp1_ded[a]));
        check(pro2_rd_data == golden[a],
              $sformatf("(24,16) addr %0d data %h expected %h", a, pro2_rd_data, golden[a]));
        check(pro2_dae == exp2_dae[a],
              $sformatf("(24,16) addr %0d DAE %b expected %b", a, pro2_dae, exp2_dae[a]));
      end
    end

    check(n1_single > 0,  "(28,16) single error never occurred");
    check(n1_adj > 0,     "(28,16) double adjacent data error never occurred");
    check(n1_edge > 0,    "(28,16) data/check boundary error never occurred");
    check(n1_chkpair > 0, "(28,16) check bit pair never occurred");
    check(n1_far > 0,     "(28,16) correctable non-adjacent pair never occurred");
    check(n1_det > 0,     "(28,16) detected double error never occurred");
    check(n2_single > 0,  "(24,16) single error never occurred");
    check(n2_dae > 0,     "(24,16) double adjacent data error never occurred");
    check(n2_chkpair > 0, "(24,16) check bit pair never occurred");
    $display("(28,16): single=%0d adjacent=%0d boundary=%0d check_pair=%0d nonadj_corrected=%0d detected=%0d",
             n1_single, n1_adj, n1_edge, n1_chkpair, n1_far, n1_det);
    $display("(24,16): single=%0d adjacent_data=%0d other_adjacent=%0d", n2_single, n2_dae, n2_chkpair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
