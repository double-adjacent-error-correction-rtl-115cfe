// tb_daec_wide_words -- both codes at the 64- and 256-bit word sizes, with
// matrices from the package's construction functions: SEC-DAEC (77,64) and
// (281,256), SEC-DED-DAEC (87,64) and (300,256). For the (77,64) code the
// matrix must have 141 ones with at most 11 in a row, the figures published
// for that code; the others have the ones count implied by their column
// weight (2K+R or 3K+R). See wide_code_checker for the checks. Also checks
// that the check-bit ordering rule of the package gives the published order
// for the (24,16) code.
module tb_daec_wide_words;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] done;
  int         c [4];
  int         f [4];

  wide_code_checker #(.DED(1'b0), .K(64), .R(13), .H(daec_pkg::pro2_gen_h(64, 13)),
                      .ONES(141), .MAX_ROW(11)) u_sec64 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  wide_code_checker #(.DED(1'b0), .K(256), .R(25), .H(daec_pkg::pro2_gen_h(256, 25)),
                      .ONES(537), .WORDS(12)) u_sec256 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  wide_code_checker #(.DED(1'b1), .K(64), .R(23), .H(daec_pkg::pro1_gen_h(64, 23)),
                      .ONES(215)) u_ded64 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  wide_code_checker #(.DED(1'b1), .K(256), .R(44), .H(daec_pkg::pro1_gen_h(256, 44)),
                      .ONES(812), .WORDS(12)) u_ded256 (.done(done[3]), .checks(c[3]), .failures(f[3]));

  int checks, failures;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endfunction

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    total();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned START16 = daec_pkg::pro2_check_start(daec_pkg::pro2_paper_h(), 16, 8);

  initial begin
    wait (done == 4'hf);
    total();
    // The rule that orders the wide SEC-DAEC check bits reproduces the
    // published (24,16) order, which starts with p2.
    checks++;
    if (START16 != 2) begin
      failures++;
      $display("FAIL (24,16) check order starts at p%0d, expected p2", START16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
