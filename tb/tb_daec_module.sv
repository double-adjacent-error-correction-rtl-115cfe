// tb_daec_module -- exhaustive check of the DAEC correction cell. Expected
// behaviour: with DAE inactive (a2 = 1) both single corrections pass; with DAE
// active (a2 = 0) only the pair correction (a1 and a3 both set) passes; the
// ad input from the cell below always flips the lower bit.
module tb_daec_module;
  logic clk = 1'b0;
  logic a1, a2, a3, ad, b1, b2;
  logic exp_b1, exp_b2;
  int   checks = 0, failures = 0;

  daec_module dut (.a1(a1), .a2(a2), .a3(a3), .ad(ad), .b1(b1), .b2(b2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {ad, a3, a2, a1} = 4'(v);
      @(posedge clk);
      #1;
      if (a2) begin
        exp_b2 = a3;
        exp_b1 = a1 | ad;
      end else begin
        exp_b2 = a1 & a3;
        exp_b1 = (a1 & a3) | ad;
      end
      checks += 2;
      if (b1 !== exp_b1) begin
        failures++;
        $display("FAIL a1=%b a2=%b a3=%b ad=%b: b1=%b expected %b", a1, a2, a3, ad, b1, exp_b1);
      end
      if (b2 !== exp_b2) begin
        failures++;
        $display("FAIL a1=%b a2=%b a3=%b ad=%b: b2=%b expected %b", a1, a2, a3, ad, b2, exp_b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
