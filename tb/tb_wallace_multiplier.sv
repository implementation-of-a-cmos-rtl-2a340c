// tb_wallace_multiplier: end-to-end test of the 8 x 8 Wallace-tree multiplier
// at its default parameters (no parameter override).
//  1. The three operand pairs used in the published evaluation, checked
//     against their arithmetic products.
//  2. All 65,536 operand pairs, checked against a * b.
// Monitors bound into every adder cell count how often each mechanism acted:
// full-adder carries in the reduction layers, half-adder carries, and the
// two carries (Cout1, Cout2) of the half-adder-pair cells of the final carry
// chain; each must occur at least once, and Cout1 and Cout2 must never be
// high together. Operands change every 10 time units; the strobe samples the
// settled outputs 5 units later.
module tb_wallace_multiplier;
  logic [7:0]  a, b;
  logic [15:0] s;
  logic        strobe = 1'b0;
  int unsigned checks = 0, failures = 0;

  wallace_multiplier dut (.a(a), .b(b), .s(s));

  bind full_adder carry_monitor #(.IS_FA(1'b1)) u_cmon (.cout(cout));
  bind half_adder carry_monitor #(.IS_FA(1'b0)) u_cmon (.cout(cout));
  bind ha_pair_or hpo_monitor u_hmon (.strobe(tb_wallace_multiplier.strobe), .c1(cout1), .c2(cout2));

  task automatic apply(logic [7:0] x, logic [7:0] y, logic [15:0] exp);
    a = x;
    b = y;
    #5 strobe = 1'b1;
    checks++;
    if (s !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %b x %b: got %b expected %b", x, y, s, exp);
    end
    #5 strobe = 1'b0;
  endtask

  task automatic require(string what, int unsigned n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    b = '0;
    #10;
    // Published test patterns.
    apply(8'b11101100, 8'b11010110, 16'b1100010101001000);  // 236 * 214 = 50504
    apply(8'b10001111, 8'b01100111, 16'd14729);             // 143 * 103
    apply(8'b00100111, 8'b00001101, 16'd507);               //  39 * 13
    // Exhaustive.
    for (int v = 0; v < 65536; v++)
      apply(8'(v >> 8), 8'(v), 16'((v >> 8) * (v & 255)));

    $display("mechanism counts:");
    require("full-adder carries", tb_cov_pkg::fa_carries);
    require("half-adder carries", tb_cov_pkg::ha_carries);
    require("half-adder pair Cout1", tb_cov_pkg::hpo_cout1);
    require("half-adder pair Cout2", tb_cov_pkg::hpo_cout2);
    checks++;
    if (tb_cov_pkg::hpo_both != 0) begin
      failures++;
      $display("FAIL Cout1 and Cout2 high together %0d times", tb_cov_pkg::hpo_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
