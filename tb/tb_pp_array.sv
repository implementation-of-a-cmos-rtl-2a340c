// tb_pp_array: checks the 8 x 8 AND array. Every operand pair is applied
// (65,536 vectors); for each, all 64 partial products are compared with
// bit i of a AND bit j of b, computed here by shifting the operands.
module tb_pp_array;
  localparam int unsigned N = 8;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int unsigned checks = 0, failures = 0;

  pp_array dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {a, b} = (2 * N)'(v);
      #1;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          checks++;
          if (pp[j][i] != 1'((a >> i) & (b >> j))) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0h b=%0h pp[%0d][%0d]=%0b", a, b, j, i, pp[j][i]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
