// tb_wallace_tree: checks the reduction tree on its own, fed with partial
// products the testbench forms itself. Four trees are compared with the
// integer product:
//   8 x 8, revised carry chain (the default)  - all 65,536 operand pairs
//   8 x 8, full-adder carry chain (REVISED=0) - all 65,536 operand pairs
//   4 x 4 and 3 x 3, revised                  - all operand pairs
//   16 x 16, revised                          - 20,000 random pairs and corners
module tb_wallace_tree;
  logic [7:0]          a8, b8;
  logic [7:0][7:0]     pp8;
  logic [15:0]         p8_rev, p8_orig;
  logic [3:0]          a4, b4;
  logic [3:0][3:0]     pp4;
  logic [7:0]          p4;
  logic [2:0]          a3, b3;
  logic [2:0][2:0]     pp3;
  logic [5:0]          p3;
  logic [15:0]         a16, b16;
  logic [15:0][15:0]   pp16;
  logic [31:0]         p16;
  int unsigned checks = 0, failures = 0;

  wallace_tree                            dut8  (.pp(pp8),  .p(p8_rev));
  wallace_tree #(.N(8),  .REVISED(1'b0))  dut8o (.pp(pp8),  .p(p8_orig));
  wallace_tree #(.N(4))                   dut4  (.pp(pp4),  .p(p4));
  wallace_tree #(.N(3))                   dut3  (.pp(pp3),  .p(p3));
  wallace_tree #(.N(16))                  dut16 (.pp(pp16), .p(p16));

  // Partial products built with shifts, bit of weight i+j in pp[j][i].
  always_comb
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) pp8[j][i] = 1'((a8 >> i) & (b8 >> j));
  always_comb
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) pp4[j][i] = 1'((a4 >> i) & (b4 >> j));
  always_comb
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 3; i++) pp3[j][i] = 1'((a3 >> i) & (b3 >> j));
  always_comb
    for (int j = 0; j < 16; j++)
      for (int i = 0; i < 16; i++) pp16[j][i] = 1'((a16 >> i) & (b16 >> j));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0; a3 = '0; b3 = '0; a16 = '0; b16 = '0;
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      check("8x8 revised",  p8_rev,  longint'(a8) * longint'(b8));
      check("8x8 original", p8_orig, longint'(a8) * longint'(b8));
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      check("4x4", p4, longint'(a4) * longint'(b4));
    end
    for (int v = 0; v < 64; v++) begin
      {a3, b3} = 6'(v);
      #1;
      check("3x3", p3, longint'(a3) * longint'(b3));
    end
    for (int v = 0; v < 20004; v++) begin
      case (v)
        0:       begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
        1:       begin a16 = 16'hFFFF; b16 = 16'h0001; end
        2:       begin a16 = 16'h8000; b16 = 16'h8000; end
        3:       begin a16 = 16'h0000; b16 = 16'hFFFF; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      #1;
      check("16x16", p16, longint'(a16) * longint'(b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
