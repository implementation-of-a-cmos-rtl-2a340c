// carry_monitor: bound into full_adder (IS_FA = 1) or half_adder (IS_FA = 0)
// cells; counts every rising edge of the cell's carry output in tb_cov_pkg.
module carry_monitor #(
  parameter bit IS_FA = 1'b1
) (
  input logic cout
);
  always @(posedge cout) begin
    if (IS_FA) tb_cov_pkg::fa_carries++;
    else       tb_cov_pkg::ha_carries++;
  end
endmodule
