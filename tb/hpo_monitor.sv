// hpo_monitor: bound into each ha_pair_or cell. Counts rising edges of the two
// half-adder carries Cout1 and Cout2, and checks the property the cell's OR
// gate relies on: the two carries are never high together once the inputs
// have settled (sampled on every edge of the testbench strobe).
module hpo_monitor (
  input logic strobe,
  input logic c1,
  input logic c2
);
  always @(posedge c1) tb_cov_pkg::hpo_cout1++;
  always @(posedge c2) tb_cov_pkg::hpo_cout2++;
  always @(posedge strobe) if (c1 && c2) tb_cov_pkg::hpo_both++;
endmodule
