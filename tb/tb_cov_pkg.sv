// tb_cov_pkg: event counters shared by the adder monitors that the top-level
// testbench binds into every adder cell of the multiplier.
package tb_cov_pkg;
  int unsigned fa_carries   = 0;  // rising edges of a full-adder carry
  int unsigned ha_carries   = 0;  // rising edges of a half-adder carry
  int unsigned hpo_cout1    = 0;  // rising edges of Cout1 in a half-adder pair
  int unsigned hpo_cout2    = 0;  // rising edges of Cout2 in a half-adder pair
  int unsigned hpo_both     = 0;  // samples with Cout1 and Cout2 both high
endpackage
