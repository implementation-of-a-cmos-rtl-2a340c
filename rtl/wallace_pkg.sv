// wallace_pkg: elaboration-time bookkeeping for the Wallace tree.
// The tree is described by how many wires of each weight ("column") exist at
// the input of each reduction layer. Layer 0 holds the partial products:
// min(c, 2N-2-c) + 1 wires of weight c. Every layer turns each group of three
// wires of a column into a full adder, two leftover wires into a half adder and
// passes a single leftover wire on; sums stay in the column, carries move one
// column up. Layers are added while some column still has three or more wires.
// The functions below replay that rule so that wallace_tree can place its
// adders with constant indices. Heights are kept in 8-bit fields, so
// N may be at most MAX_N.
package wallace_pkg;

  localparam int unsigned MAX_N    = 64;
  localparam int unsigned MAX_COLS = 2 * MAX_N;

  typedef logic [MAX_COLS-1:0][7:0] heights_t;

  // Partial products of weight c in an n x n multiplier.
  function automatic int unsigned pp_height(int unsigned n, int unsigned c);
    int unsigned h;
    h = 0;
    for (int unsigned i = 0; i < n; i++)
      if (c >= i && c - i < n) h++;
    return h;
  endfunction

  // Lowest index i of a[i] among the partial products of weight c.
  function automatic int unsigned pp_first_i(int unsigned n, int unsigned c);
    return (c < n) ? 0 : c - n + 1;
  endfunction

  // Wires a column of height h keeps in the next layer (one per full adder,
  // one for the half adder or for the passed wire).
  function automatic int unsigned own_out(int unsigned h);
    return h / 3 + ((h % 3 != 0) ? 1 : 0);
  endfunction

  // Carries a column of height h sends to the column above.
  function automatic int unsigned carry_out(int unsigned h);
    return h / 3 + ((h % 3 == 2) ? 1 : 0);
  endfunction

  function automatic heights_t next_heights(int unsigned n, heights_t h);
    heights_t nh;
    nh = '0;
    for (int unsigned c = 0; c < 2 * n; c++)
      nh[c] = 8'(own_out(int'(h[c])) + ((c > 0) ? carry_out(int'(h[c-1])) : 0));
    return nh;
  endfunction

  function automatic heights_t first_heights(int unsigned n);
    heights_t h;
    h = '0;
    for (int unsigned c = 0; c < 2 * n; c++)
      h[c] = 8'(pp_height(n, c));
    return h;
  endfunction

  function automatic int unsigned max_height(int unsigned n, heights_t h);
    int unsigned m;
    m = 0;
    for (int unsigned c = 0; c < 2 * n; c++)
      if (int'(h[c]) > m) m = int'(h[c]);
    return m;
  endfunction

  // Number of reduction layers: layers are added while a column has 3+ wires.
  function automatic int unsigned num_layers(int unsigned n);
    heights_t h;
    int unsigned l;
    h = first_heights(n);
    l = 0;
    while (max_height(n, h) > 2) begin
      h = next_heights(n, h);
      l++;
    end
    return l;
  endfunction

  // Wires of weight c at the input of layer l (l = num_layers(n) gives the
  // two rows left for the final carry chain).
  function automatic int unsigned col_height(int unsigned n, int unsigned l, int unsigned c);
    heights_t h;
    h = first_heights(n);
    for (int unsigned s = 0; s < l; s++)
      h = next_heights(n, h);
    return int'(h[c]);
  endfunction

  // Whether column c of the final carry chain receives a carry from column c-1.
  function automatic bit chain_has_carry(int unsigned n, int unsigned c);
    bit carry;
    int unsigned nl;
    nl = num_layers(n);
    carry = 1'b0;
    for (int unsigned k = 0; k < c; k++)
      carry = (col_height(n, nl, k) + (carry ? 1 : 0)) >= 2;
    return carry;
  endfunction

endpackage
