// wallace_tree: reduces the N x N partial products of an unsigned multiplier
// to the 2N-bit product.
//
// Reduction layers: wires are grouped by weight (column). In every layer each
// group of three wires of a column enters a full adder, two leftover wires a
// half adder, and one leftover wire passes straight on; sums stay in the
// column, carries move one column up. Layers are added while any column still
// holds three or more wires; for N = 8 that is four layers (column heights
// 8 -> 6 -> 4 -> 3 -> 2). The layer structure is computed at elaboration by
// wallace_pkg.
//
// Final carry chain: every column now holds one or two wires. Columns are
// resolved from weight 0 upwards, each adding its wires and the carry from the
// column below, so one wire per weight remains: that wire is the product bit.
// With REVISED = 1 the three-input cells of this chain are ha_pair_or cells
// (two half adders and an OR), so the rippling carry passes one half-adder
// carry gate and an OR per column instead of a full-adder carry; with
// REVISED = 0 they are full adders.
//
// Within a column the wires are ordered: full-adder sums, half-adder sum, the
// passed wire, then carries from the column below; the late carries therefore
// go to the last input of an adder (cin). The carry out of the top column
// (weight 2N) is always 0 for a product that fits in 2N bits; those adder
// outputs are left unconnected.
//
// The layer rule, the use of half-adder pairs with an OR in place of the
// full adders that wait on lower weights, and the 8-bit default follow the
// published design. The exact placement of each adder, the wire order inside
// a column, building the last step as a single ripple chain and the choice of
// which cells become half-adder pairs are this implementation's own reading.
//
// Interface: pp[j][i] = a[i] & b[j] (weight i + j), p = product. Purely
// combinational, no clock. For N = 8: 36 full adders and 25 half adders in
// four layers, then a half adder at weight 5 and ten three-input chain cells
// at weights 6..15.
module wallace_tree
  import wallace_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter bit          REVISED = 1'b1
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      p
);
  localparam int unsigned NC   = 2 * N;
  localparam int unsigned NL   = num_layers(N);
  localparam int unsigned MAXH = N;

  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("wallace_tree: N must be between 2 and %0d", MAX_N);
  end

  // w[l][c][k]: wire k of weight c at the input of layer l.
  // Split per column so that a simulator sees the layers as a feed-forward
  // network rather than one self-dependent variable.
  logic [MAXH-1:0] w [NL+1][NC] /* verilator split_var */;
  // rc[c]: carry into column c of the final carry chain.
  logic            rc [NC] /* verilator split_var */;

  // Layer 0: the partial products of each weight.
  for (genvar c = 0; c < NC; c++) begin : g_l0
    localparam int unsigned H  = pp_height(N, c);
    localparam int unsigned I0 = pp_first_i(N, c);
    for (genvar k = 0; k < MAXH; k++) begin : g_w
      if (k < H) begin : g_pp
        assign w[0][c][k] = pp[c-I0-k][I0+k];
      end else begin : g_zero
        assign w[0][c][k] = 1'b0;
      end
    end
  end

  // Reduction layers.
  for (genvar l = 0; l < NL; l++) begin : g_layer
    for (genvar c = 0; c < NC; c++) begin : g_col
      localparam int unsigned H     = col_height(N, l, c);
      localparam int unsigned NFA   = H / 3;
      localparam bit          HAS_HA = (H % 3) == 2;
      localparam bit          HAS_PS = (H % 3) == 1;
      // Wires column c+1 keeps for itself; carries from c are stacked above.
      localparam int unsigned UP    = (c + 1 < NC) ? own_out(col_height(N, l, c + 1)) : 0;
      // Wires of column c in the next layer, own plus carries from below.
      localparam int unsigned NEXT  = col_height(N, l + 1, c);

      for (genvar f = 0; f < NFA; f++) begin : g_fa
        if (c + 1 < NC) begin : g_up
          full_adder u_fa (
            .a   (w[l][c][3*f]),
            .b   (w[l][c][3*f+1]),
            .cin (w[l][c][3*f+2]),
            .sum (w[l+1][c][f]),
            .cout(w[l+1][c+1][UP+f])
          );
        end else begin : g_top
          full_adder u_fa (
            .a   (w[l][c][3*f]),
            .b   (w[l][c][3*f+1]),
            .cin (w[l][c][3*f+2]),
            .sum (w[l+1][c][f]),
            .cout()
          );
        end
      end

      if (HAS_HA) begin : g_ha
        if (c + 1 < NC) begin : g_up
          half_adder u_ha (
            .a   (w[l][c][3*NFA]),
            .b   (w[l][c][3*NFA+1]),
            .sum (w[l+1][c][NFA]),
            .cout(w[l+1][c+1][UP+NFA])
          );
        end else begin : g_top
          half_adder u_ha (
            .a   (w[l][c][3*NFA]),
            .b   (w[l][c][3*NFA+1]),
            .sum (w[l+1][c][NFA]),
            .cout()
          );
        end
      end

      if (HAS_PS) begin : g_pass
        assign w[l+1][c][NFA] = w[l][c][3*NFA];
      end

      // Unused wire slots of the next layer are tied low.
      for (genvar k = NEXT; k < MAXH; k++) begin : g_zero
        assign w[l+1][c][k] = 1'b0;
      end
    end
  end

  // Final carry chain over the two remaining rows.
  for (genvar c = 0; c < NC; c++) begin : g_chain
    localparam int unsigned H   = col_height(N, NL, c);
    localparam bit          CIN = chain_has_carry(N, c);

    if (!CIN) begin : g_no_cin
      assign rc[c] = 1'b0;
    end

    if (H == 1 && !CIN) begin : g_wire
      assign p[c] = w[NL][c][0];
    end else if (H == 0 && CIN) begin : g_carry
      assign p[c] = rc[c];
    end else if (H == 2 && !CIN) begin : g_ha
      if (c + 1 < NC) begin : g_up
        half_adder u_ha (.a(w[NL][c][0]), .b(w[NL][c][1]), .sum(p[c]), .cout(rc[c+1]));
      end else begin : g_top
        half_adder u_ha (.a(w[NL][c][0]), .b(w[NL][c][1]), .sum(p[c]), .cout());
      end
    end else if (H == 1 && CIN) begin : g_ha_cin
      if (c + 1 < NC) begin : g_up
        half_adder u_ha (.a(w[NL][c][0]), .b(rc[c]), .sum(p[c]), .cout(rc[c+1]));
      end else begin : g_top
        half_adder u_ha (.a(w[NL][c][0]), .b(rc[c]), .sum(p[c]), .cout());
      end
    end else if (H == 2 && CIN) begin : g_add3
      if (REVISED) begin : g_rev
        if (c + 1 < NC) begin : g_up
          ha_pair_or u_hpo (.a(w[NL][c][0]), .b(w[NL][c][1]), .cin(rc[c]), .sum(p[c]), .cout(rc[c+1]));
        end else begin : g_top
          ha_pair_or u_hpo (.a(w[NL][c][0]), .b(w[NL][c][1]), .cin(rc[c]), .sum(p[c]), .cout());
        end
      end else begin : g_orig
        if (c + 1 < NC) begin : g_up
          full_adder u_fa (.a(w[NL][c][0]), .b(w[NL][c][1]), .cin(rc[c]), .sum(p[c]), .cout(rc[c+1]));
        end else begin : g_top
          full_adder u_fa (.a(w[NL][c][0]), .b(w[NL][c][1]), .cin(rc[c]), .sum(p[c]), .cout());
        end
      end
    end else begin : g_empty
      // Only reachable for a column holding no wire at all.
      assign p[c] = 1'b0;
    end
  end

endmodule
