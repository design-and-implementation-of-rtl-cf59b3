// Spanning-tree (sparse parallel-prefix) adder.
//
// The adder runs the three parallel-prefix stages:
//  1. Pre-computation: per bit, p_i = a_i ^ b_i and g_i = a_i & b_i.
//  2. Prefix stage, kept sparse: a binary tree of black cells reduces each
//     BLOCK-bit group to one (G, P) pair; a Kogge-Stone tree of black and
//     grey cells then combines the group pairs with the carry in (taken as
//     position -1 with g = cin, p = 0). It yields only the carries into the
//     groups, G[k*BLOCK-1 : -1], and the carry out, G[WIDTH-1 : -1].
//  3. Final computation: inside each group a short ripple chain starts from
//     the group's carry and gives s_i = p_i ^ c_i, with c_{i+1} = g_i | p_i c_i.
// Only every BLOCK-th carry comes from the tree, which is what makes the
// tree sparse and smaller than a full prefix adder.
//
// Interface: a, b, cin -> sum, cout. Exact (no approximation modes).
// WIDTH must be a multiple of BLOCK and BLOCK a power of two. Combinational;
// delay ~ log2(BLOCK) + log2(WIDTH/BLOCK + 1) prefix cells plus BLOCK ripple
// steps. The three stages, the black/grey cells and the 16-bit size follow
// the design; the 4-bit grouping, the Kogge-Stone group tree and the ripple
// sum stage are this design's choices for the structure of the sparse tree.
module spanning_tree_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  import approx_pkg::*;

  localparam int unsigned NB = WIDTH / BLOCK;  // number of groups
  localparam int unsigned LB = $clog2(BLOCK);  // levels of the group tree
  localparam int unsigned NE = NB + 1;         // prefix elements incl. cin
  localparam int unsigned LK = $clog2(NE);     // levels of the carry tree

  initial begin
    assert (WIDTH % BLOCK == 0 && (BLOCK & (BLOCK - 1)) == 0)
      else $error("spanning_tree_adder: WIDTH must be a multiple of a power-of-two BLOCK");
  end

  // ---- Stage 1: pre-computation --------------------------------------
  pg_t [WIDTH-1:0] bit_pg;
  for (genvar i = 0; i < WIDTH; i++) begin : g_pre
    assign bit_pg[i].g = a[i] & b[i];
    assign bit_pg[i].p = a[i] ^ b[i];
  end

  // ---- Stage 2a: group (G, P) of every BLOCK-bit group -----------------
  pg_t [NE-1:0] grp;   // element 0 = carry in, element k+1 = group k
  assign grp[0] = '{g: cin, p: 1'b0};

  for (genvar k = 0; k < NB; k++) begin : g_grp
    pg_t [BLOCK-1:0] t [LB+1];
    assign t[0] = bit_pg[k*BLOCK +: BLOCK];
    for (genvar l = 1; l <= LB; l++) begin : g_lvl
      for (genvar j = 0; j < (BLOCK >> l); j++) begin : g_cell
        pp_black_cell u_blk (
          .left  (t[l-1][2*j+1]),
          .right (t[l-1][2*j]),
          .out   (t[l][j])
        );
      end
      for (genvar j = (BLOCK >> l); j < BLOCK; j++) begin : g_unused
        assign t[l][j] = '0;
      end
    end
    assign grp[k+1] = t[LB][0];
  end

  // ---- Stage 2b: sparse carry tree over the groups (Kogge-Stone) ------
  pg_t [NE-1:0] kt [LK+1];
  assign kt[0] = grp;

  for (genvar d = 0; d < LK; d++) begin : g_ks
    localparam int unsigned SPAN = 1 << d;
    for (genvar i = 0; i < NE; i++) begin : g_el
      if (i < SPAN) begin : g_pass
        assign kt[d+1][i] = kt[d][i];
      end else if (i < 2 * SPAN) begin : g_grey
        // The right span already reaches the carry in: result is final.
        pp_grey_cell u_grey (
          .left    (kt[d][i]),
          .right_g (kt[d][i-SPAN].g),
          .g       (kt[d+1][i].g)
        );
        assign kt[d+1][i].p = 1'b0;
      end else begin : g_black
        pp_black_cell u_blk (
          .left  (kt[d][i]),
          .right (kt[d][i-SPAN]),
          .out   (kt[d+1][i])
        );
      end
    end
  end

  // ---- Stage 3: final computation ---------------------------------------
  for (genvar k = 0; k < NB; k++) begin : g_sum
    logic [BLOCK-1:0] c;
    assign c[0] = kt[LK][k].g;   // carry into group k = G[k*BLOCK-1 : -1]
    for (genvar i = 0; i < BLOCK; i++) begin : g_bit
      assign sum[k*BLOCK+i] = bit_pg[k*BLOCK+i].p ^ c[i];
      if (i < BLOCK - 1) begin : g_carry
        assign c[i+1] = bit_pg[k*BLOCK+i].g | (bit_pg[k*BLOCK+i].p & c[i]);
      end
    end
  end

  assign cout = kt[LK][NB].g;    // G[WIDTH-1 : -1]

endmodule
