// Reconfigurable carry look-ahead adder (CLA).
//
// A WIDTH-bit carry look-ahead adder built as a binary tree of dual-mode
// blocks. The first level holds one cell per bit: even bits (the less
// significant child of their parent) are DMCLB1 cells that also form the
// carry into the next bit, odd bits are DMCLB2 cells. Every higher level
// merges pairs of groups with propagate/generate blocks: a node that is the
// less significant child of its parent, and the root, is a DMPGB1 and forms
// the carry out of its group from the group's carry in; the others are
// DMPGB2. The carry into bit m is thus produced by the node whose group ends
// just below m, giving the usual log-depth look-ahead carry tree, and the
// root's carry out is the adder's cout.
//
// Mode selection: the approximation controller marks the da least
// significant bit cells approximate. A propagate/generate node runs
// approximately only when every block in its fan-in cone does, which in a
// tree means: when both of its children are approximate. Otherwise it runs
// accurately. da = 0 gives an exact adder.
//
// Interface: a, b, cin -> sum, cout, with da as in reconfig_rca. WIDTH must
// be a power of two, at least 2. Combinational. Block equations and the
// fan-in-cone rule follow the design; the exact assignment of type-1 and
// type-2 blocks to tree positions and the DA encoding are this design's
// reading of it.
module reconfig_cla #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DAW   = approx_pkg::da_width(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic [DAW-1:0]   da,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  // Node signals, indexed [level][node]; level 0 is the bit cells.
  logic [WIDTH-1:0] np   [LEVELS+1];
  logic [WIDTH-1:0] ng   [LEVELS+1];
  logic [WIDTH-1:0] napp [LEVELS+1];
  logic [WIDTH:0]   c;   // c[m] = carry into bit m, c[WIDTH] = carry out

  initial begin
    assert (WIDTH >= 2 && (WIDTH & (WIDTH - 1)) == 0)
      else $error("reconfig_cla: WIDTH must be a power of two >= 2");
  end

  approx_controller #(.WIDTH(WIDTH), .DAW(DAW)) u_ctrl (
    .da  (da),
    .app (napp[0])
  );

  assign c[0] = cin;

  // Level 0: one dual-mode look-ahead cell per bit.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i % 2 == 0) begin : g_clb1
      dmclb1 u_clb (
        .a    (a[i]),
        .b    (b[i]),
        .cin  (c[i]),
        .app  (napp[0][i]),
        .s    (sum[i]),
        .p    (np[0][i]),
        .g    (ng[0][i]),
        .cout (c[i+1])
      );
    end else begin : g_clb2
      dmclb2 u_clb (
        .a    (a[i]),
        .b    (b[i]),
        .cin  (c[i]),
        .app  (napp[0][i]),
        .s    (sum[i]),
        .p    (np[0][i]),
        .g    (ng[0][i])
      );
    end
  end

  // Levels 1..LEVELS: propagate/generate tree.
  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned NODES = WIDTH >> l;
    for (genvar j = 0; j < NODES; j++) begin : g_node
      assign napp[l][j] = napp[l-1][2*j] & napp[l-1][2*j+1];
      if (j % 2 == 0) begin : g_pgb1
        dmpgb1 u_pgb (
          .pa   (np[l-1][2*j]),
          .ga   (ng[l-1][2*j]),
          .pb   (np[l-1][2*j+1]),
          .gb   (ng[l-1][2*j+1]),
          .cin  (c[j << l]),
          .app  (napp[l][j]),
          .p    (np[l][j]),
          .g    (ng[l][j]),
          .cout (c[(j+1) << l])
        );
      end else begin : g_pgb2
        dmpgb2 u_pgb (
          .pa   (np[l-1][2*j]),
          .ga   (ng[l-1][2*j]),
          .pb   (np[l-1][2*j+1]),
          .gb   (ng[l-1][2*j+1]),
          .app  (napp[l][j]),
          .p    (np[l][j]),
          .g    (ng[l][j])
        );
      end
    end
    // Node slots above the level's node count are unused.
    if (NODES < WIDTH) begin : g_unused
      assign np[l][WIDTH-1:NODES]   = '0;
      assign ng[l][WIDTH-1:NODES]   = '0;
      assign napp[l][WIDTH-1:NODES] = '0;
    end
  end

  assign cout = c[WIDTH];

endmodule
