// Black cell of a parallel-prefix adder: the prefix carry operator
// (gl, pl) o (gr, pr) = (gl | pl & gr, pl & pr), combining a more
// significant span (left) with the adjacent less significant span (right).
// Combinational.
module pp_black_cell (
  input  approx_pkg::pg_t left,
  input  approx_pkg::pg_t right,
  output approx_pkg::pg_t out
);

  assign out.g = left.g | (left.p & right.g);
  assign out.p = left.p & right.p;

endmodule
