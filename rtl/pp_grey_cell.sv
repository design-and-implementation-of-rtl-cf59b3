// Grey cell of a parallel-prefix adder: the generate half of the prefix
// carry operator, g = gl | pl & gr. It is used where the right span already
// reaches the carry in, so the result is a finished carry and no group
// propagate is needed. Combinational.
module pp_grey_cell (
  input  approx_pkg::pg_t left,
  input  logic            right_g,
  output logic            g
);

  assign g = left.g | (left.p & right_g);

endmodule
