// Exhaustive test of the black prefix cell: the combined span must generate
// when the left span generates or propagates a right-span generate, and
// propagate only when both spans propagate.
module tb_pp_black_cell;
  import approx_pkg::*;
  pg_t l, r, o;
  int checks = 0, failures = 0;

  pp_black_cell dut (.left(l), .right(r), .out(o));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {l.g, l.p, r.g, r.p} = 4'(v);
      #1;
      checks++;
      if (o.g !== (l.g || (l.p && r.g)) || o.p !== (l.p && r.p)) begin
        failures++;
        $display("FAIL l=%b%b r=%b%b -> %b%b", l.g, l.p, r.g, r.p, o.g, o.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
