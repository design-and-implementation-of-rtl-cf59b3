// Exhaustive test of the grey prefix cell (generate half of the operator).
module tb_pp_grey_cell;
  import approx_pkg::*;
  pg_t  l;
  logic rg, g;
  int checks = 0, failures = 0;

  pp_grey_cell dut (.left(l), .right_g(rg), .g(g));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {l.g, l.p, rg} = 3'(v);
      #1;
      checks++;
      if (g !== (l.g || (l.p && rg))) begin
        failures++;
        $display("FAIL l=%b%b rg=%b -> %b", l.g, l.p, rg, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
