// Exhaustive test of DMPGB2 against the dual-mode block table.
module tb_dmpgb2;
  logic pa, ga, pb, gb, app, p, g;
  logic ep, eg;
  int checks = 0, failures = 0;

  dmpgb2 dut (.pa(pa), .ga(ga), .pb(pb), .gb(gb), .app(app), .p(p), .g(g));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {app, pa, ga, pb, gb} = 5'(v);
      if (app) begin
        ep = pa;
        eg = gb;
      end else begin
        ep = pa && pb;
        eg = gb || (ga && pb);
      end
      #1;
      checks++;
      if ({p, g} !== {ep, eg}) begin
        failures++;
        $display("FAIL app=%b pa=%b ga=%b pb=%b gb=%b got %b", app, pa, ga, pb, gb, {p, g});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
