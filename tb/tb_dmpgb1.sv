// Exhaustive test of DMPGB1 against the dual-mode block table. The exact
// group signals are checked arithmetically: for a lower half that is one
// bit (pa, ga) and an upper half (pb, gb), the merged block must propagate
// exactly when both halves do and generate when the upper half generates
// or the lower half generates into a propagating upper half.
module tb_dmpgb1;
  logic pa, ga, pb, gb, cin, app, p, g, cout;
  logic ep, eg;
  int checks = 0, failures = 0;

  dmpgb1 dut (.pa(pa), .ga(ga), .pb(pb), .gb(gb), .cin(cin), .app(app),
              .p(p), .g(g), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {app, pa, ga, pb, gb, cin} = 6'(v);
      if (app) begin
        ep = pa;
        eg = gb;
      end else begin
        ep = pa && pb;
        eg = gb || (ga && pb);
      end
      #1;
      checks++;
      if ({p, g, cout} !== {ep, eg, eg | (ep & cin)}) begin
        failures++;
        $display("FAIL app=%b pa=%b ga=%b pb=%b gb=%b cin=%b got %b", app, pa, ga, pb, gb,
                 cin, {p, g, cout});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
