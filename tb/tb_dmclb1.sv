// Exhaustive test of DMCLB1 against the dual-mode block table.
module tb_dmclb1;
  logic a, b, cin, app, s, p, g, cout;
  logic [3:0] exp_v;
  int checks = 0, failures = 0;

  dmclb1 dut (.a(a), .b(b), .cin(cin), .app(app), .s(s), .p(p), .g(g), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {app, a, b, cin} = 4'(v);
      // {s, p, g, cout}
      if (app) exp_v = {b, b, a, a};
      else     exp_v = {a ^ b ^ cin, a ^ b, a & b, (a & b) | (a & cin) | (b & cin)};
      #1;
      checks++;
      if ({s, p, g, cout} !== exp_v) begin
        failures++;
        $display("FAIL app=%b a=%b b=%b cin=%b got %b expected %b", app, a, b, cin,
                 {s, p, g, cout}, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
