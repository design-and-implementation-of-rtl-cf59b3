// Exhaustive test of the dual-mode full adder: all 16 input combinations,
// checked against the exact full-adder truth table (app = 0) and against
// sum = b, cout = a (app = 1).
module tb_dmfa;
  logic a, b, cin, app, sum, cout;
  int checks = 0, failures = 0;

  dmfa dut (.a(a), .b(b), .cin(cin), .app(app), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {app, a, b, cin} = 4'(v);
      #1;
      checks++;
      if (app) begin
        if (sum !== b || cout !== a) begin
          failures++;
          $display("FAIL app=1 a=%b b=%b cin=%b -> %b%b", a, b, cin, cout, sum);
        end
      end else begin
        if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
          failures++;
          $display("FAIL app=0 a=%b b=%b cin=%b -> %b%b", a, b, cin, cout, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
