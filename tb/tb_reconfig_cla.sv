// Exhaustive test of the reconfigurable CLA at its default width: every
// pair of 8-bit operands, both carry-in values and every DA code 0..8. The
// result is compared with the bit-level reference model, and with the exact
// sum a + b + cin when da = 0. It also counts how often approximation
// changed the result, which must happen for every da > 0.
module tb_reconfig_cla;
  import tb_ref_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned DAW = 4;
  logic [W-1:0]   a, b, sum;
  logic           cin, cout;
  logic [DAW-1:0] da;
  logic [32:0]    ref_r;
  int checks = 0, failures = 0;
  int differs [W+1];

  reconfig_cla dut (.a(a), .b(b), .cin(cin), .da(da), .sum(sum), .cout(cout));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    ;
  end

  initial begin
    for (int d = 0; d <= int'(W); d++) begin
      differs[d] = 0;
      for (int v = 0; v < (1 << (2*W+1)); v++) begin
        {cin, a, b} = (2*W+1)'(v);
        da = DAW'(d);
        #1;
        ref_r = cla_ref(W, 32'(a), 32'(b), cin, d);
        checks++;
        if ({cout, sum} !== ref_r[W:0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL da=%0d a=%h b=%h cin=%b got %h expected %h", d, a, b, cin,
                     {cout, sum}, ref_r[W:0]);
        end
        if ({cout, sum} != (W+1)'(a) + (W+1)'(b) + (W+1)'(cin)) differs[d]++;
      end
      $display("da=%0d: %0d of %0d results differ from the exact sum", d, differs[d], 1 << (2*W+1));
      checks++;
      if ((d == 0) != (differs[d] == 0)) begin
        failures++;
        $display("FAIL da=%0d: unexpected count of inexact results", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
