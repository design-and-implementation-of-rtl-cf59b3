// Test of the 16-bit spanning-tree adder against integer addition: corner
// cases (carries that run through every group, all ones, alternating
// patterns) and 200000 random operand pairs with random carry in. It also
// checks that carries into every group and out of the adder were seen.
module tb_spanning_tree_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic [W:0]   exp_r;
  int checks = 0, failures = 0;
  int cout_seen = 0;

  spanning_tree_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    a = ta; b = tb; cin = tc;
    #1;
    exp_r = (W+1)'(ta) + (W+1)'(tb) + (W+1)'(tc);
    checks++;
    if (cout) cout_seen++;
    if ({cout, sum} !== exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %h expected %h", ta, tb, tc,
                                  {cout, sum}, exp_r);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 0);
    apply('1, '0, 1);        // carry in ripples through every group
    apply('1, '1, 1);
    apply('1, 16'h0001, 0);
    apply(16'h5555, 16'hAAAA, 1);
    apply(16'h0FFF, 16'h0001, 0);
    apply(16'h8000, 16'h8000, 0);
    for (int k = 0; k < W; k++) apply(W'(1) << k, (W'(1) << k) - 1, 1);
    for (int n = 0; n < 200000; n++) apply(W'($urandom), W'($urandom), 1'($urandom));
    checks++;
    if (cout_seen == 0) begin
      failures++;
      $display("FAIL carry out never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
