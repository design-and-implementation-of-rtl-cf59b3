// End-to-end test of the reconfigurable arithmetic unit at its default
// parameters (8-bit reconfigurable adders, 16-bit spanning-tree adder).
//
// Each operation applies random 16-bit operands, a random carry in, a
// random add/subtract control and a DA code, waits one step and checks: the
// ripple-carry and carry look-ahead RAB results against their reference
// models, the exact sum or difference when da = 0, and
// the spanning-tree result against integer addition. DA is changed between
// operations, in runs of fixed codes and then at random, so the unit is
// reconfigured on the fly. The mechanisms of the design are counted and each
// must occur: exact mode, approximate LSB cells, an approximate
// propagate/generate block (da >= 2), the whole adder approximate, an
// approximate cell passing its carry into the exact part, a changed result,
// a mode switch, subtraction and carries out of every adder. The mean absolute error of
// both reconfigurable adders is printed for every DA code.
module tb_reconfig_arith_unit;
  import tb_ref_pkg::*;
  localparam int unsigned RW  = 8;
  localparam int unsigned SW  = 16;
  localparam int unsigned DAW = 4;
  localparam int NOPS = 90000;

  logic [SW-1:0]  a, b;
  logic           cin, sub;
  logic [DAW-1:0] da;
  logic [RW-1:0]  rca_sum, cla_sum;
  logic           rca_cout, cla_cout;
  logic [SW-1:0]  sta_sum;
  logic           sta_cout;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_exact, n_app_cells, n_app_pgb, n_all_app, n_carry_into_exact;
  int n_changed, n_switch, n_rca_cout, n_cla_cout, n_sta_cout, n_sub;
  longint err_rca [RW+1];
  longint err_cla [RW+1];
  int     ops_da  [RW+1];

  reconfig_arith_unit dut (
    .a(a), .b(b), .cin(cin), .sub(sub), .da(da),
    .rca_sum(rca_sum), .rca_cout(rca_cout),
    .cla_sum(cla_sum), .cla_cout(cla_cout),
    .sta_sum(sta_sum), .sta_cout(sta_cout)
  );

  function automatic int absdiff(input int x, input int y);
    return (x > y) ? x - y : y - x;
  endfunction

  task automatic check_op(input int d);
    logic [32:0] r_rca, r_cla;
    logic [RW:0] exact8;
    logic [SW:0] exact16;
    logic [RW-1:0] b_eff;
    a   = SW'($urandom);
    b   = SW'($urandom);
    cin = 1'($urandom);
    sub = 1'($urandom);
    if (DAW'(d) != da) n_switch++;
    da  = DAW'(d);
    #1;
    b_eff   = sub ? ~b[RW-1:0] : b[RW-1:0];
    r_rca   = rca_ref(RW, 32'(a[RW-1:0]), 32'(b_eff), cin ^ sub, d);
    r_cla   = cla_ref(RW, 32'(a[RW-1:0]), 32'(b_eff), cin ^ sub, d);
    if (sub) begin
      exact8     = (RW+1)'(a[RW-1:0]) - (RW+1)'(b[RW-1:0]) - (RW+1)'(cin);
      exact8[RW] = ~exact8[RW];   // carry out = not borrow
      n_sub++;
    end else begin
      exact8 = (RW+1)'(a[RW-1:0]) + (RW+1)'(b[RW-1:0]) + (RW+1)'(cin);
    end
    exact16 = (SW+1)'(a) + (SW+1)'(b) + (SW+1)'(cin);

    checks += 3;
    if ({rca_cout, rca_sum} !== r_rca[RW:0]) begin
      failures++;
      if (failures < 10) $display("FAIL rca da=%0d a=%h b=%h cin=%b", d, a[RW-1:0], b[RW-1:0], cin);
    end
    if ({cla_cout, cla_sum} !== r_cla[RW:0]) begin
      failures++;
      if (failures < 10) $display("FAIL cla da=%0d a=%h b=%h cin=%b", d, a[RW-1:0], b[RW-1:0], cin);
    end
    if ({sta_cout, sta_sum} !== exact16) begin
      failures++;
      if (failures < 10) $display("FAIL sta a=%h b=%h cin=%b", a, b, cin);
    end
    if (d == 0) begin
      checks++;
      n_exact++;
      if ({rca_cout, rca_sum} !== exact8 || {cla_cout, cla_sum} !== exact8) begin
        failures++;
        $display("FAIL exact mode a=%h b=%h cin=%b", a[RW-1:0], b[RW-1:0], cin);
      end
    end
    if (d > 0)        n_app_cells++;
    if (d >= 2)       n_app_pgb++;
    if (d >= int'(RW)) n_all_app++;
    if (d > 0 && d < int'(RW) && a[d-1]) n_carry_into_exact++;  // approximate cell carries a
    if ({rca_cout, rca_sum} != exact8 || {cla_cout, cla_sum} != exact8) n_changed++;
    if (rca_cout) n_rca_cout++;
    if (cla_cout) n_cla_cout++;
    if (sta_cout) n_sta_cout++;
    ops_da[d]++;
    err_rca[d] += longint'(absdiff(int'({rca_cout, rca_sum}), int'(exact8)));
    err_cla[d] += longint'(absdiff(int'({cla_cout, cla_sum}), int'(exact8)));
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-34s seen %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_exact, n_app_cells, n_app_pgb, n_all_app, n_carry_into_exact} = '0;
    {n_changed, n_switch, n_rca_cout, n_cla_cout, n_sta_cout, n_sub} = '0;
    for (int d = 0; d <= int'(RW); d++) begin
      err_rca[d] = 0;
      err_cla[d] = 0;
      ops_da[d]  = 0;
    end
    da = '0;
    // runs of each DA code
    for (int d = 0; d <= int'(RW); d++)
      for (int n = 0; n < NOPS / 18; n++) check_op(d);
    // DA changing on every operation
    for (int n = 0; n < NOPS / 2; n++) check_op(int'($urandom_range(RW, 0)));

    for (int d = 0; d <= int'(RW); d++)
      $display("da=%0d: mean |error| rca %0.3f cla %0.3f over %0d ops", d,
               real'(err_rca[d]) / ops_da[d], real'(err_cla[d]) / ops_da[d], ops_da[d]);

    need("exact mode (da = 0)", n_exact);
    need("approximate LSB cells (da > 0)", n_app_cells);
    need("approximate PG block (da >= 2)", n_app_pgb);
    need("whole adder approximate", n_all_app);
    need("carry from approximate into exact", n_carry_into_exact);
    need("result changed by approximation", n_changed);
    need("mode switch", n_switch);
    need("subtraction (sub = 1)", n_sub);
    need("rca carry out", n_rca_cout);
    need("cla carry out", n_cla_cout);
    need("spanning-tree carry out", n_sta_cout);
    checks++;
    if (err_rca[0] != 0 || err_cla[0] != 0) begin
      failures++;
      $display("FAIL error in exact mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
