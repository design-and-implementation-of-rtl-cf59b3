// Test of the reconfigurable adder/subtractor block with both adder cores.
// Every operand pair, carry/borrow in, add and subtract, for DA codes 0, 3,
// 5 and 8, is compared with the reference models applied to the effective
// operands; with da = 0 the results must equal a + b + cin and a - b - cin
// (modulo 2^9, bit 8 being the carry / no-borrow flag).
module tb_rab;
  import tb_ref_pkg::*;
  import approx_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned DAW = 4;
  logic [W-1:0]   a, b, r_rca, r_cla;
  logic           cin, sub, co_rca, co_cla;
  logic [DAW-1:0] da;
  logic [32:0]    e_rca, e_cla;
  logic [W:0]     exact;
  logic [W-1:0]   b_eff;
  int checks = 0, failures = 0, n_sub = 0;
  int da_list [4] = '{0, 3, 5, 8};

  rab #(.KIND(RAB_RCA)) dut_rca (.a(a), .b(b), .cin(cin), .sub(sub), .da(da),
                                 .result(r_rca), .cout(co_rca));
  rab #(.KIND(RAB_CLA)) dut_cla (.a(a), .b(b), .cin(cin), .sub(sub), .da(da),
                                 .result(r_cla), .cout(co_cla));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (da_list[k]) begin
      for (int v = 0; v < (1 << (2*W+2)); v++) begin
        {sub, cin, a, b} = (2*W+2)'(v);
        da = DAW'(da_list[k]);
        #1;
        b_eff = sub ? ~b : b;
        e_rca = rca_ref(W, 32'(a), 32'(b_eff), cin ^ sub, da_list[k]);
        e_cla = cla_ref(W, 32'(a), 32'(b_eff), cin ^ sub, da_list[k]);
        checks += 2;
        if ({co_rca, r_rca} !== e_rca[W:0]) begin
          failures++;
          if (failures < 10) $display("FAIL rca sub=%b da=%0d a=%h b=%h cin=%b", sub, da, a, b, cin);
        end
        if ({co_cla, r_cla} !== e_cla[W:0]) begin
          failures++;
          if (failures < 10) $display("FAIL cla sub=%b da=%0d a=%h b=%h cin=%b", sub, da, a, b, cin);
        end
        if (da_list[k] == 0) begin
          if (sub) begin
            exact = (W+1)'(a) - (W+1)'(b) - (W+1)'(cin);
            exact[W] = ~exact[W];   // carry out = not borrow
            n_sub++;
          end else begin
            exact = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
          end
          checks++;
          if ({co_rca, r_rca} !== exact || {co_cla, r_cla} !== exact) begin
            failures++;
            if (failures < 10) $display("FAIL exact sub=%b a=%h b=%h cin=%b", sub, a, b, cin);
          end
        end
      end
    end
    checks++;
    if (n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
