// Test of the approximation controller: every DA code, including codes
// above the width, must give a thermometer mask of min(da, WIDTH) ones from
// the LSB.
module tb_approx_controller;
  localparam int unsigned W = 8;
  localparam int unsigned DAW = 4;
  logic [DAW-1:0] da;
  logic [W-1:0]   app;
  logic [W-1:0]   exp_app;
  int checks = 0, failures = 0;

  approx_controller dut (.da(da), .app(app));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < (1 << DAW); d++) begin
      da = DAW'(d);
      exp_app = '0;
      for (int i = 0; i < d && i < int'(W); i++) exp_app[i] = 1'b1;
      #1;
      checks++;
      if (app !== exp_app) begin
        failures++;
        $display("FAIL da=%0d app=%b expected %b", d, app, exp_app);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
