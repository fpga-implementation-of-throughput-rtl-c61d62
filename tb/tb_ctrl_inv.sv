// tb_ctrl_inv: exhaustive check of the controlled inverter at W = 12.
// Every input value is applied with ctrl = 0 (expect the value itself) and
// ctrl = 1 (expect 0 - value, worked out in 32-bit integers and cut to 12
// bits).
module tb_ctrl_inv;
  localparam int W = 12;
  logic         ctrl;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  ctrl_inv #(.W(W)) dut (.ctrl(ctrl), .a(a), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      for (int c = 0; c < 2; c++) begin
        logic [W-1:0] exp;
        ctrl = 1'(c);
        a    = W'(v);
        #1;
        exp = (c == 1) ? W'(0 - v) : W'(v);
        checks++;
        if (y !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL ctrl=%0d a=%h y=%h exp=%h", c, a, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
