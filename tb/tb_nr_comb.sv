// tb_nr_comb: check of the combinational non-restoring array divider at its
// default size (12-bit dividend and divisor).
// Expected quotient and remainder come from 32-bit integer division, which
// truncates toward zero like the divider (the quotient cut to 12 bits, so
// -2048 / -1 wraps to -2048). Every pair of 12-bit operands is applied
// (16.7 million divisions); division by zero is not checked.
module tb_nr_comb;
  localparam int M = 12, N = 12;
  logic [M-1:0] x, qt;
  logic [N-1:0] y, rem;
  int checks = 0, failures = 0;

  nr_comb #(.M(M), .N(N)) dut (.x(x), .y(y), .qt(qt), .rem(rem));

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int xv, int yv);
    logic [M-1:0] eq;
    logic [N-1:0] er;
    x = M'(xv);
    y = N'(yv);
    #1;
    eq = M'(xv / yv);
    er = N'(xv % yv);
    checks++;
    if (qt !== eq || rem !== er) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d / %0d: qt=%0d rem=%0d exp %0d %0d", xv, yv,
                 $signed(qt), $signed(rem), $signed(eq), $signed(er));
    end
  endtask

  initial begin
    for (int xv = -2048; xv < 2048; xv++)
      for (int yv = -2048; yv < 2048; yv++)
        if (yv != 0) apply(xv, yv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
