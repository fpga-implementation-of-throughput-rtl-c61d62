// tb_nr_cell: random check of one non-restoring row at N = 12.
// For random divisor magnitudes D in 1..2048 and previous partial remainders
// r in [-D, D) the expected result is 2r + xbit - D when r >= 0 and
// 2r + xbit + D when r < 0, with quotient bit (result >= 0), all computed in
// 32-bit integers. Boundary values of r and D are included.
module tb_nr_cell;
  localparam int N = 12;
  logic [N:0] r_in, ya, yn, r_out;
  logic       xbit, q;
  int checks = 0, failures = 0;

  nr_cell #(.N(N)) dut (.r_in(r_in), .xbit(xbit), .ya(ya), .yn(yn), .r_out(r_out), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int d, int r, int b);
    int exp;
    ya   = (N+1)'(d);
    yn   = (N+1)'(-d);
    r_in = (N+1)'(r);
    xbit = 1'(b);
    #1;
    exp = (r < 0) ? (2 * r + b + d) : (2 * r + b - d);
    checks++;
    if (int'($signed(r_out)) != exp || q != (exp >= 0)) begin
      failures++;
      if (failures < 10) $display("FAIL d=%0d r=%0d b=%0d r_out=%0d q=%0d exp=%0d", d, r, b, $signed(r_out), q, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int d, r;
      d = int'($urandom_range(1, 2048));
      r = int'($urandom_range(0, 2 * d - 1)) - d;
      apply(d, r, int'($urandom_range(0, 1)));
    end
    for (int b = 0; b < 2; b++) begin
      apply(2048, -2048, b);
      apply(2048, 2047, b);
      apply(1, 0, b);
      apply(1, -1, b);
      apply(2047, 2046, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
