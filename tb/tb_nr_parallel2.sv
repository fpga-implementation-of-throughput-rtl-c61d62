// tb_nr_parallel2: the two-way parallel non-restoring divider at 12 bits.
// Requests are offered in most cycles (random gaps). out_valid must follow
// each request exactly 3 cycles later and never otherwise, with quotient and
// remainder equal to 32-bit integer division (truncating toward zero).
// Because the test drives new requests every cycle, a copy's input register
// is reloaded in the very cycle the output register takes its result, which
// checks the two-cycle timing of each copy. The test counts requests that go
// to each copy (through the turn pointer) and requests that arrive while the
// other copy is still busy, and fails if either copy or the overlap never
// happens.
module tb_nr_parallel2;
  localparam int M = 12, N = 12;
  localparam int NREQ = 20000;
  localparam int NCYC = NREQ + 100;
  localparam int LAT  = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [M-1:0] x = '0, qt;
  logic [N-1:0] y = 12'd1, rem;
  logic out_valid;
  int checks = 0, failures = 0;
  int cycle = 0, to_copy[2] = '{0, 0}, overlap = 0;
  logic hist_v [NCYC];
  int   hist_x [NCYC];
  int   hist_y [NCYC];

  always #5 clk = ~clk;

  nr_parallel2 #(.M(M), .N(N)) dut (.clk, .rst_n, .in_valid, .x, .y, .out_valid, .qt, .rem);

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < NCYC; cycle++) begin
      int c;
      logic ev;
      @(negedge clk);
      c  = cycle - LAT;
      ev = (c >= 0) ? hist_v[c] : 1'b0;
      checks++;
      if (out_valid !== ev) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d out_valid=%0d exp %0d", cycle, out_valid, ev);
      end else if (ev) begin
        logic [M-1:0] eq;
        logic [N-1:0] er;
        eq = M'(hist_x[c] / hist_y[c]);
        er = N'(hist_x[c] % hist_y[c]);
        checks++;
        if (qt !== eq || rem !== er) begin
          failures++;
          if (failures < 10) $display("FAIL %0d / %0d: %0d %0d exp %0d %0d", hist_x[c], hist_y[c],
                                      $signed(qt), $signed(rem), $signed(eq), $signed(er));
        end
      end
      if (cycle < NREQ) begin
        int xv, yv;
        xv = int'($urandom_range(0, 4095)) - 2048;
        do yv = int'($urandom_range(0, 4095)) - 2048; while (yv == 0);
        hist_v[cycle] = ($urandom_range(0, 9) != 0);
        hist_x[cycle] = xv;
        hist_y[cycle] = yv;
      end else begin
        hist_v[cycle] = 1'b0;
        hist_x[cycle] = 0;
        hist_y[cycle] = 1;
      end
      if (hist_v[cycle]) begin
        to_copy[dut.turn]++;
        if (cycle >= 1 && hist_v[cycle-1]) overlap++;
      end
      in_valid = hist_v[cycle];
      x        = M'(hist_x[cycle]);
      y        = N'(hist_y[cycle]);
    end
    checks += 3;
    if (to_copy[0] == 0 || to_copy[1] == 0) begin
      failures++;
      $display("FAIL a copy never took a request: %0d %0d", to_copy[0], to_copy[1]);
    end
    if (overlap == 0) begin
      failures++;
      $display("FAIL the copies never worked at the same time");
    end
    $display("copy0=%0d copy1=%0d overlapping=%0d", to_copy[0], to_copy[1], overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
