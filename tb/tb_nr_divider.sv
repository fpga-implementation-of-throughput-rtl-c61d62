// tb_nr_divider: the registered non-restoring divider as reference design
// (PIPE_STAGES = 1) and with 2 and 4 pipeline stages, all at 12 bits, fed
// the same request stream.
// A request is offered in most cycles (random gaps). Each instance must raise
// out_valid exactly PIPE_STAGES+1 cycles after each request and at no other
// time, with quotient and remainder equal to 32-bit integer division
// (truncating toward zero). Inputs are driven and outputs sampled on the
// falling clock edge. The test also counts cycles in which a pipeline holds
// more than one division at once, and fails if that never happens.
module tb_nr_divider;
  localparam int M = 12, N = 12;
  localparam int NREQ = 20000;
  localparam int NCYC = NREQ + 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [M-1:0] x = '0;
  logic [N-1:0] y = 12'd1;
  logic         ov [3];
  logic [M-1:0] qt [3];
  logic [N-1:0] rem[3];
  int checks = 0, failures = 0, overlap = 0;
  int cycle = 0;
  int lat[3] = '{2, 3, 5};

  logic   hist_v [NCYC];
  int     hist_x [NCYC];
  int     hist_y [NCYC];

  always #5 clk = ~clk;

  nr_divider #(.M(M), .N(N), .PIPE_STAGES(1)) dut1 (.clk, .rst_n, .in_valid, .x, .y,
    .out_valid(ov[0]), .qt(qt[0]), .rem(rem[0]));
  nr_divider #(.M(M), .N(N), .PIPE_STAGES(2)) dut2 (.clk, .rst_n, .in_valid, .x, .y,
    .out_valid(ov[1]), .qt(qt[1]), .rem(rem[1]));
  nr_divider #(.M(M), .N(N), .PIPE_STAGES(4)) dut4 (.clk, .rst_n, .in_valid, .x, .y,
    .out_valid(ov[2]), .qt(qt[2]), .rem(rem[2]));

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    for (int k = 0; k < 3; k++) begin
      int c;
      logic ev;
      c  = cycle - lat[k];
      ev = (c >= 0) ? hist_v[c] : 1'b0;
      checks++;
      if (ov[k] !== ev) begin
        failures++;
        if (failures < 10) $display("FAIL dut%0d cycle %0d out_valid=%0d exp %0d", k, cycle, ov[k], ev);
      end else if (ev) begin
        logic [M-1:0] eq;
        logic [N-1:0] er;
        eq = M'(hist_x[c] / hist_y[c]);
        er = N'(hist_x[c] % hist_y[c]);
        checks++;
        if (qt[k] !== eq || rem[k] !== er) begin
          failures++;
          if (failures < 10) $display("FAIL dut%0d %0d / %0d: %0d %0d exp %0d %0d", k, hist_x[c], hist_y[c],
                                      $signed(qt[k]), $signed(rem[k]), $signed(eq), $signed(er));
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < NCYC; cycle++) begin
      @(negedge clk);
      check_outputs();
      // pipelines with several divisions in flight
      if (cycle >= 2 && hist_v[cycle-1] && hist_v[cycle-2]) overlap++;
      if (cycle < NREQ) begin
        int xv, yv;
        xv = int'($urandom_range(0, 4095)) - 2048;
        do yv = int'($urandom_range(0, 4095)) - 2048; while (yv == 0);
        if (cycle < 8) begin xv = (cycle % 2 == 1) ? 2047 : -2048; yv = (cycle < 4) ? -1 : -2048; end
        hist_v[cycle] = ($urandom_range(0, 9) != 0);
        hist_x[cycle] = xv;
        hist_y[cycle] = yv;
      end else begin
        hist_v[cycle] = 1'b0;
        hist_x[cycle] = 0;
        hist_y[cycle] = 1;
      end
      in_valid = hist_v[cycle];
      x        = M'(hist_x[cycle]);
      y        = N'(hist_y[cycle]);
    end
    checks++;
    if (overlap == 0) begin
      failures++;
      $display("FAIL pipelines never held two divisions at once");
    end
    $display("overlapping cycles: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
