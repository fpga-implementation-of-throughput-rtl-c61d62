// tb_rs_counter: the restoring divider's step counter at M = 12.
// A random start stream drives the counter. Each start taken while idle must
// give ld in that cycle, then stp for exactly 12 cycles with rdy low, then a
// one-cycle done pulse in the cycle rdy returns. The expected values come
// from a run-length count kept in the testbench (steps left in the current
// run), checked every cycle. The test also checks that starts offered while
// busy are ignored and fails if that never happened.
module tb_rs_counter;
  localparam int M = 12;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic rdy, ld, stp, done;
  int checks = 0, failures = 0, ignored = 0, runs = 0;
  int left = 0;           // steps still to come in the current run
  logic exp_done = 1'b0;

  always #5 clk = ~clk;

  rs_counter #(.M(M)) dut (.clk, .rst_n, .start, .rdy, .ld, .stp, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      logic e_rdy, e_ld, e_stp;
      @(negedge clk);
      start = ($urandom_range(0, 3) == 0);
      #1;
      e_rdy = (left == 0);
      e_ld  = start && (left == 0);
      e_stp = (left != 0);
      checks++;
      if (rdy !== e_rdy || ld !== e_ld || stp !== e_stp || done !== exp_done) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d rdy=%0d ld=%0d stp=%0d done=%0d exp %0d %0d %0d %0d",
                                    cyc, rdy, ld, stp, done, e_rdy, e_ld, e_stp, exp_done);
      end
      if (start && left != 0) ignored++;
      // state after the next rising edge
      exp_done = (left == 1);
      if (e_ld) begin
        left = M;
        runs++;
      end else if (left != 0) left--;
    end
    checks++;
    if (ignored == 0 || runs < 2) begin
      failures++;
      $display("FAIL starts while busy: %0d, runs: %0d", ignored, runs);
    end
    $display("runs=%0d ignored_starts=%0d", runs, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
