// tb_rs_exhaustive: every pair of 12-bit operands (non-zero divisor) through
// the two-way parallel restoring divider (and so through both of its
// sequential restoring dividers), at full request rate.
// in_valid stays high; each time in_ready takes a pair, the next pair is
// presented after the clock edge. Each out_valid pulse is compared, in
// request order, with 32-bit integer division (truncating toward zero) of
// the oldest outstanding pair, and must come exactly 13 cycles after that
// pair was taken. 16.7 million divisions, about 109 million clock cycles.
module tb_rs_exhaustive;
  localparam int M = 12, N = 12;
  localparam longint NPAIRS = 4096 * 4095;
  localparam longint LAT = 13;   // M + 1 cycles from taking a pair to its result

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  logic [M-1:0] x = '0, qt;
  logic [N-1:0] y = 12'd1, rem;
  longint checks = 0, failures = 0;
  int     q_x[$], q_y[$];
  longint q_c[$];

  always #5 clk = ~clk;

  rs_parallel2 #(.M(M), .N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .x, .y, .out_valid, .qt, .rem);

  initial begin
    repeat (int'(NPAIRS * 7 + 1000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int xv = -2048, yv = -2048;
    static longint cycle = 0;
    static bit all_sent = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b1;
    x = M'(xv);
    y = N'(yv);
    while (!all_sent || q_x.size() != 0) begin
      bit take;
      if (cycle != 0) @(negedge clk);   // the first pass runs at the edge in_valid rose
      cycle++;
      if (out_valid) begin
        checks++;
        if (q_x.size() == 0) begin
          failures++;
          if (failures < 10) $display("FAIL result with no request at cycle %0d", cycle);
        end else begin
          int px, py;
          longint pc;
          logic [M-1:0] eq;
          logic [N-1:0] er;
          px = q_x.pop_front(); py = q_y.pop_front(); pc = q_c.pop_front();
          eq = M'(px / py);
          er = N'(px % py);
          if (cycle - pc != LAT || qt !== eq || rem !== er) begin
            failures++;
            if (failures < 10) $display("FAIL %0d / %0d: %0d %0d after %0d cycles, exp %0d %0d",
                                        px, py, $signed(qt), $signed(rem), cycle - pc,
                                        $signed(eq), $signed(er));
          end
        end
      end else if (q_c.size() != 0 && cycle - q_c[0] > LAT) begin
        failures++;
        if (failures < 10) $display("FAIL result missing at cycle %0d", cycle);
        void'(q_x.pop_front()); void'(q_y.pop_front()); void'(q_c.pop_front());
      end
      take = in_valid && in_ready;
      if (take) begin
        q_x.push_back(xv); q_y.push_back(yv); q_c.push_back(cycle);
      end
      @(posedge clk);
      #1;
      if (take) begin
        // next pair: y runs over all non-zero values, then x advances
        yv++;
        if (yv == 0) yv = 1;
        if (yv == 2048) begin
          yv = -2048;
          xv++;
        end
        if (xv == 2048) begin
          all_sent = 1'b1;
          in_valid = 1'b0;
        end
        x = M'(xv);
        y = N'(yv);
      end
    end
    if (checks != NPAIRS) begin
      failures++;
      $display("FAIL %0d results, expected %0d", checks, NPAIRS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
