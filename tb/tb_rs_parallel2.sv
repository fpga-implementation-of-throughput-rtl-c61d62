// tb_rs_parallel2: the two-way parallel restoring divider at 12 bits.
// Requests are offered at random and held until taken. Each taken request
// must give one out_valid pulse 13 cycles (M+1) later, in request order,
// with quotient and remainder equal to 32-bit integer division (truncating
// toward zero). The test counts cycles with two divisions in flight (both
// copies busy), requests that had to wait for in_ready, and requests taken
// in the cycle of a result, and fails if any of these never happened.
module tb_rs_parallel2;
  localparam int M = 12, N = 12;
  localparam int NREQ = 3000;
  localparam int LAT  = M + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  logic [M-1:0] x = '0, qt;
  logic [N-1:0] y = 12'd1, rem;
  int checks = 0, failures = 0, stalls = 0, inflight_max = 0, b2b = 0;
  int sent = 0, got = 0;
  int q_cyc[$], q_x[$], q_y[$];
  int cx[8] = '{-2048, 2047, -2048, 2047, -2048, -1, 0, 1};
  int cy[8] = '{-1, -1, -2048, -2048, 1, 2047, 5, -2048};

  always #5 clk = ~clk;

  rs_parallel2 #(.M(M), .N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .x, .y, .out_valid, .qt, .rem);

  initial begin
    repeat (NREQ * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int cycle = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (got < NREQ) begin
      @(negedge clk);
      cycle++;
      // results
      if (out_valid) begin
        checks++;
        if (q_cyc.size() == 0) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: result with no request", cycle);
        end else begin
          int c, xv, yv;
          logic [M-1:0] eq;
          logic [N-1:0] er;
          c = q_cyc.pop_front(); xv = q_x.pop_front(); yv = q_y.pop_front();
          got++;
          eq = M'(xv / yv);
          er = N'(xv % yv);
          if (cycle - c != LAT || qt !== eq || rem !== er) begin
            failures++;
            if (failures < 10) $display("FAIL %0d / %0d: %0d %0d after %0d cycles, exp %0d %0d after %0d",
                                        xv, yv, $signed(qt), $signed(rem), cycle - c,
                                        $signed(eq), $signed(er), LAT);
          end
        end
      end else if (q_cyc.size() != 0 && cycle - q_cyc[0] >= LAT) begin
        checks++;
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: result missing", cycle);
        void'(q_cyc.pop_front()); void'(q_x.pop_front()); void'(q_y.pop_front());
        got++;
      end
      if (q_cyc.size() > inflight_max) inflight_max = q_cyc.size();
      // requests: a new one once the previous was taken
      if (!in_valid && sent < NREQ && $urandom_range(0, 3) != 0) begin
        int xv, yv;
        if (sent < 8) begin xv = cx[sent]; yv = cy[sent]; end
        else begin
          xv = int'($urandom_range(0, 4095)) - 2048;
          do yv = int'($urandom_range(0, 4095)) - 2048; while (yv == 0);
        end
        in_valid = 1'b1;
        x = M'(xv);
        y = N'(yv);
      end
      #1;
      if (in_valid) begin
        if (in_ready) begin
          if (out_valid) b2b++;
          q_cyc.push_back(cycle); q_x.push_back(int'($signed(x))); q_y.push_back(int'($signed(y)));
          sent++;
        end else stalls++;
      end
      @(posedge clk);
      #1;
      if (in_valid && q_cyc.size() != 0 && q_cyc[q_cyc.size()-1] == cycle) in_valid = 1'b0;
    end
    checks += 3;
    if (b2b == 0) begin
      failures++;
      $display("FAIL no request was taken in the cycle of a result");
    end
    if (stalls == 0) begin
      failures++;
      $display("FAIL no request ever waited for in_ready");
    end
    if (inflight_max < 2) begin
      failures++;
      $display("FAIL at most %0d divisions in flight", inflight_max);
    end
    $display("stalls=%0d max_in_flight=%0d back_to_back=%0d", stalls, inflight_max, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
