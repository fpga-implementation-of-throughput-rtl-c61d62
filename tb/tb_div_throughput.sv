// tb_div_throughput: results per clock cycle of the six configurations of
// div_top under a saturating load, at full size.
// For 1300 cycles every configuration is offered a new request in every
// cycle it can take one. The non-restoring ones must take all 1300 (one
// division per cycle: the reference, parallel and pipelined versions differ
// in how fast the clock may run, not in results per cycle); the sequential
// restoring divider must take exactly 100 (one per 13 cycles) and its
// two-way parallel version exactly 200. Every response is checked for value
// and latency as in the end-to-end test, and all requests must be answered.
module tb_div_throughput;
  import div_pkg::*;
  localparam int M = DIV_M, N = DIV_N;
  localparam int NCH  = 6;
  localparam int WINDOW = 1300;         // cycles in which requests are offered
  localparam int EXP_TAKEN[NCH] = '{1300, 1300, 1300, 1300, 100, 200};
  localparam int LAT[NCH] = '{2, 3, 3, 5, M + 1, M + 1};
  localparam bit HS [NCH] = '{0, 0, 0, 0, 1, 1};   // has in_ready
  localparam string NAME[NCH] = '{"nr_ref", "nr_par2", "nr_pipe2", "nr_pipe4", "rs_ref", "rs_par2"};

  logic     clk = 1'b0, rst_n = 1'b0;
  div_req_t req [NCH];
  div_rsp_t rsp [NCH];
  logic     rdy [NCH];

  int checks = 0, failures = 0;
  int sent[NCH], got[NCH], inflight_max[NCH];
  int q_cyc[NCH][$], q_x[NCH][$], q_y[NCH][$];
  logic pending[NCH];
  int n_restore = 0, n_correct = 0, n_negq = 0, n_negr = 0, n_stall = 0, n_wrap = 0;
  int cx[6] = '{-2048, 2047, -2048, 2047, -2048, 7};
  int cy[6] = '{-1, -1, -2048, -2048, 1, -3};

  always #5 clk = ~clk;

  div_top dut (
    .clk, .rst_n,
    .nr_ref_in  (req[0]), .nr_ref_out  (rsp[0]),
    .nr_par2_in (req[1]), .nr_par2_out (rsp[1]),
    .nr_pipe2_in(req[2]), .nr_pipe2_out(rsp[2]),
    .nr_pipe4_in(req[3]), .nr_pipe4_out(rsp[3]),
    .rs_ref_in  (req[4]), .rs_ref_in_ready (rdy[4]), .rs_ref_out (rsp[4]),
    .rs_par2_in (req[5]), .rs_par2_in_ready(rdy[5]), .rs_par2_out(rsp[5])
  );
  assign rdy[0] = 1'b1;
  assign rdy[1] = 1'b1;
  assign rdy[2] = 1'b1;
  assign rdy[3] = 1'b1;

  initial begin
    repeat (WINDOW * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counts what the request exercises, from the operands alone.
  task automatic note_mechanisms(int ch, int xv, int yv);
    int qa;
    qa = (xv / yv < 0) ? -(xv / yv) : xv / yv;
    if (!HS[ch] && (qa % 2 == 0)) n_correct++;
    if (HS[ch] && (qa & 32'hFFF) != 32'hFFF) n_restore++;
    if (xv / yv < 0) n_negq++;
    if (xv % yv < 0) n_negr++;
    if (xv == -2048 && yv == -1) n_wrap++;
  endtask

  task automatic check_response(int ch, int cycle);
    if (rsp[ch].valid) begin
      checks++;
      if (q_cyc[ch].size() == 0) begin
        failures++;
        if (failures < 10) $display("FAIL %s cycle %0d: response with no request", NAME[ch], cycle);
      end else begin
        int c, xv, yv;
        logic [M-1:0] eq;
        logic [N-1:0] er;
        c  = q_cyc[ch].pop_front();
        xv = q_x[ch].pop_front();
        yv = q_y[ch].pop_front();
        got[ch]++;
        eq = M'(xv / yv);
        er = N'(xv % yv);
        if (cycle - c != LAT[ch] || rsp[ch].qt !== eq || rsp[ch].rem !== er) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s %0d / %0d: %0d %0d after %0d cycles, exp %0d %0d after %0d", NAME[ch],
                     xv, yv, $signed(rsp[ch].qt), $signed(rsp[ch].rem), cycle - c,
                     $signed(eq), $signed(er), LAT[ch]);
        end else note_mechanisms(ch, xv, yv);
      end
    end else if (q_cyc[ch].size() != 0 && cycle - q_cyc[ch][0] >= LAT[ch]) begin
      checks++;
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d: response missing", NAME[ch], cycle);
      void'(q_cyc[ch].pop_front());
      void'(q_x[ch].pop_front());
      void'(q_y[ch].pop_front());
      got[ch]++;
    end
  endtask

  function automatic bit all_done();
    for (int ch = 0; ch < NCH; ch++)
      if (got[ch] < sent[ch]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    static int cycle = 0;
    for (int ch = 0; ch < NCH; ch++) begin
      req[ch] = '{valid: 1'b0, x: '0, y: N'(1)};
      sent[ch] = 0; got[ch] = 0; inflight_max[ch] = 0; pending[ch] = 1'b0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (cycle < WINDOW || !all_done()) begin
      @(negedge clk);
      cycle++;
      for (int ch = 0; ch < NCH; ch++) begin
        check_response(ch, cycle);
        if (q_cyc[ch].size() > inflight_max[ch]) inflight_max[ch] = q_cyc[ch].size();
        if (cycle > WINDOW) pending[ch] = 1'b0;   // withdraw offers after the window
        if (!pending[ch]) begin
          req[ch].valid = 1'b0;
          if (cycle <= WINDOW) begin
            int xv, yv;
            if (sent[ch] < 6) begin xv = cx[sent[ch]]; yv = cy[sent[ch]]; end
            else begin
              xv = int'($urandom_range(0, 4095)) - 2048;
              do yv = int'($urandom_range(0, 4095)) - 2048; while (yv == 0);
              // small divisors give large quotients
              if ($urandom_range(0, 3) == 0) yv = (yv % 16 == 0) ? 1 : yv % 16;
            end
            req[ch] = '{valid: 1'b1, x: M'(xv), y: N'(yv)};
            pending[ch] = 1'b1;
          end
        end
      end
      #1;
      for (int ch = 0; ch < NCH; ch++)
        if (pending[ch]) begin
          if (rdy[ch]) begin
            q_cyc[ch].push_back(cycle);
            q_x[ch].push_back(int'($signed(req[ch].x)));
            q_y[ch].push_back(int'($signed(req[ch].y)));
            sent[ch]++;
            pending[ch] = 1'b0;
          end else n_stall++;
        end
    end
    for (int ch = 0; ch < NCH; ch++)
      $display("%-8s requests=%0d responses=%0d max_in_flight=%0d", NAME[ch], sent[ch], got[ch], inflight_max[ch]);
    for (int ch = 0; ch < NCH; ch++) begin
      checks++;
      if (sent[ch] != EXP_TAKEN[ch] || got[ch] != sent[ch]) begin
        failures++;
        $display("FAIL %s took %0d requests in %0d cycles (expected %0d), answered %0d",
                 NAME[ch], sent[ch], WINDOW, EXP_TAKEN[ch], got[ch]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
