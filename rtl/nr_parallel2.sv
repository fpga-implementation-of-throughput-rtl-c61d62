// nr_parallel2: two-way parallel radix-2 non-restoring divider.
//
// Two copies of the combinational array divider (nr_comb) each sit behind an
// input register of their own. Accepted requests go to the copies in turn,
// so each input register loads at most every second cycle and each copy runs
// at half the request rate. A multiplexer passes the copies' results, in the
// order the requests came, to the output register. Because a copy's inputs
// stay still for two cycles, the array path is a two-cycle path: the clock
// may be about twice that of the single-copy reference (nr_divider with
// PIPE_STAGES = 1) for the same array delay, and a timing flow must be told
// of the two-cycle path from the copy input registers to the output
// register.
//
// Interface: in_valid/x/y every cycle, no backpressure; out_valid with
// qt/rem exactly 3 cycles after in_valid. rst_n (asynchronous, active low)
// clears the valid bits and the turn pointer.
//
// Two copies with alternating half-rate input registers and an output
// multiplexer follow the document; the output register, the turn pointer
// and the valid/tag pipeline that steers the multiplexer are this design's.
module nr_parallel2 #(
  parameter int unsigned M = 12,
  parameter int unsigned N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] x,
  input  logic [N-1:0] y,
  output logic         out_valid,
  output logic [M-1:0] qt,
  output logic [N-1:0] rem
);

  logic         turn;          // copy that takes the next request
  logic [1:0]   v_q;           // valid after the input register, one cycle later
  logic [1:0]   tag_q;         // copy each of those requests went to
  logic [M-1:0] x_q  [2];
  logic [N-1:0] y_q  [2];
  logic [M-1:0] qt_c [2];
  logic [N-1:0] rem_c[2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      turn      <= 1'b0;
      v_q       <= '0;
      tag_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) turn <= ~turn;
      v_q       <= {v_q[0], in_valid};
      tag_q     <= {tag_q[0], turn};
      out_valid <= v_q[1];
    end

  for (genvar k = 0; k < 2; k++) begin : g_copy
    // Half-rate input register of copy k.
    always_ff @(posedge clk)
      if (in_valid && (turn == 1'(k))) begin
        x_q[k] <= x;
        y_q[k] <= y;
      end

    nr_comb #(.M(M), .N(N)) u_div (
      .x  (x_q[k]),
      .y  (y_q[k]),
      .qt (qt_c[k]),
      .rem(rem_c[k])
    );
  end

  // Output multiplexer: the result of the request loaded two cycles ago.
  always_ff @(posedge clk)
    if (v_q[1]) begin
      qt  <= qt_c[tag_q[1]];
      rem <= rem_c[tag_q[1]];
    end

endmodule
