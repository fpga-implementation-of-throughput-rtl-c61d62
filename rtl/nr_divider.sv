// nr_divider: registered radix-2 non-restoring array divider, optionally
// pipelined.
//
// An input register holds the operands, the non-restoring array (absolute
// values, M rows of nr_cell, remainder correction, sign inverters) computes
// the result, and an output register holds it. PIPE_STAGES = 1 is the
// reference design with the whole array between the two registers.
// PIPE_STAGES = 2 or 4 cuts the array with PIPE_STAGES-1 pipeline registers
// spread evenly over the rows (for M = 12: after row 6, or after rows 3, 6
// and 9), so the longest path is about 1/PIPE_STAGES of the array and the
// clock can rise accordingly. Each pipeline register carries the partial
// remainder, the quotient bits found so far, |X|, |Y|, -|Y|, the operand
// signs and a valid bit.
//
// Interface: in_valid/x/y are taken every cycle (no backpressure); out_valid
// with qt/rem follows exactly PIPE_STAGES+1 cycles later. One division per
// cycle. rst_n (asynchronous, active low) clears the valid bits and the
// pipeline registers; the input and output data registers are not reset.
//
// The cut after the sixth row for two stages follows the document's
// pipeline-2 drawing; the four-stage spacing, the valid bits and the reset
// are this design's choices.
module nr_divider #(
  parameter int unsigned M           = 12,
  parameter int unsigned N           = 12,
  parameter int unsigned PIPE_STAGES = 1
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

  typedef struct packed {
    logic         valid;
    logic         sx;
    logic         sy;
    logic [M-1:0] xa;
    logic [N:0]   ya;
    logic [N:0]   yn;
    logic [N:0]   r;
    logic [M-1:0] q;
  } stage_t;

  // A pipeline register follows row i when the row count crosses a multiple
  // of M/PIPE_STAGES there; never after the last row (the output register).
  function automatic bit reg_after(int i);
    return (i < int'(M) - 1) &&
           (((i + 1) * int'(PIPE_STAGES)) / int'(M) != (i * int'(PIPE_STAGES)) / int'(M));
  endfunction

  // ---- input register --------------------------------------------------
  logic         in_v_q;
  logic [M-1:0] x_q;
  logic [N-1:0] y_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) in_v_q <= 1'b0;
    else        in_v_q <= in_valid;

  always_ff @(posedge clk) begin
    x_q <= x;
    y_q <= y;
  end

  // ---- operand preparation ---------------------------------------------
  stage_t head;
  logic [M-1:0] xa;
  logic [N:0]   ya, yn;

  ctrl_inv #(.W(M))   u_xabs (.ctrl(x_q[M-1]),  .a(x_q),              .y(xa));
  ctrl_inv #(.W(N+1)) u_yabs (.ctrl(y_q[N-1]),  .a({y_q[N-1], y_q}),  .y(ya));
  ctrl_inv #(.W(N+1)) u_yneg (.ctrl(~y_q[N-1]), .a({y_q[N-1], y_q}),  .y(yn));

  always_comb begin
    head       = '0;
    head.valid = in_v_q;
    head.sx    = x_q[M-1];
    head.sy    = y_q[N-1];
    head.xa    = xa;
    head.ya    = ya;
    head.yn    = yn;
  end

  // ---- array rows with optional pipeline registers ---------------------
  for (genvar i = 0; i < M; i++) begin : g_row
    stage_t     s_in, s_out, s_next;
    logic [N:0] r_new;
    logic       q_new;

    if (i == 0) begin : g_first
      assign s_in = head;
    end else begin : g_chain
      assign s_in = g_row[i-1].s_next;
    end

    nr_cell #(.N(N)) u_cell (
      .r_in (s_in.r),
      .xbit (s_in.xa[M-1-i]),
      .ya   (s_in.ya),
      .yn   (s_in.yn),
      .r_out(r_new),
      .q    (q_new)
    );

    always_comb begin
      s_out           = s_in;
      s_out.r         = r_new;
      s_out.q[M-1-i]  = q_new;
    end

    if (reg_after(i)) begin : g_preg
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) s_next <= '0;
        else        s_next <= s_out;
    end else begin : g_wire
      assign s_next = s_out;
    end
  end

  // ---- remainder correction, signs, output register --------------------
  stage_t       tail;
  logic [N:0]   rem_abs;
  logic [M-1:0] qt_c;
  logic [N-1:0] rem_c;

  assign tail    = g_row[M-1].s_next;
  assign rem_abs = tail.r + (tail.r[N] ? tail.ya : '0);

  ctrl_inv #(.W(M)) u_qsign (.ctrl(tail.sx ^ tail.sy), .a(tail.q),          .y(qt_c));
  ctrl_inv #(.W(N)) u_rsign (.ctrl(tail.sx),           .a(rem_abs[N-1:0]),  .y(rem_c));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= tail.valid;

  always_ff @(posedge clk) begin
    qt  <= qt_c;
    rem <= rem_c;
  end

endmodule
