// nr_comb: combinational radix-2 non-restoring array divider.
//
// Divides the signed M-bit dividend x by the signed N-bit divisor y and gives
// the quotient qt truncated toward zero and the remainder rem with the sign of
// x (x = y*qt + rem). Operation:
//   1. Controlled inverters form |X| (M bits), |Y| and -|Y| (N+1 bits).
//   2. M rows of nr_cell, one per quotient bit from the msb down: each shifts
//      the partial remainder left, brings down the next bit of |X|, and adds
//      -|Y| or |Y| depending on whether the previous partial remainder was
//      non-negative or negative. The first row starts from a zero remainder,
//      so it subtracts. The quotient bit is the inverted sign of the row's
//      result.
//   3. A last adder adds |Y| to the final partial remainder if it is negative
//      (it adds zero otherwise), giving |rem|.
//   4. Controlled inverters negate the quotient when the operand signs differ
//      and the remainder when the dividend is negative.
// The row/adder/multiplexer structure and the sign handling follow the
// document's array divider. The array has M rows starting with dividend bit
// M-1, so the whole range -2^(M-1)..2^(M-1)-1 divides correctly; -2^(M-1) /
// -1 overflows and wraps to -2^(M-1). Division by zero gives no meaningful
// result. No clock: the delay is M+1 carry-propagate adders in series.
module nr_comb #(
  parameter int unsigned M = 12,
  parameter int unsigned N = 12
) (
  input  logic [M-1:0] x,
  input  logic [N-1:0] y,
  output logic [M-1:0] qt,
  output logic [N-1:0] rem
);

  logic         sx, sy;
  logic [M-1:0] xa;           // |X|
  logic [N:0]   ya, yn;       // |Y|, -|Y|
  logic [N:0]   r [M+1];      // partial remainders, r[0] = 0
  logic [M-1:0] qp;           // quotient magnitude
  logic [N:0]   rem_abs;

  assign sx = x[M-1];
  assign sy = y[N-1];

  ctrl_inv #(.W(M))   u_xabs (.ctrl(sx),  .a(x),                .y(xa));
  ctrl_inv #(.W(N+1)) u_yabs (.ctrl(sy),  .a({y[N-1], y}),      .y(ya));
  ctrl_inv #(.W(N+1)) u_yneg (.ctrl(~sy), .a({y[N-1], y}),      .y(yn));

  assign r[0] = '0;

  for (genvar i = 0; i < M; i++) begin : g_row
    nr_cell #(.N(N)) u_cell (
      .r_in (r[i]),
      .xbit (xa[M-1-i]),
      .ya   (ya),
      .yn   (yn),
      .r_out(r[i+1]),
      .q    (qp[M-1-i])
    );
  end

  assign rem_abs = r[M] + (r[M][N] ? ya : '0);

  ctrl_inv #(.W(M)) u_qsign (.ctrl(sx ^ sy), .a(qp),            .y(qt));
  ctrl_inv #(.W(N)) u_rsign (.ctrl(sx),      .a(rem_abs[N-1:0]), .y(rem));

endmodule
