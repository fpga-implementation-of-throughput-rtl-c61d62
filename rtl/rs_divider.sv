// rs_divider: sequential radix-2 restoring divider.
//
// Registers P (partial remainder, N bits) and A (M bits) form one shift
// register pair. On load, A takes |X|, P is cleared and -|Y| is kept for the
// adder, together with the operand signs. Each of the following M steps
// (one per clock, enabled by rs_counter):
//   - shift (P,A) left by one,
//   - add -|Y| to the shifted P,
//   - if the sum is not negative keep it in P and shift a 1 into A,
//     otherwise keep the shifted P (the "restore") and shift in a 0.
// After M steps A holds |Q| and P holds |rem|; controlled inverters negate
// the quotient when the operand signs differ and the remainder when the
// dividend is negative, so qt is truncated toward zero and rem has the sign
// of x.
//
// Interface: a request is taken when in_valid and in_ready are both high;
// out_valid pulses M+1 cycles later, and qt/rem stay valid until the next
// request is taken (which may happen in the out_valid cycle). rst_n is
// asynchronous and active low.
//
// The algorithm, the P/A/adder structure, the absolute value of x, the
// negated divisor and the sign inverters follow the document. Doing the whole
// step on one clock edge (instead of shifting on the rising edge and catching
// the sum in a backup register on the falling edge), the N+1-bit adder that
// the full divisor range needs (P itself stays below |Y| and fits N bits),
// and capturing the signs at load are this design's choices.
module rs_divider #(
  parameter int unsigned M = 12,
  parameter int unsigned N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] x,
  input  logic [N-1:0] y,
  output logic         out_valid,
  output logic [M-1:0] qt,
  output logic [N-1:0] rem
);

  logic         ld, stp, rdy;
  logic [M-1:0] xabs;
  logic [N:0]   yneg_c;
  logic [N-1:0] p_q;
  logic [N:0]   yneg_q;
  logic [M-1:0] a_q;
  logic         sx_q, sy_q;
  logic [N:0]   p_shift, sum;

  rs_counter #(.M(M)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .start(in_valid),
    .rdy  (rdy),
    .ld   (ld),
    .stp  (stp),
    .done (out_valid)
  );

  assign in_ready = rdy;

  ctrl_inv #(.W(M))   u_xabs (.ctrl(x[M-1]),  .a(x),            .y(xabs));
  ctrl_inv #(.W(N+1)) u_yneg (.ctrl(~y[N-1]), .a({y[N-1], y}),  .y(yneg_c));

  // Shift (P,A) left and add -|Y|.
  assign p_shift = {p_q, a_q[M-1]};
  assign sum     = p_shift + yneg_q;

  always_ff @(posedge clk) begin
    if (ld) begin
      a_q    <= xabs;
      p_q    <= '0;
      yneg_q <= yneg_c;
      sx_q   <= x[M-1];
      sy_q   <= y[N-1];
    end else if (stp) begin
      a_q <= {a_q[M-2:0], ~sum[N]};
      p_q <= sum[N] ? p_shift[N-1:0] : sum[N-1:0];
    end
  end

  ctrl_inv #(.W(M)) u_qsign (.ctrl(sx_q ^ sy_q), .a(a_q),          .y(qt));
  ctrl_inv #(.W(N)) u_rsign (.ctrl(sx_q),        .a(p_q),          .y(rem));

endmodule
