// nr_cell: one row of the radix-2 non-restoring array divider.
//
// The previous partial remainder r_in (N+1 bits, two's complement) is shifted
// left by one and the next dividend bit xbit is brought into its lsb. If r_in
// is negative the divisor magnitude ya is added, otherwise yn = -|Y| is added
// (a subtraction); a multiplexer driven by the sign of r_in chooses between
// the two, as in the row structure of the non-restoring array (multiplexer,
// adder, inverted MSB as quotient bit). The quotient bit q is the inverted
// sign of the new partial remainder r_out. Purely combinational.
// Because -|Y| <= r_in < |Y| <= 2^(N-1), r_in fits N bits as a signed
// number, so dropping its top bit in the shift loses nothing, and the result
// again lies in [-|Y|, |Y|) and fits N+1 bits.
module nr_cell #(
  parameter int unsigned N = 12
) (
  input  logic [N:0] r_in,
  input  logic       xbit,
  input  logic [N:0] ya,
  input  logic [N:0] yn,
  output logic [N:0] r_out,
  output logic       q
);

  logic [N:0] shifted;
  logic [N:0] addend;

  always_comb begin
    shifted = {r_in[N-1:0], xbit};
    addend  = r_in[N] ? ya : yn;
    r_out   = shifted + addend;
    q       = ~r_out[N];
  end

endmodule
