// div_pkg: sizes and operand/result bundles shared by the binary dividers.
//
// The dividers work on 12-bit two's-complement integers (range -2048..2047)
// for both dividend and divisor, giving a 12-bit quotient truncated toward
// zero and a 12-bit remainder that takes the sign of the dividend
// (x = y*qt + rem). The request and response structs are used on the ports
// of the top level, one pair per divider configuration.
package div_pkg;

  localparam int unsigned DIV_M = 12;  // dividend and quotient width
  localparam int unsigned DIV_N = 12;  // divisor and remainder width

  typedef struct packed {
    logic                    valid;
    logic signed [DIV_M-1:0] x;    // dividend
    logic signed [DIV_N-1:0] y;    // divisor
  } div_req_t;

  typedef struct packed {
    logic                    valid;
    logic signed [DIV_M-1:0] qt;   // quotient
    logic signed [DIV_N-1:0] rem;  // remainder
  } div_rsp_t;

endpackage
