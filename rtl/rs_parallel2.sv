// rs_parallel2: two-way parallel sequential restoring divider.
//
// Two rs_divider copies take the requests in turn, so two divisions run at
// the same time and the request rate doubles to two per M+1 cycles. in_ready
// is the ready of the copy whose turn it is. The copies start in different
// cycles and have the same latency, so they finish in different cycles and
// in request order; a multiplexer passes the result of whichever copy
// signals done. Latency is that of one copy: out_valid M+1 cycles after the
// request is taken. rst_n is asynchronous and active low.
//
// Duplicating the divider and merging the results through a multiplexer
// follows the document; the strict turn order and the handshake are this
// design's.
module rs_parallel2 #(
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

  logic         turn;
  logic [1:0]   rdy, done;
  logic [M-1:0] qt_c [2];
  logic [N-1:0] rem_c[2];

  assign in_ready = rdy[turn];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                     turn <= 1'b0;
    else if (in_valid && in_ready)  turn <= ~turn;

  for (genvar k = 0; k < 2; k++) begin : g_copy
    rs_divider #(.M(M), .N(N)) u_div (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid && (turn == 1'(k))),
      .in_ready (rdy[k]),
      .x        (x),
      .y        (y),
      .out_valid(done[k]),
      .qt       (qt_c[k]),
      .rem      (rem_c[k])
    );
  end

  assign out_valid = |done;
  assign qt        = done[1] ? qt_c[1]  : qt_c[0];
  assign rem       = done[1] ? rem_c[1] : rem_c[0];

endmodule
