// div_top: the six 12-bit signed divider configurations, side by side.
//
// Each configuration has its own request port (div_req_t: valid, x, y) and
// response port (div_rsp_t: valid, qt, rem); all share clk and rst_n.
//   nr_ref   radix-2 non-restoring array between input and output registers;
//            one division per cycle, result 2 cycles after the request.
//   nr_par2  two non-restoring arrays fed alternately at half rate, output
//            multiplexer; one division per cycle, result after 3 cycles,
//            each array has two cycles to settle.
//   nr_pipe2 non-restoring array cut by one pipeline register; result after
//            3 cycles.
//   nr_pipe4 non-restoring array cut by three pipeline registers; result
//            after 5 cycles.
//   rs_ref   sequential radix-2 restoring divider, one quotient bit per
//            cycle; result M+1 = 13 cycles after the request is taken, which
//            needs rs_ref_in_ready.
//   rs_par2  two restoring dividers taking requests in turn; two divisions
//            in flight, rs_par2_in_ready as for rs_ref.
// Every configuration gives qt = x / y truncated toward zero and rem with the
// sign of x. The non-restoring ones take a request every cycle and have no
// ready. The choice of the six configurations follows the document; the
// port bundles are this design's.
module div_top
  import div_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  div_req_t nr_ref_in,
  output div_rsp_t nr_ref_out,
  input  div_req_t nr_par2_in,
  output div_rsp_t nr_par2_out,
  input  div_req_t nr_pipe2_in,
  output div_rsp_t nr_pipe2_out,
  input  div_req_t nr_pipe4_in,
  output div_rsp_t nr_pipe4_out,
  input  div_req_t rs_ref_in,
  output logic     rs_ref_in_ready,
  output div_rsp_t rs_ref_out,
  input  div_req_t rs_par2_in,
  output logic     rs_par2_in_ready,
  output div_rsp_t rs_par2_out
);

  nr_divider #(.M(DIV_M), .N(DIV_N), .PIPE_STAGES(1)) u_nr_ref (
    .clk(clk), .rst_n(rst_n),
    .in_valid(nr_ref_in.valid), .x(nr_ref_in.x), .y(nr_ref_in.y),
    .out_valid(nr_ref_out.valid), .qt(nr_ref_out.qt), .rem(nr_ref_out.rem)
  );

  nr_parallel2 #(.M(DIV_M), .N(DIV_N)) u_nr_par2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(nr_par2_in.valid), .x(nr_par2_in.x), .y(nr_par2_in.y),
    .out_valid(nr_par2_out.valid), .qt(nr_par2_out.qt), .rem(nr_par2_out.rem)
  );

  nr_divider #(.M(DIV_M), .N(DIV_N), .PIPE_STAGES(2)) u_nr_pipe2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(nr_pipe2_in.valid), .x(nr_pipe2_in.x), .y(nr_pipe2_in.y),
    .out_valid(nr_pipe2_out.valid), .qt(nr_pipe2_out.qt), .rem(nr_pipe2_out.rem)
  );

  nr_divider #(.M(DIV_M), .N(DIV_N), .PIPE_STAGES(4)) u_nr_pipe4 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(nr_pipe4_in.valid), .x(nr_pipe4_in.x), .y(nr_pipe4_in.y),
    .out_valid(nr_pipe4_out.valid), .qt(nr_pipe4_out.qt), .rem(nr_pipe4_out.rem)
  );

  rs_divider #(.M(DIV_M), .N(DIV_N)) u_rs_ref (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rs_ref_in.valid), .in_ready(rs_ref_in_ready),
    .x(rs_ref_in.x), .y(rs_ref_in.y),
    .out_valid(rs_ref_out.valid), .qt(rs_ref_out.qt), .rem(rs_ref_out.rem)
  );

  rs_parallel2 #(.M(DIV_M), .N(DIV_N)) u_rs_par2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rs_par2_in.valid), .in_ready(rs_par2_in_ready),
    .x(rs_par2_in.x), .y(rs_par2_in.y),
    .out_valid(rs_par2_out.valid), .qt(rs_par2_out.qt), .rem(rs_par2_out.rem)
  );

endmodule
