// rs_counter: step counter and control of the sequential restoring divider.
//
// While idle, rdy is high. A start seen while idle gives ld for that cycle
// (the datapath loads its operands and clears its partial remainder) and
// starts a run: stp is then high for exactly M cycles, one divide step each,
// after which the counter is idle again and done pulses for one cycle. A new
// start is accepted in the same cycle done is high, so back-to-back divisions
// take M+1 cycles each.
//
// The document gives the counter's job (making sure shifting is performed M
// times, being reset at the start of a division); the signal set and the
// one-load-cycle-then-M-steps timing are this design's. rst_n is
// asynchronous and active low.
module rs_counter #(
  parameter int unsigned M = 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic rdy,
  output logic ld,
  output logic stp,
  output logic done
);

  localparam int unsigned CW = $clog2(M + 1);

  logic          busy;
  logic [CW-1:0] cnt;    // steps done in this run

  assign rdy = ~busy;
  assign ld  = start & ~busy;
  assign stp = busy;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ld) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end

endmodule
