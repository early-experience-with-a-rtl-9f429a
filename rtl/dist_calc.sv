// dist_calc: one step of the Manhattan distance, as a single-cycle custom
// operation of the first accelerator.
//
// Each clock it registers dist_out = dist_in + |pixel - center|, the work of
// the inner statement of the distance loop (two subtractions and one addition
// in software) done in one cycle. The sum is truncated to the width of
// dist_out, 16 bits by default, as in the document's accelerator; the operand
// widths and the synchronous clear input are this design's choices. rst is an
// asynchronous reset that clears dist_out, as in the document; clr is a
// synchronous clear driven from the processor's user-logic reset register.
// Latency: one clock from the operands to dist_out.
module dist_calc #(
  parameter int PIX_W  = 16,
  parameter int DIST_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,
  input  logic [PIX_W-1:0]  pixel,
  input  logic [PIX_W-1:0]  center,
  input  logic [DIST_W-1:0] dist_in,
  output logic [DIST_W-1:0] dist_out
);

  logic [PIX_W-1:0]  diff;
  logic [DIST_W-1:0] sum;

  always_comb begin
    diff = (pixel > center) ? PIX_W'(pixel - center) : PIX_W'(center - pixel);
    sum  = DIST_W'(dist_in + DIST_W'(diff));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      dist_out <= '0;
    else if (clr) dist_out <= '0;
    else          dist_out <= sum;
  end

endmodule
