// result_collector: tail of the linear array ("collect"), where the class
// found for each pixel is handed back to the processor.
//
// It watches the word leaving the last cell. A pixel's last component
// carries the pixel's nearest class and its distance; that pair is pushed
// into a first-in first-out buffer of DEPTH entries that the processor
// drains (pop). Every other word (earlier components, center words, bubbles)
// leaves the array here and is dropped. When a result arrives while the
// buffer is full, adv goes low and the whole array, with the sender, stalls
// until the processor has read a result. A result with distance DIST_MAX
// means that no class was active. The document names the block and says that
// the new class of each pixel is returned to the processor; the buffer, its
// depth and the stall are this design's. count is 16 bits wide to fill the
// status register; only its low $clog2(DEPTH)+1 bits can be nonzero, so the
// upper bits are constant zero after synthesis.
module result_collector
  import kmeans_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  stream_t      in_w,
  output logic         adv,
  input  logic         pop,
  output logic         res_valid,
  output class_t       res_idx,
  output dist_t        res_dist,
  output logic [15:0]  count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed { class_t cls; dist_t d; } res_t;

  res_t          buf_q [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          is_res, full, push, do_pop;

  always_comb begin
    is_res    = in_w.valid && in_w.kind == W_PIXEL && in_w.last;
    full      = int'(cnt) == DEPTH;
    adv       = !(is_res && full);
    push      = is_res && !full;
    res_valid = cnt != '0;
    do_pop    = pop && res_valid;
    res_idx   = buf_q[rp].cls;
    res_dist  = buf_q[rp].d;
    count     = 16'(cnt);
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[wp] <= '{cls: in_w.bidx, d: in_w.bdist};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push)   wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_pop) rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(do_pop);
    end
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (rst) pop |-> res_valid);

endmodule
