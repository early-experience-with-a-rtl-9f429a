// kmeans_cell: one processing cell of the linear (systolic) array; cell k
// serves class k.
//
// Every word of the stream passes through the cell in one clock (register
// in_w -> out_w) while the array advances. A center word addressed to this
// class is written into the cell's center memory at its band, and its
// "active" flag is kept: an inactive class (no pixels assigned, N_CENTER = 0
// in the reference loop) never wins. For a pixel word the cell adds
// |pixel[d] - center[d]| to its accumulator, starting afresh at band 0. On the
// pixel's last band the completed distance is compared with the best
// (distance, index) pair that travels with that word from the cells to the
// left; if it is strictly smaller, the pair is replaced by (distance, k).
// Strictly smaller keeps the lowest class number on a tie, as the reference
// loop does. Because the pair rides on the same word as the last component,
// bubbles in the stream and stalls (adv low: every register holds) keep the
// alignment. The per-cell algorithm is the document's; the word format, the
// band number in each word and the active flag handling are this design's.
module kmeans_cell
  import kmeans_pkg::*;
#(
  parameter int     NB_BAND = 224,
  parameter class_t MY_ID   = '0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    adv,    // array advances this clock
  input  stream_t in_w,
  output stream_t out_w
);

  localparam int MA_W = (NB_BAND > 1) ? $clog2(NB_BAND) : 1;

  logic  active_q;
  dist_t acc_q, acc_next;
  pix_t  center_d;
  logic  is_pix, is_mine, better;

  always_comb begin
    is_pix   = in_w.valid && in_w.kind == W_PIXEL;
    is_mine  = in_w.valid && in_w.kind == W_CENTER && in_w.cls == MY_ID;
    acc_next = ((in_w.band == '0) ? '0 : acc_q) + dist_t'(abs_diff(in_w.data, center_d));
    better   = active_q && acc_next < in_w.bdist;
  end

  center_mem #(.DEPTH(NB_BAND), .WIDTH(PIX_W)) u_mem (
    .clk,
    .we   (adv && is_mine),
    .waddr(MA_W'(in_w.band)),
    .wdata(in_w.data),
    .raddr(MA_W'(in_w.band)),
    .rdata(center_d)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      active_q <= 1'b0;
      acc_q    <= '0;
      out_w    <= '0;
    end else if (adv) begin
      out_w <= in_w;
      if (is_mine) active_q <= in_w.active;
      if (is_pix) begin
        acc_q <= acc_next;
        if (in_w.last && better) begin
          out_w.bdist <= acc_next;
          out_w.bidx  <= MY_ID;
        end
      end
    end
  end

endmodule
