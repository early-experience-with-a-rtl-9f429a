// stream_sender: head of the linear array ("send pixels or centers").
//
// The processor hands it one spectral component per data write; the sender
// numbers the components band by band and puts each one as a stream word into
// the first register of the array. A control write selects what the following
// data words are and restarts the band count: with bit 9 set, the next
// NB_BAND data words are the center of class bits [7:0], and bit 8 says
// whether that class has members (inactive classes never win); after the
// last band the sender falls back to pixel mode on its own. With bit 9 clear
// the following data words are pixels, NB_BAND components each. Pixel words
// start with the "no class yet" pair (DIST_MAX, 0), as the reference loop
// starts with min = MAX_INT. A data write is taken only in a clock in which
// the array advances (wr_ready = adv); a control write is always taken. The
// document names this block and says that pixels and centers are streamed
// into the array from the processor; the command format is this design's.
module stream_sender
  import kmeans_pkg::*;
#(
  parameter int NB_BAND = 224
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              adv,
  input  logic              wr_valid,
  input  logic              wr_ctrl,   // 1: control word, 0: data component
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_ready,
  output stream_t           out_w
);

  logic   center_mode, active_q, take_data, last_band;
  class_t cls_q;
  band_t  band_q;

  always_comb begin
    wr_ready  = wr_ctrl ? 1'b1 : adv;
    take_data = wr_valid && !wr_ctrl && adv;
    last_band = int'(band_q) == NB_BAND - 1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      center_mode <= 1'b0;
      active_q    <= 1'b0;
      cls_q       <= '0;
      band_q      <= '0;
      out_w       <= '0;
    end else begin
      if (wr_valid && wr_ctrl) begin
        cls_q       <= class_t'(wr_data[7:0]);
        active_q    <= wr_data[8];
        center_mode <= wr_data[9];
        band_q      <= '0;
      end else if (take_data) begin
        band_q <= last_band ? '0 : band_q + 1'b1;
        if (last_band) center_mode <= 1'b0;
      end
      if (adv) begin
        out_w <= '0;
        if (take_data) begin
          out_w.valid  <= 1'b1;
          out_w.kind   <= center_mode ? W_CENTER : W_PIXEL;
          out_w.band   <= band_q;
          out_w.last   <= last_band;
          out_w.cls    <= cls_q;
          out_w.active <= active_q;
          out_w.data   <= pix_t'(wr_data);
          out_w.bdist   <= DIST_MAX;
          out_w.bidx    <= '0;
        end
      end
    end
  end

endmodule
