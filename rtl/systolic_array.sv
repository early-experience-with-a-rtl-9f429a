// systolic_array: the linear array of NB_CLASS cells through which pixels
// flow, one spectral component per clock.
//
// Cell k holds the center of class k. A pixel's components enter cell 0 one
// after another and move one cell to the right per clock, so cell k works on
// band d of a pixel while cell k+1 works on band d-1 of it. The running best
// (distance, class) pair rides on the pixel's last component and leaves the
// last cell with the nearest active class of that pixel: latency NB_CLASS
// clocks from the last component entering to the result leaving, and one
// pixel every NB_BAND clocks when the stream is full. Center words use the
// same path, so a new set of centers can follow the pixels of the previous
// block directly: every pixel ahead of them is compared with the old centers
// in every cell. adv is common to all cells and stalls the whole array.
// NB_CLASS = 32 cells of NB_BAND = 224 bands is the configuration the
// document synthesised.
module systolic_array
  import kmeans_pkg::*;
#(
  parameter int NB_CLASS = 32,
  parameter int NB_BAND  = 224
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    adv,
  input  stream_t in_w,   // from the sender (a register)
  output stream_t out_w   // to the collector (a register)
);

  stream_t stage [NB_CLASS+1];

  assign stage[0] = in_w;

  for (genvar k = 0; k < NB_CLASS; k++) begin : g_cell
    kmeans_cell #(.NB_BAND(NB_BAND), .MY_ID(class_t'(k))) u_cell (
      .clk, .rst, .adv,
      .in_w (stage[k]),
      .out_w(stage[k+1])
    );
  end

  assign out_w = stage[NB_CLASS];

  initial begin
    assert (NB_CLASS >= 1 && NB_CLASS <= 2**CLASS_W)
      else $error("NB_CLASS out of range");
    assert (NB_BAND >= 1 && NB_BAND <= 2**BAND_W)
      else $error("NB_BAND out of range");
  end

endmodule
