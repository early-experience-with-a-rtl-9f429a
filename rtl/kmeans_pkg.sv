// kmeans_pkg: types and constants shared by the K-Means user logic.
//
// The linear array carries one stream word per clock from the sender, through
// every cell, to the collector. A word is either one spectral component of a
// pixel or one component of a class center. Besides the component it carries
// the band number, so a cell can address its center memory directly, and the
// running best (distance, class index) of the pixel, which becomes meaningful
// on the pixel's last band. The field widths are fixed here, as upper bounds:
// 16-bit components (the document gives 8 to 14 bits per component and a
// 16-bit distance register in its first accelerator), up to 256 bands and up
// to 256 classes. DIST_W = 24 holds 256 bands of 16-bit differences without
// overflow, so the all-ones value can stand for "no class yet", as MAX_INT does
// in the reference C code. These bounds are this design's choice.
package kmeans_pkg;

  localparam int PIX_W   = 16;  // bits of one spectral component
  localparam int BAND_W  = 8;   // band number, NB_BAND <= 256
  localparam int CLASS_W = 8;   // class number, NB_CLASS <= 256
  localparam int DIST_W  = 24;  // Manhattan distance accumulated over bands
  localparam int DATA_W  = 32;  // processor bus word (32-bit NIOS)

  localparam logic [DIST_W-1:0] DIST_MAX = '1;

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [BAND_W-1:0]  band_t;
  typedef logic [CLASS_W-1:0] class_t;
  typedef logic [DIST_W-1:0]  dist_t;

  typedef enum logic {
    W_PIXEL  = 1'b0,  // component of a pixel to be classified
    W_CENTER = 1'b1   // component of a class center to be stored
  } word_kind_e;

  typedef struct packed {
    logic       valid;   // this stage holds a word
    word_kind_e kind;
    band_t      band;    // spectral band of this component
    logic       last;    // band == NB_BAND-1
    class_t     cls;     // W_CENTER: class whose cell stores the component
    logic       active;  // W_CENTER: class has members (N_CENTER[k] != 0)
    pix_t       data;    // the component
    dist_t      bdist;   // W_PIXEL: best distance so far (valid on last)
    class_t     bidx;    // W_PIXEL: class of that distance
  } stream_t;

  // |a - b| of two unsigned components
  function automatic pix_t abs_diff(pix_t a, pix_t b);
    return (a > b) ? pix_t'(a - b) : pix_t'(b - a);
  endfunction

endpackage
