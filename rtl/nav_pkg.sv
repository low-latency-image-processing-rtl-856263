// nav_pkg: types and constants shared by the image-processing pipeline.
//
// Every block between the camera and the detector interface passes the same
// video stream: a pixel value plus the synchronisation and coordinate signals
// pixel_blank, h_sync, x_cnt and y_cnt, all valid on the rising pixel-clock
// edge. The sync and coordinate part is bundled here as pix_sync_t so that
// each block can delay it alongside its own data. The coordinate width is a
// fixed 12 bits, enough for images up to 4096 x 4096; the pixel value width
// is a parameter of each block because it changes along the pipeline.
package nav_pkg;

  localparam int unsigned COORD_W = 12;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic   blank;   // 1: blanking area, pixel value is not image data
    logic   h_sync;  // 1 for the first active pixel of every line
    coord_t x_cnt;   // column of the pixel on this cycle
    coord_t y_cnt;   // row of the pixel on this cycle
  } pix_sync_t;

  // Latency of feature_detector in active pixels, split into whole lines
  // and a column remainder: when active pixel (x, y) enters the detector,
  // the feature output visible on that clock belongs to the pixel
  // FD_LAT_Y*IMG_W + FD_LAT_X positions earlier in raster order.
  // FD_LAT_X = 7 (FAST window and stages) + 1 (line-buffer input register)
  //          + 3 (NMS window and output register) + 1 (sampling clock);
  // FD_LAT_Y = 3 (FAST window centre row) + 1 (NMS window centre row).
  localparam int unsigned FD_LAT_X = 12;
  localparam int unsigned FD_LAT_Y = 4;
  // Rows and columns at the image border without a full detector window.
  localparam int unsigned FD_BORDER = 4;

  // Number of bits needed to hold the values 0..n.
  function automatic int unsigned width_of(input int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

endpackage
