// feature_detector: FAST12 feature detection on the live pixel stream.
//
// The chain of the detector: a 7-line line buffer gives seven vertically
// aligned pixels, fast_response computes the FAST12 corner response over a
// 7x7 window, a 3-line line buffer aligns three lines of responses, and
// nms_core keeps the local maxima above a threshold. Nothing is stored
// beyond the line buffers, so a feature leaves the block a fixed number of
// active pixels after the last pixel it depends on has entered, not after a
// whole frame.
//
// Interface: the stream (in_data with its pix_sync_t) enters; both
// thresholds are static configuration inputs. The outputs feat_valid and
// feat_score change only on active-pixel clocks. On the clock of active
// pixel s the outputs describe pixel s - (FD_LAT_Y*IMG_W + FD_LAT_X) (see
// nav_pkg); the coordinate conversion is done downstream by
// detector_interface. Features within FD_BORDER pixels of the image edge are
// computed from incomplete windows and must be discarded downstream.
module feature_detector
  import nav_pkg::*;
#(
  parameter int unsigned DW     = 8,
  parameter int unsigned RESP_W = DW + 4,
  parameter int unsigned IMG_W  = 640
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DW-1:0]     in_data,
  input  pix_sync_t         in_sync,
  input  logic [DW-1:0]     fast_threshold,
  input  logic [RESP_W-1:0] nms_threshold,
  output logic              feat_valid,
  output logic [RESP_W-1:0] feat_score
);

  logic              en;
  logic [DW-1:0]     pix_taps  [7];
  logic [RESP_W-1:0] resp;
  logic [RESP_W-1:0] resp_taps [3];

  assign en = !in_sync.blank;

  linebuffer #(.DW(DW), .N(7), .IMG_W(IMG_W)) u_lb_pix (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .h_sync (in_sync.h_sync),
    .din    (in_data),
    .taps   (pix_taps)
  );

  fast_response #(.DW(DW), .RESP_W(RESP_W)) u_resp (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .threshold (fast_threshold),
    .taps      (pix_taps),
    .resp      (resp)
  );

  linebuffer #(.DW(RESP_W), .N(3), .IMG_W(IMG_W)) u_lb_resp (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .h_sync (in_sync.h_sync),
    .din    (resp),
    .taps   (resp_taps)
  );

  nms_core #(.RESP_W(RESP_W)) u_nms (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (en),
    .threshold  (nms_threshold),
    .taps       (resp_taps),
    .feat_valid (feat_valid),
    .feat_score (feat_score)
  );

endmodule
