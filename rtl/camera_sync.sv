// camera_sync: converts a parallel CMOS-sensor interface into the pipeline's
// common video stream.
//
// Input side: the sensor's frame_valid / line_valid / data bus, sampled on
// the rising edge of the continuous pixel clock (the style of parallel
// interface the MT9V034 class of sensors uses; this input side is specific
// to the sensor and is this design's choice). Output side: pixel_data plus a
// pix_sync_t bundle holding pixel_blank, h_sync, x_cnt and y_cnt, as the
// common stream definition requires.
//
// How it works: inputs are registered once, then a column counter runs while
// line_valid is high and a row counter advances at each line end and is
// cleared at the rising edge of frame_valid. The downstream line buffers rely
// on every line holding exactly IMG_W pixels, so this block enforces it:
// pixels past column IMG_W-1 and lines past row IMG_H-1 are blanked, and a
// line that ends with a pixel count other than IMG_W sets the sticky
// sync_error flag (cleared by error_clr).
//
// Timing: two register stages from the sensor pins to the stream outputs.
// h_sync is high together with the first active pixel of each line. During
// blanking x_cnt and y_cnt keep the coordinates of the last active pixel.
module camera_sync
  import nav_pkg::*;
#(
  parameter int unsigned CAM_DW = 10,   // sensor data width
  parameter int unsigned IMG_W  = 640,  // active pixels per line
  parameter int unsigned IMG_H  = 480   // active lines per frame
) (
  input  logic              clk,        // pixel_clk
  input  logic              rst_n,
  input  logic              cam_fv,     // frame valid
  input  logic              cam_lv,     // line valid
  input  logic [CAM_DW-1:0] cam_data,
  output logic [CAM_DW-1:0] pixel_data,
  output pix_sync_t         pixel_sync,
  output logic              sync_error, // sticky: a line was not IMG_W long
  input  logic              error_clr
);

  logic              fv_q, lv_q, fv_d, line_open;
  logic [CAM_DW-1:0] d_q;
  coord_t            x_cur, y_cur;
  logic              frame_start, line_start, line_end, active;
  coord_t            pix_x, pix_y;
  logic              in_image;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fv_q <= 1'b0;
      lv_q <= 1'b0;
      fv_d <= 1'b0;
      d_q  <= '0;
    end else begin
      fv_q <= cam_fv;
      lv_q <= cam_lv;
      fv_d <= fv_q;
      d_q  <= cam_data;
    end
  end

  always_comb begin
    active      = fv_q && lv_q;
    frame_start = fv_q && !fv_d;
    line_start  = active && !line_open;
    line_end    = line_open && !active;
    pix_x       = line_start ? '0 : x_cur;
    pix_y       = frame_start ? '0 : y_cur;
    in_image    = active && (32'(pix_x) < IMG_W) && (32'(pix_y) < IMG_H);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_open  <= 1'b0;
      x_cur      <= '0;
      y_cur      <= '0;
      sync_error <= 1'b0;
    end else begin
      line_open <= active;
      if (active && (x_cur != '1 || line_start))
        x_cur <= pix_x + coord_t'(1);
      if (frame_start)
        y_cur <= '0;
      if (line_end) begin
        if (y_cur != '1) y_cur <= y_cur + coord_t'(1);
        if (32'(x_cur) != IMG_W) sync_error <= 1'b1;
      end else if (error_clr) begin
        sync_error <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pixel_data <= '0;
      pixel_sync <= '{blank: 1'b1, h_sync: 1'b0, x_cnt: '0, y_cnt: '0};
    end else begin
      pixel_sync.blank  <= !in_image;
      pixel_sync.h_sync <= in_image && line_start;
      pixel_data        <= in_image ? d_q : '0;
      if (in_image) begin
        pixel_sync.x_cnt <= pix_x;
        pixel_sync.y_cnt <= pix_y;
      end
    end
  end

endmodule
