// nav_fabric_top: the FPGA-fabric half of a processor-centric vision SoC
// for low-latency feature detection.
//
// The camera is wired straight into the fabric. camera_sync turns its
// interface into the common video stream, preprocessor maps pixel values,
// and the stream then splits: feature_detector finds FAST12 corners on the
// fly while memory_buffer writes the same pixels to external memory. The
// detector_interface converts each detection into image coordinates and
// queues it for the processor, which computes descriptors from the frame
// buffer, matches them and votes on the heading. The processor, its memory
// controller and the external memory are not part of this RTL: their
// connections are the ports below (a memory-mapped slave with interrupt for
// the features, a write master for the frame, and configuration inputs that
// a GPIO block would drive).
//
// Everything runs in one clock domain, the camera's continuous pixel clock;
// the processor bus is assumed to be synchronous to it.
//
// Latency: a feature at (x, y) is queued when the pixel FD_LAT_Y rows and
// FD_LAT_X columns after it (plus the 3 register stages of camera_sync and
// preprocessor) has arrived from the sensor.
module nav_fabric_top
  import nav_pkg::*;
#(
  parameter int unsigned CAM_DW     = 10,
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned IMG_W      = 640,
  parameter int unsigned IMG_H      = 480,
  parameter int unsigned RESP_W     = PIX_W + 4,
  parameter int unsigned FEAT_DEPTH = 256,
  parameter int unsigned MB_DEPTH   = 16
) (
  input  logic              clk,              // pixel_clk
  input  logic              rst_n,
  // camera sensor
  input  logic              cam_fv,
  input  logic              cam_lv,
  input  logic [CAM_DW-1:0] cam_data,
  // configuration (GPIO of the processor subsystem)
  input  logic [PIX_W-1:0]  fast_threshold,
  input  logic [RESP_W-1:0] nms_threshold,
  input  logic              lut_we,
  input  logic [CAM_DW-1:0] lut_addr,
  input  logic [PIX_W-1:0]  lut_wdata,
  input  logic [31:0]       frame_base,
  input  logic              status_clr,
  output logic              sync_error,
  output logic              mb_overflow,
  // detector interface slave and interrupt
  input  logic [1:0]        s_address,
  input  logic              s_read,
  output logic [31:0]       s_readdata,
  input  logic              s_write,
  input  logic [31:0]       s_writedata,
  output logic              irq,
  // memory buffer write master
  output logic [31:0]       m_address,
  output logic              m_write,
  output logic [31:0]       m_writedata,
  input  logic              m_waitrequest
);

  logic [CAM_DW-1:0] cs_data;
  pix_sync_t         cs_sync;
  logic [PIX_W-1:0]  pp_data;
  pix_sync_t         pp_sync;
  logic              fd_valid;
  logic [RESP_W-1:0] fd_score;

  camera_sync #(.CAM_DW(CAM_DW), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_cam_sync (
    .clk        (clk),
    .rst_n      (rst_n),
    .cam_fv     (cam_fv),
    .cam_lv     (cam_lv),
    .cam_data   (cam_data),
    .pixel_data (cs_data),
    .pixel_sync (cs_sync),
    .sync_error (sync_error),
    .error_clr  (status_clr)
  );

  preprocessor #(.IN_W(CAM_DW), .OUT_W(PIX_W)) u_preproc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_data   (cs_data),
    .in_sync   (cs_sync),
    .out_data  (pp_data),
    .out_sync  (pp_sync),
    .lut_we    (lut_we),
    .lut_addr  (lut_addr),
    .lut_wdata (lut_wdata)
  );

  feature_detector #(.DW(PIX_W), .RESP_W(RESP_W), .IMG_W(IMG_W)) u_detector (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_data        (pp_data),
    .in_sync        (pp_sync),
    .fast_threshold (fast_threshold),
    .nms_threshold  (nms_threshold),
    .feat_valid     (fd_valid),
    .feat_score     (fd_score)
  );

  detector_interface #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .LAT_X(FD_LAT_X), .LAT_Y(FD_LAT_Y),
    .BORDER(FD_BORDER), .RESP_W(RESP_W), .FIFO_DEPTH(FEAT_DEPTH)
  ) u_det_if (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_sync     (pp_sync),
    .feat_valid  (fd_valid),
    .feat_score  (fd_score),
    .s_address   (s_address),
    .s_read      (s_read),
    .s_readdata  (s_readdata),
    .s_write     (s_write),
    .s_writedata (s_writedata),
    .irq         (irq)
  );

  memory_buffer #(.PIX_W(PIX_W), .IMG_W(IMG_W), .FIFO_DEPTH(MB_DEPTH)) u_mem_buf (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_data       (pp_data),
    .in_sync       (pp_sync),
    .frame_base    (frame_base),
    .m_address     (m_address),
    .m_write       (m_write),
    .m_writedata   (m_writedata),
    .m_waitrequest (m_waitrequest),
    .overflow      (mb_overflow),
    .overflow_clr  (status_clr)
  );

endmodule
