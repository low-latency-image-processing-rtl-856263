// tb_camera_sync: checks the stream produced from a frame_valid / line_valid
// sensor interface on a small image (12 x 5).
//
// Frames are sent with random horizontal and vertical blanking. The model
// predicts, two clocks after each sensor cycle, pixel_blank, h_sync, x_cnt,
// y_cnt and pixel_data. A line sent 4 pixels too long must be truncated and
// must set sync_error; an extra line past IMG_H must be blanked; a short
// line must set sync_error too; error_clr must clear it.
`timescale 1ns/1ps
module tb_camera_sync;
  import nav_pkg::*;

  localparam int W = 12, H = 5;

  logic        clk = 0, rst_n = 0;
  logic        fv = 0, lv = 0, err_clr = 0;
  logic [9:0]  d = '0;
  logic [9:0]  pd;
  pix_sync_t   ps;
  logic        serr;

  camera_sync #(.CAM_DW(10), .IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .cam_fv(fv), .cam_lv(lv), .cam_data(d),
    .pixel_data(pd), .pixel_sync(ps), .sync_error(serr), .error_clr(err_clr));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // expected output per clock: what was driven before the previous edge
  typedef struct { bit blank; bit hs; int x; int y; int data; } exp_t;
  exp_t pipe [$];
  int   last_x = 0, last_y = 0;

  task automatic drive(input bit f, input bit l, input int x, input int y, input int v);
    exp_t e;
    fv = f; lv = l; d = 10'(v);
    e.blank = !(f && l && x < W && y < H);
    e.hs    = !e.blank && x == 0;
    if (!e.blank) begin last_x = x; last_y = y; end
    e.x = last_x; e.y = last_y; e.data = e.blank ? 0 : v;
    pipe.push_back(e);
    @(negedge clk);
  endtask

  task automatic frame(input int long_line, input int short_line, input int extra_lines);
    repeat (1 + $urandom % 3) drive(0, 0, 0, 0, 0);
    for (int y = 0; y < H + extra_lines; y++) begin
      int len = (y == long_line) ? W + 4 : (y == short_line) ? W - 3 : W;
      repeat (1 + $urandom % 4) drive(1, 0, 0, y, 0);
      for (int x = 0; x < len; x++) drive(1, 1, x, y, int'($urandom % 1024));
    end
    repeat (2) drive(1, 0, 0, 0, 0);
  endtask

  // compare on every clock once the pipeline is primed
  bit primed = 0;
  int nh = 0;
  always @(posedge clk) begin
    #1;
    if (primed && pipe.size() > 1) begin
      exp_t e;
      e = pipe.pop_front();
      check(ps.blank == e.blank, "blank");
      check(ps.h_sync == e.hs, "h_sync");
      if (!e.blank) begin
        check(int'(ps.x_cnt) == e.x && int'(ps.y_cnt) == e.y,
              $sformatf("coords got (%0d,%0d) want (%0d,%0d)", ps.x_cnt, ps.y_cnt, e.x, e.y));
        check(int'(pd) == e.data, "data");
      end
      if (ps.h_sync) nh++;
    end
  end

  initial begin
    @(negedge clk);
    rst_n = 1;
    primed = 1;
    pipe.push_back('{1, 0, 0, 0, 0});
    frame(-1, -1, 0);
    check(serr == 0, "no error on a regular frame");
    frame(2, -1, 1);
    check(serr == 1, "error after a long line");
    err_clr = 1; drive(0, 0, 0, 0, 0); err_clr = 0;
    drive(0, 0, 0, 0, 0);
    check(serr == 0, "error cleared");
    frame(-1, 3, 0);
    check(serr == 1, "error after a short line");
    repeat (4) drive(0, 0, 0, 0, 0);
    check(nh == 3 * H, $sformatf("h_sync count %0d", nh));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
