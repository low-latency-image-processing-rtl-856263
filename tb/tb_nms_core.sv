// tb_nms_core: checks 3x3 non-maxima suppression against a direct model.
//
// Three-row strips of small random responses (many ties) are fed one
// column per active pixel into the taps (taps[0] = bottom row), with random
// idle clocks. After the edge of the column fed at step t, feat_valid and
// feat_score must describe the centre of column t-2: above the threshold,
// strictly greater than the row above and the left neighbour, and not less
// than the right neighbour and the row below.
`timescale 1ns/1ps
module tb_nms_core;
  localparam int NC = 400;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [11:0] thr = '0;
  logic [11:0] taps [3];
  logic        fv;
  logic [11:0] fs;

  nms_core #(.RESP_W(12)) dut (.clk, .rst_n, .en, .threshold(thr), .taps,
                               .feat_valid(fv), .feat_score(fs));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, found = 0, ties = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int strip [3][NC];

  initial begin
    for (int r = 0; r < 3; r++) taps[r] = '0;
    @(negedge clk); rst_n = 1;
    for (int st = 0; st < 6; st++) begin
      int range;
      range = (st % 2 == 0) ? 6 : 4000;
      thr = 12'($urandom % 3);
      for (int x = 0; x < NC; x++)
        for (int r = 0; r < 3; r++) strip[r][x] = int'($urandom % range);
      for (int t = 0; t < NC; t++) begin
        if ($urandom % 4 == 0) begin en = 0; @(negedge clk); end
        en = 1;
        for (int r = 0; r < 3; r++) taps[r] = 12'(strip[2 - r][t]);
        @(posedge clk); #1;
        if (t >= 3) begin
          int cx, c;
          bit m;
          cx = t - 2;
          c  = strip[1][cx];
          m  = c > int'(thr);
          m &= c > strip[0][cx-1] && c > strip[0][cx] && c > strip[0][cx+1];
          m &= c > strip[1][cx-1];
          m &= c >= strip[1][cx+1];
          m &= c >= strip[2][cx-1] && c >= strip[2][cx] && c >= strip[2][cx+1];
          if (m) found++;
          if (m && (c == strip[1][cx+1] || c == strip[2][cx])) ties++;
          check(fv == m, $sformatf("strip %0d col %0d: valid %0d want %0d", st, cx, fv, m));
          if (m) check(int'(fs) == c, "score");
        end
        @(negedge clk);
        en = 0;
      end
    end
    $display("maxima %0d, with ties %0d", found, ties);
    check(found > 20 && ties > 5, "maxima and ties exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
