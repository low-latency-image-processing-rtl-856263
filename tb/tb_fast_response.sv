// tb_fast_response: checks the FAST12 response against a direct model.
//
// Seven-row image strips are fed one column per active pixel straight into
// the taps (taps[0] = bottom row), with random idle clocks between columns.
// After the edge of the column fed at step t the response must equal the
// model's score for the centre of column t-6: 0 for non-corners, otherwise
// the larger of the summed bright and dark excesses over the threshold.
// Strips use dark, mid-grey and bright backgrounds so that the comparisons
// near 0 and 255 are exercised, and a different threshold each. The last
// strips hold constructed arcs of exactly 10 to 16 contiguous bright or dark
// circle pixels, so the 12-pixel limit itself is tested.
`timescale 1ns/1ps
module tb_fast_response;
  localparam int NC = 300;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [7:0]  thr = 8'd20;
  logic [7:0]  taps [7];
  logic [11:0] resp;

  fast_response #(.DW(8), .RESP_W(12)) dut (.clk, .rst_n, .en, .threshold(thr), .taps, .resp);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, corners = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int strip [7][NC];
  int arcs [17];
  localparam int CDX [16] = '{ 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3,-3,-3,-2,-1};
  localparam int CDY [16] = '{-3,-3,-2,-1, 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3};

  function automatic int model(input int cx, input int t);
    int c = strip[3][cx];
    int sb = 0, sd = 0, best = 0;
    bit br [32];
    bit dk [32];
    bit corner = 0;
    for (int i = 0; i < 16; i++) begin
      int p = strip[3 + CDY[i]][cx + CDX[i]];
      br[i] = p - c > t;   br[i+16] = br[i];
      dk[i] = c - p > t;   dk[i+16] = dk[i];
      if (br[i]) sb += p - c - t;
      if (dk[i]) sd += c - p - t;
    end
    for (int j = 0; j < 16; j++) begin
      bit allb = 1, alld = 1;
      for (int k = 0; k < 12; k++) begin allb &= br[j+k]; alld &= dk[j+k]; end
      corner |= allb | alld;
    end
    best = (sb > sd) ? sb : sd;
    return corner ? best : 0;
  endfunction

  function automatic int clip(input int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  initial begin
    for (int r = 0; r < 7; r++) taps[r] = '0;
    @(negedge clk); rst_n = 1;
    for (int st = 0; st < 12; st++) begin
      int base;
      base = (st % 3 == 0) ? 8 : (st % 3 == 1) ? 128 : 247;
      thr  = 8'((st % 3 == 2) ? 5 + $urandom % 10 : 5 + $urandom % 40);
      for (int x = 0; x < NC; x++)
        for (int r = 0; r < 7; r++) strip[r][x] = clip(base + int'($urandom % 5) - 2);
      // isolated spots and short bars make corners of both polarities
      for (int k = 0; k < 60; k++) begin
        int x0, v;
        x0 = 3 + int'($urandom % (NC - 6));
        v  = ($urandom % 2) ? 255 : 0;
        if ($urandom % 3 == 0) v = int'($urandom % 256);
        strip[3][x0] = v;
        if ($urandom % 2) strip[2][x0] = v;
        if ($urandom % 3 == 0) strip[3][x0 + 1] = v;
      end
      // strips 9..11: arcs of exactly 10..16 contiguous circle pixels
      if (st >= 9) begin
        base = 120;
        thr  = 8'd20;
        for (int x = 0; x < NC; x++)
          for (int r = 0; r < 7; r++) strip[r][x] = base;
        for (int cx = 4; cx < NC - 4; cx += 8) begin
          int len, j0, v;
          len = 10 + int'($urandom % 7);
          j0  = int'($urandom % 16);
          v   = ($urandom % 2) ? base + 40 + int'($urandom % 20) : base - 40 - int'($urandom % 20);
          for (int k = 0; k < len; k++)
            strip[3 + CDY[(j0 + k) % 16]][cx + CDX[(j0 + k) % 16]] = v;
          arcs[len]++;
        end
      end
      for (int t = 0; t < NC; t++) begin
        if ($urandom % 4 == 0) begin en = 0; @(negedge clk); end
        en = 1;
        for (int r = 0; r < 7; r++) taps[r] = 8'(strip[6 - r][t]);
        @(posedge clk); #1;
        if (t >= 9) begin
          int want;
          want = model(t - 6, int'(thr));
          if (want > 0) corners++;
          check(int'(resp) == want,
                $sformatf("strip %0d col %0d: got %0d want %0d", st, t - 6, resp, want));
        end
        @(negedge clk);
        en = 0;
      end
    end
    $display("corners seen: %0d", corners);
    check(corners > 50, "enough corners exercised");
    check(arcs[11] > 0 && arcs[12] > 0, "arcs of 11 and 12 pixels exercised");
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
