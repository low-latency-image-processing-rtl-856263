// tb_linebuffer: checks that the taps give vertically aligned pixels.
//
// A 5-line buffer on 16-pixel lines is fed several frames of random pixels
// with random blanking between and inside lines. After the clock edge of
// active pixel number s, tap k must hold pixel s - 16k (counted over all
// frames); this is checked for every active pixel once that pixel exists.
`timescale 1ns/1ps
module tb_linebuffer;
  localparam int W = 16, N = 5;

  logic       clk = 0, rst_n = 0;
  logic       en = 0, hs = 0;
  logic [7:0] din = '0;
  logic [7:0] taps [N];

  linebuffer #(.DW(8), .N(N), .IMG_W(W)) dut (
    .clk, .rst_n, .en, .h_sync(hs), .din, .taps);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [7:0] hist [$];

  initial begin
    @(negedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < 9; y++) begin
        repeat ($urandom % 5) @(negedge clk);
        for (int x = 0; x < W; x++) begin
          // occasional gap inside a line (blanking is allowed anywhere)
          if ($urandom % 6 == 0) begin en = 0; hs = 0; @(negedge clk); end
          en = 1; hs = (x == 0); din = 8'($urandom);
          hist.push_back(din);
          @(posedge clk); #1;
          for (int k = 0; k < N; k++) begin
            int s;
            s = hist.size() - 1 - k * W;
            if (s >= 0)
              check(taps[k] == hist[s],
                    $sformatf("f%0d y%0d x%0d tap%0d got %0d want %0d", f, y, x, k, taps[k], hist[s]));
          end
          @(negedge clk);
          en = 0; hs = 0;
        end
      end
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
