// tb_preprocessor: checks the look-up-table pixel mapping.
//
// A random stream (random blanking, coordinates and 10-bit values) is sent
// first with the table as reset (value >> 2), then after part of the table
// has been rewritten with a random mapping while the stream runs. Every
// output must be the model's table entry for the input one clock earlier,
// with the sync bundle delayed by exactly one clock.
`timescale 1ns/1ps
module tb_preprocessor;
  import nav_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [9:0] in_data = '0;
  pix_sync_t  in_sync = '{blank: 1'b1, h_sync: 1'b0, x_cnt: '0, y_cnt: '0};
  logic [7:0] out_data;
  pix_sync_t  out_sync;
  logic       we = 0;
  logic [9:0] wa = '0;
  logic [7:0] wd = '0;

  preprocessor #(.IN_W(10), .OUT_W(8)) dut (
    .clk, .rst_n, .in_data, .in_sync, .out_data, .out_sync,
    .lut_we(we), .lut_addr(wa), .lut_wdata(wd));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [7:0] model [1024];
  logic [9:0] prev_data;
  pix_sync_t  prev_sync;
  bit         have_prev = 0;

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = 8'(i / 4);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // rewrite table entries in the second half
      if (n >= 2000 && n < 3000) begin
        we = 1; wa = 10'($urandom); wd = 8'($urandom);
      end else we = 0;
      in_data = 10'($urandom);
      in_sync = '{blank: 1'($urandom), h_sync: 1'($urandom), x_cnt: coord_t'($urandom),
                  y_cnt: coord_t'($urandom)};
      @(posedge clk);
      // the table write and the read of this clock see the old contents
      prev_data = in_data; prev_sync = in_sync;
      #1;
      check(out_data == model[prev_data],
            $sformatf("n=%0d in=%0d got %0d want %0d", n, prev_data, out_data, model[prev_data]));
      check(out_sync == prev_sync, "sync delayed by one clock");
      if (we) model[wa] = wd;
      @(negedge clk);
    end
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
