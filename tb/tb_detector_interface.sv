// tb_detector_interface: checks coordinate recalculation, the feature FIFO,
// the register map and the interrupt on a 16 x 12 image with latency
// (LAT_X, LAT_Y) = (5, 2), border 2 and an 8-entry FIFO.
//
// A stream with random blanking runs over several frames and carries random
// detector outputs. A model (global active-pixel counter minus the latency,
// split into column, row modulo the image height) predicts which features
// are kept and with which coordinates, keeps its own FIFO of 8 entries and
// an overflow flag, and predicts every register read. A processor process
// reads at random (sometimes too slowly, so the FIFO overflows), toggles the
// interrupt enable and clears the overflow flag. irq is checked on every
// clock against the model.
`timescale 1ns/1ps
module tb_detector_interface;
  import nav_pkg::*;
  localparam int W = 16, H = 12, LX = 5, LY = 2, B = 2, D = 8;

  logic        clk = 0, rst_n = 0;
  pix_sync_t   in_sync = '{blank: 1'b1, h_sync: 1'b0, x_cnt: '0, y_cnt: '0};
  logic        fv = 0;
  logic [11:0] fs = '0;
  logic [1:0]  a = '0;
  logic        rd = 0, wr = 0;
  logic [31:0] rdata, wdata = '0;
  logic        irq;

  detector_interface #(.IMG_W(W), .IMG_H(H), .LAT_X(LX), .LAT_Y(LY), .BORDER(B),
                       .RESP_W(12), .FIFO_DEPTH(D)) dut (
    .clk, .rst_n, .in_sync, .feat_valid(fv), .feat_score(fs),
    .s_address(a), .s_read(rd), .s_readdata(rdata), .s_write(wr), .s_writedata(wdata), .irq);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- model ----------------
  typedef struct { int x; int y; int s; } feat_t;
  feat_t q [$];
  bit    m_ovf = 0, m_ien = 0;
  int    s_idx = 0;
  bit    exp_valid = 0;
  logic [31:0] exp_data;
  int    n_push = 0, n_ovf = 0, n_pop = 0, n_irq = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      bit    do_push, pop;
      feat_t e;
      // check the read issued on the previous clock
      if (exp_valid) check(rdata == exp_data,
                           $sformatf("read data %h want %h", rdata, exp_data));
      exp_valid = 0;
      if (rd) begin
        exp_valid = 1;
        case (a)
          2'd0: exp_data = {13'd0, m_ien, m_ovf, q.size() == 0, 16'(q.size())};
          2'd1: exp_data = q.size() ? {16'(q[0].y), 16'(q[0].x)} : rdata;
          2'd2: exp_data = q.size() ? 32'(q[0].s) : rdata;
          default: exp_data = {31'd0, m_ien};
        endcase
        // reads of an empty FIFO return whatever the head slot holds
        if ((a == 2'd1 || a == 2'd2) && q.size() == 0) exp_valid = 0;
      end
      pop = rd && a == 2'd2 && q.size() > 0;
      do_push = 0;
      if (!in_sync.blank) begin
        int p, px, py;
        p  = s_idx - (LY * W + LX);
        p  = ((p % (W * H)) + W * H) % (W * H);
        px = p % W; py = p / W;
        if (fv && px >= B && px < W - B && py >= B && py < H - B) begin
          e = '{px, py, int'(fs)};
          do_push = 1;
        end
        s_idx++;
      end
      // a full FIFO refuses a feature even if a read frees a slot this clock
      if (do_push && q.size() == D) begin
        m_ovf = 1; n_ovf++;
        do_push = 0;
      end else if (wr && a == 2'd3 && wdata[1]) begin
        m_ovf = 0;
      end
      if (wr && a == 2'd3) m_ien = wdata[0];
      if (pop) begin void'(q.pop_front()); n_pop++; end
      if (do_push) begin q.push_back(e); n_push++; end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(irq == (m_ien && q.size() > 0), "irq level");
      if (irq) n_irq++;
    end
  end

  // ---------------- stream ----------------
  bit stream_done = 0;
  initial begin
    @(negedge clk); rst_n = 1;
    for (int f = 0; f < 6; f++)
      for (int y = 0; y < H; y++) begin
        repeat ($urandom % 4) @(negedge clk);
        for (int x = 0; x < W; x++) begin
          if ($urandom % 5 == 0) begin in_sync.blank = 1; fv = 1; @(negedge clk); end
          in_sync = '{blank: 1'b0, h_sync: x == 0, x_cnt: coord_t'(x), y_cnt: coord_t'(y)};
          fv = ($urandom % 3 == 0);
          fs = 12'($urandom);
          @(negedge clk);
          in_sync.blank = 1; fv = 0;
        end
      end
    stream_done = 1;
  end

  // ---------------- processor ----------------
  task automatic bus(input logic [1:0] ad, input bit w, input logic [31:0] d);
    a = ad; rd = !w; wr = w; wdata = d;
    @(negedge clk);
    rd = 0; wr = 0;
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    bus(2'd3, 1, 32'h1);
    while (!stream_done) begin
      int r;
      r = int'($urandom % 100);
      if (r < 30)      bus(2'd1, 0, 0);
      else if (r < 55) bus(2'd2, 0, 0);
      else if (r < 62) bus(2'd0, 0, 0);
      else if (r < 64) bus(2'd3, 0, 0);
      else if (r < 66) bus(2'd3, 1, 32'($urandom % 4));
      else if (r < 68) bus(2'd3, 1, 32'h3);
      else begin
        // a slow phase lets the FIFO fill up
        if (r > 97) repeat (200) @(negedge clk);
        else @(negedge clk);
      end
    end
    repeat (3) @(negedge clk);
    $display("pushed %0d popped %0d dropped %0d irq-clocks %0d", n_push, n_pop, n_ovf, n_irq);
    check(n_push > 50 && n_pop > 20 && n_ovf > 0 && n_irq > 0, "all paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
