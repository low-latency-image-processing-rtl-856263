// line_fifo: dual-port, single-clock FIFO sized for one image line.
//
// A memory array with separate write and read pointers that wrap at DEPTH
// (DEPTH need not be a power of two), so it maps onto one embedded block RAM.
// write_enable stores din; read_enable takes the oldest entry and presents
// it on dout one clock later, where it stays until the next read (the
// registered read port of a block RAM). A read and a write may happen on the
// same clock. Writing a full FIFO or reading an empty one is a protocol
// error and is flagged by assertions; the line buffer's controller never
// does either.
module line_fifo #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 640
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       write_enable,
  input  logic [DW-1:0]              din,
  input  logic                       read_enable,
  output logic [DW-1:0]              dout,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH < 2) ? 1 : $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (write_enable) mem[wr_ptr] <= din;
    if (read_enable)  dout <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (write_enable) wr_ptr <= next_ptr(wr_ptr);
      if (read_enable)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(write_enable) - CW'(read_enable);
    end
  end

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n)
      write_enable && !read_enable |-> 32'(count) < DEPTH;
  endproperty
  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) read_enable |-> count != '0;
  endproperty
  a_no_overflow:  assert property (p_no_overflow)  else $error("line_fifo: write to full FIFO");
  a_no_underflow: assert property (p_no_underflow) else $error("line_fifo: read from empty FIFO");

endmodule
