// data_fifo: the store buffer between the USB input and the flash write path.
//
// A synchronous first-word-fall-through FIFO of DEPTH 16-bit words. It flags
// half_full when it holds at least DEPTH/2 words; the flash controller moves a
// word into the flash only while that flag is set, so each page is written
// from a buffer that is never close to running dry (that gating is taken
// from the published write flow). DEPTH is this design's
// choice: 8192 words, so that half of the buffer is one 4096-word page.
// Interface: wr_en/full on the write side, rd_en/empty with rd_data showing
// the oldest word on the read side. Writing when full or reading when empty is
// ignored (and flagged by an assertion). One clock, synchronous reset.
module data_fifo #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_en,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             half_full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign full      = (count == (AW+1)'(DEPTH));
  assign empty     = (count == '0);
  assign half_full = (count >= (AW+1)'(DEPTH / 2));
  assign rd_data   = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // Overflow or underflow means the producer or consumer ignored a flag.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
