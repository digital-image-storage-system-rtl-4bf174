// async_fifo: dual-clock FIFO that carries the 16-bit words of the feedback
// deserializer from its recovered clock into the controller clock.
//
// The deserializer on the feedback link turns the serial signal back into
// 16-bit parallel words and hands them to the FPGA, which uploads them to
// the PC. Those words arrive on the deserializer's own output clock, so they
// cross into the system clock here. Standard design: binary read and write
// pointers with one extra wrap bit, exchanged between the domains in Gray
// code through two-flop synchronisers; full and empty are computed from the
// synchronised pointers and so are pessimistic by up to two clocks, never
// wrong. A word offered while the FIFO is full is dropped and counted in
// overflows (write domain), since the deserializer cannot be held off.
// DEPTH must be a power of two; its value is this design's choice, as is
// the whole crossing scheme. Read side is first word fall through.
// Each side has its own active-high reset, synchronous to its clock.
module async_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_en,
  output logic             full,
  output logic [15:0]      overflows,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + 1'b1;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin      <= '0;
      wgray     <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
      overflows <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
      if (wr_en && full && overflows != '1) overflows <= overflows + 1'b1;
    end
  end

  // read domain
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + 1'b1;
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end

  a_no_underflow: assert property (@(posedge rclk) disable iff (rrst) !(rd_en && empty));
endmodule
