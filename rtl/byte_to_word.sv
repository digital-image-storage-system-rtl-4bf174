// byte_to_word: packs the 8-bit byte stream coming from the USB FIFO into
// 16-bit words for the two paralleled 8-bit NAND chips.
//
// The two flash chips share every control pin, so one write strobe stores one
// byte in each: the store path is 16 bits wide. The first byte of each pair
// becomes the low half (bits 7:0, flash chip 1) and the second the high half
// (bits 15:8, flash chip 2); that byte order is this design's choice.
// Interface: valid/ready on both sides. A word is presented one cycle after
// its second byte is accepted and is held until taken. Reset (active high,
// synchronous) drops a half-collected word.
module byte_to_word (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [15:0] out_data,
  output logic        out_valid,
  input  logic        out_ready
);
  logic       have_low;
  logic [7:0] low_byte;

  // A byte can be taken unless a finished word is still waiting.
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_low  <= 1'b0;
      low_byte  <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (!have_low) begin
          low_byte <= in_data;
          have_low <= 1'b1;
        end else begin
          out_data  <= {in_data, low_byte};
          out_valid <= 1'b1;
          have_low  <= 1'b0;
        end
      end
    end
  end
endmodule
