// word_to_byte: splits 16-bit words read from the paralleled flash chips into
// the byte stream that is uploaded to the host over the USB FIFO.
//
// The low half (flash chip 1) is sent first, then the high half (flash chip
// 2), matching the order in which byte_to_word packs them. Interface:
// valid/ready on both sides; a word is accepted only when both of its bytes
// have been sent, so one word is in flight at a time. Reset is synchronous,
// active high.
module word_to_byte (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [7:0]  out_data,
  output logic        out_valid,
  input  logic        out_ready
);
  logic [15:0] word_q;
  logic        full;   // a word is held
  logic        second; // the high byte is the one on the output

  assign in_ready  = !full;
  assign out_valid = full;
  assign out_data  = second ? word_q[15:8] : word_q[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      full   <= 1'b0;
      second <= 1'b0;
      word_q <= '0;
    end else if (!full) begin
      if (in_valid) begin
        word_q <= in_data;
        full   <= 1'b1;
        second <= 1'b0;
      end
    end else if (out_ready) begin
      if (second) begin
        full   <= 1'b0;
        second <= 1'b0;
      end else begin
        second <= 1'b1;
      end
    end
  end
endmodule
