// img_store_top: FPGA logic of a digital image store that takes image data
// from a host PC over an FT245 USB FIFO, stores it in two paralleled 8-bit
// NAND flash chips, and reads it back to the host.
//
// Store path: FT245 bytes (ft245_if) are packed into 16-bit words
// (byte_to_word), one byte per flash chip, and queued in the store FIFO
// (data_fifo). The flash controller (nand_ctrl) moves words from the FIFO
// into the flash by alternating page program over the eight plane slots,
// skipping block groups that the power-up scan found invalid. Read-back path:
// nand_ctrl reads the stored pages in the same order, word_to_byte splits
// them into bytes and ft245_if writes them to the USB FIFO. The two paths
// share the USB data bus and never run at the same time. With rd_to_ser high
// the read-out words go instead to the 16-bit parallel input of the LVDS
// serializer (ser_d/ser_de), one word every flash read cycle. Feedback path:
// 16-bit words from the feedback LVDS deserializer arrive on its own clock
// (des_clk), cross into the system clock through async_fifo and, while
// fb_upload is high, are uploaded to the host through word_to_byte and the
// USB FIFO. Words that find the feedback FIFO full are counted in
// fb_overflows. The read-out to the serializer and the feedback upload follow
// the published system description; the select inputs, the FIFO and the
// rule that both selects change only between words are this design's own.
//
// Control: after reset the controller scans for invalid blocks and raises
// init_done. Then op/op_start start an erase, a write (store) or a read
// (read-back); busy is high while one runs. During a write, stop_req ends
// the pass at the end of the page being written; pages_written tells how
// many pages were stored and is what a later read returns; fifo_level shows
// how many words wait in the store FIFO. The way the host
// selects the operation is this design's choice; the chain of blocks follows
// the published system description. The image serialiser/deserialiser links, the RS-422 level
// shifters and the flash and USB chips themselves are outside this module.
// One clock, synchronous active-high reset.
module img_store_top
  import img_store_pkg::*;
#(
  parameter int unsigned PAGE_WORDS = 4096,
  parameter int unsigned PAGES      = 64,
  parameter int unsigned BLOCKS     = 8192,
  parameter int unsigned N_CE       = 2,
  parameter int unsigned FIFO_DEPTH = 8192,
  parameter int unsigned FB_DEPTH   = 1024,
  parameter int unsigned USB_STROBE = 2,
  parameter int unsigned USB_GAP    = 2
) (
  input  logic        clk,
  input  logic        rst,
  // host control
  input  op_e         op,
  input  logic        op_start,
  input  logic        stop_req,
  output logic        busy,
  output logic        init_done,
  output logic [31:0] pages_written,
  output logic [$clog2(BLOCKS/4):0] bad_groups,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level,
  // FT245 USB FIFO chip
  input  logic        usb_rxf_n,
  input  logic        usb_txe_n,
  output logic        usb_rd_n,
  output logic        usb_oe_n,
  output logic        usb_wr,
  input  logic [7:0]  usb_d_i,
  output logic [7:0]  usb_d_o,
  output logic        usb_d_oe,
  // paralleled NAND flash chips
  output logic [N_CE-1:0] nf_ce_n,
  output logic        nf_cle,
  output logic        nf_ale,
  output logic        nf_we_n,
  output logic        nf_re_n,
  output logic [15:0] nf_io_o,
  output logic        nf_io_oe,
  input  logic [15:0] nf_io_i,
  input  logic [1:0][N_CE-1:0] nf_rb_n,
  // LVDS serializer (parallel side): flash read-out to the image store and
  // transfer device when rd_to_ser is high
  input  logic        rd_to_ser,
  output logic [15:0] ser_d,
  output logic        ser_de,
  // LVDS deserializer (parallel side) of the feedback link, on its own clock;
  // its words are uploaded to the host while fb_upload is high
  input  logic        des_clk,
  input  logic [15:0] des_d,
  input  logic        des_valid,
  input  logic        fb_upload,
  output logic [15:0] fb_overflows
);
  logic [7:0]  rx_byte, tx_byte;
  logic        rx_valid, rx_ready, tx_valid, tx_ready;
  logic [15:0] in_word, fifo_word, rd_word;
  logic        in_valid, fifo_full, fifo_half, fifo_rd;
  logic        rd_valid, rd_ready;
  logic [15:0] fb_word, up_word;
  logic        fb_empty, fb_rd, up_valid, up_ready;
  logic [1:0]  des_rst_sync;

  ft245_if #(.STROBE(USB_STROBE), .GAP(USB_GAP)) u_usb (
    .clk, .rst,
    .rxf_n(usb_rxf_n), .txe_n(usb_txe_n), .rd_n(usb_rd_n), .oe_n(usb_oe_n),
    .wr(usb_wr), .d_i(usb_d_i), .d_o(usb_d_o), .d_oe(usb_d_oe),
    .rx_data(rx_byte), .rx_valid, .rx_ready,
    .tx_data(tx_byte), .tx_valid, .tx_ready
  );

  byte_to_word u_pack (
    .clk, .rst,
    .in_data(rx_byte), .in_valid(rx_valid), .in_ready(rx_ready),
    .out_data(in_word), .out_valid(in_valid), .out_ready(!fifo_full)
  );

  data_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(16)) u_fifo (
    .clk, .rst,
    .wr_data(in_word), .wr_en(in_valid && !fifo_full), .full(fifo_full),
    .rd_en(fifo_rd), .rd_data(fifo_word), .empty(),
    .half_full(fifo_half), .count(fifo_level)
  );

  nand_ctrl #(
    .PAGE_WORDS(PAGE_WORDS), .SPARE_COL(PAGE_WORDS), .PAGES(PAGES),
    .BLOCKS(BLOCKS), .N_CE(N_CE)
  ) u_nand (
    .clk, .rst,
    .op, .op_start, .stop_req, .busy, .init_done, .pages_written, .bad_groups,
    .fifo_half, .fifo_data(fifo_word), .fifo_rd,
    .rd_data(rd_word), .rd_valid, .rd_ready,
    .ce_n(nf_ce_n), .cle(nf_cle), .ale(nf_ale), .we_n(nf_we_n), .re_n(nf_re_n),
    .io_o(nf_io_o), .io_oe(nf_io_oe), .io_i(nf_io_i), .rb_n(nf_rb_n)
  );

  // Flash read-out goes either to the serializer (one word per word read,
  // never held off) or to the USB upload. The USB upload takes either the
  // flash read-out or the feedback words; the choice is made per word.
  assign ser_d    = rd_word;
  assign ser_de   = rd_valid && rd_to_ser;
  assign rd_ready = rd_to_ser || (!fb_upload && up_ready);
  assign up_word  = fb_upload ? fb_word : rd_word;
  assign up_valid = fb_upload ? !fb_empty : (rd_valid && !rd_to_ser);
  assign fb_rd    = fb_upload && !fb_empty && up_ready;

  // reset brought into the deserializer clock domain
  always_ff @(posedge des_clk) des_rst_sync <= {des_rst_sync[0], rst};

  async_fifo #(.DEPTH(FB_DEPTH), .WIDTH(16)) u_fb (
    .wclk(des_clk), .wrst(des_rst_sync[1]), .wr_data(des_d), .wr_en(des_valid),
    .full(), .overflows(fb_overflows),
    .rclk(clk), .rrst(rst), .rd_en(fb_rd), .rd_data(fb_word), .empty(fb_empty)
  );

  word_to_byte u_unpack (
    .clk, .rst,
    .in_data(up_word), .in_valid(up_valid), .in_ready(up_ready),
    .out_data(tx_byte), .out_valid(tx_valid), .out_ready(tx_ready)
  );
endmodule
