// tb_img_store_frames: stores a cyclic test picture at full default size and
// reads it back, counting the error rate, which must be zero.
//
// The picture is a checkerboard of 16-bit pixels, FRAME_W x FRAME_H, with
// 8 x 8-pixel squares; each of the NFR frames shifts the pattern by one
// square, so consecutive frames differ. Each pixel also carries its frame
// number and pixel index in low bits that the checkerboard leaves free, so a
// page stored or read in the wrong place cannot go unnoticed. The frames are
// sent as one byte stream through the USB chip model (low byte first),
// stored, read back and compared byte by byte; the error rate is the number
// of differing bytes over the bytes compared. The frame size is this test's
// choice: 256 x 128 pixels is 64 KiB, eight 4096-word pages.
module tb_img_store_frames;
  import img_store_pkg::*;
  localparam int PW = 4096, NCE = 2, FD = 8192;
  localparam int FRAME_W = 256, FRAME_H = 128, NFR = 3;
  localparam int NPG = NFR * FRAME_W * FRAME_H / PW;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  op_e  op = OP_NONE;
  logic op_start = 0, stop_req = 0, busy, init_done;
  logic [31:0] pages_written;
  logic [11:0] bad_groups;
  logic [13:0] fifo_level;
  logic usb_rxf_n, usb_txe_n, usb_rd_n, usb_oe_n, usb_wr, usb_d_oe;
  logic [7:0] usb_d_i, usb_d_o;
  logic [NCE-1:0] nf_ce_n;
  logic nf_cle, nf_ale, nf_we_n, nf_re_n, nf_io_oe;
  logic [15:0] nf_io_o, nf_io_i;
  logic [1:0][NCE-1:0] nf_rb_n;
  logic rd_to_ser = 0, ser_de, des_clk = 0, des_valid = 0, fb_upload = 0;
  logic [15:0] ser_d, des_d = '0, fb_overflows;

  img_store_top dut (.*);

  ft245_model #(.RECOVER(2)) u_usb (.clk, .rd_n(usb_rd_n), .wr(usb_wr), .d_from_fpga(usb_d_o),
                                    .d_to_fpga(usb_d_i), .rxf_n(usb_rxf_n), .txe_n(usb_txe_n));
  nand_flash_model #(.T_PROG(56000)) u_f0 (
    .clk, .ce_n(nf_ce_n), .cle(nf_cle), .ale(nf_ale), .we_n(nf_we_n), .re_n(nf_re_n),
    .io_in(nf_io_o[7:0]), .io_out(nf_io_i[7:0]), .rb_n(nf_rb_n[0]));
  nand_flash_model #(.T_PROG(56000)) u_f1 (
    .clk, .ce_n(nf_ce_n), .cle(nf_cle), .ale(nf_ale), .we_n(nf_we_n), .re_n(nf_re_n),
    .io_in(nf_io_o[15:8]), .io_out(nf_io_i[15:8]), .rb_n(nf_rb_n[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // pixel p of frame f: checkerboard level in bits 15:12, index bits below
  function automatic logic [15:0] pixel(int f, int p);
    int x, y;
    x = p % FRAME_W; y = p / FRAME_W;
    return {(((x / 8) + (y / 8) + f) % 2 == 1) ? 4'hC : 4'h3, 12'((f << 10) ^ p)};
  endfunction
  function automatic logic [7:0] hb(int i);
    logic [15:0] px;
    px = pixel(i / (2 * FRAME_W * FRAME_H), (i / 2) % (FRAME_W * FRAME_H));
    return (i % 2) ? px[15:8] : px[7:0];
  endfunction

  int bad, n;
  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    while (!init_done) @(posedge clk);
    check(bad_groups == 0, "no invalid group");

    op <= OP_ERASE; op_start <= 1; @(posedge clk); op_start <= 0; @(posedge clk);
    while (busy) @(posedge clk);
    check(u_f0.erase_count == 2048 * 8 && u_f1.erase_count == 2048 * 8, "every group erased");

    n = (NPG * PW + FD / 2 + 8) * 2;
    for (int i = 0; i < n; i++) u_usb.push_host(hb(i));
    op <= OP_WRITE; op_start <= 1; @(posedge clk); op_start <= 0; @(posedge clk);
    while (dut.u_nand.pages_cnt < NPG - 1) @(posedge clk);
    stop_req <= 1; @(posedge clk); stop_req <= 0;
    while (busy) @(posedge clk);
    check(pages_written == NPG, $sformatf("pages stored %0d", pages_written));
    check(u_f0.prog_violations == 0 && u_f1.prog_violations == 0, "no plane re-programmed while busy");
    check(u_f0.busy_violations == 0 && u_f1.busy_violations == 0, "no command to a busy chip");

    u_usb.from_fpga.delete();
    op <= OP_READ; op_start <= 1; @(posedge clk); op_start <= 0; @(posedge clk);
    while (u_usb.from_fpga.size() < NPG * PW * 2) @(posedge clk);
    repeat (20) @(posedge clk);
    check(u_usb.from_fpga.size() == NPG * PW * 2, "read-back size");
    bad = 0;
    foreach (u_usb.from_fpga[i]) if (u_usb.from_fpga[i] != hb(i)) bad++;
    $display("error rate %0d / %0d bytes over %0d frames", bad, NPG * PW * 2, NFR);
    check(bad == 0, "error rate is zero");
    check(!busy, "read-back ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
