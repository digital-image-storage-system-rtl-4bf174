// tb_img_store_top: end-to-end test of the image store at a reduced flash
// size (16-word pages, 4 pages per block, 16 blocks per chip enable, a
// 32-word store FIFO). An FT245 chip model stands for the USB host and two
// flash chip models for the paralleled flash; one flash block is invalid.
//
// Sequence: power-up invalid-block scan; erase; a store pass that fills the
// whole flash from a byte stream sent by the host; read-back of every page
// to the host, compared byte for byte with what was sent, while the host is
// sometimes too slow to collect (TXE# high); then erase, a store pass ended
// early by stop_req, and its read-back. The test counts how often each
// mechanism happens (invalid group skipped, flash waiting for the FIFO to be
// half full, waiting on ready/busy, USB reads and writes, USB TXE# stalls,
// stop request, end of flash, read-out to the LVDS serializer port, feedback
// words uploaded from the deserializer clock domain, feedback FIFO overflow)
// and counts a failure for any that never did. The stopped pass is also read
// out to the serializer port and compared, and 40 feedback words sent on an
// unrelated clock must reach the host in order.
module tb_img_store_top;
  import img_store_pkg::*;
  localparam int PW = 16, PG = 4, BL = 16, NCE = 2, FD = 32, FBD = 16, SLOTS = NCE * 4;
  localparam int NPAGES = 3 * PG * SLOTS;   // three valid groups

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  op_e  op = OP_NONE;
  logic op_start = 0, stop_req = 0, busy, init_done;
  logic [31:0] pages_written;
  logic [$clog2(BL/4):0] bad_groups;
  logic [$clog2(FD):0] fifo_level;
  logic usb_rxf_n, usb_txe_n, usb_rd_n, usb_oe_n, usb_wr, usb_d_oe;
  logic [7:0] usb_d_i, usb_d_o;
  logic [NCE-1:0] nf_ce_n;
  logic nf_cle, nf_ale, nf_we_n, nf_re_n, nf_io_oe;
  logic [15:0] nf_io_o, nf_io_i;
  logic [1:0][NCE-1:0] nf_rb_n;
  logic rd_to_ser = 0, ser_de, des_clk = 0, des_valid = 0, fb_upload = 0;
  logic [15:0] ser_d, des_d = '0, fb_overflows;
  always #7 des_clk = ~des_clk;   // deserializer clock, unrelated to clk

  img_store_top #(.PAGE_WORDS(PW), .PAGES(PG), .BLOCKS(BL), .N_CE(NCE), .FIFO_DEPTH(FD), .FB_DEPTH(FBD)) dut (.*);

  ft245_model #(.RECOVER(2)) u_usb (.clk, .rd_n(usb_rd_n), .wr(usb_wr), .d_from_fpga(usb_d_o),
                                    .d_to_fpga(usb_d_i), .rxf_n(usb_rxf_n), .txe_n(usb_txe_n));
  nand_flash_model #(.PAGE_BYTES(PW), .SPARE(4), .PAGES(PG), .BLOCKS(BL), .N_CE(NCE),
                     .T_PROG(7 * 2 * (PW + 7))) u_f0 (
    .clk, .ce_n(nf_ce_n), .cle(nf_cle), .ale(nf_ale), .we_n(nf_we_n), .re_n(nf_re_n),
    .io_in(nf_io_o[7:0]), .io_out(nf_io_i[7:0]), .rb_n(nf_rb_n[0]));
  nand_flash_model #(.PAGE_BYTES(PW), .SPARE(4), .PAGES(PG), .BLOCKS(BL), .N_CE(NCE),
                     .T_PROG(7 * 2 * (PW + 7))) u_f1 (
    .clk, .ce_n(nf_ce_n), .cle(nf_cle), .ale(nf_ale), .we_n(nf_we_n), .re_n(nf_re_n),
    .io_in(nf_io_o[15:8]), .io_out(nf_io_i[15:8]), .rb_n(nf_rb_n[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // host byte stream: byte i of everything ever sent
  function automatic logic [7:0] hb(int i); return 8'(i * 113 + (i >> 8) * 7 + 1); endfunction

  // mechanism counters
  int n_skip = 0, n_fifo_wait = 0, n_rb_wait = 0, n_usb_rd = 0, n_usb_wr = 0;
  int n_txe_stall = 0, n_stop = 0, n_full_end = 0, n_ser = 0, n_fb_up = 0;
  logic rd_q = 1, wr_q = 0;
  always @(posedge clk) if (!rst) begin
    rd_q <= usb_rd_n; wr_q <= usb_wr;
    if (rd_q && !usb_rd_n) n_usb_rd++;
    if (wr_q && !usb_wr) n_usb_wr++;
    if (dut.u_nand.state.name() == "S_GRP" && dut.u_nand.mode.name() != "M_SCAN"
        && dut.u_nand.bbt_addr == dut.u_nand.grp_blk) n_skip++;
    if (dut.u_nand.state.name() == "S_DATA_W" && !dut.u_nand.phase && !dut.fifo_half) n_fifo_wait++;
    if (dut.u_nand.state.name() == "S_WAIT_RB" && !dut.u_nand.ce_ready) n_rb_wait++;
    if (dut.u_unpack.out_valid && usb_txe_n) n_txe_stall++;
  end

  logic [15:0] ser_words[$];
  always @(posedge clk) if (ser_de) begin ser_words.push_back(ser_d); n_ser++; end
  always @(posedge clk) if (!rst && dut.fb_rd) n_fb_up++;

  task automatic run_op(op_e o);
    op <= o; op_start <= 1; @(posedge clk); op_start <= 0; @(posedge clk);
    while (busy) @(posedge clk);
  endtask

  int sent = 0;        // bytes pushed to the USB chip by the host
  int stored = 0;      // bytes of the stream already in flash
  task automatic host_send(int nbytes);
    for (int i = 0; i < nbytes; i++) u_usb.push_host(hb(sent + i));
    sent += nbytes;
  endtask

  // read back `pages` pages and compare with the stream from byte `from`
  task automatic read_back(int pages, int from, bit slow_host);
    int bad = 0, n = pages * PW * 2;
    u_usb.from_fpga.delete();
    op <= OP_READ; op_start <= 1; @(posedge clk); op_start <= 0;
    while (u_usb.from_fpga.size() < n) begin
      @(posedge clk);
      if (slow_host) u_usb.tx_block = ($urandom % 8 == 0);
      if (!busy && !dut.u_unpack.out_valid && !dut.u_nand.rd_valid && u_usb.from_fpga.size() < n) break;
    end
    u_usb.tx_block = 0;
    repeat (20) @(posedge clk);
    check(u_usb.from_fpga.size() == n, $sformatf("read-back size %0d of %0d", u_usb.from_fpga.size(), n));
    foreach (u_usb.from_fpga[i]) if (u_usb.from_fpga[i] != hb(from + i)) bad++;
    check(bad == 0, $sformatf("read-back bytes equal stored stream (%0d bad)", bad));
  endtask

  initial begin
    u_f1.mark_bad(0, 2);             // chip 2, die 0, block 2: group 2 is invalid
    repeat (4) @(posedge clk); rst <= 0;
    while (!init_done) @(posedge clk);
    check(bad_groups == 1, "scan found the invalid group");

    run_op(OP_ERASE);
    check(u_f0.erase_count == 3 * SLOTS, "valid groups erased");

    // store pass over the whole flash: the flash also needs FD/2 words
    // beyond the last page in the FIFO, because it only takes words while
    // the FIFO is half full
    host_send(NPAGES * PW * 2 + FD + 8);
    op <= OP_WRITE; op_start <= 1; @(posedge clk); op_start <= 0; @(posedge clk);
    while (busy) @(posedge clk);
    n_full_end++;
    check(pages_written == NPAGES, $sformatf("whole flash stored: %0d pages", pages_written));
    check(u_f0.prog_violations == 0 && u_f1.prog_violations == 0, "no plane re-programmed while busy");
    check(u_f0.busy_violations == 0 && u_f1.busy_violations == 0, "no command to a busy chip");
    read_back(NPAGES, stored, 1'b1);
    stored += NPAGES * PW * 2;

    // erase, store a few pages and stop, read back
    run_op(OP_ERASE);
    host_send(6 * PW * 2);
    op <= OP_WRITE; op_start <= 1; @(posedge clk); op_start <= 0;
    repeat (2 * 2 * (PW + 7) * 5) @(posedge clk);    // well into the third page
    stop_req <= 1; n_stop++; @(posedge clk); stop_req <= 0;
    while (busy) @(posedge clk);
    check(pages_written >= 1 && pages_written <= 6, $sformatf("stopped store: %0d pages", pages_written));
    read_back(pages_written, stored, 1'b0);

    // read-out of the stopped pass to the LVDS serializer port
    begin
      int bad, np;
      bad = 0;
      np = pages_written;
      ser_words.delete();
      rd_to_ser <= 1;
      run_op(OP_READ);
      repeat (4) @(posedge clk);
      rd_to_ser <= 0;
      check(ser_words.size() == np * PW, $sformatf("serializer words %0d", ser_words.size()));
      foreach (ser_words[i]) if (ser_words[i] != {hb(stored + 2 * i + 1), hb(stored + 2 * i)}) bad++;
      check(bad == 0, "serializer read-out equals stored words");
    end

    // feedback link: words on the deserializer clock are uploaded to the host
    begin
      int bad, nfb;
      bad = 0;
      nfb = 40;
      u_usb.from_fpga.delete();
      fb_upload <= 1;
      for (int i = 0; i < nfb; i++) begin
        @(posedge des_clk);
        des_d <= 16'(i * 2654 + 77); des_valid <= 1;
        @(posedge des_clk);
        des_valid <= 0;
        repeat (12) @(posedge des_clk);      // slower than the USB upload
      end
      while (u_usb.from_fpga.size() < 2 * nfb && !dut.fb_empty) @(posedge clk);
      repeat (40) @(posedge clk);
      check(u_usb.from_fpga.size() == 2 * nfb, $sformatf("feedback bytes at host %0d", u_usb.from_fpga.size()));
      for (int i = 0; i < nfb && 2 * i + 1 < u_usb.from_fpga.size(); i++)
        if ({u_usb.from_fpga[2 * i + 1], u_usb.from_fpga[2 * i]} != 16'(i * 2654 + 77)) bad++;
      check(bad == 0, "feedback words uploaded in order");
      check(fb_overflows == 0, "no feedback overflow while uploading");
      // with the upload off, a burst longer than the FIFO overflows
      fb_upload <= 0;
      @(posedge des_clk);
      for (int i = 0; i < FBD + 5; i++) begin
        des_d <= 16'(i); des_valid <= 1; @(posedge des_clk);
      end
      des_valid <= 0;
      repeat (4) @(posedge des_clk);
      check(fb_overflows == 5, $sformatf("feedback overflows counted %0d", fb_overflows));
    end

    $display("mechanisms: skip=%0d fifo_wait=%0d rb_wait=%0d usb_rd=%0d usb_wr=%0d txe_stall=%0d stop=%0d full=%0d ser=%0d fb_up=%0d ovf=%0d",
             n_skip, n_fifo_wait, n_rb_wait, n_usb_rd, n_usb_wr, n_txe_stall, n_stop, n_full_end,
             n_ser, n_fb_up, fb_overflows);
    check(n_ser > 0, "read-out to the serializer");
    check(n_fb_up > 0 && fb_overflows > 0, "feedback upload and feedback overflow");
    check(n_skip > 0, "invalid group skipped");
    check(n_fifo_wait > 0, "flash waited for the FIFO to be half full");
    check(n_rb_wait > 0, "controller waited on ready/busy");
    check(n_usb_rd > 0 && n_usb_wr > 0, "USB reads and writes");
    check(n_txe_stall > 0, "USB write held off by TXE#");
    check(n_stop > 0 && n_full_end > 0, "store ended by stop and by end of flash");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
