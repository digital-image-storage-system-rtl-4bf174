// tb_img_store_full: the image store at its full default size (4096-word
// pages, 64 pages per block, 8192 blocks per chip enable, two chip enables,
// 8192-word store FIFO), taken through one complete store and read-back.
//
// Sequence: power-up scan of all 2048 block groups (one group is made
// invalid); erase of every valid group; a store pass that writes one full
// rotation of the eight plane slots (eight 4096-word pages) from the USB
// host and is then stopped; read-back of those eight pages to the host,
// compared byte for byte. The flash models program for 56000 clocks,
// 700 us at an 80 MHz clock, and report any plane programmed again before
// that time is over.
module tb_img_store_full;
  import img_store_pkg::*;
  localparam int PW = 4096, NCE = 2, FD = 8192, NPG = 8;

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
  function automatic logic [7:0] hb(int i); return 8'(i * 113 + (i >> 8) * 7 + 1); endfunction

  int bad, n;
  initial begin
    u_f0.mark_bad(1, 4096 + 7);      // chip 1, die 1, block 4103: group 6
    repeat (4) @(posedge clk); rst <= 0;
    while (!init_done) @(posedge clk);
    check(bad_groups == 1, "scan found one invalid group");
    check(dut.u_nand.u_bbt.mem[0] == 6, "invalid group is block 6");

    op <= OP_ERASE; op_start <= 1; @(posedge clk); op_start <= 0; @(posedge clk);
    while (busy) @(posedge clk);
    check(u_f0.erase_count == 2047 * 8 && u_f1.erase_count == 2047 * 8, "every valid group erased");

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
    check(bad == 0, $sformatf("read-back equals stored stream (%0d bad)", bad));
    check(!busy, "read-back ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
