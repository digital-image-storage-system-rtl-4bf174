// tb_nand_ctrl: self-checking testbench of the paralleled NAND controller.
//
// Two flash chip models (chip 1 on io[7:0], chip 2 on io[15:8]) are attached
// at a reduced size: 16-word pages, 4 pages per block, 16 blocks per chip
// enable, so four block groups. One block of chip 2 is marked invalid, which
// must invalidate its whole group. The test checks the power-up scan, an
// erase of the valid groups, a full write pass fed by a FIFO stand-in whose
// half-full flag drops now and then, the page order and contents in both
// chips, that no plane is re-programmed while still busy, the bus time per
// page (2 clocks per bus cycle plus a few clocks of overhead), and a read
// back with a stalling consumer.
module tb_nand_ctrl;
  import img_store_pkg::*;
  localparam int PW = 16, PG = 4, BL = 16, NCE = 2, SLOTS = NCE * 4;
  localparam int T_PROG = 7 * 2 * (PW + 7);   // just under seven page loads

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  op_e  op = OP_NONE;
  logic op_start = 0, stop_req = 0;
  logic busy, init_done;
  logic [31:0] pages_written;
  logic [$clog2(BL/4):0] bad_groups;
  logic fifo_half = 0, fifo_rd;
  logic [15:0] fifo_data;
  logic [15:0] rd_data;
  logic rd_valid, rd_ready = 0;
  logic [NCE-1:0] ce_n;
  logic cle, ale, we_n, re_n, io_oe;
  logic [15:0] io_o, io_i;
  logic [1:0][NCE-1:0] rb_n;

  nand_ctrl #(.PAGE_WORDS(PW), .PAGES(PG), .BLOCKS(BL), .N_CE(NCE)) dut (
    .clk, .rst, .op, .op_start, .stop_req, .busy, .init_done, .pages_written,
    .bad_groups, .fifo_half, .fifo_data, .fifo_rd, .rd_data, .rd_valid, .rd_ready,
    .ce_n, .cle, .ale, .we_n, .re_n, .io_o, .io_oe, .io_i, .rb_n);

  nand_flash_model #(.PAGE_BYTES(PW), .SPARE(4), .PAGES(PG), .BLOCKS(BL), .N_CE(NCE),
                     .T_PROG(T_PROG)) u_f0 (
    .clk, .ce_n, .cle, .ale, .we_n, .re_n, .io_in(io_o[7:0]), .io_out(io_i[7:0]), .rb_n(rb_n[0]));
  nand_flash_model #(.PAGE_BYTES(PW), .SPARE(4), .PAGES(PG), .BLOCKS(BL), .N_CE(NCE),
                     .T_PROG(T_PROG)) u_f1 (
    .clk, .ce_n, .cle, .ale, .we_n, .re_n, .io_in(io_o[15:8]), .io_out(io_i[15:8]), .rb_n(rb_n[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] pattern(int k);
    return 16'(k * 40503 + 4660);
  endfunction

  // FIFO stand-in: the word stream is pattern(0), pattern(1), ...
  int wr_idx = 0;
  assign fifo_data = pattern(wr_idx);
  always @(posedge clk) if (fifo_rd) wr_idx <= wr_idx + 1;

  // bus time per page: clocks between successive program commands
  int last_prog_cyc = -1, max_page_cyc = 0, min_page_cyc = 1 << 30, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!we_n && cle && io_o[7:0] == CMD_PROG1 && op == OP_WRITE) begin
      if (last_prog_cyc >= 0 && cyc - last_prog_cyc > max_page_cyc) max_page_cyc = cyc - last_prog_cyc;
      if (last_prog_cyc >= 0 && cyc - last_prog_cyc < min_page_cyc) min_page_cyc = cyc - last_prog_cyc;
      last_prog_cyc = cyc;
    end
  end

  // expected location of the i-th page written: groups 0, 4, 6 (group 2 is invalid)
  function automatic void page_loc(int i, output int ce, output int row);
    int grp_list[3] = '{0, 4, 6};
    int g, p, s, blk;
    s = i % SLOTS;
    p = (i / SLOTS) % PG;
    g = grp_list[i / (SLOTS * PG)];
    ce = s / 4;
    blk = g + (s % 4) % 2 + ((s % 4) / 2) * (BL / 2);
    row = blk * PG + p;
  endfunction

  int npages, rd_idx, cmp_bad, stall_cycles;
  initial begin
    u_f1.mark_bad(1, 10);          // die 1, block 10: plane 2 of group 2
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (init_done);
    @(posedge clk);
    check(bad_groups == 1, "one invalid group found by the scan");
    check(dut.u_bbt.mem[0] == 2, "invalid group is block 2");
    check(u_f0.read_count == 4 * SLOTS, "scan read every block of every group");

    // erase
    op <= OP_ERASE; op_start <= 1; @(posedge clk); op_start <= 0;
    @(posedge clk); wait (!busy); @(posedge clk);
    check(u_f0.erase_count == 3 * SLOTS && u_f1.erase_count == 3 * SLOTS, $sformatf("erase of 3 valid groups: %0d %0d", u_f0.erase_count, u_f1.erase_count));
    check(u_f0.busy_violations == 0 && u_f1.busy_violations == 0, "no command while busy (erase)");

    // write the whole flash; the half-full flag drops now and then
    op <= OP_WRITE; op_start <= 1; fifo_half <= 1; @(posedge clk); op_start <= 0;
    stall_cycles = 0;
    while (busy || op_start) begin
      @(posedge clk);
      if (($urandom % 50) == 0) begin
        fifo_half <= 0;
        repeat (1 + $urandom % 8) begin @(posedge clk); stall_cycles++; end
        fifo_half <= 1;
      end
    end
    npages = 3 * PG * SLOTS;
    check(pages_written == npages, $sformatf("pages written %0d", pages_written));
    check(wr_idx == npages * PW, "every word taken from the FIFO once");
    check(u_f0.prog_count == npages && u_f1.prog_count == npages, $sformatf("program count %0d %0d", u_f0.prog_count, u_f1.prog_count));
    check(u_f0.prog_violations == 0 && u_f1.prog_violations == 0,
          "no plane re-programmed before its program time ended");
    check(u_f0.busy_violations == 0 && u_f1.busy_violations == 0, "no command while busy (write)");
    cmp_bad = 0;
    for (int i = 0; i < npages; i++) begin
      int ce, row;
      page_loc(i, ce, row);
      for (int w = 0; w < PW; w++) begin
        logic [15:0] e;
        e = pattern(i * PW + w);
        if (u_f0.peek(ce, row, w) != e[7:0] || u_f1.peek(ce, row, w) != e[15:8]) cmp_bad++;
      end
    end
    check(cmp_bad == 0, $sformatf("flash contents and page order (%0d bad bytes)", cmp_bad));
    check(u_f0.peek(1, 10 * PG, 0) == 8'hFF, "invalid group left alone");
    $display("clocks per page min %0d max %0d, FIFO stall clocks %0d", min_page_cyc, max_page_cyc, stall_cycles);
    // 1 command + 5 address + PW data + 1 confirm bus cycles of 2 clocks,
    // plus tWB (TWB+1), the next-slot step and the ready check: 3 + TWB clocks
    check(min_page_cyc == 2 * (PW + 7) + 7, $sformatf("page time %0d clocks", min_page_cyc));

    // read back with a consumer that stalls
    op <= OP_READ; op_start <= 1; @(posedge clk); op_start <= 0;
    rd_idx = 0; cmp_bad = 0;
    while (busy || rd_valid || op_start) begin
      rd_ready <= ($urandom % 4) != 0;
      @(posedge clk);
      if (rd_valid && rd_ready) begin
        if (rd_data != pattern(rd_idx)) cmp_bad++;
        rd_idx++;
      end
    end
    check(rd_idx == npages * PW, $sformatf("read-back word count %0d", rd_idx));
    check(cmp_bad == 0, "read-back data equals written data");

    // a write that is stopped after a few pages, then read back
    op <= OP_ERASE; op_start <= 1; @(posedge clk); op_start <= 0;
    @(posedge clk); wait (!busy); @(posedge clk);
    wr_idx = 0;
    op <= OP_WRITE; op_start <= 1; @(posedge clk); op_start <= 0;
    repeat (3 * 2 * (PW + 7)) @(posedge clk);
    stop_req <= 1; @(posedge clk); stop_req <= 0;
    wait (!busy); @(posedge clk);
    check(pages_written >= 3 && pages_written <= 5, $sformatf("stop ends at a page boundary (%0d pages)", pages_written));
    check(wr_idx == pages_written * PW, "stopped write took whole pages");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
