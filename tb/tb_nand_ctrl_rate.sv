// tb_nand_ctrl_rate: store rate of the paralleled flash controller at full
// page size (4096 words of 2 bytes), with the store FIFO always at least half
// full so that the flash bus is the only limit.
//
// Two full rotations of the eight plane slots (16 pages) are written. The
// flash models take 56000 clocks per page program, 700 us at an 80 MHz
// clock (25 ns per two-clock bus cycle), the longest program time. Checks:
// every page is loaded in 2*(4096+7)+7 clocks; coming back to a plane takes
// longer than the program time, so no plane is programmed while busy and the
// controller never waits on ready/busy; the resulting store rate at 80 MHz
// is above 30 MB/s and above the 13.54 MB/s of programming one page at a
// time (load 102.4 us plus program 200 us per 4096 bytes).
module tb_nand_ctrl_rate;
  import img_store_pkg::*;
  localparam int PW = 4096, NCE = 2, NPG = 16;
  localparam int T_PROG = 56000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  op_e  op = OP_NONE;
  logic op_start = 0, stop_req = 0, busy, init_done;
  logic [31:0] pages_written;
  logic [11:0] bad_groups;
  logic fifo_rd;
  logic [15:0] fifo_data, rd_data;
  logic rd_valid;
  logic [NCE-1:0] ce_n;
  logic cle, ale, we_n, re_n, io_oe;
  logic [15:0] io_o, io_i;
  logic [1:0][NCE-1:0] rb_n;

  nand_ctrl dut (.clk, .rst, .op, .op_start, .stop_req, .busy, .init_done, .pages_written,
    .bad_groups, .fifo_half(1'b1), .fifo_data, .fifo_rd, .rd_data, .rd_valid, .rd_ready(1'b1),
    .ce_n, .cle, .ale, .we_n, .re_n, .io_o, .io_oe, .io_i, .rb_n);
  nand_flash_model #(.T_PROG(T_PROG)) u_f0 (.clk, .ce_n, .cle, .ale, .we_n, .re_n,
    .io_in(io_o[7:0]), .io_out(io_i[7:0]), .rb_n(rb_n[0]));
  nand_flash_model #(.T_PROG(T_PROG)) u_f1 (.clk, .ce_n, .cle, .ale, .we_n, .re_n,
    .io_in(io_o[15:8]), .io_out(io_i[15:8]), .rb_n(rb_n[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int k = 0;
  assign fifo_data = 16'(k * 7 + 1);
  always @(posedge clk) if (fifo_rd) k <= k + 1;

  int cyc = 0, t_first = -1, t_last = -1, rb_waits = 0, min_pg = 1 << 30, last = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!we_n && cle && io_o[7:0] == CMD_PROG1 && op == OP_WRITE) begin
      if (last >= 0 && cyc - last < min_pg) min_pg = cyc - last;
      last = cyc;
      if (t_first < 0) t_first = cyc;
    end
    if (op == OP_WRITE && dut.state.name() == "S_WAIT_RB" && !dut.ce_ready) rb_waits++;
  end

  real mbps;
  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    while (!init_done) @(posedge clk);
    op <= OP_WRITE; op_start <= 1; @(posedge clk); op_start <= 0; @(posedge clk);
    while (dut.pages_cnt < NPG - 1) @(posedge clk);
    stop_req <= 1; @(posedge clk); stop_req <= 0;
    while (dut.state.name() != "S_TWB") @(posedge clk);   // confirm of the last page
    t_last = cyc;
    while (busy) @(posedge clk);
    check(pages_written == NPG, $sformatf("pages %0d", pages_written));
    check(min_pg == 2 * (PW + 7) + 7, $sformatf("clocks per page %0d", min_pg));
    check(8 * min_pg > T_PROG, "plane revisited after its program time");
    check(u_f0.prog_violations == 0 && u_f1.prog_violations == 0, "no plane programmed while busy");
    check(rb_waits == 0, $sformatf("no wait on ready/busy during the pass (%0d)", rb_waits));
    // bytes stored per 12.5 ns clock, in MB/s
    mbps = real'(NPG * PW * 2) / (real'(t_last - t_first) * 12.5e-9) / 1.0e6;
    $display("store rate %0.1f MB/s at 80 MHz", mbps);
    check(mbps > 30.0 && mbps > 13.54, "store rate above 30 MB/s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
