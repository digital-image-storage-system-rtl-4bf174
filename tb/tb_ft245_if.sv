// tb_ft245_if: runs the USB FIFO strobe controller against the FT245 chip
// model. The host sends 60 bytes, which must arrive in order through a
// consumer that stalls; then 60 bytes are sent to the host while the chip
// now and then reports itself full, and must arrive in order. The strobe
// order (OE# before RD#, no bus contention) is checked by the module's
// assertions; the clocks per byte with no stalls are checked against
// 3 + STROBE + GAP.
module tb_ft245_if;
  localparam int STROBE = 2, GAP = 2, N = 60;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic rxf_n, txe_n, rd_n, oe_n, wr, d_oe;
  logic [7:0] d_i, d_o, rx_data, tx_data;
  logic rx_valid, rx_ready = 0, tx_valid = 0, tx_ready;

  ft245_if #(.STROBE(STROBE), .GAP(GAP)) dut (.*);
  ft245_model #(.RECOVER(2)) chip (.clk, .rd_n, .wr, .d_from_fpga(d_o), .d_to_fpga(d_i), .rxf_n, .txe_n);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] hb(int i); return 8'(i * 29 + 5); endfunction
  function automatic logic [7:0] fb(int i); return 8'(i * 53 + 200); endfunction

  int got = 0, sent = 0, bad = 0;
  int cyc = 0, last_rd = -1, min_rd = 1000, last_wr = -1, min_wr = 1000;
  logic rd_q = 1, wr_q = 0;
  bit stall_consumer = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rd_q <= rd_n; wr_q <= wr;
    if (rst) begin last_rd = -1; last_wr = -1; end
    if (rd_q && !rd_n) begin
      if (last_rd >= 0 && cyc - last_rd < min_rd) min_rd = cyc - last_rd;
      last_rd = cyc;
    end
    if (!wr_q && wr) begin
      if (last_wr >= 0 && cyc - last_wr < min_wr) min_wr = cyc - last_wr;
      last_wr = cyc;
    end
    if (rx_valid && rx_ready) begin
      if (rx_data != hb(got)) bad++;
      got <= got + 1;
    end
    if (tx_valid && tx_ready) sent <= sent + 1;
  end
  assign tx_data = fb(sent);

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (2) @(posedge clk);
    chip.from_fpga.delete();         // strobe levels before reset are not transfers
    for (int i = 0; i < N; i++) chip.push_host(hb(i));
    // first half with a consumer that is always ready, then a stalling one
    while (got < N) begin
      rx_ready <= (got < N / 2) ? 1'b1 : ($urandom % 3 == 0);
      @(posedge clk);
    end
    rx_ready <= 0;
    check(bad == 0, "host bytes arrive in order");
    check(got == N, "all host bytes received");
    check(min_rd == 3 + STROBE + GAP, $sformatf("clocks per read %0d", min_rd));
    repeat (10) @(posedge clk);
    tx_valid <= 1;
    while (sent < N) begin
      @(posedge clk);
      if (sent > N / 2) chip.tx_block = ($urandom % 4 == 0);
      if (sent == N - 1 && tx_ready) tx_valid <= 0;
    end
    tx_valid <= 0; chip.tx_block = 0;
    repeat (10) @(posedge clk);
    check(chip.from_fpga.size() == N, $sformatf("bytes at host %0d", chip.from_fpga.size()));
    bad = 0;
    foreach (chip.from_fpga[i]) if (chip.from_fpga[i] != fb(i)) bad++;
    check(bad == 0, "bytes to host arrive in order");
    check(min_wr == 3 + STROBE + GAP, $sformatf("clocks per write %0d", min_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
