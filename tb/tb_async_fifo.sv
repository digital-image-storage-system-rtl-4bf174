// tb_async_fifo: dual-clock FIFO with unrelated write (period 6) and read
// (period 10) clocks. Phase 1: random writes that respect full and random
// reads; every word read must be the next one written. Phase 2: the reader
// stops and the writer offers words regardless of full; exactly the words
// beyond the capacity must be dropped and counted as overflows, and the
// words kept must drain in order. The flags must settle: empty after
// draining, full after filling.
module tb_async_fifo;
  localparam int D = 16;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #3 wclk = ~wclk;
  always #5 rclk = ~rclk;
  logic [15:0] wr_data = '0, rd_data, overflows;
  logic wr_en = 0, rd_en = 0, full, empty;
  async_fifo #(.DEPTH(D), .WIDTH(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wn = 0, rn = 0, bad = 0;
  bit phase2 = 0;
  function automatic logic [15:0] w(int i); return 16'(i * 1237 + 9); endfunction

  // writer: drives on the falling edge, obeys full in phase 1
  always @(negedge wclk) if (!wrst && !phase2) begin
    wr_en   = (wn < 600) && !full && ($urandom % 2 == 0);
    wr_data = w(wn);
  end
  always @(posedge wclk) if (!wrst && !phase2 && wr_en && !full) wn <= wn + 1;
  // reader
  always @(posedge rclk) begin
    if (!rrst && rd_en && !empty) begin
      if (rd_data != w(rn)) bad++;
      rn <= rn + 1;
    end
  end

  initial begin
    repeat (3) @(posedge rclk); wrst <= 0; rrst <= 0;
    while (rn < 600) begin
      @(negedge rclk);
      rd_en = !empty && ($urandom % 3 != 0);
    end
    @(negedge rclk); rd_en = 0;
    check(rn == 600, "all words read");
    check(bad == 0, "words read in order");
    repeat (6) @(posedge rclk);
    check(empty, "empty after draining");
    check(overflows == 0, "no overflow when the writer obeys full");

    // phase 2: overfill
    @(negedge wclk);
    phase2 = 1;
    wr_en = 0;
    for (int i = 0; i < D + 7; i++) begin
      @(negedge wclk); wr_en = 1; wr_data = w(rn + i);
    end
    @(negedge wclk); wr_en = 0;
    repeat (4) @(posedge wclk);
    check(full, "full after filling");
    check(overflows == 7, $sformatf("overflows %0d", overflows));
    repeat (4) @(posedge rclk);
    bad = 0;
    while (!empty) begin
      @(negedge rclk); rd_en = 1;
      @(posedge rclk); #1;
    end
    @(negedge rclk); rd_en = 0;
    check(rn == 600 + D, $sformatf("kept words drained: %0d", rn - 600));
    check(bad == 0, "kept words in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge rclk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
