// tb_data_fifo: drives random writes and reads into a 32-word FIFO and
// compares every word read with a reference queue; checks the full, empty
// and half-full flags and the level against the reference on every clock.
module tb_data_fifo;
  localparam int D = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] wr_data, rd_data;
  logic wr_en = 0, rd_en = 0, full, empty, half_full;
  logic [$clog2(D):0] count;
  data_fifo #(.DEPTH(D), .WIDTH(16)) dut (.*);

  int checks = 0, failures = 0, hf_seen = 0, full_seen = 0;
  logic [15:0] model[$];
  int wn = 0;
  assign wr_data = 16'(wn * 977 + 3);

  always @(posedge clk) if (!rst) begin
    checks++;
    if (count != model.size() || full != (model.size() == D) || empty != (model.size() == 0)
        || half_full != (model.size() >= D / 2)) begin
      failures++; $display("FAIL flags: count %0d model %0d", count, model.size());
    end
    if (half_full) hf_seen++;
    if (full) full_seen++;
    if (rd_en) begin
      checks++;
      if (rd_data != model[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, model[0]); end
      void'(model.pop_front());
    end
    if (wr_en) begin model.push_back(wr_data); wn <= wn + 1; end
  end

  int phase_bias;
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      phase_bias = (i / 500) % 2;     // alternate filling and draining
      @(negedge clk);
      wr_en = !full  && ($urandom % 4 < (phase_bias ? 1 : 3));
      rd_en = !empty && ($urandom % 4 < (phase_bias ? 3 : 1));
    end
    @(negedge clk); wr_en = 0; rd_en = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (hf_seen == 0 || full_seen == 0) begin failures++; $display("FAIL flags never set"); end
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
