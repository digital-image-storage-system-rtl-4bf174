// tb_word_to_byte: checks that each 16-bit word leaves as its low byte then
// its high byte, with random stalls on both sides, and that no byte is lost.
module tb_word_to_byte;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] in_data; logic in_valid = 0, in_ready;
  logic [7:0] out_data; logic out_valid, out_ready = 0;
  word_to_byte dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  localparam int N = 200;
  function automatic logic [15:0] w(int i); return 16'(i * 4099 + 7); endfunction
  assign in_data = w(sent);

  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (out_valid && out_ready) begin
      logic [15:0] e;
      e = w(got / 2);
      checks++;
      if (out_data != ((got % 2) ? e[15:8] : e[7:0])) begin
        failures++; $display("FAIL byte %0d: %h", got, out_data);
      end
      got <= got + 1;
    end
    in_valid  <= (sent + ((in_valid && in_ready) ? 1 : 0)) < N && ($urandom % 3 != 0);
    out_ready <= ($urandom % 3 != 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    wait (got == 2 * N);
    repeat (20) @(posedge clk);
    checks++;
    if (got != 2 * N) begin failures++; $display("FAIL count %0d", got); end
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
