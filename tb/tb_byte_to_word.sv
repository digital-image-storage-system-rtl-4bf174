// tb_byte_to_word: checks that byte pairs become 16-bit words, first byte
// low, under random stalls on both sides, and that no byte is lost or
// duplicated.
module tb_byte_to_word;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] in_data; logic in_valid = 0, in_ready;
  logic [15:0] out_data; logic out_valid, out_ready = 0;
  byte_to_word dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  localparam int N = 400;
  function automatic logic [7:0] b(int i); return 8'(i * 37 + 11); endfunction
  assign in_data = b(sent);

  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != {b(2*got+1), b(2*got)}) begin
        failures++; $display("FAIL word %0d: %h", got, out_data);
      end
      got <= got + 1;
    end
    in_valid  <= (sent + ((in_valid && in_ready) ? 1 : 0)) < N && ($urandom % 3 != 0);
    out_ready <= ($urandom % 3 != 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    wait (got == N / 2);
    repeat (20) @(posedge clk);
    checks++;
    if (got != N / 2) begin failures++; $display("FAIL count %0d", got); end
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
