// tb_bbt_ram: appends an ascending list of invalid group addresses and reads
// every entry back; unused entries must read as all ones; clear empties it;
// appends beyond the depth are dropped.
module tb_bbt_ram;
  localparam int D = 8, AW = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic clear = 0, app_en = 0;
  logic [AW-1:0] app_addr, rd_addr;
  logic [$clog2(D):0] rd_idx = 0, n_entries;
  bbt_ram #(.DEPTH(D), .AWIDTH(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int list[5] = '{2, 6, 10, 30, 44};

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    foreach (list[i]) begin
      app_en <= 1; app_addr <= AW'(list[i]); @(posedge clk);
    end
    app_en <= 0; @(posedge clk);
    check(n_entries == 5, "five entries");
    for (int i = 0; i < D; i++) begin
      rd_idx = ($clog2(D)+1)'(i); #1;
      check(rd_addr == ((i < 5) ? AW'(list[i]) : '1), $sformatf("entry %0d = %0d", i, rd_addr));
    end
    for (int i = 0; i < 5; i++) begin
      app_en <= 1; app_addr <= AW'(46 + 2 * i); @(posedge clk);
    end
    app_en <= 0; @(posedge clk);
    check(n_entries == D, "list stops at its depth");
    rd_idx = D - 1; #1;
    check(rd_addr == AW'(46 + 2 * 2), "last entry kept, later ones dropped");
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    rd_idx = 0; #1;
    check(n_entries == 0 && rd_addr == '1, "clear empties the list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
