// ft245_model: behavioural model of the FT245 USB FIFO chip as the FPGA sees
// it, for simulation only. The host side is a pair of queues: bytes queued
// with push_host() are offered to the FPGA (RXF# low while one waits), and
// bytes the FPGA writes are collected in from_fpga. A byte is read out on
// RD# low and removed when RD# returns high; a byte is taken from the bus on
// the falling edge of WR. After each transfer RXF# or TXE# goes high for
// RECOVER clocks. When tx_block is set the chip reports itself full (TXE#
// high), to model a host that is slow to collect data.
module ft245_model #(
  parameter int unsigned RECOVER = 2
) (
  input  logic       clk,
  input  logic       rd_n,
  input  logic       wr,
  input  logic [7:0] d_from_fpga,
  output logic [7:0] d_to_fpga,
  output logic       rxf_n,
  output logic       txe_n
);
  byte unsigned to_fpga[$];
  byte unsigned from_fpga[$];
  int  rx_hold = 0, tx_hold = 0;
  bit  tx_block = 0;
  logic rd_q = 1'b1, wr_q = 1'b0;

  // queue state mirrored into plain variables so the pins update with them
  bit           have = 0;
  byte unsigned head = 0;

  task automatic push_host(byte unsigned b);
    to_fpga.push_back(b);
    have = 1'b1;
    head = to_fpga[0];
  endtask

  assign rxf_n     = !(have && rx_hold == 0);
  assign txe_n     = !(tx_hold == 0 && !tx_block);
  assign d_to_fpga = (!rd_n && have) ? head : 8'h00;

  always @(posedge clk) begin
    if (rx_hold > 0) rx_hold--;
    if (tx_hold > 0) tx_hold--;
    if (!rd_q && rd_n) begin
      void'(to_fpga.pop_front());
      have = to_fpga.size() > 0;
      if (have) head = to_fpga[0];
      rx_hold = RECOVER;
    end
    if (wr_q && !wr) begin
      from_fpga.push_back(d_from_fpga);
      tx_hold = RECOVER;
    end
    rd_q <= rd_n;
    wr_q <= wr;
  end
endmodule
