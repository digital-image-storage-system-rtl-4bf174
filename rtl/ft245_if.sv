// ft245_if: strobe controller for the FT245-style USB FIFO chip.
//
// Read side: when the chip signals data with RXF# low and the previous byte
// has been taken, the controller pulls OE# low, then RD# low; the byte is
// sampled at the end of the RD# low time, RD# and OE# return high and the
// byte is held on rx_data/rx_valid until rx_ready takes it. Write side: when the
// chip can accept data (TXE# low) and a byte waits (tx_valid), the byte is
// driven onto D0..D7, WR is held high for STROBE cycles and dropped, which
// hands the byte to the chip; tx_ready pulses for one cycle when it is done.
// Reads and writes never overlap; when both are possible the read goes first
// (RXF# has priority). After each transfer the controller waits GAP cycles
// before sampling RXF#/TXE# again, so the chip has time to update them.
// The order of the strobes follows the published system description; the pulse
// widths STROBE and GAP (in clocks) are this design's choices, since no
// timing values are given. The data bus is split into d_i, d_o and d_oe for a
// bidirectional pad. One clock, synchronous active-high reset; RXF#/TXE# are
// expected to be synchronous to clk.
module ft245_if #(
  parameter int unsigned STROBE = 2,
  parameter int unsigned GAP    = 2
) (
  input  logic       clk,
  input  logic       rst,
  // FT245 pins
  input  logic       rxf_n,
  input  logic       txe_n,
  output logic       rd_n,
  output logic       oe_n,
  output logic       wr,
  input  logic [7:0] d_i,
  output logic [7:0] d_o,
  output logic       d_oe,
  // received bytes
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic       rx_ready,
  // bytes to send
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready
);
  typedef enum logic [2:0] {S_IDLE, S_OE, S_RD, S_WR, S_WR_END, S_GAP} state_e;
  state_e state;
  logic [7:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      rd_n     <= 1'b1;
      oe_n     <= 1'b1;
      wr       <= 1'b0;
      d_o      <= '0;
      d_oe     <= 1'b0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      tx_ready <= 1'b0;
    end else begin
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      tx_ready <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!rxf_n && !rx_valid) begin
            oe_n  <= 1'b0;
            state <= S_OE;
          end else if (!txe_n && tx_valid) begin
            d_o   <= tx_data;
            d_oe  <= 1'b1;
            wr    <= 1'b1;
            cnt   <= 8'(STROBE - 1);
            state <= S_WR;
          end
        end
        S_OE: begin
          rd_n  <= 1'b0;
          cnt   <= 8'(STROBE - 1);
          state <= S_RD;
        end
        S_RD: begin
          if (cnt == 0) begin
            rx_data  <= d_i;
            rx_valid <= 1'b1;
            rd_n     <= 1'b1;
            oe_n     <= 1'b1;
            cnt      <= 8'(GAP);
            state    <= S_GAP;
          end else cnt <= cnt - 1'b1;
        end
        S_WR: begin
          if (cnt == 0) begin
            wr    <= 1'b0;      // falling edge of WR hands the byte over
            state <= S_WR_END;
          end else cnt <= cnt - 1'b1;
        end
        S_WR_END: begin
          d_oe     <= 1'b0;
          tx_ready <= 1'b1;
          cnt      <= 8'(GAP);
          state    <= S_GAP;
        end
        S_GAP: begin
          if (cnt == 0) state <= S_IDLE;
          else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The chip's data bus is never driven by both sides during a read.
  a_no_contention: assert property (@(posedge clk) disable iff (rst) !(d_oe && !oe_n));
  // A read strobe is only issued with the output enable already low.
  a_rd_after_oe:   assert property (@(posedge clk) disable iff (rst) !rd_n |-> !oe_n);
endmodule
