// Quad SPI slave: the accelerator's link to the host CPU.
//
// The CPU is the master. A command is one chip-select frame (cs_n low). Four
// IO lines carry one nibble per sclk rising edge, high nibble first, so a
// byte takes two sclk cycles. Received bytes leave on rx_valid/rx_data;
// frame_end pulses when cs_n rises. For a response the control unit raises
// tx_mode: the slave then drives the lines (io_oe) with the high nibble of
// tx_data at once and moves to the next nibble after every rising edge
// the master sampled, taking a new byte from tx_data (tx_take pulse) every
// second nibble. There is no acknowledge, as in the paper.
//
// sclk, cs_n and io_in are sampled by the system clock through two-flop
// synchronisers, so sclk may be at most clk/10. The paper runs the SPI at
// 50 MHz beside a 100 MHz core, which would need a separate sclk domain;
// oversampling is this design's simplification.
module qspi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       cs_n,
  input  logic [3:0] io_in,
  output logic [3:0] io_out,
  output logic       io_oe,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       frame_end,
  input  logic       tx_mode,
  input  logic [7:0] tx_data,
  output logic       tx_take
);
  logic [1:0] sclk_s, cs_s;
  logic [3:0] io_s1, io_s2;
  logic       sclk_d, cs_d;
  logic       half;          // one nibble of the byte received / sent
  logic [3:0] hi;
  logic [7:0] tx_byte;
  logic       tx_on;

  logic rise;
  assign rise = sclk_s[1] && !sclk_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= 2'b11; io_s1 <= '0; io_s2 <= '0; sclk_d <= 1'b0; cs_d <= 1'b1;
      half <= 1'b0; hi <= '0; rx_valid <= 1'b0; rx_data <= '0; frame_end <= 1'b0;
      tx_byte <= '0; tx_on <= 1'b0; tx_take <= 1'b0; io_out <= '0; io_oe <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      io_s1  <= io_in;
      io_s2  <= io_s1;
      sclk_d <= sclk_s[1];
      cs_d   <= cs_s[1];
      rx_valid  <= 1'b0;
      frame_end <= 1'b0;
      tx_take   <= 1'b0;

      if (cs_s[1]) begin
        half <= 1'b0; tx_on <= 1'b0; io_oe <= 1'b0;
        if (!cs_d) frame_end <= 1'b1;
      end else if (tx_mode && !tx_on) begin
        // start of the response: present the first byte
        tx_on   <= 1'b1;
        tx_byte <= tx_data;
        tx_take <= 1'b1;
        io_out  <= tx_data[7:4];
        io_oe   <= 1'b1;
        half    <= 1'b0;
      end else if (rise) begin
        if (tx_on) begin
          if (!half) begin
            io_out <= tx_byte[3:0];
            half   <= 1'b1;
          end else begin
            tx_byte <= tx_data;
            tx_take <= 1'b1;
            io_out  <= tx_data[7:4];
            half    <= 1'b0;
          end
        end else begin
          if (!half) begin
            hi   <= io_s2;
            half <= 1'b1;
          end else begin
            rx_data  <= {hi, io_s2};
            rx_valid <= 1'b1;
            half     <= 1'b0;
          end
        end
      end
    end
  end
endmodule
