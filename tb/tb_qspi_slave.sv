// Self-checking test of qspi_slave: random command frames of 1..20 bytes
// are sent by the testbench SPI master and must arrive in order on rx_valid /
// rx_data with one frame_end per frame; then response frames with tx_mode
// set must return a random byte sequence, nibble by nibble, with one
// tx_take per byte; io_oe must be off while receiving and after cs_n rises.
module tb_qspi_slave;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, rx_valid, frame_end, tx_mode = 0, tx_take;
  logic [3:0] io_in = 0, io_out, io_oe;
  logic [7:0] rx_data, tx_data = 0;
  int checks = 0, failures = 0, n_fe = 0, bad_oe = 0;
  logic [7:0] rxq[$], txq[$];

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  qspi_slave dut (.*);
  `include "spi_master.svh"

  always @(posedge clk) begin
    if (rx_valid) rxq.push_back(rx_data);
    if (frame_end) n_fe++;
    if (tx_take) tx_data <= (txq.size() > 0) ? txq.pop_front() : 8'h00;
    if (io_oe != 0 && rx_valid) bad_oe++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      logic [7:0] sent[$];
      int n;
      n = $urandom_range(1, 20);
      rxq.delete(); sent.delete();
      spi_begin();
      for (int i = 0; i < n; i++) begin sent.push_back(8'($urandom)); spi_byte(sent[$]); end
      spi_end();
      checks++;
      if (rxq != sent || n_fe != f + 1) begin failures++; $display("FAIL frame %0d: %0d bytes got %0d, frame_end %0d", f, n, rxq.size(), n_fe); end
    end
    for (int f = 0; f < 10; f++) begin
      logic [7:0] exp_q[$], b;
      int n;
      n = $urandom_range(1, 30);
      txq.delete();
      for (int i = 0; i < n + 1; i++) txq.push_back(8'($urandom));
      exp_q = txq;
      tx_data = txq.pop_front();
      spi_begin();
      @(negedge clk); tx_mode = 1;
      for (int i = 0; i < n; i++) begin
        spi_read_byte(b);
        checks++;
        if (b != exp_q[i]) begin failures++; $display("FAIL tx byte %0d got %h exp %h", i, b, exp_q[i]); end
      end
      spi_end();
      tx_mode = 0;
      checks++;
      if (io_oe != 0) begin failures++; $display("FAIL io_oe still on"); end
    end
    checks++;
    if (bad_oe != 0) begin failures++; $display("FAIL io_oe while not responding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
