// Testbench quad-SPI master (included inside testbench modules that declare
// clk, sclk, cs_n, io_in, io_out). sclk is slow compared with clk (one half
// period = SPI_H clk cycles), as the oversampling slave requires. Writes put
// the nibble on io_in while sclk is low and raise sclk; reads sample io_out
// just before each rising edge, high nibble first.
localparam int SPI_H = 6;

task automatic spi_begin();
  @(negedge clk); cs_n = 0; sclk = 0;
  repeat (SPI_H) @(negedge clk);
endtask

task automatic spi_end();
  repeat (SPI_H) @(negedge clk);
  cs_n = 1;
  repeat (2 * SPI_H) @(negedge clk);
endtask

task automatic spi_byte(input logic [7:0] b);
  for (int n = 1; n >= 0; n--) begin
    io_in = b[4*n +: 4];
    repeat (SPI_H) @(negedge clk);
    sclk = 1;
    repeat (SPI_H) @(negedge clk);
    sclk = 0;
  end
endtask

task automatic spi_word(input logic [31:0] w);
  for (int k = 3; k >= 0; k--) spi_byte(w[8*k +: 8]);
endtask

task automatic spi_read_byte(output logic [7:0] b);
  for (int n = 1; n >= 0; n--) begin
    repeat (SPI_H) @(negedge clk);
    b[4*n +: 4] = io_out;
    sclk = 1;
    repeat (SPI_H) @(negedge clk);
    sclk = 0;
  end
endtask

task automatic spi_cmd(input logic [7:0] op, input logic [31:0] arg);
  spi_begin(); spi_byte(op); spi_word(arg); spi_end();
endtask
