// Behavioural model of a NOR flash array read port (not synthesizable).
// Accepts one line read per cycle (req with addr); the line comes back on
// rvalid/rdata LAT cycles later (8 cycles = 80 ns at 100 MHz). Contents are
// a sparse associative array written by the testbench; unwritten lines read
// as zero.
module nor_flash_model #(
  parameter int W   = 256,
  parameter int LAT = 8
) (
  input  logic         clk,
  input  logic         req,
  input  logic [31:0]  addr,
  output logic         rvalid,
  output logic [W-1:0] rdata
);
  logic [W-1:0] mem [int unsigned];
  logic         v [LAT];
  logic [W-1:0] d [LAT];
  int unsigned  reads = 0;

  initial begin
    for (int i = 0; i < LAT; i++) begin v[i] = 1'b0; d[i] = '0; end
  end

  always_ff @(posedge clk) begin
    v[0] <= req;
    d[0] <= (req && mem.exists(addr)) ? mem[addr] : '0;
    if (req) reads <= reads + 1;
    for (int i = 1; i < LAT; i++) begin v[i] <= v[i-1]; d[i] <= d[i-1]; end
  end
  assign rvalid = v[LAT-1];
  assign rdata  = d[LAT-1];
endmodule
