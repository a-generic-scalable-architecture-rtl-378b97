// Behavioural model of the active list DRAM (not synthesizable).
// One request per cycle; writes take effect at once, reads return in order
// LAT cycles later. Storage is a sparse associative array of entries.
module dram_model
  import asr_pkg::*;
#(
  parameter int LAT = 6
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  al_entry_t   wdata,
  output logic        rvalid,
  output al_entry_t   rdata
);
  al_entry_t   mem [int unsigned];
  logic        v [LAT];
  al_entry_t   d [LAT];
  int unsigned n_reads = 0, n_writes = 0;

  initial begin
    for (int i = 0; i < LAT; i++) begin v[i] = 1'b0; d[i] = '0; end
  end

  always @(posedge clk) begin
    v[0] <= req && !we;
    d[0] <= (req && !we && mem.exists(addr)) ? mem[addr] : '0;
    if (req && we) begin mem[addr] = wdata; n_writes <= n_writes + 1; end
    if (req && !we) n_reads <= n_reads + 1;
    for (int i = 1; i < LAT; i++) begin v[i] <= v[i-1]; d[i] <= d[i-1]; end
  end
  assign rvalid = v[LAT-1];
  assign rdata  = d[LAT-1];
endmodule
