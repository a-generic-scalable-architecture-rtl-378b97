// Self-checking test of dram_ctrl with the behavioural DRAM model. Several
// frame passes: the list written in one pass is read back in the next, with
// lengths that are and are not multiples of the page size, random consumer
// back-pressure and random producer gaps, and a final flush. Checks order
// and contents of every entry, wr_count, that DRAM traffic is in whole-page
// bursts except the final partial page, and that the page counters advance.
module tb_dram_ctrl;
  import asr_pkg::*;
  localparam int PG = 16;
  logic clk = 0, rst_n = 0, start = 0, flush = 0;
  logic [31:0] rd_base = 0, rd_count = 0, wr_base = 0, wr_count, n_rd_pages, n_wr_pages;
  logic rd_valid, rd_take = 0, rd_done, wr_valid = 0, wr_ready, flushed;
  al_entry_t rd_entry, wr_entry = '0;
  logic dr_req, dr_we, dr_rvalid;
  logic [31:0] dr_addr;
  al_entry_t dr_wdata, dr_rdata;
  int checks = 0, failures = 0, cyc = 0;
  al_entry_t prev[$], cur[$];
  int n_switch = 0; logic last_we = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) cyc <= cyc + 1;
  dram_ctrl #(.PAGE(PG)) dut (.*);
  dram_model #(.LAT(6)) mem (.clk, .req(dr_req), .we(dr_we), .addr(dr_addr), .wdata(dr_wdata),
                             .rvalid(dr_rvalid), .rdata(dr_rdata));

  always @(posedge clk) if (dr_req) begin
    if (dr_we != last_we) n_switch++;
    last_we <= dr_we;
  end

  task automatic pass(int n_new, int base_r, int base_w);
    int got = 0, sent = 0, t0;
    @(negedge clk);
    rd_base = base_r; rd_count = prev.size(); wr_base = base_w; start = 1;
    @(negedge clk); start = 0;
    $display("pass: read %0d write %0d cyc %0d", prev.size(), n_new, cyc);
    t0 = cyc;
    while ((got < prev.size() || sent < n_new) && cyc - t0 < 20000) begin
      // consumer
      rd_take = rd_valid && ($urandom_range(0, 3) != 0);
      if (rd_take) begin
        checks++;
        if (rd_entry != prev[got]) begin failures++; $display("FAIL entry %0d of %0d got %h exp %h", got, prev.size(), rd_entry.word, prev[got].word); end
        got++;
      end
      // producer
      wr_valid = 0;
      if (sent < n_new && $urandom_range(0, 2) != 0) begin
        wr_entry = al_entry_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        wr_valid = 1;
      end
      if (wr_valid && wr_ready) begin cur.push_back(wr_entry); sent++; end
      @(posedge clk);
      @(negedge clk);
      rd_take = 0; wr_valid = 0;
    end
    checks++;
    if (!rd_done) begin failures++; $display("FAIL rd_done low after %0d/%0d", got, prev.size()); end
    flush = 1;
    t0 = cyc;
    while (!flushed && cyc - t0 < 2000) @(negedge clk);
    flush = 0;
    checks++;
    if (!flushed || wr_count != 32'(n_new)) begin failures++; $display("FAIL flush %b count %0d exp %0d", flushed, wr_count, n_new); end
    prev = cur; cur.delete();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    pass(40, 0, 1000);          // empty old list, 40 new
    pass(PG * 4, 1000, 0);      // read 40, write 64
    pass(7, 0, 1000);
    pass(0, 1000, 0);
    pass(100, 0, 1000);
    pass(33, 1000, 0);
    checks++;
    if (n_rd_pages == 0 || n_wr_pages == 0 || n_switch < 4) begin
      failures++; $display("FAIL pages rd %0d wr %0d switches %0d", n_rd_pages, n_wr_pages, n_switch);
    end
    $display("pages read %0d written %0d, read/write switches %0d", n_rd_pages, n_wr_pages, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
