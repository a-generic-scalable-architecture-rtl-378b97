// Self-checking test of feature_buffer: fills one bank with two random
// frames while the other bank is being read, swaps, and checks every 4-lane
// read window (including the zero padding past dimension 39) against a copy
// kept here. Checks that writes never disturb the bank being read.
module tb_feature_buffer;
  logic clk = 0, rst_n = 0, we = 0, swap = 0;
  logic [0:0] wr_frame = 0;
  logic [5:0] wr_idx = 0, rd_base = 0;
  logic signed [15:0] wr_data = 0;
  logic signed [15:0] rd_feat [2][4];
  logic signed [15:0] model [2][2][64];   // [bank][frame][dim]
  int rb = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  feature_buffer dut (.*);

  task automatic check_all();
    for (int base = 0; base < 44; base += 4) begin
      rd_base = 6'(base);
      #1;
      for (int f = 0; f < 2; f++)
        for (int l = 0; l < 4; l++) begin
          logic signed [15:0] e;
          e = (base + l < 39) ? model[rb][f][base + l] : 16'sd0;
          checks++;
          if (rd_feat[f][l] !== e) begin
            failures++;
            $display("FAIL bank %0d f %0d dim %0d got %0d exp %0d", rb, f, base + l, rd_feat[f][l], e);
          end
        end
    end
  endtask

  initial begin
    for (int b = 0; b < 2; b++) for (int f = 0; f < 2; f++) for (int i = 0; i < 64; i++) model[b][f][i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check_all();
    for (int blk = 0; blk < 6; blk++) begin
      // fill the other bank; the read bank must stay unchanged meanwhile
      for (int f = 0; f < 2; f++)
        for (int i = 0; i < 39; i++) begin
          logic signed [15:0] v;
          v = 16'($urandom);
          @(negedge clk);
          we = 1; wr_frame = 1'(f); wr_idx = 6'(i); wr_data = v;
          model[1 - rb][f][i] = v;
          @(posedge clk);
          #1 we = 0;
        end
      check_all();
      @(negedge clk); swap = 1; @(posedge clk); #1 swap = 0;
      rb = 1 - rb;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
