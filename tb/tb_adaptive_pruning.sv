// Self-checking test of adaptive_pruning (Eq. 4.1 beam adaptation).
// Drives a sequence of frames with random active counts and best scores and
// compares beam and threshold, one cycle after each frame_end, with a
// reference model: beam' = beam + (1.1*Nset - N)/5 when N > Nset, else the
// initial beam, limited to 0..initial beam; threshold = best - beam'.
module tb_adaptive_pruning;
  import asr_pkg::*;
  logic clk = 0, rst_n = 0, utt_start = 0, frame_end = 0;
  logic [31:0] n_active, n_set;
  score_t init_beam, best, beam, threshold;
  int checks = 0, failures = 0;
  longint rbeam, rthr;
  int n_shrink = 0, n_reset = 0, n_floor = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  adaptive_pruning dut (.*);

  task automatic chk(string what);
    checks++;
    if (longint'(beam) != rbeam || longint'(threshold) != rthr) begin
      failures++;
      $display("FAIL %s: beam %0d/%0d thr %0d/%0d", what, beam, rbeam, threshold, rthr);
    end
  endtask

  initial begin
    n_set = 1000; init_beam = 614000; n_active = 0; best = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); utt_start <= 1; @(posedge clk); utt_start <= 0; @(posedge clk);
    rbeam = 614000; rthr = longint'(NEG_INF); chk("utt_start");
    for (int f = 0; f < 400; f++) begin
      longint tol, nb;
      n_active <= (f % 50 < 25) ? $urandom_range(1000, 2000000) : $urandom_range(0, 1200);
      best <= (f % 37 == 3) ? NEG_INF : -score_t'($urandom_range(0, 5000000));
      frame_end <= 1;
      @(posedge clk);
      frame_end <= 0;
      tol = longint'(n_set) + longint'(n_set) / 10;
      if (longint'(n_active) <= longint'(n_set)) begin nb = init_beam; n_reset++; end
      else begin
        nb = rbeam + (tol - longint'(n_active)) / 5;
        if (nb < rbeam) n_shrink++;
      end
      if (nb > init_beam) nb = init_beam;
      if (nb < 0) begin nb = 0; n_floor++; end
      rbeam = nb;
      rthr = (best <= NEG_INF) ? longint'(NEG_INF) : longint'(best) - nb;
      @(negedge clk);
      chk("frame");
    end
    if (n_shrink == 0 || n_reset == 0 || n_floor == 0) begin
      failures++; $display("FAIL coverage shrink=%0d reset=%0d floor=%0d", n_shrink, n_reset, n_floor);
    end
    $display("shrink=%0d reset=%0d floor=%0d", n_shrink, n_reset, n_floor);
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
