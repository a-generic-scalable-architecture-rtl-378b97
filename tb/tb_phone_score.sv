// Self-checking test of phone_score: random and corner operands against a
// reference add-compare-select written with 64-bit integers.
module tb_phone_score;
  import asr_pkg::*;
  score_t own, left, tps, tpi, sen, score;
  logic   fl;
  int checks = 0, failures = 0;

  phone_score dut (.own, .left, .tp_self(tps), .tp_in(tpi), .senone(sen), .score, .from_left(fl));

  function automatic longint ref_add(longint a, longint b);
    longint s;
    if (a <= longint'(NEG_INF) || b <= longint'(NEG_INF)) return longint'(NEG_INF);
    s = a + b;
    if (s <= longint'(NEG_INF)) return longint'(NEG_INF);
    if (s >= longint'(SCORE_MAX)) return longint'(SCORE_MAX);
    return s;
  endfunction

  task automatic check1();
    longint ps, pl, exp_s;
    #1;
    ps = ref_add(longint'(own), longint'(tps));
    pl = ref_add(longint'(left), longint'(tpi));
    exp_s = ref_add((pl > ps) ? pl : ps, longint'(sen));
    checks++;
    if (longint'(score) != exp_s || fl != (pl > ps)) begin
      failures++;
      $display("FAIL own=%0d left=%0d tps=%0d tpi=%0d sen=%0d got=%0d exp=%0d", own, left, tps, tpi, sen, score, exp_s);
    end
  endtask

  initial begin
    // worked example: max(-100-5, -90-20) + -7 = -112
    own = -100; left = -90; tps = -5; tpi = -20; sen = -7; #1;
    checks++; if (score != -112 || fl) begin failures++; $display("FAIL example %0d", score); end
    // left path wins
    own = -1000; left = -10; tps = -5; tpi = -5; sen = -1; #1;
    checks++; if (score != -16 || !fl) begin failures++; $display("FAIL example2 %0d", score); end
    // unreached own state
    own = NEG_INF; left = -50; check1();
    own = NEG_INF; left = NEG_INF; check1();
    for (int i = 0; i < 2000; i++) begin
      own  = (i % 7 == 0) ? NEG_INF : -score_t'($urandom_range(0, 2000000));
      left = (i % 5 == 0) ? NEG_INF : -score_t'($urandom_range(0, 2000000));
      tps  = -score_t'($urandom_range(0, 30000));
      tpi  = -score_t'($urandom_range(0, 30000));
      sen  = -score_t'($urandom_range(0, 500000));
      if (i % 97 == 0) own = NEG_INF + 5;
      check1();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
