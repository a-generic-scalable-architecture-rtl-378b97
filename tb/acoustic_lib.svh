// Testbench helpers (included inside testbench modules): a random acoustic
// library, its packed flash image, the log-add table image and a reference
// senone scorer written directly from Eq. 2.4/2.5 with the table quantisation
// of the log_add unit (difference >> 3 indexes a table of
// round(log_1.0003(1 + 1.0003^-(8k))) entries; beyond 4096 entries the
// correction is 0).
//
// Flash image layout (768-bit lines, 24 32-bit words per line, word i of a
// line at bits [32i+:32]): table lines 0..85 hold 48 16-bit entries each;
// the library starts at line LIB: number of senones, then per senone
// {id, record length}, and per mixture: mixture length (= dims + 2),
// weight, log reciprocal, then one {precision, mean} word per dimension.

localparam int MAXM = 8;
localparam int MAXD = 40;
typedef struct {
  int      id;
  int      nmix;
  int      weight [MAXM];
  int      recip  [MAXM];
  shortint mean   [MAXM][MAXD];
  int      prec   [MAXM][MAXD];
} sen_t;

int lb_tbl [4096];

function automatic void make_table();
  real lb;
  lb = $ln(1.0003);
  for (int k = 0; k < 4096; k++) begin
    real v;
    v = $ln(1.0 + $exp(-real'(8 * k) * lb)) / lb;
    lb_tbl[k] = $rtoi(v + 0.5);
  end
endfunction

function automatic longint ref_logadd(longint a, longint b);
  longint mx, d;
  if (a <= -(longint'(1) << 30)) return (b <= -(longint'(1) << 30)) ? -(longint'(1) << 30) : b;
  if (b <= -(longint'(1) << 30)) return a;
  mx = (a > b) ? a : b;
  d  = (a > b) ? a - b : b - a;
  if ((d >> 3) < 4096) return mx + lb_tbl[d >> 3];
  return mx;
endfunction

function automatic sen_t rand_senone(int id, int nmix, int feat_len);
  sen_t s;
  s.id = id; s.nmix = nmix;
  for (int m = 0; m < MAXM; m++) begin
    s.weight[m] = -$urandom_range(0, 8000);
    s.recip[m]  = $urandom_range(0, 3000);
    for (int d = 0; d < MAXD; d++) begin
      s.mean[m][d] = shortint'($urandom_range(0, 600)) - 300;
      s.prec[m][d] = $urandom_range(1000, 30000);
    end
  end
  return s;
endfunction

// reference score of one senone for one feature vector
function automatic longint ref_senone(sen_t s, shortint feat [MAXD], int feat_len);
  longint acc;
  acc = -(longint'(1) << 30);
  for (int m = 0; m < s.nmix; m++) begin
    longint dsum, msc;
    dsum = 0;
    for (int d = 0; d < feat_len; d++)
      dsum += ((longint'(feat[d]) - longint'(s.mean[m][d])) ** 2 * longint'(s.prec[m][d])) >>> 16;
    msc = longint'(s.weight[m]) + longint'(s.recip[m]) - dsum;
    acc = ref_logadd(acc, msc);
  end
  return acc;
endfunction

// append the words of one senone record
function automatic void senone_words(sen_t s, int feat_len, ref int unsigned w[$]);
  int len;
  len = s.nmix * (feat_len + 3);
  w.push_back({16'(s.id), 16'(len)});
  for (int m = 0; m < s.nmix; m++) begin
    w.push_back(32'(feat_len + 2));
    w.push_back(32'(s.weight[m]));
    w.push_back(32'(s.recip[m]));
    for (int d = 0; d < feat_len; d++) w.push_back({16'(s.prec[m][d]), 16'(s.mean[m][d])});
  end
endfunction
