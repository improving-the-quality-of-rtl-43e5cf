// ro_predict.svh: reference model of the simulated oscillator periods.
//
// Included inside testbench modules. Recomputes, independently of the RTL,
// the period of oscillator i of a bank in configuration c from the delay
// recipe of the oscillator model: half period = 700 ps AND gate + systematic
// offset + for each stage (600 ps inverter +- hashed offset of up to 30 ps +
// 400 ps mux). The systematic offset of oscillator i in a bank of n is
// amp * (2i - n + 1)^2 / (n - 1)^2 picoseconds.

function automatic int unsigned pr_hash(int unsigned s, int unsigned k);
  int unsigned x;
  x = (s * 32'h9E3779B1) ^ (k * 32'h85EBCA6B);
  x = x ^ (x >> 15);
  x = x * 32'h2C1B3C6D;
  x = x ^ (x >> 12);
  return x;
endfunction

function automatic int pr_corr_ps(int i, int n, int amp);
  int num;
  num = 2 * i - n + 1;
  if (n < 2) return 0;
  return (amp * num * num) / ((n - 1) * (n - 1));
endfunction

function automatic int pr_period_ps(int unsigned seed, int corr, int c);
  int d;
  d = 700 + corr;
  for (int st = 0; st < 3; st++) begin
    int sel;
    sel = (c >> (2 - st)) & 1;
    d += 600 + int'(pr_hash(seed, 2 * st + sel) % 61) - 30 + 400;
  end
  return 2 * d;
endfunction

// Expected edge count of a window of win_ns nanoseconds.
function automatic real pr_count(int unsigned seed, int corr, int c, real win_ns);
  return win_ns * 1000.0 / real'(pr_period_ps(seed, corr, c));
endfunction
