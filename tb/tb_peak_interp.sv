// tb_peak_interp: self-checking test of the peak detector with sinc
// interpolation at its default size (141 lags, 66-bit magnitudes, F = 8
// steps per sample, H = 4 taps each side). Each trial streams a magnitude
// curve (a sinc-shaped main lobe at a random fractional position over a noise
// floor, at a random scale) into the coarse search and keeps it in a memory
// model with a registered read. Expected results are worked out here in
// floating point: the integer peak must match exactly, the chosen offset must
// reach the largest interpolated value within 1e-5, and the amplitude must
// match that value within 1e-5; ToA = lag*8 + offset - 4. Peaks at the first
// and last lag exercise the zero fill outside the curve. The latency of
// (F+1)*(2H+1)+2 clocks from start to done is checked.
module tb_peak_interp;
  localparam int WL = 66, NLAGS = 141, F = 8, H = 4, NT = 2 * H + 1;
  localparam int LAGW = 8, TOA_W = LAGW + 3 + 2;

  logic clk = 0, rst_n = 0, clear = 0;
  logic mag_valid = 0;
  logic [LAGW-1:0] mag_lag = '0;
  logic [WL-1:0] mag_in = '0;
  logic start = 0;
  logic [LAGW-1:0] mag_raddr;
  logic [WL-1:0] mag_rdata;
  logic busy, done;
  logic [LAGW-1:0] peak_lag;
  logic signed [TOA_W-1:0] toa;
  logic [WL-1:0] peak_amp;

  int checks = 0, failures = 0;
  int off_seen [F + 1];

  peak_interp #(.WL(WL), .NLAGS(NLAGS), .F(F), .H(H)) dut (.*);

  always #5 clk = ~clk;

  longint mags [NLAGS];
  always_ff @(posedge clk) mag_rdata <= WL'(mags[mag_raddr]);

  real pi = 3.14159265358979323846;
  function automatic real sinc(real t);
    return (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
  endfunction

  function automatic real interp(int p, int o);
    real y = 0.0;
    real d = (real'(o) - real'(F / 2)) / real'(F);
    for (int j = -H; j <= H; j++)
      if (p + j >= 0 && p + j < NLAGS) y += real'(mags[p + j]) * sinc(d - real'(j));
    return y;
  endfunction

  task automatic trial(int centre);
    real pos, scale, best, yo;
    int p, lat;
    scale = real'($urandom_range(1, 1 << 20)) * 1048576.0;
    pos = real'(centre) + real'($urandom_range(0, 999)) / 1000.0 - 0.5;
    for (int k = 0; k < NLAGS; k++) begin
      real v = $sqrt(sinc(real'(k) - pos) ** 2) + real'($urandom_range(0, 1000)) / 20000.0;
      mags[k] = longint'(v * scale);
    end
    p = 0;
    for (int k = 1; k < NLAGS; k++) if (mags[k] > mags[p]) p = k;
    @(posedge clk); #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    for (int k = 0; k < NLAGS; k++) begin
      mag_valid = 1; mag_lag = LAGW'(k); mag_in = WL'(mags[k]);
      @(posedge clk); #1;
      mag_valid = 0;
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    start = 1;
    @(posedge clk); #1 start = 0;
    lat = 0;
    while (!done) begin @(posedge clk); #1; lat++; end
    best = interp(p, 0);
    for (int o = 1; o <= F; o++) if (interp(p, o) > best) best = interp(p, o);
    yo = interp(p, int'(toa) - p * F + F / 2);
    checks++;
    if (int'(peak_lag) != p) begin failures++; $display("FAIL: peak lag %0d exp %0d", peak_lag, p); end
    checks++;
    if (int'(toa) - p * F + F / 2 < 0 || int'(toa) - p * F + F / 2 > F || yo < best - 1e-5 * best) begin
      failures++; $display("FAIL: toa %0d (lag %0d) y %0.1f best %0.1f", toa, p, yo, best);
    end else off_seen[int'(toa) - p * F + F / 2]++;
    checks++;
    if ($sqrt((real'(peak_amp[63:0]) - yo) ** 2) > 1e-5 * yo + 4.0) begin
      failures++; $display("FAIL: amplitude %0d exp %0.1f", peak_amp, yo);
    end
    checks++;
    if (lat != (F + 1) * NT + 2) begin failures++; $display("FAIL: latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    trial(0);
    trial(NLAGS - 1);
    trial(2);
    for (int n = 0; n < 30; n++) trial($urandom_range(5, NLAGS - 6));
    // the fine search must have landed on several different offsets
    checks++;
    begin
      automatic int used = 0;
      for (int o = 0; o <= F; o++) if (off_seen[o] > 0) used++;
      if (used < 4) begin failures++; $display("FAIL: only %0d offsets used", used); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
