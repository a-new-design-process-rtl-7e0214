// tb_atb_relaxed_format: the end-to-end burst test of tb_analyze_traffic_burst
// repeated with the relaxed 52.2 word-length result (IWL = 52, FWL = 2,
// 54-bit words after the correlator) instead of the default 62.4. Same four
// bursts, same independent model and the same checks; only the fixed-point
// format of correlation values, magnitudes, amplitude and valley differs.
module tb_atb_relaxed_format;
  import atb_pkg::*;
  localparam int NLAGS = BURST_LEN - REF_LEN + 1;
  localparam int F = 8, H = 4, NEAR = 2, FAR = 5, ITER = 32;
  localparam int FULL_W = CIC_FULL_W;
  localparam int FWL = 2, DW = 52 + 2;   // P4 format under test

  logic clk = 0, rst_n = 0;
  logic [7:0] dec_rate = 8'd128;
  logic adc_valid = 0;
  logic signed [ADC_W-1:0] adc_i = '0, adc_q = '0;
  logic samp_valid;
  iq_samp_t samp;
  logic ref_we = 0;
  logic [3:0] ref_addr = '0;
  logic signed [REF_W-1:0] ref_i = '0, ref_q = '0;
  logic start = 0, busy, done;
  logic [7:0] peak_lag;
  logic signed [12:0] toa;
  logic [DW-1:0] peak_amp, valley;
  logic [3:0] valley_count;
  logic signed [DW-1:0] chan_i [CHAN_TAPS], chan_q [CHAN_TAPS];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rate_switch = 0, n_bursts = 0, n_fold = 0, n_offcentre = 0;
  int n_valley_cut = 0, n_zero_taps = 0, n_busy_start = 0, n_ref_load = 0;

  analyze_traffic_burst #(.IWL(52), .FWL(2)) dut (.*);

  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- CIC model ----------------
  longint h [];
  longint hist_i [$], hist_q [$];
  longint exp_i [$], exp_q [$];
  int     exp_g [$];
  int     rate_now = 128, in_grp = 0, groups = 0;

  function automatic void make_h(int r);
    longint t [];
    h = new[1];
    h[0] = 1;
    for (int s = 0; s < CIC_N; s++) begin
      t = new[h.size() + r - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int k = 0; k < r; k++) t[i + k] += h[i];
      h = t;
    end
  endfunction

  function automatic longint cic_out(ref longint hist [$]);
    longint acc = 0;
    int base = hist.size() - 1 - (CIC_N - 1);
    for (int k = 0; k < h.size(); k++)
      if (base - k >= 0) acc += h[k] * hist[base - k];
    return acc >>> (FULL_W - SAMP_W);
  endfunction

  // ---------------- stimulus ----------------
  int sym_i [$], sym_q [$];            // symbols (+-1) of the current burst, by group
  int burst_base = 0;                  // group index of burst sample 0
  int tr_pos = 0;                      // burst position of the training sequence
  int ref_si [REF_LEN], ref_sq [REF_LEN];
  real theta = 0.0;
  bit  capture_armed = 0;
  longint cap_i [BURST_LEN], cap_q [BURST_LEN];
  int  cap_n = 0, cap_first_g = -1;

  function automatic int symbol(int g, bit q);
    int b = g - burst_base;
    if (b >= tr_pos && b < tr_pos + REF_LEN) return q ? ref_sq[b - tr_pos] : ref_si[b - tr_pos];
    return ($urandom_range(0, 1) != 0) ? 1 : -1;
  endfunction

  int cur_si = 1, cur_sq = 1;

  // drive one ADC sample (with random idle cycles) and update the model
  task automatic drive_sample();
    real a = 700.0;
    int vi, vq;
    while ($urandom_range(0, 9) == 0) begin
      adc_valid = 0;
      @(posedge clk); #1;
    end
    if (in_grp == 0) begin cur_si = symbol(groups, 0); cur_sq = symbol(groups, 1); end
    vi = int'(a * (real'(cur_si) * $cos(theta) - real'(cur_sq) * $sin(theta))) + $urandom_range(0, 16) - 8;
    vq = int'(a * (real'(cur_si) * $sin(theta) + real'(cur_sq) * $cos(theta))) + $urandom_range(0, 16) - 8;
    adc_valid = 1;
    adc_i = ADC_W'(vi);
    adc_q = ADC_W'(vq);
    hist_i.push_back(longint'(vi));
    hist_q.push_back(longint'(vq));
    if (in_grp == rate_now - 1) begin
      exp_i.push_back(cic_out(hist_i));
      exp_q.push_back(cic_out(hist_q));
      exp_g.push_back(groups);
      in_grp = 0;
      groups++;
    end else in_grp++;
    @(posedge clk); #1;
    adc_valid = 0;
  endtask

  // ---------------- decimated stream monitor and capture ----------------
  always @(posedge clk) begin
    if (rst_n && samp_valid) begin
      longint ei, eq;
      int g;
      checks++;
      if (exp_i.size() == 0) begin
        failures++; $display("FAIL: unexpected decimated sample");
      end else begin
        ei = exp_i.pop_front(); eq = exp_q.pop_front(); g = exp_g.pop_front();
        if (longint'(samp.i) != ei || longint'(samp.q) != eq) begin
          failures++;
          if (failures < 10) $display("FAIL: decimated %0d,%0d exp %0d,%0d", samp.i, samp.q, ei, eq);
        end
        if (capture_armed && cap_n < BURST_LEN) begin
          if (cap_n == 0) cap_first_g = g;
          cap_i[cap_n] = ei; cap_q[cap_n] = eq;
          cap_n++;
        end
      end
    end
  end

  // ---------------- reference model of the analysis ----------------
  longint ci [NLAGS], cq [NLAGS];
  real    mg [NLAGS];
  real    K;
  real    pi = 3.14159265358979323846;

  function automatic real sinc(real t);
    return (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
  endfunction

  function automatic real interp(int p, int o);
    real y = 0.0;
    real d = (real'(o) - real'(F / 2)) / real'(F);
    for (int j = -H; j <= H; j++)
      if (p + j >= 0 && p + j < NLAGS) y += mg[p + j] * sinc(d - real'(j));
    return y;
  endfunction

  function automatic real wide2r(logic [DW-1:0] v);
    logic [127:0] x = 128'(v);
    return real'(x[63:0]) + real'(x[127:64]) * 18446744073709551616.0;
  endfunction

  function automatic bit close(real a, real b, real rel);
    real d = a - b;
    if (d < 0) d = -d;
    return d <= rel * ((b < 0) ? -b : b) + 64.0;
  endfunction

  task automatic check_results();
    int p, o, n;
    real best, yo, vsum, vexp;
    for (int k = 0; k < NLAGS; k++) begin
      ci[k] = 0; cq[k] = 0;
      for (int m = 0; m < REF_LEN; m++) begin
        longint ri = longint'(ref_si[m]) * 4194304, rq = longint'(ref_sq[m]) * 4194304;
        ci[k] += cap_i[k + m] * ri + cap_q[k + m] * rq;
        cq[k] += cap_q[k + m] * ri - cap_i[k + m] * rq;
      end
      mg[k] = K * $sqrt(real'(ci[k]) * real'(ci[k]) + real'(cq[k]) * real'(cq[k])) * real'(1 << FWL);
    end
    p = 0;
    for (int k = 1; k < NLAGS; k++) if (mg[k] > mg[p]) p = k;
    checks++;
    if (!(int'(peak_lag) == p || close(mg[int'(peak_lag)], mg[p], 1e-9))) begin
      failures++; $display("FAIL: peak lag %0d exp %0d", peak_lag, p);
    end
    p = int'(peak_lag);
    if (ci[p] < 0) n_fold++;
    checks++;
    if (p < tr_pos || p > tr_pos + 4) begin
      failures++; $display("FAIL: peak lag %0d, training sequence at %0d", p, tr_pos);
    end
    best = interp(p, 0);
    for (int k = 1; k <= F; k++) if (interp(p, k) > best) best = interp(p, k);
    o = int'(toa) - p * F + F / 2;
    checks++;
    if (o < 0 || o > F) begin
      failures++; $display("FAIL: toa %0d vs peak lag %0d", toa, p);
    end else begin
      yo = interp(p, o);
      if (o != F / 2) n_offcentre++;
      checks++;
      if (yo < best * (1.0 - 1e-6)) begin failures++; $display("FAIL: offset %0d not the best", o); end
      checks++;
      if (!close(wide2r(peak_amp), yo, 1e-6)) begin
        failures++; $display("FAIL: amplitude %0.1f exp %0.1f", wide2r(peak_amp), yo);
      end
    end
    vsum = 0.0; n = 0;
    for (int d = NEAR; d <= FAR; d++) begin
      if (p - d >= 0)    begin vsum += mg[p - d]; n++; end
      if (p + d < NLAGS) begin vsum += mg[p + d]; n++; end
    end
    vexp = (n == 0) ? 0.0 : vsum / real'(n);
    if (n < 2 * (FAR - NEAR + 1)) n_valley_cut++;
    checks++;
    if (int'(valley_count) != n || !close(wide2r(valley), vexp, 1e-6)) begin
      failures++; $display("FAIL: valley %0.1f/%0d exp %0.1f/%0d", wide2r(valley), valley_count, vexp, n);
    end
    for (int t = 0; t < CHAN_TAPS; t++) begin
      logic signed [DW-1:0] ei, eq;
      if (p + t < NLAGS) begin
        ei = DW'(ci[p + t]) <<< FWL; eq = DW'(cq[p + t]) <<< FWL;
      end else begin
        ei = '0; eq = '0; n_zero_taps++;
      end
      checks++;
      if (chan_i[t] !== ei || chan_q[t] !== eq) begin
        failures++; $display("FAIL: channel tap %0d", t);
      end
    end
  endtask

  // ---------------- one burst ----------------
  task automatic run_burst(int r, int pos, real th, bit new_ref);
    longint t_cap_end, t_done;
    int exp_clocks;
    if (r != rate_now) begin
      adc_valid = 0;
      dec_rate = 8'(r);
      rate_now = r;
      make_h(r);
      hist_i.delete(); hist_q.delete();
      in_grp = 0;
      n_rate_switch++;
      repeat (3) @(posedge clk);
      #1;
    end
    if (new_ref) begin
      for (int n = 0; n < REF_LEN; n++) begin
        ref_si[n] = ($urandom_range(0, 1) != 0) ? 1 : -1;
        ref_sq[n] = ($urandom_range(0, 1) != 0) ? 1 : -1;
        ref_we = 1; ref_addr = 4'(n);
        ref_i = REF_W'(ref_si[n] * 4194304); ref_q = REF_W'(ref_sq[n] * 4194304);
        @(posedge clk); #1;
      end
      ref_we = 0;
      n_ref_load++;
    end
    theta = th;
    tr_pos = pos;
    // lead-in: random symbols; the burst starts at a group boundary
    repeat (6 * r) drive_sample();
    while (in_grp != 0) drive_sample();
    burst_base = groups;
    repeat (r / 2) drive_sample();
    // arm the capture: the next decimated sample is burst sample 0
    start = 1;
    cap_n = 0;
    capture_armed = 1;
    drive_sample();
    start = 0;
    while (cap_n < BURST_LEN) drive_sample();
    t_cap_end = cycle;
    checks++;
    if (cap_first_g != burst_base) begin
      failures++; $display("FAIL: capture began at group %0d, expected %0d", cap_first_g, burst_base);
    end
    // a start pulse while busy must be ignored
    drive_sample();
    start = 1;
    drive_sample();
    start = 0;
    n_busy_start++;
    while (!done) drive_sample();
    t_done = cycle;
    capture_armed = 0;
    n_bursts++;
    checks++;
    // correlation + CORDIC per lag + interpolation + valley + control overhead
    exp_clocks = NLAGS * REF_LEN + 2 + NLAGS * (ITER + 4) + (F + 1) * (2 * H + 1) + 2 +
                 2 * (FAR - NEAR + 1) + DW + 4 + 2 + 12;
    if (t_done - t_cap_end != longint'(exp_clocks)) begin
      failures++; $display("FAIL: processing took %0d clocks", t_done - t_cap_end);
    end
    $display("burst %0d: rate %0d, %0d clocks from capture to done", n_bursts, r, t_done - t_cap_end);
    check_results();
    // done must not repeat: the extra start was ignored
    repeat (50) drive_sample();
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after done"); end
  endtask

  initial begin
    K = 1.0;
    for (int i = 0; i < ITER; i++) K = K * $sqrt(1.0 + 2.0 ** (-2.0 * i));
    make_h(128);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_burst(128, 61, 0.5, 1);
    run_burst(128, 0, 2.9, 0);
    run_burst(64, BURST_LEN - REF_LEN - 1, 2.0, 0);
    run_burst(128, 40, -1.0, 1);
    // every mechanism must have happened
    checks++;
    if (n_rate_switch == 0 || n_bursts != 4 || n_fold == 0 || n_offcentre == 0 ||
        n_valley_cut == 0 || n_zero_taps == 0 || n_busy_start == 0 || n_ref_load < 2) begin
      failures++;
      $display("FAIL: mechanism not exercised");
    end
    $display("mechanisms: rate_switch=%0d bursts=%0d cordic_fold=%0d offcentre_interp=%0d valley_cut=%0d zero_taps=%0d start_while_busy=%0d ref_loads=%0d",
             n_rate_switch, n_bursts, n_fold, n_offcentre, n_valley_cut, n_zero_taps, n_busy_start, n_ref_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
