// tb_burst_correlator: self-checking test of the training-sequence correlator
// at its default size (156-sample burst, 16-sample reference, 141 lags,
// 24-bit I/Q samples and reference). The burst buffer is modelled here as an
// array with a registered read. Bursts of random full-scale samples, and one
// built from extreme values, are correlated with random references; every
// lag is compared with sum x[k+n]*conj(r[n]) computed in 64-bit integers and
// scaled to the 62.4 fixed-point format. The lag order, the done pulse and
// the latency of NLAGS*REF_LEN+2 clocks from start to done are checked.
module tb_burst_correlator;
  import atb_pkg::*;
  localparam int LEN = 156, RLEN = 16, NLAGS = LEN - RLEN + 1;

  logic clk = 0, rst_n = 0;
  logic ref_we = 0;
  logic [3:0] ref_addr = '0;
  logic signed [REF_W-1:0] ref_i = '0, ref_q = '0;
  logic start = 0, busy, done;
  logic [7:0] buf_raddr;
  iq_samp_t buf_rdata;
  logic corr_valid;
  logic [7:0] corr_lag;
  logic signed [WL-1:0] corr_i, corr_q;

  int checks = 0, failures = 0;

  burst_correlator #(.LEN(LEN), .RLEN(RLEN), .NLAGS(NLAGS)) dut (.*);

  always #5 clk = ~clk;

  longint xi [LEN], xq [LEN], ri [RLEN], rq [RLEN];
  always_ff @(posedge clk) begin
    buf_rdata.i <= SAMP_W'(xi[buf_raddr]);
    buf_rdata.q <= SAMP_W'(xq[buf_raddr]);
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int next_lag = 0;
  longint start_cycle, done_cycle;

  always @(posedge clk) begin
    if (rst_n && corr_valid) begin
      automatic longint ei = 0, eq = 0;
      automatic logic signed [WL-1:0] wi, wq;
      for (int n = 0; n < RLEN; n++) begin
        ei += xi[next_lag + n] * ri[n] + xq[next_lag + n] * rq[n];
        eq += xq[next_lag + n] * ri[n] - xi[next_lag + n] * rq[n];
      end
      wi = WL'(ei) <<< F_WL;
      wq = WL'(eq) <<< F_WL;
      checks++;
      if (corr_i !== wi || corr_q !== wq || int'(corr_lag) != next_lag) begin
        failures++;
        if (failures < 10)
          $display("FAIL: lag %0d (exp %0d) corr %0d,%0d exp %0d,%0d", corr_lag, next_lag, corr_i, corr_q, wi, wq);
      end
      next_lag++;
    end
    if (rst_n && done) done_cycle = cycle;
  end

  // samples may take the most negative code; the reference stays symmetric
  function automatic longint rnd24(int mode, bit is_ref = 0);
    if (mode == 1)
      return ($urandom_range(0, 1) != 0) ? longint'(8388607) : (is_ref ? longint'(-8388607) : longint'(-8388608));
    if (is_ref) return longint'($urandom_range(0, 16777214)) - 8388607;
    return longint'(signed'(SAMP_W'($urandom)));
  endfunction

  task automatic run(int mode);
    for (int n = 0; n < LEN; n++) begin xi[n] = rnd24(mode); xq[n] = rnd24(mode); end
    for (int n = 0; n < RLEN; n++) begin
      ri[n] = rnd24(mode, 1); rq[n] = rnd24(mode, 1);
      @(posedge clk); #1;
      ref_we = 1; ref_addr = 4'(n); ref_i = REF_W'(ri[n]); ref_q = REF_W'(rq[n]);
    end
    @(posedge clk); #1;
    ref_we = 0;
    next_lag = 0;
    start = 1;
    start_cycle = cycle;
    @(posedge clk); #1;
    start = 0;
    repeat (20) @(posedge clk);
    #1 start = 1;            // ignored while busy
    @(posedge clk); #1 start = 0;
    wait (!busy);
    repeat (3) @(posedge clk);
    checks++;
    if (next_lag != NLAGS) begin failures++; $display("FAIL: %0d lags", next_lag); end
    checks++;
    if (done_cycle - start_cycle != NLAGS * RLEN + 2) begin
      failures++;
      $display("FAIL: latency %0d", done_cycle - start_cycle);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(0);
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
