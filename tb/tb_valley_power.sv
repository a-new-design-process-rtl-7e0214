// tb_valley_power: self-checking test of the valley estimator at its default
// size (141 lags, 66-bit magnitudes, valley = lags 2..5 away from the peak on
// both sides). Random full-width magnitude curves are held in a memory model
// with a registered read; for peaks in the middle and at or near both ends
// the result is compared with the floor of the mean of the in-range valley
// magnitudes, computed here with wide integers, and the number of positions
// used is checked. A peak near an end must average fewer than 8 positions.
// The latency from start to done is checked against 2*(FAR-NEAR+1)+WL+CW+2
// clocks (CW = 4 count bits at the defaults).
module tb_valley_power;
  localparam int WL = 66, NLAGS = 141, NEAR = 2, FAR = 5, LAGW = 8, CW = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic [LAGW-1:0] peak_lag = '0;
  logic [LAGW-1:0] mag_raddr;
  logic [WL-1:0] mag_rdata;
  logic busy, done;
  logic [WL-1:0] valley;
  logic [CW-1:0] count;

  int checks = 0, failures = 0, edge_cases = 0;

  valley_power #(.WL(WL), .NLAGS(NLAGS), .NEAR(NEAR), .FAR(FAR)) dut (.*);

  always #5 clk = ~clk;

  logic [WL-1:0] mags [NLAGS];
  always_ff @(posedge clk) mag_rdata <= mags[mag_raddr];

  task automatic trial(int p, bit full);
    logic [WL+3:0] sum = '0;
    logic [WL+3:0] expv;
    int n = 0, lat = 0;
    for (int k = 0; k < NLAGS; k++) begin
      mags[k] = WL'({$urandom, $urandom, $urandom});
      if (!full) mags[k] = mags[k] >> $urandom_range(0, WL - 1);
    end
    for (int d = NEAR; d <= FAR; d++) begin
      if (p - d >= 0)    begin sum += (WL+4)'(mags[p - d]); n++; end
      if (p + d < NLAGS) begin sum += (WL+4)'(mags[p + d]); n++; end
    end
    expv = (n == 0) ? '0 : sum / (WL+4)'(n);
    if (n < 2 * (FAR - NEAR + 1)) edge_cases++;
    @(posedge clk); #1;
    start = 1; peak_lag = LAGW'(p);
    @(posedge clk); #1;
    start = 0; peak_lag = '0;
    while (!done) begin @(posedge clk); #1; lat++; end
    checks++;
    if ({4'b0, valley} != expv || int'(count) != n) begin
      failures++;
      $display("FAIL: peak %0d valley %0d count %0d exp %0d/%0d", p, valley, count, expv, n);
    end
    checks++;
    if (lat != 2 * (FAR - NEAR + 1) + WL + CW + 2) begin
      failures++; $display("FAIL: latency %0d", lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    trial(0, 1);
    trial(1, 0);
    trial(4, 1);
    trial(NLAGS - 1, 1);
    trial(NLAGS - 3, 0);
    for (int i = 0; i < 40; i++) trial($urandom_range(0, NLAGS - 1), i % 2 == 0);
    checks++;
    if (edge_cases < 5) begin failures++; $display("FAIL: only %0d edge cases", edge_cases); end
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
