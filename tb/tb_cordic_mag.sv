// tb_cordic_mag: self-checking test of the vectoring CORDIC at its default
// size (66-bit 62.4 inputs, 32 iterations). Vectors in all four quadrants and
// of magnitudes from a few units to 2^62, plus the axes and zero, are compared
// with K*sqrt(x^2+y^2) computed in floating point (K the CORDIC gain), within
// a tolerance of 1e-12 relative plus 64 LSB. Saturation of a full-scale
// vector, the returned tag, the in_ready handshake and the ITER+1 clock
// latency are checked as well.
module tb_cordic_mag;
  localparam int WL = 66, ITER = 32, TAG_W = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [WL-1:0] in_x = '0, in_y = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic [WL-1:0] out_mag;
  logic [TAG_W-1:0] out_tag;

  int checks = 0, failures = 0;
  real K;

  cordic_mag #(.WL(WL), .ITER(ITER), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint rnd_scaled();
    int sh = $urandom_range(0, 62);
    longint v = longint'({$urandom, $urandom}) >>> (63 - sh);
    return v;
  endfunction

  task automatic one(longint x, longint y, bit sat = 0);
    int lat = 0;
    real e, m, tol;
    wait (in_ready);
    @(posedge clk); #1;
    in_valid = 1; in_x = WL'(x); in_y = WL'(y); in_tag = TAG_W'($urandom);
    if (sat) begin in_x = {1'b0, {(WL-1){1'b1}}}; in_y = {1'b1, {(WL-1){1'b0}}}; end
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (in_ready) begin failures++; $display("FAIL: in_ready while busy"); end
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != ITER + 1 || out_tag != in_tag) begin
      failures++; $display("FAIL: latency %0d tag %0d/%0d", lat, out_tag, in_tag);
    end
    checks++;
    if (sat) begin
      if (out_mag != '1) begin failures++; $display("FAIL: no saturation, %h", out_mag); end
    end else begin
      e = K * $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      m = real'(out_mag[63:0]) + real'(out_mag[WL-1:64]) * 18446744073709551616.0;
      tol = e * 1e-12 + 64.0;
      if (m - e > tol || e - m > tol) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d y=%0d mag %0.1f exp %0.1f", x, y, m, e);
      end
    end
  endtask

  initial begin
    K = 1.0;
    for (int i = 0; i < ITER; i++) K = K * $sqrt(1.0 + 2.0 ** (-2.0 * i));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    one(0, 0);
    one(1000, 0);
    one(-1000, 0);
    one(0, 12345);
    one(0, -12345);
    one(-(64'sd1 <<< 62), 64'sd1 <<< 61);
    one(0, 0, 1);
    for (int n = 0; n < 400; n++) one(rnd_scaled(), rnd_scaled());
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
