// tb_sinc_rom: self-checking test of the sinc coefficient memory (F = 8
// fractional steps, H = 4 taps each side, 24-bit words with 22 fraction
// bits). Every entry is read, with the one-clock latency, and compared with
// sin(pi t)/(pi t) * 2^22 computed here in floating point (within 1 LSB).
module tb_sinc_rom;
  localparam int F = 8, H = 4, SINC_W = 24, NT = 2 * H + 1, DEPTH = (F + 1) * NT;

  logic clk = 0;
  logic [6:0] addr = '0;
  logic signed [SINC_W-1:0] data;

  int checks = 0, failures = 0;

  sinc_rom #(.F(F), .H(H), .SINC_W(SINC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    real pi, t, v, e;
    pi = 3.14159265358979323846;
    for (int o = 0; o <= F; o++)
      for (int k = 0; k < NT; k++) begin
        @(posedge clk); #1;
        addr = 7'(o * NT + k);
        @(posedge clk); #1;
        t = (real'(o) - real'(F / 2)) / real'(F) - real'(k - H);
        v = (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
        e = v * 4194304.0;
        checks++;
        if (real'(data) - e > 1.0 || e - real'(data) > 1.0) begin
          failures++;
          $display("FAIL: o=%0d k=%0d rom %0d exp %0.2f", o, k, data, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
