// tb_cic_decimator: self-checking test of the CIC decimator at its default
// size (N = 4, M = 1, 12-bit input, 40-bit full precision, 24-bit output).
// Random full-scale input with random gaps is filtered at decimation rates
// 128, 7 and 1. The expected output is computed directly as a convolution with
// the N-fold box-car impulse response (length N*(R-1)+1), delayed by the N-1
// samples of the registered integrator chain, then truncated to the top 24
// bits. The output latency (two clocks after the completing input sample) and
// the clear on a rate change are checked too.
module tb_cic_decimator;
  localparam int IN_W = 12, N = 4, RMAX = 128, OUT_W = 24;
  localparam int FULL_W = IN_W + N * 7;

  logic clk = 0, rst_n = 0;
  logic [7:0] rate;
  logic in_valid = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0, failures = 0;

  cic_decimator #(.IN_W(IN_W), .N(N), .M(1), .RMAX(RMAX), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  longint h [];
  longint xs [$];
  longint exp_q [$];
  longint due_q [$];
  longint cycle = 0;
  int outputs = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic void make_h(int r);
    longint t [];
    h = new[1];
    h[0] = 1;
    for (int s = 0; s < N; s++) begin
      t = new[h.size() + r - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int k = 0; k < r; k++) t[i + k] += h[i];
      h = t;
    end
  endfunction

  function automatic longint expected_at(int j);
    longint acc = 0;
    int base = j - (N - 1);
    for (int k = 0; k < h.size(); k++)
      if (base - k >= 0) acc += h[k] * xs[base - k];
    return acc >>> (FULL_W - OUT_W);
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e, d;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %0d", out_data);
      end else begin
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (longint'(out_data) != e || cycle != d) begin
          failures++;
          if (failures < 10)
            $display("FAIL: out %0d exp %0d at cycle %0d due %0d", out_data, e, cycle, d);
        end
      end
      outputs++;
    end
  end

  task automatic run_rate(int r, int nout);
    int j = 0, cnt = 0;
    @(posedge clk); #1;
    in_valid = 0;
    rate = 8'(r);
    make_h(r);
    xs.delete();
    repeat (2) @(posedge clk);
    #1;
    while (j < nout * r) begin
      if ($urandom_range(0, 9) < 7) begin
        in_valid = 1;
        in_data  = IN_W'($urandom);
        if (j % 7 == 3) in_data = (j % 2 != 0) ? 12'sh7ff : -12'sh800;
        xs.push_back(longint'(in_data));
        if (cnt == r - 1) begin
          exp_q.push_back(expected_at(j));
          due_q.push_back(cycle + 2);
          cnt = 0;
        end else cnt++;
        j++;
      end else begin
        in_valid = 0;
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    rate = 8'd128;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_rate(128, 30);
    run_rate(7, 80);
    run_rate(1, 60);
    run_rate(128, 10);
    checks++;
    if (exp_q.size() != 0 || outputs != 180) begin
      failures++;
      $display("FAIL: %0d outputs, %0d still expected", outputs, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
