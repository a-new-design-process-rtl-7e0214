// tb_sample_ram: self-checking test of the burst buffer memory at its default
// size (156 words of 48 bits, one complex 24-bit sample each). It fills the
// buffer in order, as a burst capture does, reads it back in a different
// order, then mixes random writes and reads against a shadow array, checking
// the one-clock read latency and that a same-address write/read returns the
// old word.
module tb_sample_ram;
  localparam int DEPTH = 156, W = 48, AW = 8;

  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;

  int checks = 0, failures = 0;
  logic [W-1:0] shadow [DEPTH];

  sample_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_read(int a);
    logic [W-1:0] e;
    raddr = AW'(a);
    e = shadow[a];
    @(posedge clk); #1;
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL: addr %0d read %h exp %h", a, rdata, e);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = W'({$urandom, $urandom});
      shadow[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = DEPTH - 1; a >= 0; a -= 3) check_read(a);
    for (int n = 0; n < 2000; n++) begin
      automatic int ra = $urandom_range(0, DEPTH - 1);
      automatic logic [W-1:0] e = shadow[ra];
      we = 1'($urandom_range(0, 1));
      waddr = ($urandom_range(0, 3) == 0) ? AW'(ra) : AW'($urandom_range(0, DEPTH - 1));
      wdata = W'({$urandom, $urandom});
      raddr = AW'(ra);
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      checks++;
      if (rdata !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: random addr %0d read %h exp %h", ra, rdata, e);
      end
    end
    we = 0;
    for (int a = 0; a < DEPTH; a++) check_read(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
