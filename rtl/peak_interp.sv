// peak_interp: correlation peak detector with sinc interpolation, the second
// half of the peak-detection stage (P4). It yields the time of arrival (ToA)
// and the peak amplitude of the burst.
//
// 1. Coarse search: while the CORDIC magnitudes of a burst stream past
//    (mag_valid), the largest one and its lag p are kept (first of equals).
// 2. Fine search: after start, the magnitude curve is interpolated at the
//    F+1 fractional positions p + d, d = -1/2 .. +1/2 in steps of 1/F:
//      y(d) = sum_{j=-H}^{H} mag[p+j] * sinc(d - j)
//    with mag outside 0..NLAGS-1 taken as zero. Each term is a WL-bit
//    magnitude (multiplier) times a SINC_W-bit coefficient read from
//    sinc_rom (multiplicand); one product is formed per clock. The offset o
//    with the largest y wins (first of equals).
// Results: peak_lag = p, toa = p*F + o - F/2 in units of 1/F sample (signed),
// peak_amp = y at the winning offset, scaled back to the WL-bit fixed-point
// format (SINC_FRAC bits dropped, floor) and clamped to 0 .. 2^WL-1.
//
// Interface: clear empties the coarse search before a new burst. start
// launches the fine search; mag_raddr/mag_rdata read the magnitude store
// (registered read, one clock latency). done pulses with the results
// (F+1)*(2H+1)+2 clocks after start; they hold until the next start.
// The split into CORDIC plus sinc interpolation, and the sinc multiplicand
// read from memory, follow the document; the coarse/fine search, F and H are
// this design's choices.
module peak_interp #(
  parameter int unsigned WL        = 66,
  parameter int unsigned NLAGS     = 141,
  parameter int unsigned F         = 8,
  parameter int unsigned H         = 4,
  parameter int unsigned SINC_W    = 24,
  parameter int unsigned SINC_FRAC = 22,
  localparam int unsigned LAGW     = (NLAGS > 1) ? $clog2(NLAGS) : 1,
  localparam int unsigned TOA_W    = LAGW + $clog2(F) + 2,
  localparam int unsigned NT       = 2 * H + 1,
  localparam int unsigned ROM_AW   = $clog2((F + 1) * NT)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    mag_valid,
  input  logic [LAGW-1:0]         mag_lag,
  input  logic [WL-1:0]           mag_in,
  input  logic                    start,
  output logic [LAGW-1:0]         mag_raddr,
  input  logic [WL-1:0]           mag_rdata,
  output logic                    busy,
  output logic                    done,
  output logic [LAGW-1:0]         peak_lag,
  output logic signed [TOA_W-1:0] toa,
  output logic [WL-1:0]           peak_amp
);

  localparam int unsigned ACC_W = WL + 1 + SINC_W + $clog2(NT);
  localparam int unsigned OW    = $clog2(F + 1);
  localparam int unsigned TW    = $clog2(NT);

  typedef logic signed [ACC_W-1:0] acc_t;

  // coarse search
  logic [WL-1:0]   max_mag;
  logic [LAGW-1:0] max_lag;
  logic            any;

  // fine search issue counters
  logic            running;
  logic [OW-1:0]   o;
  logic [TW-1:0]   k;
  logic [ROM_AW-1:0] rom_addr;
  logic signed [SINC_W-1:0] sinc;
  int              pos;
  logic            in_range;

  // stage 1 (memory and ROM data available)
  logic            s1_valid, s1_first, s1_last, s1_final, s1_in_range;
  logic [OW-1:0]   s1_o;
  acc_t            acc, sum, term;
  acc_t            y;
  acc_t            amp_max;
  acc_t            best_y;
  logic [OW-1:0]   best_o;
  logic            have_best;
  logic            fin;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      max_mag <= '0;
      max_lag <= '0;
      any     <= 1'b0;
    end else if (mag_valid && (!any || mag_in > max_mag)) begin
      max_mag <= mag_in;
      max_lag <= mag_lag;
      any     <= 1'b1;
    end
  end

  assign pos       = int'(max_lag) + int'(k) - int'(H);
  assign in_range  = (pos >= 0) && (pos < int'(NLAGS));
  assign mag_raddr = in_range ? LAGW'(pos) : '0;
  assign rom_addr  = ROM_AW'(int'(o) * int'(NT) + int'(k));
  assign busy      = running | s1_valid | fin;

  sinc_rom #(.F(F), .H(H), .SINC_W(SINC_W)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (sinc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running     <= 1'b0;
      o           <= '0;
      k           <= '0;
      s1_valid    <= 1'b0;
      s1_first    <= 1'b0;
      s1_last     <= 1'b0;
      s1_final    <= 1'b0;
      s1_in_range <= 1'b0;
      s1_o        <= '0;
    end else begin
      s1_valid    <= running;
      s1_first    <= (k == '0);
      s1_last     <= (k == TW'(NT - 1));
      s1_final    <= (k == TW'(NT - 1)) && (o == OW'(F));
      s1_in_range <= in_range;
      s1_o        <= o;
      if (running) begin
        if (k == TW'(NT - 1)) begin
          k <= '0;
          if (o == OW'(F)) running <= 1'b0;
          else             o       <= o + OW'(1);
        end else begin
          k <= k + TW'(1);
        end
      end else if (start) begin
        running <= 1'b1;
        o       <= '0;
        k       <= '0;
      end
    end
  end

  assign term = s1_in_range ? acc_t'($signed({1'b0, mag_rdata})) * acc_t'(sinc) : acc_t'(0);
  assign sum  = (s1_first ? acc_t'(0) : acc) + term;
  assign y       = best_y >>> SINC_FRAC;
  assign amp_max = {{(ACC_W - WL){1'b0}}, {WL{1'b1}}};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      best_y    <= '0;
      best_o    <= '0;
      have_best <= 1'b0;
      fin       <= 1'b0;
      done      <= 1'b0;
      peak_lag  <= '0;
      toa       <= '0;
      peak_amp  <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !running) have_best <= 1'b0;
      if (s1_valid) begin
        acc <= sum;
        if (s1_last && (!have_best || sum > best_y)) begin
          best_y    <= sum;
          best_o    <= s1_o;
          have_best <= 1'b1;
        end
        fin <= s1_final;
      end
      if (fin) begin
        done     <= 1'b1;
        peak_lag <= max_lag;
        toa      <= TOA_W'(signed'(int'(max_lag) * int'(F) + int'(best_o) - int'(F / 2)));
        if (y < 0)                                 peak_amp <= '0;
        else if (y > amp_max)                      peak_amp <= '1;
        else                                       peak_amp <= y[WL-1:0];
      end
    end
  end

endmodule
