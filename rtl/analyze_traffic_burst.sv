// analyze_traffic_burst: fixed-point "Analyze Traffic Burst" receiver block of
// a GSM base station built on a software-defined radio. From the 12-bit I/Q
// samples of the radio's ADC it finds, for one received burst, the time of
// arrival (ToA) of the training sequence, the valley power (VP) and the
// channel-estimate coefficients.
//
// Signal path and word lengths (points P1..P4 of the receiver chain):
//   P1  adc_i/adc_q, ADC_W = 12 bits
//   P2  two CIC decimators (N = 4 stages, rate dec_rate <= 128, M = 1),
//       full precision 40 bits, truncated to 24 bits
//       -> burst buffer (BURST_LEN complex samples)
//   P3  burst_correlator: correlation with the loaded training-sequence
//       reference, 24 x 24 -> 47-bit products -> correlation store
//   P4  cordic_mag (magnitude of each correlation value) -> magnitude store
//       -> peak_interp (integer peak + sinc interpolation: ToA, amplitude)
//       -> valley_power (mean magnitude beside the peak)
// Everything from the correlator output on is held in the minimised
// fixed-point format IWL.FWL: 62.4 (66 bits) by default, the result of the
// word-length search at a 0.2 dB SNR allowance; 52.2 (54 bits) is the
// relaxed result at 2 dB. IWL must stay >= 52 so the correlation fits.
//
// Sequence: the decimators run continuously. A start pulse (while idle)
// captures the next BURST_LEN decimated samples, then the block correlates,
// takes the magnitudes, searches and interpolates the peak, measures the
// valley and reads out CHAN_TAPS correlation values starting at the peak lag
// as the channel estimate (taps past the last lag read as zero). done pulses
// once with all results valid; they hold until the next done. busy is high
// from start to done. After the last sample is captured the processing takes
// NLAGS*(RLEN + CORDIC_ITER + 4) + 2 + (INTERP_F+1)*(2*INTERP_H+1) + 2
// + 2*(VAL_FAR-VAL_NEAR+1) + DW + 6 + 12 clocks (7509 at the defaults).
// The reference (REF_LEN complex REF_W-bit values, the modulated training
// sequence) is written through ref_we/ref_addr/ref_i/ref_q while idle.
// The chain, its widths and its 62.4 format follow the document; the control
// sequence, the memories between the stages and the handshakes are this
// design's own.
module analyze_traffic_burst
  import atb_pkg::*;
#(
  parameter int unsigned BURST    = BURST_LEN,
  parameter int unsigned RLEN     = REF_LEN,
  parameter int unsigned NLAGS    = BURST - RLEN + 1,
  parameter int unsigned CORDIC_ITER = 32,
  parameter int unsigned INTERP_F = 8,
  parameter int unsigned INTERP_H = 4,
  parameter int unsigned VAL_NEAR = 2,
  parameter int unsigned VAL_FAR  = 5,
  parameter int unsigned NTAPS    = CHAN_TAPS,
  parameter int unsigned IWL      = I_WL,
  parameter int unsigned FWL      = F_WL,
  localparam int unsigned DW      = IWL + FWL,
  localparam int unsigned RW      = $clog2(CIC_RMAX + 1),
  localparam int unsigned AW      = $clog2(BURST),
  localparam int unsigned RAW     = (RLEN > 1) ? $clog2(RLEN) : 1,
  localparam int unsigned LAGW    = (NLAGS > 1) ? $clog2(NLAGS) : 1,
  localparam int unsigned TOA_W   = LAGW + $clog2(INTERP_F) + 2,
  localparam int unsigned VCW     = $clog2(2 * (VAL_FAR - VAL_NEAR + 1) + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ADC samples (P1) and decimation rate
  input  logic [RW-1:0]            dec_rate,
  input  logic                     adc_valid,
  input  logic signed [ADC_W-1:0]  adc_i,
  input  logic signed [ADC_W-1:0]  adc_q,
  // decimated stream (P2), for observation
  output logic                     samp_valid,
  output iq_samp_t                 samp,
  // training-sequence reference load
  input  logic                     ref_we,
  input  logic [RAW-1:0]           ref_addr,
  input  logic signed [REF_W-1:0]  ref_i,
  input  logic signed [REF_W-1:0]  ref_q,
  // burst analysis
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [LAGW-1:0]          peak_lag,
  output logic signed [TOA_W-1:0]  toa,
  output logic [DW-1:0]            peak_amp,
  output logic [DW-1:0]            valley,
  output logic [VCW-1:0]           valley_count,
  output logic signed [DW-1:0]     chan_i [NTAPS],
  output logic signed [DW-1:0]     chan_q [NTAPS]
);

  typedef enum logic [3:0] {
    S_IDLE, S_CAPTURE, S_CORR, S_MAG_RD, S_MAG_GO, S_MAG_WAIT,
    S_INTERP, S_VALLEY, S_CHAN, S_DONE
  } state_t;

  localparam int unsigned TW = $clog2(NTAPS + 1);

  state_t state;

  // ---------------- P2: decimation ----------------
  logic                     dec_i_valid, dec_q_valid;
  logic signed [SAMP_W-1:0] dec_i, dec_q;

  cic_decimator #(.IN_W(ADC_W), .N(CIC_N), .M(CIC_M), .RMAX(CIC_RMAX), .OUT_W(SAMP_W)) u_cic_i (
    .clk, .rst_n, .rate(dec_rate), .in_valid(adc_valid), .in_data(adc_i),
    .out_valid(dec_i_valid), .out_data(dec_i)
  );
  cic_decimator #(.IN_W(ADC_W), .N(CIC_N), .M(CIC_M), .RMAX(CIC_RMAX), .OUT_W(SAMP_W)) u_cic_q (
    .clk, .rst_n, .rate(dec_rate), .in_valid(adc_valid), .in_data(adc_q),
    .out_valid(dec_q_valid), .out_data(dec_q)
  );

  assign samp_valid = dec_i_valid && dec_q_valid;   // the two run in lockstep
  assign samp.i     = dec_i;
  assign samp.q     = dec_q;

  // ---------------- burst buffer ----------------
  logic [AW-1:0] wr_idx;
  logic [AW-1:0] buf_raddr;
  iq_samp_t      buf_rdata;
  logic          buf_we;

  assign buf_we = (state == S_CAPTURE) && samp_valid;

  sample_ram #(.DEPTH(BURST), .W(2 * SAMP_W)) u_burst_buf (
    .clk, .we(buf_we), .waddr(wr_idx), .wdata(samp),
    .raddr(buf_raddr), .rdata(buf_rdata)
  );

  // ---------------- P3: correlation ----------------
  logic            corr_start, corr_busy, corr_done;
  logic            corr_valid;
  logic [LAGW-1:0] corr_lag;
  logic signed [DW-1:0] corr_i, corr_q;

  burst_correlator #(.LEN(BURST), .RLEN(RLEN), .NLAGS(NLAGS), .IWL(IWL), .FWL(FWL)) u_corr (
    .clk, .rst_n,
    .ref_we(ref_we && (state == S_IDLE)), .ref_addr, .ref_i, .ref_q,
    .start(corr_start), .busy(corr_busy), .done(corr_done),
    .buf_raddr, .buf_rdata,
    .corr_valid, .corr_lag, .corr_i, .corr_q
  );

  // correlation store (also the source of the channel estimate)
  logic [LAGW-1:0] cs_raddr;
  logic [2*DW-1:0] cs_rdata;
  logic signed [DW-1:0] cs_i, cs_q;

  sample_ram #(.DEPTH(NLAGS), .W(2 * DW)) u_corr_store (
    .clk, .we(corr_valid), .waddr(corr_lag), .wdata({corr_i, corr_q}),
    .raddr(cs_raddr), .rdata(cs_rdata)
  );

  assign cs_i = cs_rdata[2*DW-1:DW];
  assign cs_q = cs_rdata[DW-1:0];

  // ---------------- P4: magnitude ----------------
  logic            cd_in_valid, cd_in_ready, cd_out_valid;
  logic [DW-1:0]   cd_mag;
  logic [LAGW-1:0] cd_tag;
  logic [LAGW-1:0] mlag;

  assign cd_in_valid = (state == S_MAG_GO);

  cordic_mag #(.WL(DW), .ITER(CORDIC_ITER), .TAG_W(LAGW)) u_cordic (
    .clk, .rst_n,
    .in_valid(cd_in_valid), .in_ready(cd_in_ready),
    .in_x(cs_i), .in_y(cs_q), .in_tag(mlag),
    .out_valid(cd_out_valid), .out_mag(cd_mag), .out_tag(cd_tag)
  );

  logic [LAGW-1:0] ms_raddr, pi_raddr, vp_raddr;
  logic [DW-1:0]   ms_rdata;

  sample_ram #(.DEPTH(NLAGS), .W(DW)) u_mag_store (
    .clk, .we(cd_out_valid), .waddr(cd_tag), .wdata(cd_mag),
    .raddr(ms_raddr), .rdata(ms_rdata)
  );

  assign ms_raddr = (state == S_VALLEY) ? vp_raddr : pi_raddr;

  // ---------------- P4: peak detection ----------------
  logic pi_start, pi_busy, pi_done, pi_clear;

  peak_interp #(.WL(DW), .NLAGS(NLAGS), .F(INTERP_F), .H(INTERP_H),
                .SINC_W(SINC_W), .SINC_FRAC(SINC_FRAC)) u_peak (
    .clk, .rst_n, .clear(pi_clear),
    .mag_valid(cd_out_valid), .mag_lag(cd_tag), .mag_in(cd_mag),
    .start(pi_start), .mag_raddr(pi_raddr), .mag_rdata(ms_rdata),
    .busy(pi_busy), .done(pi_done),
    .peak_lag, .toa, .peak_amp
  );

  logic vp_start, vp_busy, vp_done;

  valley_power #(.WL(DW), .NLAGS(NLAGS), .NEAR(VAL_NEAR), .FAR(VAL_FAR)) u_valley (
    .clk, .rst_n, .start(vp_start), .peak_lag,
    .mag_raddr(vp_raddr), .mag_rdata(ms_rdata),
    .busy(vp_busy), .done(vp_done), .valley, .count(valley_count)
  );

  // ---------------- channel estimate read-out ----------------
  logic [TW-1:0]   tap;        // tap being addressed
  logic            ch_valid;   // read data of the previous tap is available
  logic            ch_in_range;
  logic [TW-1:0]   ch_tap;
  int              ch_pos;

  assign ch_pos   = int'(peak_lag) + int'(tap);
  assign cs_raddr = (state == S_CHAN) ? ((ch_pos < int'(NLAGS)) ? LAGW'(ch_pos) : '0) : mlag;

  // ---------------- control ----------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      wr_idx      <= '0;
      mlag        <= '0;
      tap         <= '0;
      ch_valid    <= 1'b0;
      ch_in_range <= 1'b0;
      ch_tap      <= '0;
      corr_start  <= 1'b0;
      pi_start    <= 1'b0;
      pi_clear    <= 1'b0;
      vp_start    <= 1'b0;
      done        <= 1'b0;
      for (int t = 0; t < NTAPS; t++) begin
        chan_i[t] <= '0;
        chan_q[t] <= '0;
      end
    end else begin
      corr_start <= 1'b0;
      pi_start   <= 1'b0;
      pi_clear   <= 1'b0;
      vp_start   <= 1'b0;
      done       <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_CAPTURE;
          wr_idx   <= '0;
          pi_clear <= 1'b1;
        end
        S_CAPTURE: if (samp_valid) begin
          if (wr_idx == AW'(BURST - 1)) begin
            state      <= S_CORR;
            corr_start <= 1'b1;
          end else begin
            wr_idx <= wr_idx + AW'(1);
          end
        end
        S_CORR: if (corr_done) begin
          state <= S_MAG_RD;
          mlag  <= '0;
        end
        S_MAG_RD:   state <= S_MAG_GO;            // correlation store read
        S_MAG_GO:   if (cd_in_ready) state <= S_MAG_WAIT;
        S_MAG_WAIT: if (cd_out_valid) begin
          if (mlag == LAGW'(NLAGS - 1)) begin
            state    <= S_INTERP;
            pi_start <= 1'b1;
          end else begin
            mlag  <= mlag + LAGW'(1);
            state <= S_MAG_RD;
          end
        end
        S_INTERP: if (pi_done) begin
          state    <= S_VALLEY;
          vp_start <= 1'b1;
        end
        S_VALLEY: if (vp_done) begin
          state    <= S_CHAN;
          tap      <= '0;
          ch_valid <= 1'b0;
        end
        S_CHAN: begin
          ch_valid    <= (tap < TW'(NTAPS));
          ch_in_range <= (ch_pos < int'(NLAGS));
          ch_tap      <= tap;
          if (tap < TW'(NTAPS)) tap <= tap + TW'(1);
          if (ch_valid) begin
            chan_i[ch_tap] <= ch_in_range ? cs_i : '0;
            chan_q[ch_tap] <= ch_in_range ? cs_q : '0;
          end
          if (ch_valid && ch_tap == TW'(NTAPS - 1)) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the stages run strictly one after another
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(pi_busy && vp_busy)) else $error("peak search and valley overlap");
      assert (!(corr_busy && state != S_CORR)) else $error("correlator running outside S_CORR");
    end
  end

endmodule
