// burst_correlator: complex cross-correlation of a stored burst with the
// training-sequence reference, the timing/phase estimation stage (P3).
//
//   corr[k] = sum_{n=0}^{REF_LEN-1} x[k+n] * conj(r[n]),  k = 0 .. NLAGS-1
//
// x is the burst of decimated samples (SAMP_W-bit I/Q) read from the burst
// buffer, r the reference (REF_W-bit I/Q) held in a small internal memory that
// is loaded through the ref_* write port. Each complex product is formed from
// four SAMP_W x REF_W real products of SAMP_W+REF_W-1 = 47 bits; this width
// holds every product as long as the reference avoids the single code
// -2^(REF_W-1), which an assertion checks on each reference write. The sum is
// kept exact and delivered in the minimised fixed-point format of the chain:
// IWL + FWL bits with FWL fraction bits (the integer sum shifted left by FWL;
// 62.4 by default). The sum of 2*REF_LEN products needs up to
// PROD_W + log2(2*REF_LEN) = 52 integer bits, so IWL must be at least that.
// The FWL fraction bits of corr_i/corr_q are always zero: the correlation of
// integer samples is an integer. The correlation values double as the
// channel estimate.
//
// Operation: a start pulse runs all NLAGS lags, one complex multiply-
// accumulate per clock (REF_LEN clocks per lag, NLAGS*REF_LEN+2 clocks in
// all). buf_raddr addresses the burst buffer, whose registered read data must
// arrive on buf_rdata one clock later. Each finished lag is presented for one
// cycle on corr_valid/corr_lag/corr_i/corr_q; done pulses with the last lag.
// The correlation itself and the 24 x 24-bit products follow the document;
// the serial one-MAC-per-clock schedule, the reference memory and the lag
// range are this design's choices.
module burst_correlator
  import atb_pkg::*;
#(
  parameter int unsigned LEN    = BURST_LEN,
  parameter int unsigned RLEN   = REF_LEN,
  parameter int unsigned NLAGS  = LEN - RLEN + 1,
  parameter int unsigned IWL    = I_WL,
  parameter int unsigned FWL    = F_WL,
  localparam int unsigned DW    = IWL + FWL,
  localparam int unsigned AW    = $clog2(LEN),
  localparam int unsigned RAW   = (RLEN > 1) ? $clog2(RLEN) : 1,
  localparam int unsigned LAGW  = (NLAGS > 1) ? $clog2(NLAGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // reference load port
  input  logic              ref_we,
  input  logic [RAW-1:0]    ref_addr,
  input  logic signed [REF_W-1:0] ref_i,
  input  logic signed [REF_W-1:0] ref_q,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // burst buffer read port
  output logic [AW-1:0]     buf_raddr,
  input  iq_samp_t          buf_rdata,
  // results
  output logic              corr_valid,
  output logic [LAGW-1:0]   corr_lag,
  output logic signed [DW-1:0] corr_i,
  output logic signed [DW-1:0] corr_q
);

  typedef logic signed [DW-1:0] wide_t;

  logic signed [REF_W-1:0] ref_mem_i [RLEN];
  logic signed [REF_W-1:0] ref_mem_q [RLEN];

  logic            running;
  logic [LAGW-1:0] lag;
  logic [RAW-1:0]  n;
  // stage 1: burst sample and reference coefficient available
  logic            s1_valid, s1_first, s1_last, s1_final;
  logic [LAGW-1:0] s1_lag;
  logic signed [REF_W-1:0] s1_ri, s1_rq;
  wide_t           acc_i, acc_q;
  wide_t           sum_i, sum_q;
  logic signed [PROD_W-1:0] p_ii, p_qq, p_qi, p_iq;

  assign busy      = running | s1_valid;
  assign buf_raddr = AW'(lag) + AW'(n);

  // A reference of -2^(REF_W-1) times a sample of -2^(SAMP_W-1) would not fit
  // the 47-bit product, so the reference must stay in the symmetric range.
  always_ff @(posedge clk) begin
    if (rst_n && ref_we)
      assert (ref_i != {1'b1, {(REF_W-1){1'b0}}} && ref_q != {1'b1, {(REF_W-1){1'b0}}})
        else $error("reference value -2^%0d is outside the symmetric range", REF_W - 1);
  end

  always_ff @(posedge clk) begin
    if (ref_we) begin
      ref_mem_i[ref_addr] <= ref_i;
      ref_mem_q[ref_addr] <= ref_q;
    end
  end

  // issue stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running  <= 1'b0;
      lag      <= '0;
      n        <= '0;
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_final <= 1'b0;
      s1_lag   <= '0;
      s1_ri    <= '0;
      s1_rq    <= '0;
    end else begin
      s1_valid <= running;
      s1_first <= (n == '0);
      s1_last  <= (n == RAW'(RLEN - 1));
      s1_final <= (n == RAW'(RLEN - 1)) && (lag == LAGW'(NLAGS - 1));
      s1_lag   <= lag;
      s1_ri    <= ref_mem_i[n];
      s1_rq    <= ref_mem_q[n];
      if (running) begin
        if (n == RAW'(RLEN - 1)) begin
          n <= '0;
          if (lag == LAGW'(NLAGS - 1)) running <= 1'b0;
          else                         lag     <= lag + LAGW'(1);
        end else begin
          n <= n + RAW'(1);
        end
      end else if (start) begin
        running <= 1'b1;
        lag     <= '0;
        n       <= '0;
      end
    end
  end

  // multiply-accumulate stage: x * conj(r)
  assign p_ii  = buf_rdata.i * s1_ri;
  assign p_qq  = buf_rdata.q * s1_rq;
  assign p_qi  = buf_rdata.q * s1_ri;
  assign p_iq  = buf_rdata.i * s1_rq;
  assign sum_i = (s1_first ? wide_t'(0) : acc_i) + wide_t'(p_ii) + wide_t'(p_qq);
  assign sum_q = (s1_first ? wide_t'(0) : acc_q) + wide_t'(p_qi) - wide_t'(p_iq);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_i      <= '0;
      acc_q      <= '0;
      corr_valid <= 1'b0;
      corr_lag   <= '0;
      corr_i     <= '0;
      corr_q     <= '0;
      done       <= 1'b0;
    end else begin
      corr_valid <= 1'b0;
      done       <= 1'b0;
      if (s1_valid) begin
        acc_i <= sum_i;
        acc_q <= sum_q;
        if (s1_last) begin
          corr_valid <= 1'b1;
          corr_lag   <= s1_lag;
          corr_i     <= sum_i <<< FWL;
          corr_q     <= sum_q <<< FWL;
          done       <= s1_final;
        end
      end
    end
  end

endmodule
