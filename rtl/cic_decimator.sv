// cic_decimator: N-stage cascaded integrator-comb decimator for one real
// sample stream (instantiate two for I and Q).
//
// Structure (Hogenauer): N integrators run at the input rate, a down-sampler
// keeps one sample in R, and N comb sections with differential delay M run at
// the output rate. The full-precision register width grows by
// ceil(N*log2(M*RMAX)) bits over the input width (12 + 4*7 = 40 bits at the
// defaults); two's-complement wrap-around in the integrators is harmless
// because the combs undo it. The output keeps only the top OUT_W bits
// (truncation, 24 bits by default), the width used by the rest of the chain.
//
// The decimation rate R is a run-time input (1..RMAX). Whenever it differs
// from the rate in use the filter state is cleared and the new rate is taken,
// so a rate switch starts a fresh, transient-free filter. The gain is R^N*M^N,
// so rates below RMAX give proportionally smaller outputs.
//
// Interface: in_valid/in_data carry one input sample per asserted cycle.
// out_valid pulses for one cycle with out_data two clocks after the input
// sample that completes a group of R samples. Synchronous active-low reset.
// The stage count, rate range and widths follow the document; the delay-line
// form of the combs, the clear-on-rate-change and the reset are this design's
// own choices.
module cic_decimator #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned N     = 4,
  parameter int unsigned M     = 1,
  parameter int unsigned RMAX  = 128,
  parameter int unsigned OUT_W = 24,
  localparam int unsigned RW   = $clog2(RMAX + 1),
  localparam int unsigned FULL_W = IN_W + $clog2((M * RMAX) ** N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [RW-1:0]           rate,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  typedef logic signed [FULL_W-1:0] acc_t;

  acc_t            integ [N];
  acc_t            dly   [N][M];
  logic [RW-1:0]   cur_rate;
  logic [RW-1:0]   cnt;
  logic            dec_pending;
  logic            restart;
  logic [RW-1:0]   eff_rate;
  acc_t            comb  [N+1];

  assign eff_rate = (rate == '0) ? RW'(1) : (rate > RW'(RMAX)) ? RW'(RMAX) : rate;
  assign restart  = (eff_rate != cur_rate);

  // comb chain, evaluated once per decimated sample
  always_comb begin
    comb[0] = integ[N-1];
    for (int s = 0; s < N; s++)
      comb[s+1] = comb[s] - dly[s][M-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      for (int s = 0; s < N; s++) begin
        integ[s] <= '0;
        for (int d = 0; d < M; d++) dly[s][d] <= '0;
      end
      cnt         <= '0;
      dec_pending <= 1'b0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      cur_rate    <= eff_rate;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ[0] <= integ[0] + acc_t'(in_data);
        for (int s = 1; s < N; s++) integ[s] <= integ[s] + integ[s-1];
        if (cnt == cur_rate - RW'(1)) begin
          cnt         <= '0;
          dec_pending <= 1'b1;
        end else begin
          cnt         <= cnt + RW'(1);
          dec_pending <= 1'b0;
        end
      end else begin
        dec_pending <= 1'b0;
      end
      if (dec_pending) begin
        for (int s = 0; s < N; s++) begin
          dly[s][0] <= comb[s];
          for (int d = 1; d < M; d++) dly[s][d] <= dly[s][d-1];
        end
        out_valid <= 1'b1;
        out_data  <= comb[N][FULL_W-1 -: OUT_W];
      end
    end
  end

endmodule
