// cordic_mag: vectoring-mode CORDIC that returns the magnitude of a complex
// correlation value, the first half of the peak-detection stage (P4).
//
// The vector (x, y) is first folded into the right half plane (x<0 -> (-x,-y),
// a 180-degree turn that keeps the length), then rotated by +-atan(2^-i),
// i = 0 .. ITER-1, always towards the x axis, so y is driven to zero and the
// length collects in x. Only shifts and additions are used. The result
// carries the CORDIC gain K = prod sqrt(1 + 2^-2i) ~= 1.64676; it is not
// divided out, because every magnitude of a burst is scaled alike and the
// peak search and the peak-to-valley comparison are unaffected.
// Internal registers are WL+2 bits wide so the gain cannot overflow; the
// output is saturated to WL unsigned bits (same fixed-point scaling as the
// input, F_WL fraction bits).
//
// Interface: in_valid/in_ready handshake, one vector at a time, with a TAG_W
// tag (the lag index) returned alongside the result. out_valid pulses for one
// cycle ITER+1 clocks after the vector is accepted; in_ready is high whenever
// the unit is idle. Synchronous active-low reset.
// The CORDIC rotation to eliminate y follows the document; the iterative
// (one rotation per clock) schedule, ITER and the handling of the gain are
// this design's choices.
module cordic_mag #(
  parameter int unsigned WL    = 66,
  parameter int unsigned ITER  = 32,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned IW   = WL + 2,
  localparam int unsigned CW   = $clog2(ITER + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [WL-1:0] in_x,
  input  logic signed [WL-1:0] in_y,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic [WL-1:0]        out_mag,
  output logic [TAG_W-1:0]     out_tag
);

  logic signed [IW-1:0] x, y;
  logic [CW-1:0]        it;
  logic                 active;
  logic [TAG_W-1:0]     tag;

  assign in_ready = !active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      it        <= '0;
      x         <= '0;
      y         <= '0;
      tag       <= '0;
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!active) begin
        if (in_valid) begin
          active <= 1'b1;
          it     <= '0;
          tag    <= in_tag;
          if (in_x < 0) begin
            x <= -IW'(in_x);
            y <= -IW'(in_y);
          end else begin
            x <= IW'(in_x);
            y <= IW'(in_y);
          end
        end
      end else if (it == CW'(ITER)) begin
        active    <= 1'b0;
        out_valid <= 1'b1;
        out_tag   <= tag;
        // x is non-negative here; saturate to WL unsigned bits
        if (x[IW-1:WL] != '0) out_mag <= '1;
        else                  out_mag <= x[WL-1:0];
      end else begin
        if (y >= 0) begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
        end else begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
        end
        it <= it + CW'(1);
      end
    end
  end

endmodule
