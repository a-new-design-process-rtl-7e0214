// valley_power: estimates the correlation level in the "valley" beside the
// peak, the Valley Power (VP) output used with the ToA for synchronisation.
//
// After start it reads the magnitudes at distances NEAR..FAR lags on both
// sides of the integer peak lag (2*(FAR-NEAR+1) = 8 positions at the
// defaults), skipping those outside 0..NLAGS-1, sums them and divides the sum
// by the number of positions read (a restoring divider, one quotient bit per
// clock). The result is the mean valley magnitude in the chain's WL-bit
// fixed-point format (floor); it is 0 if no position was in range. Like the
// peak amplitude it carries the CORDIC gain, so the two compare directly.
//
// Interface: start with peak_lag valid; mag_raddr/mag_rdata read the
// magnitude store (registered read, one clock latency). done pulses with
// valley and count (the number of valley positions averaged); both hold until
// the next start. Latency: 2*(FAR-NEAR+1) + WL + CW + 2 clocks, CW being the
// width of count (80 clocks at the defaults).
// The document names the valley power as an output; which positions form the
// valley, and the use of magnitudes rather than squared magnitudes, are this
// design's choices.
module valley_power #(
  parameter int unsigned WL    = 66,
  parameter int unsigned NLAGS = 141,
  parameter int unsigned NEAR  = 2,
  parameter int unsigned FAR   = 5,
  localparam int unsigned LAGW = (NLAGS > 1) ? $clog2(NLAGS) : 1,
  localparam int unsigned NPOS = 2 * (FAR - NEAR + 1),
  localparam int unsigned CW   = $clog2(NPOS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [LAGW-1:0] peak_lag,
  output logic [LAGW-1:0] mag_raddr,
  input  logic [WL-1:0]   mag_rdata,
  output logic            busy,
  output logic            done,
  output logic [WL-1:0]   valley,
  output logic [CW-1:0]   count
);

  localparam int unsigned SW = WL + CW;   // sum width
  localparam int unsigned PW = $clog2(NPOS + 1);
  localparam int unsigned BW = $clog2(SW + 1);

  typedef enum logic [1:0] {IDLE, GATHER, DIVIDE} state_t;

  state_t          state;
  logic [PW-1:0]   idx;        // position being issued
  logic [LAGW-1:0] lag;
  int              d_off, pos;
  logic            in_range;
  logic            s1_valid, s1_in_range, s1_last;
  logic [SW-1:0]   sum;
  logic [CW-1:0]   cnt;
  logic [SW-1:0]   dividend;   // shifts left, quotient bits enter at the bottom
  logic [CW-1:0]   rem;
  logic [CW:0]     rem_sh;
  logic [BW-1:0]   bitn;

  // position idx: even -> below the peak, odd -> above, distance NEAR + idx/2
  assign d_off      = int'(NEAR) + int'(idx) / 2;
  assign pos       = idx[0] ? int'(lag) + d_off : int'(lag) - d_off;
  assign in_range  = (pos >= 0) && (pos < int'(NLAGS));
  assign mag_raddr = in_range ? LAGW'(pos) : '0;
  assign busy      = (state != IDLE);
  assign rem_sh    = {rem, dividend[SW-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= IDLE;
      idx         <= '0;
      lag         <= '0;
      s1_valid    <= 1'b0;
      s1_in_range <= 1'b0;
      s1_last     <= 1'b0;
      sum         <= '0;
      cnt         <= '0;
      dividend    <= '0;
      rem         <= '0;
      bitn        <= '0;
      done        <= 1'b0;
      valley      <= '0;
      count       <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state    <= GATHER;
          lag      <= peak_lag;
          idx      <= '0;
          sum      <= '0;
          cnt      <= '0;
          s1_valid <= 1'b0;
        end
        GATHER: begin
          // issue one read per clock; accumulate the one issued last clock
          s1_valid    <= (idx < PW'(NPOS));
          s1_in_range <= in_range;
          s1_last     <= (idx == PW'(NPOS - 1));
          if (idx < PW'(NPOS)) idx <= idx + PW'(1);
          if (s1_valid && s1_in_range) begin
            sum <= sum + SW'(mag_rdata);
            cnt <= cnt + CW'(1);
          end
          if (s1_valid && s1_last) begin
            state    <= DIVIDE;
            dividend <= (s1_in_range) ? sum + SW'(mag_rdata) : sum;
            rem      <= '0;
            bitn     <= '0;
            if (s1_in_range) cnt <= cnt + CW'(1);
          end
        end
        DIVIDE: begin
          if (bitn == BW'(SW)) begin
            state  <= IDLE;
            done   <= 1'b1;
            count  <= cnt;
            valley <= (cnt == '0) ? '0 : dividend[WL-1:0];
          end else begin
            bitn <= bitn + BW'(1);
            if (rem_sh >= {1'b0, cnt}) begin
              rem      <= CW'(rem_sh - {1'b0, cnt});
              dividend <= {dividend[SW-2:0], 1'b1};
            end else begin
              rem      <= rem_sh[CW-1:0];
              dividend <= {dividend[SW-2:0], 1'b0};
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
