// holo_normalizer: one normaliser pipeline of equation 3,
//   fringe = holo_value / denom,  denom = alpha_max / 255,
// with a 21-bit numerator, a 13-bit denominator and an 8-bit quotient, the
// widths of the published divider.
//
// It is a fully pipelined restoring divider that accepts one value per
// enabled cycle. Stage 0 checks for overflow: when holo_value >= 256*denom the
// result saturates at 255 (possible because the denominator is a truncated
// alpha_max/255). Stages 1..8 each decide one quotient bit, most significant
// first, by comparing the remainder with denom shifted left. A denominator of
// 0 is treated as 1. The denominator is a per-run register, so it is not
// carried along the pipeline and must stay constant while values are in
// flight. Saturation, the zero rule and the stage split are this design's
// choices.
// Latency: 9 enabled cycles from in_valid to out_valid; `en` low freezes it.
module holo_normalizer
  import holo_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [DEN_W-1:0]     denom,
  input  logic                 in_valid,
  input  logic [ACC_W-1:0]     holo_value,
  output logic                 out_valid,
  output logic [FRINGE_W-1:0]  fringe
);

  localparam int unsigned STAGES = FRINGE_W;   // one quotient bit per stage
  localparam int unsigned WIDE   = ACC_W + 1;

  logic [DEN_W-1:0] den;
  assign den = (denom == '0) ? DEN_W'(1) : denom;

  // stage registers: index 0 is the overflow stage
  logic [STAGES:0]               v_q;
  logic [STAGES:0]               sat_q;
  logic [STAGES:0][WIDE-1:0]     rem_q;
  logic [STAGES:0][FRINGE_W-1:0] quo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= '0;
      sat_q <= '0;
      rem_q <= '0;
      quo_q <= '0;
    end else if (en) begin
      v_q[0]   <= in_valid;
      sat_q[0] <= WIDE'(holo_value) >= (WIDE'(den) << FRINGE_W);
      rem_q[0] <= WIDE'(holo_value);
      quo_q[0] <= '0;
      for (int unsigned s = 1; s <= STAGES; s++) begin
        logic [WIDE-1:0] d_sh;
        d_sh = WIDE'(den) << (STAGES - s);
        v_q[s]   <= v_q[s-1];
        sat_q[s] <= sat_q[s-1];
        if (rem_q[s-1] >= d_sh) begin
          rem_q[s] <= rem_q[s-1] - d_sh;
          quo_q[s] <= quo_q[s-1] | FRINGE_W'(1 << (STAGES - s));
        end else begin
          rem_q[s] <= rem_q[s-1];
          quo_q[s] <= quo_q[s-1];
        end
      end
    end
  end

  assign out_valid = v_q[STAGES];
  assign fringe    = sat_q[STAGES] ? '1 : quo_q[STAGES];

endmodule
