// holo_scale_div: computes the normalisation denominator alpha_max / 255.
//
// Equation 3 divides every holo-value by alpha_max/255, so this quotient is
// needed once per frame. A sequential restoring divider produces it: after
// `start` it shifts the 21-bit alpha_max in one bit per cycle, subtracting
// 255 whenever the partial remainder allows. After ACC_W cycles `done` pulses
// for one cycle and `denom` holds the new quotient (it keeps the previous one
// until then). With alpha_max at most 32*255*255 the quotient fits the
// published 13-bit denominator; a larger quotient saturates at 8191. A
// quotient of zero (alpha_max below 255) is returned as 1 so that the divider
// that follows never divides by zero. The sequential form, the saturation and
// the zero rule are this design's choices.
// Latency: `done` is high ACC_W clock edges after the edge that takes
// `start`; `busy` is high in between.
module holo_scale_div
  import holo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ACC_W-1:0]  alpha_max,
  output logic              busy,
  output logic              done,
  output logic [DEN_W-1:0]  denom
);

  localparam logic [9:0] DIVISOR = 10'd255;

  logic [ACC_W-1:0] num_q;    // dividend bits still to shift in
  logic [ACC_W-1:0] quo_q;    // quotient being built
  logic [8:0]       rem_q;    // partial remainder, below 255 between steps
  logic [4:0]       cnt_q;
  logic [9:0]       trial;
  logic             take;
  logic [ACC_W-1:0] quo_next;

  assign trial    = {rem_q, num_q[ACC_W-1]};
  assign take     = trial >= DIVISOR;
  assign quo_next = {quo_q[ACC_W-2:0], take};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q <= '0;
      quo_q <= '0;
      rem_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      denom <= DEN_W'(1);
    end else begin
      done <= 1'b0;
      if (start) begin
        num_q <= alpha_max;
        quo_q <= '0;
        rem_q <= '0;
        cnt_q <= 5'(ACC_W);
        busy  <= 1'b1;
      end else if (busy) begin
        num_q <= num_q << 1;
        rem_q <= take ? 9'(trial - DIVISOR) : trial[8:0];
        quo_q <= quo_next;
        cnt_q <= cnt_q - 5'd1;
        if (cnt_q == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (quo_next == '0)
            denom <= DEN_W'(1);
          else if (quo_next > ACC_W'({DEN_W{1'b1}}))
            denom <= '1;
          else
            denom <= DEN_W'(quo_next);
        end
      end
    end
  end

endmodule
