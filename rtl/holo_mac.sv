// holo_mac: one superposition pipeline (multiplier and accumulator).
//
// Each enabled cycle it takes one pixel byte and one basis byte, multiplies
// them into a 16-bit product (stage 1, registered), and adds the product to a
// 21-bit running sum (stage 2). The first pair of a sum is marked with
// `first`, which restarts the sum; the pair marked `last` completes it and the
// following cycle `res_valid` pulses with the finished holo-value in `res`.
// With 32 views the sum of 32 products of two bytes (at most 2,080,800) fits
// in 21 bits, as in the published pipeline: 8x8 multipliers, 16-by-21-bit
// adders with 21-bit sums.
//
// Timing: two enabled cycles from the `last` pair to `res_valid`. When `en`
// is low nothing moves (this is how the whole engine stalls); `res_valid`
// is only meaningful in cycles where `en` is high.
module holo_mac
  import holo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  logic              first,
  input  logic              last,
  input  logic [PIX_W-1:0]  pixel,
  input  logic [PIX_W-1:0]  basis,
  output logic              res_valid,
  output logic [ACC_W-1:0]  res
);

  logic [PROD_W-1:0] prod_q;
  logic              p_valid_q, p_first_q, p_last_q;
  logic [ACC_W-1:0]  acc_q;
  logic              done_q;

  // Stage 1: 8x8 multiplier.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q    <= '0;
      p_valid_q <= 1'b0;
      p_first_q <= 1'b0;
      p_last_q  <= 1'b0;
    end else if (en) begin
      prod_q    <= PROD_W'(pixel) * PROD_W'(basis);
      p_valid_q <= in_valid;
      p_first_q <= first;
      p_last_q  <= last;
    end
  end

  // Stage 2: 16-by-21-bit accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q  <= '0;
      done_q <= 1'b0;
    end else if (en) begin
      if (p_valid_q)
        acc_q <= (p_first_q ? '0 : acc_q) + ACC_W'(prod_q);
      done_q <= p_valid_q && p_last_q;
    end
  end

  assign res       = acc_q;
  assign res_valid = done_q;

endmodule
