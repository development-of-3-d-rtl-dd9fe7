// holo_alpha_max: comparator stage that finds alpha_max, the largest
// un-normalised holo-value of a hologram frame.
//
// Up to N holo-values arrive per enabled cycle (one per output lane, each with
// its own valid bit). A compare tree picks the largest of them and a 21-bit
// comparator keeps it in the alpha_max register if it beats the value held.
// `clear` (one cycle, at the start of a frame) resets alpha_max to zero,
// the alpha_min of the normalisation. The register follows its inputs by one
// enabled cycle. The tree structure and the clear input are this design's
// choices; the published design only names the comparator and the register.
module holo_alpha_max
  import holo_pkg::*;
#(
  parameter int unsigned N = OUT_LANES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      clear,
  input  logic [N-1:0]              in_valid,
  input  logic [N-1:0][ACC_W-1:0]   value,
  output logic [ACC_W-1:0]          alpha_max
);

  logic [ACC_W-1:0] group_max;

  always_comb begin
    group_max = '0;
    for (int unsigned l = 0; l < N; l++)
      if (in_valid[l] && value[l] > group_max)
        group_max = value[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      alpha_max <= '0;
    else if (clear)
      alpha_max <= '0;
    else if (en && group_max > alpha_max)
      alpha_max <= group_max;
  end

endmodule
