// holo_formatter: packs fringe bytes into link words and frames hololines.
//
// Each enabled cycle with `in_valid` it takes OUT_LANES (8) fringe bytes,
// byte 0 being the earliest sample of the hololine, and emits one link word
// one cycle later. A word counter marks the first word of each hololine
// (`sol`) and its last word (`eol`, after WORDS_PER_LINE words) and tags the
// word with the hololine index, counted from 0 at `restart`. After
// `line_count` complete hololines `lines_done` rises and stays high until the
// next `restart`. The published design names a formatter that puts the
// computed fringes into the format of the display hololines; the word
// layout (package type link_word_t) and the framing are this design's.
module holo_formatter
  import holo_pkg::*;
#(
  parameter int unsigned WORDS_PER_LINE = 32768   // 256 x 1024 bytes / 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  restart,
  input  logic [15:0]           line_count,
  input  logic                  in_valid,
  input  logic [BUS_W-1:0]      in_bytes,
  output logic                  out_valid,
  output link_word_t            out_word,
  output logic                  lines_done
);

  localparam int unsigned WCW = $clog2(WORDS_PER_LINE) + 1;

  logic [WCW-1:0] word_q;
  logic [15:0]    line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q     <= '0;
      line_q     <= '0;
      out_valid  <= 1'b0;
      out_word   <= '0;
      lines_done <= 1'b0;
    end else if (restart) begin
      word_q     <= '0;
      line_q     <= '0;
      out_valid  <= 1'b0;
      lines_done <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid && !lines_done;
      if (in_valid && !lines_done) begin
        out_word.data <= in_bytes;
        out_word.line <= LINE_W'(line_q);
        out_word.sol  <= (word_q == '0);
        out_word.eol  <= (word_q == WCW'(WORDS_PER_LINE - 1));
        if (word_q == WCW'(WORDS_PER_LINE - 1)) begin
          word_q <= '0;
          line_q <= line_q + 16'd1;
          if (line_q + 16'd1 == line_count)
            lines_done <= 1'b1;
        end else begin
          word_q <= word_q + 1'b1;
        end
      end
    end
  end

endmodule
