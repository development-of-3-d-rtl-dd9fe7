// tb_holo_formatter: sends numbered words with random gaps and stalls and
// checks every output word's data, sol/eol framing and hololine tag against
// counts kept here, and that lines_done rises after line_count lines and
// blocks further words.
module tb_holo_formatter;
  import holo_pkg::*;
  localparam int WPL = 5;
  logic clk = 0, rst_n = 0, en, restart, in_valid;
  logic [15:0] line_count;
  logic [BUS_W-1:0] in_bytes;
  logic out_valid, lines_done;
  link_word_t out_word;
  int checks = 0, failures = 0;

  holo_formatter #(.WORDS_PER_LINE(WPL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned sent = 0, got = 0;
  always @(posedge clk) if (rst_n && en && !restart) begin
    if (out_valid) begin
      checks++;
      if (out_word.data != BUS_W'(got) * 64'h0101_0101_0101_0101 ||
          out_word.sol != (got % WPL == 0) || out_word.eol != (got % WPL == WPL - 1) ||
          out_word.line != LINE_W'(got / WPL)) begin
        failures++;
        $display("word %0d: data %h sol %0b eol %0b line %0d", got, out_word.data, out_word.sol, out_word.eol, out_word.line);
      end
      got++;
    end
  end

  initial begin
    en = 0; restart = 0; in_valid = 0; in_bytes = 0; line_count = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      restart <= 1; line_count <= 16'(3 + run);
      @(posedge clk);
      restart <= 0;
      sent = 0; got = 0;
      while (sent < (3 + run) * WPL + 4) begin
        en <= $urandom_range(3) != 0;
        in_valid <= $urandom_range(2) != 0;
        in_bytes <= BUS_W'(sent) * 64'h0101_0101_0101_0101;
        @(posedge clk);
        if (en && in_valid) sent++;
      end
      en <= 1; in_valid <= 0;
      repeat (3) @(posedge clk);
      checks++;
      if (got != (3 + run) * WPL) begin failures++; $display("got %0d words", got); end
      checks++;
      if (!lines_done) begin failures++; $display("lines_done low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
