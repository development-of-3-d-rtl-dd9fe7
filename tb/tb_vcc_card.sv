// tb_vcc_card: three links send hololines (random gaps) of tagged bytes to a
// small concentrator card; the bench plays the other cards' agreement by
// raising line_go at random times once line_ready is seen. Every DAC sample
// on every channel is checked against the expected hololine byte, as is the
// sol marker, the line length and the back-pressure (links are held while a
// FIFO is full, so nothing is lost).
module tb_vcc_card;
  import holo_pkg::*;
  localparam int LINKS = 3, CH = 6, WPL = 6, LINES = 6, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic [LINKS-1:0] link_valid, link_ready;
  link_word_t [LINKS-1:0] link_word;
  logic line_ready, line_go, dac_valid, dac_sol;
  logic [CH-1:0][7:0] dac_code;
  int checks = 0, failures = 0;
  int stalls = 0;

  vcc_card #(.LINKS(LINKS), .FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte b of hololine t on link c
  function automatic logic [7:0] val(int c, int t, int b);
    return 8'(c * 71 + t * 13 + b * 7 + b / 8);
  endfunction

  // producers
  int w[LINKS];
  for (genvar c = 0; c < LINKS; c++) begin : g_src
    always @(posedge clk) if (rst_n) begin
      if (link_valid[c] && link_ready[c]) w[c]++;
      else if (link_valid[c]) stalls++;
    end
    always @(negedge clk) begin
      int t, k;
      t = w[c] / WPL; k = w[c] % WPL;
      link_valid[c] = rst_n && t < LINES && ($urandom_range(3) != 0 || link_valid[c] && !link_ready[c]);
      for (int b = 0; b < 8; b++) link_word[c].data[b*8 +: 8] = val(c, t, k * 8 + b);
      link_word[c].sol = (k == 0);
      link_word[c].eol = (k == WPL - 1);
      link_word[c].line = LINE_W'(t);
    end
  end

  // display side
  int lines_out = 0, sample = 0;
  always @(negedge clk) line_go = line_ready && $urandom_range(2) == 0;
  always @(posedge clk) if (rst_n && dac_valid) begin
    checks++;
    if (dac_sol != (sample == 0)) begin failures++; $display("sol at sample %0d", sample); end
    for (int ch = 0; ch < CH; ch++) begin
      int c, t;
      c = ch / 2; t = lines_out * 2 + ch % 2;
      checks++;
      if (dac_code[ch] != val(c, t, sample)) begin
        failures++; $display("line %0d ch %0d sample %0d: %0d expected %0d", lines_out, ch, sample, dac_code[ch], val(c, t, sample));
      end
    end
    sample++;
    if (sample == WPL * 8) begin sample = 0; lines_out++; end
  end

  initial begin
    link_valid = 0; link_word = '0; line_go = 0;
    foreach (w[c]) w[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (lines_out == LINES / 2);
    repeat (20) @(posedge clk);
    checks++;
    if (dac_valid || lines_out != LINES / 2) begin failures++; $display("extra output"); end
    checks++;
    if (stalls == 0) begin failures++; $display("back-pressure never happened"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
