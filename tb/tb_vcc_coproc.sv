// tb_vcc_coproc: the concentrator co-processor with its six FIFOs modelled
// here as queues. Checks that each link word is routed to FIFO 2c + (line
// parity), that a link is held off exactly when its target FIFO is full,
// that line_ready rises only when every FIFO holds a complete hololine,
// and that read-out delivers the bytes of all channels in step with the
// sol marker, one byte per clock.
module tb_vcc_coproc;
  import holo_pkg::*;
  localparam int LINKS = 3, CH = 6, FW = 65, DEPTH = 4, WPL = 3, LINES = 6;
  logic clk = 0, rst_n = 0;
  logic [LINKS-1:0] link_valid, link_ready;
  link_word_t [LINKS-1:0] link_word;
  logic [CH-1:0] fifo_push, fifo_full, fifo_pop, fifo_empty;
  logic [CH-1:0][FW-1:0] fifo_wdata, fifo_rdata;
  logic line_ready, line_go, dac_valid, dac_sol;
  logic [CH-1:0][7:0] dac_code;
  int checks = 0, failures = 0;

  vcc_coproc #(.LINKS(LINKS), .FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FW-1:0] q[CH][$];
  int lines_in_q[CH];
  always_comb
    for (int ch = 0; ch < CH; ch++) begin
      fifo_full[ch]  = q[ch].size() >= DEPTH;
      fifo_empty[ch] = q[ch].size() == 0;
      fifo_rdata[ch] = fifo_empty[ch] ? '0 : q[ch][0];
    end

  function automatic logic [7:0] val(int c, int t, int b);
    return 8'(c * 53 + t * 11 + b * 3);
  endfunction

  int w[LINKS];
  int full_holds = 0;
  int lines_out = 0, sample = 0;
  bit all_have;

  always @(posedge clk) if (rst_n) begin
    // routing and hold-off checks, then the FIFO model update
    all_have = 1;
    for (int ch = 0; ch < CH; ch++) if (lines_in_q[ch] == 0) all_have = 0;
    checks++;
    if (line_ready && !all_have) begin failures++; $display("line_ready without complete lines"); end
    for (int c = 0; c < LINKS; c++) begin
      int ch;
      ch = 2 * c + int'(link_word[c].line[0]);
      checks++;
      if (link_ready[c] != !fifo_full[ch]) begin failures++; $display("link %0d ready wrong", c); end
      if (link_valid[c] && !link_ready[c]) full_holds++;
      if (link_valid[c] && link_ready[c]) begin
        checks++;
        if (!fifo_push[ch] || fifo_wdata[ch] != {link_word[c].eol, link_word[c].data}) begin
          failures++; $display("link %0d word not routed to FIFO %0d", c, ch);
        end
        w[c]++;
      end
    end
    for (int ch = 0; ch < CH; ch++) begin
      if (fifo_pop[ch]) begin
        if (q[ch][0][64]) lines_in_q[ch]--;
        void'(q[ch].pop_front());
      end
      if (fifo_push[ch]) begin
        q[ch].push_back(fifo_wdata[ch]);
        if (fifo_wdata[ch][64]) lines_in_q[ch]++;
      end
    end
    if (dac_valid) begin
      checks++;
      if (dac_sol != (sample == 0)) begin failures++; $display("sol wrong"); end
      for (int ch = 0; ch < CH; ch++) begin
        checks++;
        if (dac_code[ch] != val(ch / 2, lines_out * 2 + ch % 2, sample)) begin
          failures++; $display("ch %0d sample %0d: %0d", ch, sample, dac_code[ch]);
        end
      end
      sample++;
      if (sample == WPL * 8) begin sample = 0; lines_out++; end
    end
  end

  for (genvar c = 0; c < LINKS; c++) begin : g_src
    always @(negedge clk) begin
      int t, k;
      t = w[c] / WPL; k = w[c] % WPL;
      link_valid[c] = rst_n && t < LINES && ($urandom_range(2) != 0 || link_valid[c] && !link_ready[c]);
      for (int b = 0; b < 8; b++) link_word[c].data[b*8 +: 8] = val(c, t, k * 8 + b);
      link_word[c].sol = (k == 0);
      link_word[c].eol = (k == WPL - 1);
      link_word[c].line = LINE_W'(t);
    end
  end
  always @(negedge clk) line_go = line_ready && $urandom_range(3) == 0;

  initial begin
    link_valid = 0; link_word = '0; line_go = 0;
    foreach (w[c]) w[c] = 0;
    foreach (lines_in_q[ch]) lines_in_q[ch] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (lines_out == LINES / 2);
    repeat (10) @(posedge clk);
    checks++;
    if (full_holds == 0) begin failures++; $display("full FIFO never held a link"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
