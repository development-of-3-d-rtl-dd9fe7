// tb_holo_mac: checks one superposition pipeline against sums of products
// computed here. Random sums of 32 byte pairs (and all-255 pairs for the
// 21-bit maximum) are fed with random enable stalls; every result must equal
// the independently computed sum, and must appear 2 enabled cycles after the
// last pair.
module tb_holo_mac;
  import holo_pkg::*;
  logic clk = 0, rst_n = 0, en, in_valid, first, last;
  logic [7:0] pixel, basis;
  logic res_valid;
  logic [ACC_W-1:0] res;
  int checks = 0, failures = 0;

  holo_mac dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned expect_q[$];
  int unsigned e;
  int en_cycles_since_last;
  // result checker: counts enabled cycles after the last pair
  always @(posedge clk) if (rst_n && en) begin
    en_cycles_since_last++;
    if (res_valid) begin
      checks++;
      if (expect_q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = expect_q.pop_front();
        if (res != ACC_W'(e)) begin failures++; $display("res %0d expected %0d", res, e); end
      end
      checks++;
      if (en_cycles_since_last != 2) begin failures++; $display("latency %0d", en_cycles_since_last); end
    end
    if (in_valid && last) en_cycles_since_last = 0;
  end

  task automatic send(input bit all_max);
    int unsigned sum = 0;
    for (int i = 0; i < 32; i++) begin
      logic [7:0] p, b;
      p = all_max ? 8'hff : 8'($urandom);
      b = all_max ? 8'hff : 8'($urandom);
      sum += p * b;
      if (i == 31) expect_q.push_back(sum);
      // random stall cycles
      while ($urandom_range(3) == 0) begin
        en <= 0; in_valid <= $urandom; pixel <= $urandom; basis <= $urandom; first <= $urandom; last <= $urandom;
        @(posedge clk);
      end
      en <= 1; in_valid <= 1; pixel <= p; basis <= b; first <= (i == 0); last <= (i == 31);
      @(posedge clk);
    end
  endtask

  initial begin
    en = 0; in_valid = 0; first = 0; last = 0; pixel = 0; basis = 0;
    en_cycles_since_last = 100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(1);
    for (int k = 0; k < 200; k++) send(0);
    en <= 1; in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("%0d results missing", expect_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
