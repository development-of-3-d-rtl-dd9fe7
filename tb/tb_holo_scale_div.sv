// tb_holo_scale_div: checks alpha_max/255 for edge and random values against
// integer division done here, including the zero rule (result 1), and the
// latency: done is high ACC_W clock edges after the edge that takes start.
module tb_holo_scale_div;
  import holo_pkg::*;
  logic clk = 0, rst_n = 0, start;
  logic [ACC_W-1:0] alpha_max;
  logic busy, done;
  logic [DEN_W-1:0] denom;
  int checks = 0, failures = 0;

  holo_scale_div dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned a);
    int unsigned e, cyc;
    e = a / 255;
    if (e == 0) e = 1;
    if (e > 8191) e = 8191;
    alpha_max <= ACC_W'(a); start <= 1;
    @(posedge clk);
    start <= 0; alpha_max <= $urandom;
    cyc = 1;
    #1;
    while (!done) begin @(posedge clk); #1; cyc++; if (cyc > 100) break; end
    checks++;
    if (denom != DEN_W'(e)) begin failures++; $display("a=%0d denom %0d expected %0d", a, denom, e); end
    checks++;
    if (cyc != ACC_W + 1) begin failures++; $display("latency %0d", cyc); end
    @(posedge clk);
  endtask

  initial begin
    start = 0; alpha_max = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(0); run(254); run(255); run(256); run(509); run(510);
    run(2080800); run(2097151); run(7160 * 255); run(8192 * 255 - 1);
    for (int k = 0; k < 300; k++) run($urandom_range(2080800));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
