// tb_holo_sync_fifo: random pushes and pops against a queue model; checks
// data order, empty, full and count every cycle.
module tb_holo_sync_fifo;
  logic clk = 0, rst_n = 0, push, pop;
  logic [15:0] wdata, rdata;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];

  holo_sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bias;
  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      bias = (t / 500) % 2;
      #1;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 16) || count != 5'(model.size())) begin
        failures++; $display("t=%0d flags e=%0b f=%0b c=%0d model %0d", t, empty, full, count, model.size());
      end
      if (!empty) begin
        checks++;
        if (rdata != model[0]) begin failures++; $display("rdata %h expected %h", rdata, model[0]); end
      end
      push = !full && ($urandom_range(3) < (bias ? 3 : 1));
      pop  = !empty && ($urandom_range(3) < (bias ? 1 : 3));
      wdata = 16'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
