// tb_holo_alpha_max: feeds groups of 8 random holo-values with random valid
// bits and enables and checks the running maximum against a model kept
// here; also checks that `clear` restarts it.
module tb_holo_alpha_max;
  import holo_pkg::*;
  logic clk = 0, rst_n = 0, en, clear;
  logic [7:0] in_valid;
  logic [7:0][ACC_W-1:0] value;
  logic [ACC_W-1:0] alpha_max;
  int checks = 0, failures = 0;
  int unsigned model;

  holo_alpha_max #(.N(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clear = 0; in_valid = 0; value = '0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      en = $urandom_range(3) != 0;
      clear = (t % 1000 == 500);
      in_valid = 8'($urandom);
      for (int l = 0; l < 8; l++)
        value[l] = ($urandom_range(20) == 0) ? ACC_W'(2080800 - $urandom_range(50)) : ACC_W'($urandom_range(2080800));
      @(posedge clk);
      if (clear) model = 0;
      else if (en)
        for (int l = 0; l < 8; l++)
          if (in_valid[l] && value[l] > model) model = value[l];
      #1;
      checks++;
      if (alpha_max != ACC_W'(model)) begin
        failures++;
        $display("t=%0d alpha_max %0d expected %0d", t, alpha_max, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
