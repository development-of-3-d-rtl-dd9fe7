// tb_holo_normalizer: streams random holo-values through the divider
// pipeline with random enable stalls and compares each fringe byte with
// min(255, value / denom) computed here (denominator 0 counts as 1), for
// several denominators including 7160 and 8192. Also checks the 9-cycle
// latency.
module tb_holo_normalizer;
  import holo_pkg::*;
  logic clk = 0, rst_n = 0, en, in_valid;
  logic [DEN_W-1:0] denom;
  logic [ACC_W-1:0] holo_value;
  logic out_valid;
  logic [FRINGE_W-1:0] fringe;
  int checks = 0, failures = 0;

  holo_normalizer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int unsigned e; int unsigned t; } exp_t;
  exp_t q[$];
  int unsigned en_count = 0;
  exp_t x;
  int unsigned d, e;
  always @(posedge clk) if (rst_n && en) begin
    en_count++;
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        x = q.pop_front();
        if (fringe != 8'(x.e)) begin failures++; $display("fringe %0d expected %0d", fringe, x.e); end
        checks++;
        if (en_count - x.t != 9) begin failures++; $display("latency %0d", en_count - x.t); end
      end
    end
    if (in_valid) begin
      d = (denom == 0) ? 1 : denom;
      e = holo_value / d;
      if (e > 255) e = 255;
      q.push_back('{e, en_count});
    end
  end

  int unsigned dens[8] = '{8160, 8191, 7160, 1, 0, 100, 4095, 4096};

  initial begin
    en = 0; in_valid = 0; denom = 8160; holo_value = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (dens[d]) begin
      // let the pipeline drain before the denominator changes
      en <= 1; in_valid <= 0;
      repeat (12) @(posedge clk);
      denom <= DEN_W'(dens[d]);
      for (int k = 0; k < 2000; k++) begin
        en <= ($urandom_range(4) != 0);
        in_valid <= $urandom_range(5) != 0;
        case ($urandom_range(3))
          0: holo_value <= ACC_W'($urandom_range(2080800));
          1: holo_value <= ACC_W'($urandom_range(300000));
          2: holo_value <= ACC_W'((dens[d] == 0 ? 1 : dens[d]) * $urandom_range(256));
          default: holo_value <= ACC_W'($urandom);
        endcase
        @(posedge clk);
      end
    end
    en <= 1; in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
