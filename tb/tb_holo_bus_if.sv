// tb_holo_bus_if: drives writes to every address region and checks the
// decoded strobes, addresses, register values, the start pulse and the
// stream back-pressure against the address map.
module tb_holo_bus_if;
  import holo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_we, bus_ready;
  logic [BUS_AW-1:0] bus_addr;
  logic [BUS_W-1:0] bus_wdata, wdata;
  logic basis_we, pixel_we, stream_push, stream_full, start, denom_we;
  logic [BUS_AW-3:0] basis_waddr, pixel_waddr;
  mode_e mode;
  logic [15:0] line_count;
  logic [DEN_W-1:0] denom_wdata;
  int checks = 0, failures = 0;

  holo_bus_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bus_we = 0; bus_addr = 0; bus_wdata = 0; stream_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      logic [1:0] r;
      logic [BUS_AW-3:0] off;
      r = 2'($urandom);
      off = (BUS_AW-2)'($urandom);
      if (r == 0) off = (BUS_AW-2)'($urandom_range(1));
      bus_we = $urandom_range(3) != 0;
      bus_addr = {r, off};
      bus_wdata = {$urandom, $urandom};
      stream_full = $urandom_range(1);
      #1;
      chk(bus_ready == !(r == 3 && stream_full), "ready");
      chk(basis_we == (bus_we && r == 1), "basis_we");
      chk(pixel_we == (bus_we && r == 2), "pixel_we");
      chk(stream_push == (bus_we && r == 3 && !stream_full), "stream_push");
      chk(denom_we == (bus_we && r == 0 && off[7:0] == 1), "denom_we");
      if (basis_we) chk(basis_waddr == off, "basis_waddr");
      if (pixel_we) chk(pixel_waddr == off, "pixel_waddr");
      if (denom_we) chk(denom_wdata == bus_wdata[12:0], "denom_wdata");
      chk(wdata == bus_wdata, "wdata");
      @(posedge clk);
      #1;
      if (bus_we && r == 0 && off[7:0] == 0) begin
        chk(mode == mode_e'(bus_wdata[1:0]), "mode");
        chk(line_count == bus_wdata[31:16], "line_count");
        chk(start == bus_wdata[8], "start");
      end else
        chk(start == 0, "start idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
