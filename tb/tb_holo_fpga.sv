// tb_holo_fpga: exercises a reduced processor FPGA (4 views, 32 pipelines,
// 64-sample basis fringes, 4 hogels, 3 hololines) in all four modes.
// Pixel and basis memories are loaded over the bus with random bytes; the
// bench computes every holo-value itself from equation
//   H(t, j*64+n) = sum_i pixel_i(j, t) * basis_i(n)
// and checks:
//  * MODE_MAC_CMP: every raw value in order, alpha_max and alpha_max/255,
//    with random raw_ready stalls;
//  * MODE_TANDEM: every link word against min(255, H/denom), the sol/eol
//    framing and hololine tags, with random link stalls; and, with no
//    stalls, one link word per clock from the first to the last word;
//  * MODE_NORMALIZE: the stored raw values streamed back over the bus give
//    the same link words;
//  * MODE_PASSTHRU: precomputed words arrive unchanged and framed.
// Each stall source and each mode must occur at least once.
module tb_holo_fpga;
  import holo_pkg::*;
  localparam int VIEWS = 4, LANES = 32, BASIS_LEN = 64, HOGELS = 4, PIX_LINES = 3;
  localparam int MSEG = BASIS_LEN / LANES, CHUNKS = LANES / 8;
  localparam int LINE_LEN = HOGELS * BASIS_LEN, WPL = LINE_LEN / 8;

  logic clk = 0, rst_n = 0;
  logic bus_we, bus_ready;
  logic [BUS_AW-1:0] bus_addr;
  logic [BUS_W-1:0] bus_wdata;
  logic raw_valid, raw_ready;
  logic [RAW_GROUP_W-1:0] raw_group;
  logic link_valid, link_ready;
  link_word_t link_word;
  logic busy, done;
  logic [ACC_W-1:0] alpha_max;
  logic [DEN_W-1:0] denom;
  int checks = 0, failures = 0;

  holo_fpga #(.VIEWS(VIEWS), .LANES(LANES), .BASIS_LEN(BASIS_LEN), .HOGELS(HOGELS),
              .PIX_LINES(PIX_LINES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] basis [VIEWS][BASIS_LEN];
  logic [7:0] pixel [PIX_LINES][HOGELS][VIEWS];
  int unsigned H [PIX_LINES][LINE_LEN];
  int unsigned amax, den;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one bus write, driven between clock edges and held until accepted
  task automatic bus_write(input logic [1:0] region, input int unsigned off, input logic [63:0] d);
    bit taken;
    taken = 0;
    while (!taken) begin
      @(negedge clk);
      bus_we = 1; bus_addr = {region, (BUS_AW-2)'(off)}; bus_wdata = d;
      #1 taken = bus_ready;
      @(posedge clk);
    end
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic start_run(input mode_e m, input int lines);
    bus_write(REG_REGION, REG_CTRL, {32'(lines) << 16 | 32'h100 | 32'(m)});
  endtask

  // expected link words
  link_word_t exp_q[$];
  link_word_t lw;
  int link_stall_cycles = 0, raw_stall_cycles = 0;
  int first_word_cyc, last_word_cyc, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && link_valid && !link_ready) link_stall_cycles++;
    if (rst_n && raw_valid && !raw_ready) raw_stall_cycles++;
    if (rst_n && link_valid && link_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected link word"); end
      else begin
        lw = exp_q.pop_front();
        if (link_word !== lw) begin
          failures++;
          $display("link word %h/%0b%0b/%0d expected %h/%0b%0b/%0d", link_word.data, link_word.sol,
                   link_word.eol, link_word.line, lw.data, lw.sol, lw.eol, lw.line);
        end
      end
      if (link_word.sol && link_word.line == 0) first_word_cyc = cyc;
      last_word_cyc = cyc;
    end
  end

  int dbgn = 0;
  // raw values collected in MODE_MAC_CMP
  logic [RAW_GROUP_W-1:0] raw_store[$];
  always @(posedge clk) if (rst_n && raw_valid && raw_ready) raw_store.push_back(raw_group);

  function automatic int unsigned norm(int unsigned v, int unsigned d);
    int unsigned q;
    if (d == 0) d = 1;
    q = v / d;
    return q > 255 ? 255 : q;
  endfunction

  task automatic expect_lines(input int lines, input bit passthru, ref logic [63:0] pw[$]);
    for (int t = 0; t < lines; t++)
      for (int w = 0; w < WPL; w++) begin
        link_word_t x;
        x.line = LINE_W'(t); x.sol = (w == 0); x.eol = (w == WPL - 1);
        if (passthru) x.data = pw[t * WPL + w];
        else for (int b = 0; b < 8; b++) x.data[b*8 +: 8] = 8'(norm(H[t][w*8+b], den));
        exp_q.push_back(x);
      end
  endtask

  task automatic wait_done(input string what);
    int n = 0;
    while (!done && n < 100000) begin @(posedge clk); n++; end
    chk(done, {what, " done"});
    @(posedge clk);
    chk(exp_q.size() == 0, {what, " all link words seen"});
  endtask

  logic [63:0] none[$];
  logic [63:0] pw[$];
  bit ready_random;
  always @(negedge clk) begin
    link_ready = ready_random ? ($urandom_range(3) != 0) : 1'b1;
    raw_ready  = ready_random ? ($urandom_range(3) != 0) : 1'b1;
  end

  initial begin
    bus_we = 0; bus_addr = 0; bus_wdata = 0; ready_random = 1;
    first_word_cyc = 0; last_word_cyc = 0;
    foreach (basis[i, n]) basis[i][n] = 8'($urandom);
    foreach (pixel[t, j, i]) pixel[t][j][i] = 8'($urandom);
    basis[0][5] = 8'hff; pixel[1][2][0] = 8'hff;
    amax = 0;
    foreach (H[t, p]) begin
      int j, n;
      j = p / BASIS_LEN; n = p % BASIS_LEN;
      H[t][p] = 0;
      for (int i = 0; i < VIEWS; i++) H[t][p] += pixel[t][j][i] * basis[i][n];
      if (H[t][p] > amax) amax = H[t][p];
    end
    den = amax / 255; if (den == 0) den = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the basis memory: row m*VIEWS+i, chunk c holds basis_i(m*LANES + 8c .. +7)
    for (int m = 0; m < MSEG; m++)
      for (int i = 0; i < VIEWS; i++)
        for (int c = 0; c < CHUNKS; c++) begin
          logic [63:0] d;
          for (int b = 0; b < 8; b++) d[b*8 +: 8] = basis[i][m*LANES + c*8 + b];
          bus_write(BASIS_REGION, (m*VIEWS + i) * CHUNKS + c, d);
        end
    // load the pixel memory: byte address (t*HOGELS + j)*VIEWS + i
    for (int a = 0; a < PIX_LINES * HOGELS * VIEWS / 8; a++) begin
      logic [63:0] d;
      for (int b = 0; b < 8; b++) begin
        int ba, t, j, i;
        ba = a * 8 + b; i = ba % VIEWS; j = (ba / VIEWS) % HOGELS; t = ba / (VIEWS * HOGELS);
        d[b*8 +: 8] = pixel[t][j][i];
      end
      bus_write(PIXEL_REGION, a, d);
    end

    // ---- pass 1: multiply, accumulate, compare
    start_run(MODE_MAC_CMP, PIX_LINES);
    wait_done("mac_cmp");
    chk(alpha_max == ACC_W'(amax), $sformatf("alpha_max %0d expected %0d", alpha_max, amax));
    chk(denom == DEN_W'(den), $sformatf("denom %0d expected %0d", denom, den));
    chk(raw_store.size() == PIX_LINES * WPL, $sformatf("raw groups %0d", raw_store.size()));
    for (int g = 0; g < raw_store.size() && g < PIX_LINES * WPL; g++)
      for (int l = 0; l < 8; l++) begin
        int t, p;
        t = g / WPL; p = (g % WPL) * 8 + l;
        chk(raw_store[g][l*RAW_SLOT_W +: RAW_SLOT_W] == 24'(H[t][p]),
            $sformatf("raw t%0d p%0d %0d expected %0d", t, p, raw_store[g][l*RAW_SLOT_W +: RAW_SLOT_W], H[t][p]));
      end

    // ---- option 1: tandem with the denominator programmed, random stalls
    den = den + 3;
    bus_write(REG_REGION, REG_DENOM, 64'(den));
    expect_lines(PIX_LINES, 0, none);
    start_run(MODE_TANDEM, PIX_LINES);
    wait_done("tandem");

    // ---- option 1 again without stalls: one word per clock
    ready_random = 0;
    expect_lines(2, 0, none);
    start_run(MODE_TANDEM, 2);
    wait_done("tandem rate");
    chk(last_word_cyc - first_word_cyc == 2 * WPL - 1,
        $sformatf("tandem rate: %0d cycles for %0d words", last_word_cyc - first_word_cyc + 1, 2 * WPL));
    ready_random = 1;

    // ---- option 3: normalise stored values streamed over the bus
    expect_lines(PIX_LINES, 0, none);
    start_run(MODE_NORMALIZE, PIX_LINES);
    foreach (raw_store[g])
      for (int k = 0; k < RAW_WORDS; k++) bus_write(STREAM_REGION, 0, raw_store[g][k*64 +: 64]);
    wait_done("normalize");

    // ---- option 2: precomputed fringe words passed through
    for (int k = 0; k < 2 * WPL; k++) pw.push_back({$urandom, $urandom});
    expect_lines(2, 1, pw);
    start_run(MODE_PASSTHRU, 2);
    foreach (pw[k]) bus_write(STREAM_REGION, 0, pw[k]);
    wait_done("passthru");

    chk(link_stall_cycles > 0, "link stall happened");
    chk(raw_stall_cycles > 0, "raw stall happened");
    $display("link stalls %0d raw stalls %0d", link_stall_cycles, raw_stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

