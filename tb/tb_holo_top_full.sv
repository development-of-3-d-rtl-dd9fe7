// tb_holo_top_full: one complete frame through the computation module with
// every parameter at its default: 9 processor cards with 256 pipelines each,
// 32 views, 1024-sample basis fringes, 256 hogels per hololine and 16
// hololines per card (144 in all), 3 concentrators with 6 channels each.
// The bench loads all basis and pixel memories and
// runs the frame; all 144 hololines of 262,144 fringe bytes are checked
// sample by sample on the 18 DAC channels against values computed here from
// equation  H = sum_i pixel_i * basis_i  and  min(255, H / denom).
// The frame is made the way the two-pass flow does it: a compare pass whose
// raw values are checked as they leave and which must deliver one 8-value
// group per clock, the frame-wide alpha_max/255 written to all cards, then
// the compute-and-normalise pass that is displayed. Link back-pressure and
// synchronised line starts are counted.
module tb_holo_top_full;
  import holo_pkg::*;
  localparam int NUM_CARDS = 9, LINKS = 3, NUM_VCC = 3, CH = 6;
  localparam int VIEWS = 32, LANES = 256, BASIS_LEN = 1024, HOGELS = 256, PIX_LINES = 16;
  localparam int MSEG = BASIS_LEN / LANES, CHUNKS = LANES / 8;
  localparam int LINE_LEN = HOGELS * BASIS_LEN, WPL = LINE_LEN / 8;
  localparam bit FULL = 1;

  logic clk = 0, rst_n = 0;
  logic [NUM_CARDS-1:0] bus_we, bus_ready, raw_valid, raw_ready, busy, done;
  logic [NUM_CARDS-1:0][BUS_AW-1:0] bus_addr;
  logic [NUM_CARDS-1:0][BUS_W-1:0] bus_wdata;
  logic [NUM_CARDS-1:0][RAW_GROUP_W-1:0] raw_group;
  logic [NUM_CARDS-1:0][ACC_W-1:0] alpha_max;
  logic [NUM_CARDS-1:0][DEN_W-1:0] denom;
  logic [NUM_VCC-1:0] dac_valid, dac_sol;
  logic [NUM_VCC-1:0][CH-1:0][7:0] dac_code;
  int checks = 0, failures = 0;

  holo_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // scene data: basis fringes and hogel vectors, generated from a hash
  function automatic logic [7:0] basis_b(int c, int i, int n);
    int unsigned h;
    h = (c * 7919 + i * 104729 + n * 31337) * 2654435761;
    return 8'(h >> 13);
  endfunction
  function automatic logic [7:0] pixel_b(int c, int t, int j, int i);
    int unsigned h;
    h = (c * 3571 + t * 65537 + j * 4099 + i * 977 + 12345) * 2246822519;
    return 8'(h >> 11);
  endfunction

  logic [7:0] basis_a [NUM_CARDS][VIEWS][BASIS_LEN];
  logic [7:0] pixel_a [NUM_CARDS][PIX_LINES][HOGELS][VIEWS];

  function automatic int unsigned holo(int c, int t, int p);
    int unsigned s;
    int j, n;
    j = p / BASIS_LEN; n = p % BASIS_LEN;
    s = 0;
    for (int i = 0; i < VIEWS; i++) s += pixel_a[c][t][j][i] * basis_a[c][i][n];
    return s;
  endfunction

  function automatic int unsigned norm(int unsigned v, int unsigned d);
    int unsigned q;
    if (d == 0) d = 1;
    q = v / d;
    return q > 255 ? 255 : q;
  endfunction

  // all cards write the same address in the same cycle, each its own data
  typedef logic [NUM_CARDS-1:0][63:0] words_t;
  task automatic bus_write_all(input logic [1:0] region, input int unsigned off, input words_t d,
                               input logic [NUM_CARDS-1:0] mask);
    logic [NUM_CARDS-1:0] pending;
    int tries;
    pending = mask;
    tries = 0;
    while (pending != 0 && tries < 10000) begin
      tries++;
      @(negedge clk);
      bus_we = pending;
      for (int c = 0; c < NUM_CARDS; c++) begin
        bus_addr[c] = {region, (BUS_AW-2)'(off)};
        bus_wdata[c] = d[c];
      end
      #1 pending = pending & ~bus_ready;
      @(posedge clk);
    end
    chk(pending == 0, "bus write accepted");
    @(negedge clk);
    bus_we = '0;
  endtask

  task automatic start_all(input mode_e m, input int lines);
    words_t d;
    for (int c = 0; c < NUM_CARDS; c++) d[c] = {32'(lines) << 16 | 32'h100 | 32'(m)};
    done_seen = '0;
    bus_write_all(REG_REGION, REG_CTRL, d, '1);
  endtask

  // done pulses are remembered until the next start
  logic [NUM_CARDS-1:0] done_seen;
  always @(posedge clk) done_seen <= !rst_n ? '0 : (done_seen | done);

  task automatic wait_all_done(input string what, input int limit);
    int n;
    n = 0;
    while (done_seen != '1 && n < limit) begin
      @(posedge clk);
      n++;
    end
    chk(done_seen == '1, {what, ": all cards done"});
    chk(busy == '0, {what, ": all cards idle"});
  endtask

  // ---------------------------------------------------------------- display check
  typedef enum int { PH_IDLE, PH_NORM, PH_PASS } phase_e;
  phase_e phase;
  int unsigned gden;
  int round_q[NUM_VCC], sample_q[NUM_VCC];
  int line_starts = 0, sync_starts = 0;
  logic [63:0] pw [NUM_CARDS][$];

  function automatic logic [7:0] expected(int c, int t, int s);
    if (phase == PH_PASS) return pw[c][t * WPL + s / 8][(s % 8) * 8 +: 8];
    return 8'(norm(holo(c, t, s), gden));
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dac_sol != 0) begin
      line_starts++;
      if (dac_sol == '1) sync_starts++;
    end
    chk(dac_valid == '0 || dac_valid == '1, "concentrators in step");
    for (int v = 0; v < NUM_VCC; v++) if (dac_valid[v]) begin
      if (dac_sol[v]) sample_q[v] = 0;
      for (int ch = 0; ch < CH; ch++) begin
        int c, t;
        logic [7:0] e;
        c = v * LINKS + ch / 2;
        t = 2 * round_q[v] + ch % 2;
        e = expected(c, t, sample_q[v]);
        chk(dac_code[v][ch] == e, $sformatf("vcc %0d ch %0d line %0d sample %0d: %0d expected %0d",
                                            v, ch, t, sample_q[v], dac_code[v][ch], e));
      end
      sample_q[v]++;
      if (sample_q[v] == LINE_LEN) round_q[v]++;
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  // Link back-pressure is seen from outside as a card that stays busy longer
  // than its computation needs: the nominal run is PIX_LINES*WPL*DRAIN_RATIO
  // cycles plus a short pipeline fill.
  localparam int NOMINAL = PIX_LINES * HOGELS * MSEG * VIEWS + 64;
  int link_holds = 0, raw_holds = 0, cyc = 0;
  int busy_len[NUM_CARDS];
  // rate: raw groups leave a card at one per clock when raw_ready stays high
  int run_len[NUM_CARDS], longest_run = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int c = 0; c < NUM_CARDS; c++) begin
      if (busy[c]) busy_len[c]++;
      else if (busy_len[c] > 0) begin
        if (busy_len[c] > NOMINAL) link_holds += busy_len[c] - NOMINAL;
        busy_len[c] = 0;
      end
      if (raw_valid[c] && !raw_ready[c]) raw_holds++;
      if (raw_valid[c] && raw_ready[c]) begin
        run_len[c]++;
        if (run_len[c] > longest_run) longest_run = run_len[c];
      end else run_len[c] = 0;
    end
  end

  bit raw_random = 0;
  always @(negedge clk) raw_ready = raw_random ? 9'($urandom) : '1;

  logic [RAW_GROUP_W-1:0] raw_store [NUM_CARDS][$];
  bit full_raw_check = 0;
  int unsigned card_max[NUM_CARDS];
  int raw_count[NUM_CARDS];
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NUM_CARDS; c++)
      if (raw_valid[c] && raw_ready[c]) begin
        if (!full_raw_check) raw_store[c].push_back(raw_group[c]);
        else begin
          // checked as it leaves: group g of card c holds samples 8g .. 8g+7
          for (int l = 0; l < 8; l++) begin
            int unsigned h;
            h = holo(c, raw_count[c] / WPL, (raw_count[c] % WPL) * 8 + l);
            if (h > card_max[c]) card_max[c] = h;
            chk(raw_group[c][l*RAW_SLOT_W +: RAW_SLOT_W] == 24'(h), "raw value");
          end
          raw_count[c]++;
        end
      end

  task automatic reset_display();
    foreach (round_q[v]) begin round_q[v] = 0; sample_q[v] = 0; end
  endtask

  task automatic wait_display(input string what, input int limit);
    int n;
    n = 0;
    while (!(round_q[0] == PIX_LINES / 2 && round_q[1] == PIX_LINES / 2 && round_q[2] == PIX_LINES / 2) && n < limit) begin
      @(posedge clk); n++;
    end
    chk(round_q[0] == PIX_LINES / 2, {what, ": all hololines displayed"});
  endtask

  initial begin
    words_t d;
    int unsigned gmax;
    int mode_runs[4];
    bus_we = '0; bus_addr = '0; bus_wdata = '0; phase = PH_IDLE; gden = 1;
    foreach (mode_runs[m]) mode_runs[m] = 0;
    foreach (busy_len[c]) begin busy_len[c] = 0; run_len[c] = 0; card_max[c] = 0; raw_count[c] = 0; end
    reset_display();
    foreach (basis_a[c, i, n]) basis_a[c][i][n] = basis_b(c, i, n);
    foreach (pixel_a[c, t, j, i]) pixel_a[c][t][j][i] = pixel_b(c, t, j, i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- load basis rows (row m*VIEWS+i, chunk k: basis_i(m*LANES + 8k ..))
    for (int m = 0; m < MSEG; m++)
      for (int i = 0; i < VIEWS; i++)
        for (int k = 0; k < CHUNKS; k++) begin
          for (int c = 0; c < NUM_CARDS; c++)
            for (int b = 0; b < 8; b++) d[c][b*8 +: 8] = basis_a[c][i][m*LANES + k*8 + b];
          bus_write_all(BASIS_REGION, (m*VIEWS + i) * CHUNKS + k, d, '1);
        end
    // ---- load hogel vectors (byte address (t*HOGELS + j)*VIEWS + i)
    for (int a = 0; a < PIX_LINES * HOGELS * VIEWS / 8; a++) begin
      for (int c = 0; c < NUM_CARDS; c++)
        for (int b = 0; b < 8; b++) begin
          int ba;
          ba = a * 8 + b;
          d[c][b*8 +: 8] = pixel_a[c][ba / (VIEWS * HOGELS)][(ba / VIEWS) % HOGELS][ba % VIEWS];
        end
      bus_write_all(PIXEL_REGION, a, d, '1);
    end
    $display("memories loaded at cycle %0d", cyc);

    // ---- pass 1: multiply, accumulate, compare; raw values checked as they leave
    full_raw_check = 1;
    start_all(MODE_MAC_CMP, PIX_LINES);
    wait_all_done("mac_cmp", 2000000);
    mode_runs[MODE_MAC_CMP]++;
    full_raw_check = 0;
    gmax = 0;
    for (int c = 0; c < NUM_CARDS; c++) begin
      chk(alpha_max[c] == ACC_W'(card_max[c]), $sformatf("card %0d alpha_max %0d expected %0d", c, alpha_max[c], card_max[c]));
      chk(raw_count[c] == PIX_LINES * WPL, "raw group count");
      if (card_max[c] > gmax) gmax = card_max[c];
    end
    chk(longest_run == PIX_LINES * WPL, $sformatf("rate: longest unbroken raw run %0d of %0d groups", longest_run, PIX_LINES * WPL));
    // ---- the host writes the frame-wide alpha_max/255 to every card
    gden = gmax / 255;
    for (int c = 0; c < NUM_CARDS; c++) d[c] = 64'(gden);
    bus_write_all(REG_REGION, REG_DENOM, d, '1);
    // ---- the frame: compute and normalise, displayed on 18 channels
    phase = PH_NORM; reset_display();
    start_all(MODE_TANDEM, PIX_LINES);
    wait_display("frame", 4000000);
    wait_all_done("frame", 1000);
    mode_runs[MODE_TANDEM]++;
    $display("frame displayed at cycle %0d", cyc);

    chk(link_holds > 0, "link back-pressure happened");
    chk(sync_starts > 0 && sync_starts == line_starts, "display lines started together");
    $display("link holds %0d, raw holds %0d, line starts %0d (together %0d), modes %0d %0d %0d %0d",
             link_holds, raw_holds, line_starts, sync_starts, mode_runs[0], mode_runs[1], mode_runs[2], mode_runs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
