// holo_fpga: the hologram computation FPGA of one processor card.
//
// It computes hololines of a horizontal-parallax-only holographic stereogram:
//   holo_value(j*BASIS_LEN + n, k) = sum_{i<VIEWS} pixel_i(j, k) * basis_i(n)
// and normalises each value to a fringe byte, value / (alpha_max/255).
//
// Organisation. LANES superposition pipelines (holo_mac) run in parallel.
// The basis fringes are held in an on-chip memory whose row m*VIEWS+i holds
// basis_i(m*LANES + l) for lane l, so lane l always handles hololine samples
// n = m*LANES + l. The hogel vectors (pixel_i(j, k), i < VIEWS) of up to
// PIX_LINES hololines sit in a pixel memory. For each hololine k, hogel j
// and segment m, the engine spends VIEWS cycles broadcasting pixel_i(j, k)
// to all lanes while each lane reads its own basis byte; all lanes finish
// together with LANES consecutive holo-values. These are captured and drained
// OUT_LANES (8) at a time over LANES/OUT_LANES cycles, which must not exceed
// VIEWS, so the output is one 8-byte link word per cycle in hololine order.
// Eight holo_normalizer pipelines turn them into fringe bytes, and
// holo_formatter frames them into hololines for the HSIO link.
//
// Modes (register REG_CTRL, see holo_pkg::mode_e):
//   MODE_TANDEM    compute and normalise in one pass with the programmed
//                  denominator, no compare stage
//   MODE_MAC_CMP   compute, find alpha_max with holo_alpha_max, write the raw
//                  values on the raw port (3 bus words per 8 values, 24-bit
//                  slots), then compute alpha_max/255 into the denominator
//   MODE_NORMALIZE normalise raw values written to the stream region
//   MODE_PASSTHRU  send precomputed fringe words written to the stream region
//
// Flow control: one enable, `adv`, moves every pipeline stage. It is the
// link side's room (output FIFO not full) or, in MODE_MAC_CMP, `raw_ready`.
// When it drops, the whole engine stalls in place.
//
// The arithmetic widths, the lane count, the 32 views, the 1024-sample basis
// fringes, 256 hogels per hololine and the single-pass versus stored
// normalisation options follow the published design. The lane-to-sample
// mapping, memories, address map, link framing and flow control are this
// design's choices. PIX_LINES = 16 is 144 hololines shared by 9 cards.
module holo_fpga
  import holo_pkg::*;
#(
  parameter int unsigned VIEWS     = 32,
  parameter int unsigned LANES     = 256,
  parameter int unsigned BASIS_LEN = 1024,
  parameter int unsigned HOGELS    = 256,
  parameter int unsigned PIX_LINES = 16,
  parameter int unsigned OUT_DEPTH = 16,
  parameter int unsigned IN_DEPTH  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // card bus (from PCI bridge / SDRAM)
  input  logic               bus_we,
  input  logic [BUS_AW-1:0]  bus_addr,
  input  logic [BUS_W-1:0]   bus_wdata,
  output logic               bus_ready,
  // raw holo-values to card memory (MODE_MAC_CMP)
  output logic               raw_valid,
  output logic [RAW_GROUP_W-1:0] raw_group,
  input  logic               raw_ready,
  // HSIO link to the video concentrator card
  output logic               link_valid,
  output link_word_t         link_word,
  input  logic               link_ready,
  // status
  output logic               busy,
  output logic               done,
  output logic [ACC_W-1:0]   alpha_max,
  output logic [DEN_W-1:0]   denom
);

  localparam int unsigned MSEG       = BASIS_LEN / LANES;
  localparam int unsigned BROWS      = MSEG * VIEWS;
  localparam int unsigned CHUNKS     = LANES / 8;
  localparam int unsigned PIX_WORDS  = PIX_LINES * HOGELS * VIEWS / 8;
  localparam int unsigned WORDS_PER_LINE = HOGELS * BASIS_LEN / 8;
  localparam int unsigned DRAIN      = LANES / OUT_LANES;
  localparam int unsigned IW  = (VIEWS  > 1) ? $clog2(VIEWS)  : 1;
  localparam int unsigned MW  = (MSEG   > 1) ? $clog2(MSEG)   : 1;
  localparam int unsigned JW  = (HOGELS > 1) ? $clog2(HOGELS) : 1;
  localparam int unsigned BRW = (BROWS  > 1) ? $clog2(BROWS)  : 1;
  localparam int unsigned CW  = (CHUNKS > 1) ? $clog2(CHUNKS) : 1;
  localparam int unsigned PAW = $clog2(PIX_WORDS * 8);
  localparam int unsigned DW  = (DRAIN  > 1) ? $clog2(DRAIN)  : 1;

  initial begin
    assert (LANES % OUT_LANES == 0 && DRAIN <= VIEWS && BASIS_LEN % LANES == 0)
      else $error("holo_fpga: need LANES multiple of 8, LANES/8 <= VIEWS, BASIS_LEN multiple of LANES");
  end

  // ------------------------------------------------------------ bus interface
  logic               basis_we, pixel_we, stream_push, start, denom_we;
  logic [BUS_AW-3:0]  basis_waddr, pixel_waddr;
  logic [BUS_W-1:0]   wdata;
  logic [DEN_W-1:0]   denom_wdata;
  mode_e              mode_reg;
  logic [15:0]        line_count;
  logic               stream_full, stream_empty;
  logic [BUS_W-1:0]   stream_rdata;
  logic               stream_pop;

  holo_bus_if u_bus (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_ready,
    .basis_we, .basis_waddr, .pixel_we, .pixel_waddr,
    .stream_push, .stream_full, .wdata,
    .mode(mode_reg), .line_count, .start, .denom_we, .denom_wdata
  );

  holo_sync_fifo #(.WIDTH(BUS_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n, .push(stream_push), .wdata, .pop(stream_pop),
    .rdata(stream_rdata), .empty(stream_empty), .full(stream_full), .count()
  );

  // ------------------------------------------------------------ memories
  logic [LANES*8-1:0] basis_mem [BROWS];
  logic [BUS_W-1:0]   pix_mem   [PIX_WORDS];

  // basis write: the low CW address bits pick the 8-lane chunk of a row
  logic [BRW-1:0] b_wrow;
  logic [CW-1:0]  b_wchunk;
  assign b_wrow   = BRW'(basis_waddr >> $clog2(CHUNKS));
  assign b_wchunk = CW'(basis_waddr);

  always_ff @(posedge clk) begin
    if (basis_we)
      for (int unsigned c = 0; c < CHUNKS; c++)
        if (b_wchunk == CW'(c))
          basis_mem[b_wrow][c*BUS_W +: BUS_W] <= wdata;
    if (pixel_we)
      pix_mem[pixel_waddr[PAW-4:0]] <= wdata;
  end

  // ------------------------------------------------------------ run control
  mode_e  mode;
  logic   running, adv;
  logic   out_full, out_empty;
  logic   fmt_done;
  logic       fmt_valid;
  link_word_t fmt_word;
  logic   sd_start, sd_busy, sd_done;
  logic [DEN_W-1:0] sd_denom;
  logic [31:0] raw_sent_q;
  logic   mac_finished;

  assign adv = (mode == MODE_MAC_CMP) ? raw_ready : !out_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode    <= MODE_TANDEM;
      running <= 1'b0;
      done    <= 1'b0;
      denom   <= DEN_W'(1);
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        mode    <= mode_reg;
        running <= 1'b1;
      end else if (running) begin
        if (mode == MODE_MAC_CMP) begin
          if (sd_done) begin
            running <= 1'b0;
            done    <= 1'b1;
          end
        end else if (fmt_done && !fmt_valid && out_empty) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
      if (denom_we)
        denom <= denom_wdata;
      else if (sd_done)
        denom <= sd_denom;
    end
  end

  assign busy = running;
  logic run_start;
  assign run_start = start && !running;

  // ------------------------------------------------------------ sequencer
  logic [IW-1:0] i_q;
  logic [MW-1:0] m_q;
  logic [JW-1:0] j_q;
  logic [15:0]   t_q;
  logic          issuing;
  logic          compute_mode;

  assign compute_mode = (mode == MODE_TANDEM) || (mode == MODE_MAC_CMP);
  assign issuing = running && compute_mode && (t_q < line_count) && (t_q < 16'(PIX_LINES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_q <= '0; m_q <= '0; j_q <= '0; t_q <= '0;
    end else if (run_start) begin
      i_q <= '0; m_q <= '0; j_q <= '0; t_q <= '0;
    end else if (adv && issuing) begin
      if (i_q == IW'(VIEWS - 1)) begin
        i_q <= '0;
        if (m_q == MW'(MSEG - 1)) begin
          m_q <= '0;
          if (j_q == JW'(HOGELS - 1)) begin
            j_q <= '0;
            t_q <= t_q + 16'd1;
          end else
            j_q <= j_q + 1'b1;
        end else
          m_q <= m_q + 1'b1;
      end else
        i_q <= i_q + 1'b1;
    end
  end

  // fetch stage: synchronous memory reads
  logic [PAW-1:0]      pix_baddr;
  logic [BRW-1:0]      brow;
  logic                f_valid, f_first, f_last;
  logic [2:0]          f_bsel;
  logic [BUS_W-1:0]    f_pword;
  logic [LANES*8-1:0]  f_brow;

  assign pix_baddr = PAW'(((32'(t_q) * HOGELS + 32'(j_q)) * VIEWS) + 32'(i_q));
  assign brow      = BRW'(32'(m_q) * VIEWS + 32'(i_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_valid <= 1'b0; f_first <= 1'b0; f_last <= 1'b0; f_bsel <= '0;
      f_pword <= '0;   f_brow  <= '0;
    end else if (adv) begin
      f_valid <= issuing;
      f_first <= (i_q == '0);
      f_last  <= (i_q == IW'(VIEWS - 1));
      f_bsel  <= pix_baddr[2:0];
      f_pword <= pix_mem[pix_baddr[PAW-1:3]];
      f_brow  <= basis_mem[brow];
    end
  end

  logic [7:0] f_pixel;
  assign f_pixel = f_pword[f_bsel*8 +: 8];

  // ------------------------------------------------------------ lanes
  logic [LANES-1:0]             lane_valid;
  logic [LANES-1:0][ACC_W-1:0]  lane_res;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    holo_mac u_mac (
      .clk, .rst_n, .en(adv),
      .in_valid(f_valid), .first(f_first), .last(f_last),
      .pixel(f_pixel), .basis(f_brow[l*8 +: 8]),
      .res_valid(lane_valid[l]), .res(lane_res[l])
    );
  end

  // ------------------------------------------------------------ capture and drain
  logic [LANES-1:0][ACC_W-1:0]      bank_q;
  logic                             draining_q;
  logic [DW-1:0]                    drain_q;
  logic                             d_valid;
  logic [OUT_LANES-1:0][ACC_W-1:0]  d_group;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_q <= '0; draining_q <= 1'b0; drain_q <= '0;
      d_valid <= 1'b0; d_group <= '0;
    end else if (run_start) begin
      draining_q <= 1'b0; drain_q <= '0; d_valid <= 1'b0;
    end else if (adv) begin
      d_valid <= draining_q;
      if (draining_q) begin
        d_group <= bank_q[32'(drain_q) * OUT_LANES +: OUT_LANES];
        if (drain_q == DW'(DRAIN - 1))
          draining_q <= 1'b0;
        else
          drain_q <= drain_q + 1'b1;
      end
      if (lane_valid[0]) begin
        bank_q     <= lane_res;
        draining_q <= 1'b1;
        drain_q    <= '0;
      end
    end
  end

  // ------------------------------------------------------------ compare and alpha_max/255
  holo_alpha_max #(.N(OUT_LANES)) u_cmp (
    .clk, .rst_n, .en(adv && mode == MODE_MAC_CMP), .clear(run_start),
    .in_valid({OUT_LANES{d_valid}}), .value(d_group), .alpha_max
  );

  // raw port: 8 values in 24-bit slots
  always_comb begin
    raw_group = '0;
    for (int unsigned l = 0; l < OUT_LANES; l++)
      raw_group[l*RAW_SLOT_W +: RAW_SLOT_W] = RAW_SLOT_W'(d_group[l]);
  end
  assign raw_valid = running && mode == MODE_MAC_CMP && d_valid;

  localparam longint unsigned GROUPS_PER_LINE = 64'(WORDS_PER_LINE);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      raw_sent_q <= '0;
    else if (run_start)
      raw_sent_q <= '0;
    else if (raw_valid && raw_ready)
      raw_sent_q <= raw_sent_q + 32'd1;
  end
  assign mac_finished = (64'(raw_sent_q) == 64'(line_count) * GROUPS_PER_LINE);

  logic sd_started_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sd_started_q <= 1'b0;
    else if (run_start)
      sd_started_q <= 1'b0;
    else if (sd_start)
      sd_started_q <= 1'b1;
  end
  // wait one cycle after the last raw transfer so the comparator has it
  logic mac_finished_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mac_finished_q <= 1'b0;
    else        mac_finished_q <= running && mode == MODE_MAC_CMP && mac_finished;
  end
  assign sd_start = mac_finished_q && !sd_started_q && running;

  holo_scale_div u_sdiv (
    .clk, .rst_n, .start(sd_start), .alpha_max,
    .busy(sd_busy), .done(sd_done), .denom(sd_denom)
  );

  // ------------------------------------------------------------ stream input (options 2 and 3)
  localparam int unsigned GCW = $clog2(RAW_WORDS + 1);
  logic [RAW_GROUP_W-1:0] gather_q;
  logic [GCW-1:0]         gcnt_q;
  logic                   g_valid;
  logic [RAW_GROUP_W-1:0] g_group;
  logic                   p_valid;
  logic [BUS_W-1:0]       p_word;
  logic                   stream_mode;

  assign stream_mode = running && (mode == MODE_PASSTHRU || mode == MODE_NORMALIZE);
  assign stream_pop  = adv && stream_mode && !stream_empty && !fmt_done &&
                       !(mode == MODE_NORMALIZE && gcnt_q == GCW'(RAW_WORDS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gather_q <= '0; gcnt_q <= '0; g_valid <= 1'b0; g_group <= '0;
      p_valid <= 1'b0; p_word <= '0;
    end else if (run_start) begin
      gcnt_q <= '0; g_valid <= 1'b0; p_valid <= 1'b0;
    end else if (adv) begin
      g_valid <= 1'b0;
      p_valid <= stream_pop && mode == MODE_PASSTHRU;
      p_word  <= stream_rdata;
      if (mode == MODE_NORMALIZE) begin
        if (gcnt_q == GCW'(RAW_WORDS)) begin
          g_valid <= 1'b1;
          g_group <= gather_q;
          gcnt_q  <= '0;
        end else if (stream_pop) begin
          gather_q <= {stream_rdata, gather_q[RAW_GROUP_W-1:BUS_W]};
          gcnt_q   <= gcnt_q + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------ normalisers
  logic [OUT_LANES-1:0]               n_valid;
  logic [OUT_LANES-1:0][FRINGE_W-1:0] n_byte;

  for (genvar l = 0; l < OUT_LANES; l++) begin : g_norm
    logic             nin_valid;
    logic [ACC_W-1:0] nin_value;
    assign nin_valid = (mode == MODE_NORMALIZE) ? g_valid
                     : (mode == MODE_TANDEM && d_valid);
    assign nin_value = (mode == MODE_NORMALIZE) ? g_group[l*RAW_SLOT_W +: ACC_W]
                     : d_group[l];
    holo_normalizer u_norm (
      .clk, .rst_n, .en(adv), .denom,
      .in_valid(nin_valid), .holo_value(nin_value),
      .out_valid(n_valid[l]), .fringe(n_byte[l])
    );
  end

  // ------------------------------------------------------------ formatter and link
  logic       fmt_in_valid;
  logic [BUS_W-1:0] fmt_in;

  assign fmt_in_valid = running && ((mode == MODE_PASSTHRU) ? p_valid : n_valid[0]);
  assign fmt_in       = (mode == MODE_PASSTHRU) ? p_word : BUS_W'(n_byte);

  holo_formatter #(.WORDS_PER_LINE(WORDS_PER_LINE)) u_fmt (
    .clk, .rst_n, .en(adv), .restart(run_start), .line_count,
    .in_valid(fmt_in_valid), .in_bytes(fmt_in),
    .out_valid(fmt_valid), .out_word(fmt_word), .lines_done(fmt_done)
  );

  logic [$bits(link_word_t)-1:0] out_rdata;
  holo_sync_fifo #(.WIDTH($bits(link_word_t)), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .push(fmt_valid && adv && mode != MODE_MAC_CMP), .wdata(fmt_word),
    .pop(link_valid && link_ready), .rdata(out_rdata),
    .empty(out_empty), .full(out_full), .count()
  );

  assign link_valid = !out_empty;
  assign link_word  = link_word_t'(out_rdata);

  // A link word stays on the port until it is taken.
  a_link_stable: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable(link_word));

endmodule
