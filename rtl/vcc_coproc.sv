// vcc_coproc: the formatting co-processor (HoloFPGA) of a video concentrator
// card.
//
// Load side: each of the LINKS incoming processor-card links carries
// hololines framed by holo_formatter. A link feeds two hololine FIFOs, and
// the co-processor routes each word by the parity of its hololine tag: even
// hololines to FIFO 2*c, odd ones to FIFO 2*c+1. A link is held off
// (`link_ready` low) while its target FIFO is full. The co-processor counts
// the complete hololines in every FIFO (a word with `eol` completes one).
//
// Read-out side: when every FIFO holds at least one complete hololine and no
// read-out is running, `line_ready` rises. On `line_go` the co-processor
// starts reading all 2*LINKS FIFOs in lockstep, one byte per channel per
// cycle (byte 0 of a word first), and presents the bytes as DAC codes with
// `dac_valid`; `dac_sol` marks the first sample of a hololine. Read-out ends
// with the last byte of the `eol` word. The DAC outputs lag the read-out
// state by one cycle.
//
// The split of each link into two FIFOs, the FIFOs, DACs and the
// co-processor's control of the start and end of FIFO loading and read-out
// follow the published card. The parity routing, the all-FIFOs-ready start
// rule and the `line_go` handshake (standing in for the agreement between
// cards that the card's microprocessor arranges) are this design's choices.
module vcc_coproc
  import holo_pkg::*;
#(
  parameter int unsigned LINKS      = 3,
  parameter int unsigned FIFO_DEPTH = 32768,
  localparam int unsigned CH        = 2 * LINKS,
  localparam int unsigned FW        = BUS_W + 1          // {eol, data}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // links from processor cards
  input  logic [LINKS-1:0]             link_valid,
  input  link_word_t [LINKS-1:0]       link_word,
  output logic [LINKS-1:0]             link_ready,
  // FIFO control
  output logic [CH-1:0]                fifo_push,
  output logic [CH-1:0][FW-1:0]        fifo_wdata,
  input  logic [CH-1:0]                fifo_full,
  output logic [CH-1:0]                fifo_pop,
  input  logic [CH-1:0][FW-1:0]        fifo_rdata,
  input  logic [CH-1:0]                fifo_empty,
  // display synchronisation
  output logic                         line_ready,
  input  logic                         line_go,
  // DAC codes
  output logic                         dac_valid,
  output logic                         dac_sol,
  output logic [CH-1:0][FRINGE_W-1:0]  dac_code
);

  localparam int unsigned LCW = $clog2(FIFO_DEPTH + 1) + 1;

  // ---------------------------------------------------------------- loading
  always_comb begin
    fifo_push  = '0;
    fifo_wdata = '0;
    link_ready = '0;
    for (int unsigned c = 0; c < LINKS; c++) begin
      int unsigned ch;
      ch = 2 * c + int'(link_word[c].line[0]);
      link_ready[c]  = !fifo_full[ch];
      fifo_push[ch]  = link_valid[c] && !fifo_full[ch];
      fifo_wdata[ch] = {link_word[c].eol, link_word[c].data};
    end
  end

  // ---------------------------------------------------------------- line counts
  logic [CH-1:0][LCW-1:0] lines_q;
  logic [CH-1:0]          have_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      lines_q <= '0;
    else
      for (int unsigned ch = 0; ch < CH; ch++) begin
        logic inc, dec;
        inc = fifo_push[ch] && fifo_wdata[ch][BUS_W];
        dec = fifo_pop[ch] && fifo_rdata[ch][BUS_W];
        if (inc && !dec)      lines_q[ch] <= lines_q[ch] + 1'b1;
        else if (dec && !inc) lines_q[ch] <= lines_q[ch] - 1'b1;
      end
  end

  for (genvar ch = 0; ch < CH; ch++) begin : g_have
    assign have_line[ch] = lines_q[ch] != '0;
  end

  // ---------------------------------------------------------------- read-out
  logic       reading_q;
  logic [2:0] byte_q;
  logic       first_q;
  logic       last_word;

  assign line_ready = !reading_q && (&have_line);
  assign last_word  = fifo_rdata[0][BUS_W];

  always_comb begin
    fifo_pop = '0;
    if (reading_q && byte_q == 3'd7)
      fifo_pop = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading_q <= 1'b0;
      byte_q    <= '0;
      first_q   <= 1'b0;
      dac_valid <= 1'b0;
      dac_sol   <= 1'b0;
      dac_code  <= '0;
    end else begin
      dac_valid <= reading_q;
      dac_sol   <= reading_q && first_q;
      if (reading_q) begin
        for (int unsigned ch = 0; ch < CH; ch++)
          dac_code[ch] <= fifo_rdata[ch][byte_q*8 +: 8];
        first_q <= 1'b0;
        byte_q  <= byte_q + 3'd1;
        if (byte_q == 3'd7 && last_word)
          reading_q <= 1'b0;
      end else if (line_go && line_ready) begin
        reading_q <= 1'b1;
        byte_q    <= '0;
        first_q   <= 1'b1;
      end
    end
  end

  // All channels carry hololines of the same length, so the FIFOs stay in
  // step: every channel reaches its eol word together.
  for (genvar ch = 1; ch < CH; ch++) begin : g_chk
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      fifo_pop[0] |-> !fifo_empty[ch] && fifo_rdata[ch][BUS_W] == fifo_rdata[0][BUS_W]);
  end
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_pop[0] |-> !fifo_empty[0]);

endmodule
