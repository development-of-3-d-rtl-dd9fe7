// vcc_card: one video concentrator card (digital part).
//
// It takes hololines from LINKS processor-card links, buffers them in
// 2*LINKS hololine FIFOs and streams them out as 8-bit DAC codes, one
// hololine per channel at a time, all channels in step. The co-processor
// (vcc_coproc) does the routing and the start/end control of FIFO loading
// and read-out; each FIFO is a holo_sync_fifo of FIFO_DEPTH 65-bit entries
// ({eol, 8 fringe bytes}). The default depth, 32768 words, holds one
// complete 256 KB hololine, the amount one acousto-optic modulator channel
// shows per line; the depth is this design's choice. The D-to-A converters,
// the card's microprocessor and its video SDRAM are outside this module:
// `dac_code` drives the converters, and `line_ready`/`line_go` let cards
// agree on when the next display line starts.
// Timing: a word pushed into a FIFO can be displayed from the next cycle; a
// read-out begins the cycle after `line_go` meets `line_ready` and the DAC
// codes appear one cycle after that, one byte per cycle.
module vcc_card
  import holo_pkg::*;
#(
  parameter int unsigned LINKS      = 3,
  parameter int unsigned FIFO_DEPTH = 32768,
  localparam int unsigned CH        = 2 * LINKS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [LINKS-1:0]             link_valid,
  input  link_word_t [LINKS-1:0]       link_word,
  output logic [LINKS-1:0]             link_ready,
  output logic                         line_ready,
  input  logic                         line_go,
  output logic                         dac_valid,
  output logic                         dac_sol,
  output logic [CH-1:0][FRINGE_W-1:0]  dac_code
);

  localparam int unsigned FW = BUS_W + 1;

  logic [CH-1:0]          fifo_push, fifo_pop, fifo_full, fifo_empty;
  logic [CH-1:0][FW-1:0]  fifo_wdata, fifo_rdata;

  for (genvar ch = 0; ch < CH; ch++) begin : g_fifo
    holo_sync_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(fifo_push[ch]), .wdata(fifo_wdata[ch]),
      .pop(fifo_pop[ch]),   .rdata(fifo_rdata[ch]),
      .empty(fifo_empty[ch]), .full(fifo_full[ch]), .count()
    );
  end

  vcc_coproc #(.LINKS(LINKS), .FIFO_DEPTH(FIFO_DEPTH)) u_coproc (
    .clk, .rst_n,
    .link_valid, .link_word, .link_ready,
    .fifo_push, .fifo_wdata, .fifo_full,
    .fifo_pop, .fifo_rdata, .fifo_empty,
    .line_ready, .line_go,
    .dac_valid, .dac_sol, .dac_code
  );

endmodule
