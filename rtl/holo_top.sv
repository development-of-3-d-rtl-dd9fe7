// holo_top: the hologram computation module of the holographic video system.
//
// NUM_CARDS processor-card FPGAs (holo_fpga) each compute a share of the
// hololines of a frame; groups of LINKS cards feed one video concentrator
// card (vcc_card), which buffers their hololines and streams them to the
// display's D-to-A converters. With the defaults there are 9 processor cards
// with 256 superposition pipelines each (2,304 in all) and 3 concentrator
// cards with 6 output channels each, 18 channels in all. Card c is wired to
// link c % LINKS of concentrator c / LINKS.
//
// Everything outside the FPGAs and the concentrators' logic appears as
// ports: each card's bus (standing for the PCI bridge and card SDRAM), each
// card's raw-result port (to the card SDRAM), and the concentrators' DAC
// codes. The concentrators start a display line together: a line starts
// when every concentrator reports `line_ready`, an AND that here stands for
// the coordination done by the concentrators' microprocessors.
//
// Card and concentrator counts, the pipeline count per FPGA, 32 views,
// 1024-sample basis fringes and 256 hogels per hololine are the published
// configuration; PIX_LINES = 16 is 144 hololines over 9 cards.
module holo_top
  import holo_pkg::*;
#(
  parameter int unsigned NUM_CARDS = 9,
  parameter int unsigned LINKS     = 3,
  parameter int unsigned VIEWS     = 32,
  parameter int unsigned LANES     = 256,
  parameter int unsigned BASIS_LEN = 1024,
  parameter int unsigned HOGELS    = 256,
  parameter int unsigned PIX_LINES = 16,
  localparam int unsigned NUM_VCC  = NUM_CARDS / LINKS,
  localparam int unsigned CH       = 2 * LINKS
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // processor card buses
  input  logic [NUM_CARDS-1:0]                   bus_we,
  input  logic [NUM_CARDS-1:0][BUS_AW-1:0]       bus_addr,
  input  logic [NUM_CARDS-1:0][BUS_W-1:0]        bus_wdata,
  output logic [NUM_CARDS-1:0]                   bus_ready,
  // raw holo-values to card memories
  output logic [NUM_CARDS-1:0]                   raw_valid,
  output logic [NUM_CARDS-1:0][RAW_GROUP_W-1:0]  raw_group,
  input  logic [NUM_CARDS-1:0]                   raw_ready,
  // card status
  output logic [NUM_CARDS-1:0]                   busy,
  output logic [NUM_CARDS-1:0]                   done,
  output logic [NUM_CARDS-1:0][ACC_W-1:0]        alpha_max,
  output logic [NUM_CARDS-1:0][DEN_W-1:0]        denom,
  // display channels
  output logic [NUM_VCC-1:0]                     dac_valid,
  output logic [NUM_VCC-1:0]                     dac_sol,
  output logic [NUM_VCC-1:0][CH-1:0][FRINGE_W-1:0] dac_code
);

  initial assert (NUM_CARDS % LINKS == 0)
    else $error("holo_top: NUM_CARDS must be a multiple of LINKS");

  localparam int unsigned FIFO_DEPTH = HOGELS * BASIS_LEN / 8;

  logic       [NUM_CARDS-1:0] link_valid, link_ready;
  link_word_t [NUM_CARDS-1:0] link_word;
  logic       [NUM_VCC-1:0]   line_ready;
  logic                       line_go;

  for (genvar c = 0; c < NUM_CARDS; c++) begin : g_card
    holo_fpga #(
      .VIEWS(VIEWS), .LANES(LANES), .BASIS_LEN(BASIS_LEN),
      .HOGELS(HOGELS), .PIX_LINES(PIX_LINES)
    ) u_fpga (
      .clk, .rst_n,
      .bus_we(bus_we[c]), .bus_addr(bus_addr[c]), .bus_wdata(bus_wdata[c]),
      .bus_ready(bus_ready[c]),
      .raw_valid(raw_valid[c]), .raw_group(raw_group[c]), .raw_ready(raw_ready[c]),
      .link_valid(link_valid[c]), .link_word(link_word[c]), .link_ready(link_ready[c]),
      .busy(busy[c]), .done(done[c]), .alpha_max(alpha_max[c]), .denom(denom[c])
    );
  end

  assign line_go = &line_ready;

  for (genvar v = 0; v < NUM_VCC; v++) begin : g_vcc
    vcc_card #(.LINKS(LINKS), .FIFO_DEPTH(FIFO_DEPTH)) u_vcc (
      .clk, .rst_n,
      .link_valid(link_valid[v*LINKS +: LINKS]),
      .link_word(link_word[v*LINKS +: LINKS]),
      .link_ready(link_ready[v*LINKS +: LINKS]),
      .line_ready(line_ready[v]), .line_go,
      .dac_valid(dac_valid[v]), .dac_sol(dac_sol[v]), .dac_code(dac_code[v])
    );
  end

endmodule
