// holo_pkg: types and constants shared by the holographic fringe computation
// and the video concentrator logic.
//
// The fringe arithmetic follows the superposition of equation
//   holo_value(p, k) = sum_i pixel_i(j, k) * basis_i(n),   p = j*BASIS_LEN + n
// with 8-bit pixel and basis bytes, 16-bit products, a 21-bit sum over 32
// views, a 13-bit normalisation denominator (alpha_max / 255) and an 8-bit
// fringe byte. These widths are the published ones. The operating-mode
// encoding, the bus address map and the link word layout are this design's
// own choices.
package holo_pkg;

  localparam int unsigned PIX_W   = 8;   // pixel and basis byte
  localparam int unsigned PROD_W  = 16;  // 8x8 product
  localparam int unsigned ACC_W   = 21;  // sum over 32 views
  localparam int unsigned DEN_W   = 13;  // alpha_max / 255
  localparam int unsigned FRINGE_W = 8;  // normalised fringe byte

  localparam int unsigned BUS_W   = 64;  // processor card data bus
  localparam int unsigned BUS_AW  = 20;  // word address on the card bus
  localparam int unsigned OUT_LANES = BUS_W / 8;  // fringe bytes per link word
  localparam int unsigned RAW_SLOT_W = 24;        // raw value slot in memory
  localparam int unsigned RAW_GROUP_W = OUT_LANES * RAW_SLOT_W;  // 192 bits
  localparam int unsigned RAW_WORDS = RAW_GROUP_W / BUS_W;       // 3 bus words

  localparam int unsigned LINE_W  = 8;   // hololine tag on the link

  // Operating modes of the processor FPGA.
  //  MODE_TANDEM    : multiply, accumulate and normalise in one pass with a
  //                   programmed denominator, no compare stage (option 1)
  //  MODE_PASSTHRU  : precomputed fringe bytes from memory to the link (option 2)
  //  MODE_NORMALIZE : stored holo-values from memory normalised to the link (option 3)
  //  MODE_MAC_CMP   : multiply, accumulate and compare; raw holo-values to
  //                   memory, alpha_max and alpha_max/255 produced at the end
  typedef enum logic [1:0] {
    MODE_TANDEM    = 2'd0,
    MODE_PASSTHRU  = 2'd1,
    MODE_NORMALIZE = 2'd2,
    MODE_MAC_CMP   = 2'd3
  } mode_e;

  // Bus regions, selected by the top two word-address bits.
  typedef enum logic [1:0] {
    REG_REGION    = 2'd0,
    BASIS_REGION  = 2'd1,
    PIXEL_REGION  = 2'd2,
    STREAM_REGION = 2'd3
  } region_e;

  // Register word addresses inside REG_REGION.
  localparam logic [7:0] REG_CTRL  = 8'd0;  // [1:0] mode, [8] start, [31:16] line count
  localparam logic [7:0] REG_DENOM = 8'd1;  // [12:0] normalisation denominator

  // One word on a processor-card to VCC link.
  typedef struct packed {
    logic [LINE_W-1:0] line;  // hololine index within the run
    logic              sol;   // first word of a hololine
    logic              eol;   // last word of a hololine
    logic [BUS_W-1:0]  data;  // eight fringe bytes, byte 0 displayed first
  } link_word_t;

endpackage
