// holo_bus_if: bus interface of the processor FPGA.
//
// The card's 64-bit data bus and its address bus (from the PCI bridge or the
// card SDRAM) deliver word writes: `bus_we` with `bus_addr` and `bus_wdata`,
// accepted in a cycle where `bus_ready` is high. The two top address bits
// select a region (holo_pkg::region_e):
//   REG_REGION    control registers: REG_CTRL (mode, start, line count) and
//                 REG_DENOM (normalisation denominator)
//   BASIS_REGION  basis fringe memory, word address = row*CHUNKS + chunk
//   PIXEL_REGION  pixel (hogel vector) memory, word address
//   STREAM_REGION input stream of precomputed fringe bytes or stored
//                 holo-values; `bus_ready` is low while the stream FIFO is full
// The decoded write strobes are combinational, in the cycle of the bus
// write; `start` is a one-cycle pulse and `mode`/`line_count` are registers.
// The published design names the bus interface that feeds pixel and basis
// data to the pipelines; the address map is this design's.
module holo_bus_if
  import holo_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // card bus
  input  logic               bus_we,
  input  logic [BUS_AW-1:0]  bus_addr,
  input  logic [BUS_W-1:0]   bus_wdata,
  output logic               bus_ready,
  // basis memory write port
  output logic               basis_we,
  output logic [BUS_AW-3:0]  basis_waddr,
  // pixel memory write port
  output logic               pixel_we,
  output logic [BUS_AW-3:0]  pixel_waddr,
  // stream FIFO push port
  output logic               stream_push,
  input  logic               stream_full,
  // shared write data
  output logic [BUS_W-1:0]   wdata,
  // registers
  output mode_e              mode,
  output logic [15:0]        line_count,
  output logic               start,
  output logic               denom_we,
  output logic [DEN_W-1:0]   denom_wdata
);

  region_e region;
  logic    accept;

  assign region      = region_e'(bus_addr[BUS_AW-1 -: 2]);
  assign bus_ready   = !(region == STREAM_REGION && stream_full);
  assign accept      = bus_we && bus_ready;
  assign wdata       = bus_wdata;

  assign basis_we    = accept && region == BASIS_REGION;
  assign pixel_we    = accept && region == PIXEL_REGION;
  assign stream_push = accept && region == STREAM_REGION;
  assign basis_waddr = bus_addr[BUS_AW-3:0];
  assign pixel_waddr = bus_addr[BUS_AW-3:0];

  logic reg_wr;
  assign reg_wr      = accept && region == REG_REGION;
  assign denom_we    = reg_wr && bus_addr[7:0] == REG_DENOM;
  assign denom_wdata = bus_wdata[DEN_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_TANDEM;
      line_count <= 16'd1;
      start      <= 1'b0;
    end else begin
      start <= 1'b0;
      if (reg_wr && bus_addr[7:0] == REG_CTRL) begin
        mode       <= mode_e'(bus_wdata[1:0]);
        line_count <= bus_wdata[31:16];
        start      <= bus_wdata[8];
      end
    end
  end

endmodule
