// data_sram: the 256 kB data memory of the spiking processor.
//
// DEPTH words of LANES x LW bits (default 512 x 256 x 16 bit = 256 kB); lane
// i of every word belongs to PE i. Port A serves the PE array: a full-word
// read with one cycle latency or a full-word write. Port B is the spike-map
// write port of the image sensor: a bit-masked write that sets one bit plane
// of half the lanes without disturbing the rest of the word. When both ports
// write the same word in one cycle, port B's masked bits win.
//
// The 256 kB size follows the modelled chip; the organisation into 256 lanes
// of 16 bits and the second, masked port are this design's choices.
module data_sram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned LANES = 256,
  parameter int unsigned LW    = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned DW   = LANES * LW
) (
  input  logic          clk,
  // port A: processor
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B: masked write
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_mask,
  input  logic [DW-1:0] b_wdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en && a_we)
      mem[a_addr] <= a_wdata;
    if (b_we)
      mem[b_addr] <= (((a_en && a_we && a_addr == b_addr) ? a_wdata : mem[b_addr]) & ~b_mask)
                   | (b_wdata & b_mask);
    if (a_en && !a_we)
      a_rdata <= mem[a_addr];
  end

endmodule
