// inst_sram: the 64 kB instruction memory of the spiking processor.
//
// DEPTH words of W bits (default 8192 x 64 bit = 64 kB). The host (MPU)
// writes programs through the write port; the sequencer reads through the
// read port with one cycle latency. The size follows the modelled chip; the
// 64-bit word is this design's instruction width.
module inst_sram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
    if (re)
      rdata <= mem[raddr];
  end

endmodule
