// pe_array: the chain of processing elements.
//
// NPE PEs receive the same command every clock (SIMD). PE i is connected to
// data SRAM lane i and, for nearby data sharing, to the spike register of PE
// i+1. The chain is cut into independent chains of chain_len PEs (8, 16, ...,
// 256): the last PE of each chain reads 0 from its right neighbour, which is
// the zero padding at the right edge of a feature-map row. Convolution runs
// column-parallel: each PE computes one output column; a kernel row is
// applied by loading an input spike row (LDS), issuing SYN with the kernel
// weight, then SHIFT and SYN for each further kernel column (up to 7x7
// kernels take 7 SHIFT/SYN steps per row).
//
// The chain lengths and the column-parallel chain follow the modelled chip;
// the shift direction and zero fill are this design's choices.
//
// chain_log: chain length = 8 << chain_log (0..5). All timing is that of pe.
module pe_array
  import vc_pkg::*;
#(
  parameter int unsigned NPE  = 256,
  parameter int unsigned FRAC = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_cmd_t             cmd,
  input  logic [2:0]          chain_log,
  input  logic [NPE*VW-1:0]   rd_data,   // data SRAM word, lane i = PE i
  output logic [NPE*VW-1:0]   wr_data,
  output logic [NPE-1:0]      spk,       // spike registers
  output logic [NPE*NN-1:0]   spk_out,   // output spikes, PE i at [4i +: 4]
  output logic                busy
);

  logic [NPE-1:0] spk_right;
  logic [NPE-1:0] pe_busy;
  logic [8:0]     chain_len;

  assign chain_len = 9'd8 << chain_log;

  always_comb begin
    for (int i = 0; i < NPE; i++) begin
      if (i == NPE - 1 || ((i + 1) % int'(chain_len)) == 0)
        spk_right[i] = 1'b0;
      else
        spk_right[i] = spk[(i + 1) % NPE];
    end
  end

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    logic signed [VW-1:0] v_mon [NN];
    pe #(.FRAC(FRAC)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .cmd      (cmd),
      .lane_rd  (rd_data[i*VW +: VW]),
      .lane_wr  (wr_data[i*VW +: VW]),
      .spk_right(spk_right[i]),
      .spk      (spk[i]),
      .spk_out  (spk_out[i*NN +: NN]),
      .busy     (pe_busy[i]),
      .v_mon    (v_mon)
    );
  end

  assign busy = |pe_busy;

endmodule
