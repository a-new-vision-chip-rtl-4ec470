// pe: one processing element of the spiking vision processor.
//
// Each PE holds four integrate-and-fire neurons (membrane potentials V[0..3],
// 16-bit signed), one input spike register and four output spike bits. Every
// clock it executes the command broadcast by the sequencer:
//   SYN    synaptic integration: V[n] += spk ? w[n] : 0 for the masked
//          neurons, four 8-bit weights at a time (4 synaptic ops per clock);
//          with weight 1 it is the temporal accumulation of a pixel's spikes
//   FIRE   fire-reset: V[n] >= threshold -> output spike, V[n] = 0
//   ADDV/SUBV  ALU between neuron registers (rate coding, phase differences)
//   MAP    if V[s] == key then V[d] = value; a sequence of MAPs applies any
//          table (the preprocessing f-function) to all pixels in parallel
//   LDS/LDV/STV/STS  local data access through the PE's 16-bit SRAM lane
//   SHIFT  nearby data sharing: take the right neighbour's spike register
//   DEPTH  iToF depth from V0..V3 (counts at 0/90/180/270 deg) into V[d]
// The IF neuron, its widths and the fire-reset rule follow the modelled chip;
// four neurons per PE, saturating arithmetic and the command set are this
// design's choices.
//
// Timing: all commands take effect at the clock edge ending the cycle they are
// presented in. LDS/LDV use lane_rd, which the sequencer presents in the same
// cycle as the command. DEPTH raises busy for FRAC+2 cycles; V[d] is
// written when it finishes. STV/STS drive lane_wr combinationally.
module pe
  import vc_pkg::*;
#(
  parameter int unsigned FRAC = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pe_cmd_t              cmd,
  input  logic [VW-1:0]        lane_rd,    // data SRAM lane, read data
  output logic [VW-1:0]        lane_wr,    // data SRAM lane, write data
  input  logic                 spk_right,  // right neighbour's spike register
  output logic                 spk,        // this PE's spike register
  output logic [NN-1:0]        spk_out,    // output spikes of the last FIRE
  output logic                 busy,
  output logic signed [VW-1:0] v_mon [NN]  // membrane potentials (observation)
);

  logic signed [VW-1:0] v [NN];

  localparam logic signed [VW:0] VMAX = (VW+1)'((1 << (VW-1)) - 1);
  localparam logic signed [VW:0] VMIN = -(VW+1)'(1 << (VW-1));

  function automatic logic signed [VW-1:0] sat(input logic signed [VW:0] x);
    if (x > VMAX)      return VMAX[VW-1:0];
    else if (x < VMIN) return VMIN[VW-1:0];
    else               return x[VW-1:0];
  endfunction

  // depth solver on V0..V3
  logic              dep_busy, dep_done;
  logic [FRAC+1:0]   dep_code;
  logic [1:0]        dep_dst;

  depth_solver #(.W(VW), .FRAC(FRAC)) u_depth (
    .clk   (clk),
    .rst_n (rst_n),
    .start (cmd.op == OP_DEPTH),
    .cnt0  (v[0]),
    .cnt90 (v[1]),
    .cnt180(v[2]),
    .cnt270(v[3]),
    .busy  (dep_busy),
    .done  (dep_done),
    .depth (dep_code)
  );

  assign busy = dep_busy | dep_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NN; n++) v[n] <= '0;
      spk     <= 1'b0;
      spk_out <= '0;
      dep_dst <= '0;
    end else begin
      unique case (cmd.op)
        OP_LDS:   spk <= lane_rd[cmd.bitsel];
        OP_SHIFT: spk <= spk_right;
        OP_SYN: begin
          for (int n = 0; n < NN; n++)
            if (cmd.mask[n] && spk)
              v[n] <= sat((VW+1)'(v[n]) + (VW+1)'($signed(cmd.imm[8*n +: WW])));
        end
        OP_ADDV:  v[cmd.d] <= sat((VW+1)'(v[cmd.d]) + (VW+1)'(v[cmd.s]));
        OP_SUBV:  v[cmd.d] <= sat((VW+1)'(v[cmd.d]) - (VW+1)'(v[cmd.s]));
        OP_MAP: begin
          if (v[cmd.s] == $signed(cmd.imm[31:16]))
            v[cmd.d] <= $signed(cmd.imm[15:0]);
        end
        OP_FIRE: begin
          for (int n = 0; n < NN; n++) begin
            spk_out[n] <= 1'b0;
            if (cmd.mask[n] && v[n] >= $signed(cmd.imm[VW-1:0])) begin
              spk_out[n] <= 1'b1;
              v[n]       <= '0;
            end
          end
        end
        OP_LDV:   v[cmd.d] <= $signed(lane_rd);
        OP_CLR: begin
          for (int n = 0; n < NN; n++)
            if (cmd.mask[n]) v[n] <= '0;
        end
        OP_DEPTH: dep_dst <= cmd.d;
        default: ;
      endcase
      if (dep_done)
        v[dep_dst] <= $signed(VW'(dep_code));
    end
  end

  always_comb begin
    if (cmd.op == OP_STS) lane_wr = VW'(spk_out);
    else                  lane_wr = v[cmd.d];
  end

  always_comb
    for (int n = 0; n < NN; n++) v_mon[n] = v[n];

endmodule
