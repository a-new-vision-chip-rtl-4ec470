// vc_pkg: types and constants shared by the spiking vision processor.
//
// The processor is a SIMD array of integrate-and-fire PEs driven by a
// sequencer that reads 64-bit instructions. The instruction format below is
// this design's own; the neuron widths (1-bit spikes, 8-bit weights, 16-bit
// membrane potential) and the four neurons per PE (1024 neurons on 256 PEs)
// follow the chip being modelled.
//
// Instruction word (64 bits):
//   [63:59] op     opcode (op_e)
//   [58:57] bsel   address base: 0 none, 1 base0, 2 base1
//   [56:55] d      destination neuron register / loop or base register index
//   [54:53] s      source neuron register
//   [52:49] mask   neuron-register mask (bit n selects V[n])
//   [48:45] bitsel bit of a 16-bit lane used by LDS
//   [31:0]  imm    four 8-bit weights (SYN), key/value (MAP), threshold (FIRE),
//                  address (LDS/LDV/STV/STS), immediate (SETB/ADDB/SETC/CFG/
//                  SETW), jump target (DJNZ)
//
// Weights can come with the instruction (SYN) or from the data SRAM: the
// weight pointer addresses 32-bit weight groups (four 8-bit weights, weight of
// neuron n in byte n); group g is lanes 2j and 2j+1 (low half in lane 2j) of
// word g / (LANES/2), with j = g % (LANES/2). LDW loads the group into the
// weight register and advances the pointer; SYNW integrates with it.
package vc_pkg;

  localparam int unsigned NN  = 4;   // neurons per PE
  localparam int unsigned VW  = 16;  // membrane potential width
  localparam int unsigned WW  = 8;   // synaptic weight width
  localparam int unsigned IW  = 64;  // instruction width

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_HALT  = 5'd1,
    OP_WAITF = 5'd2,   // wait until a new spike map has been written
    OP_SETB  = 5'd3,   // base[d[0]] = imm
    OP_ADDB  = 5'd4,   // base[d[0]] += imm
    OP_SETC  = 5'd5,   // loop counter[d[0]] = imm
    OP_DJNZ  = 5'd6,   // counter[d[0]]--, jump to imm if it was not 1
    OP_CFG   = 5'd7,   // chain length = 8 << imm[2:0]
    OP_LDS   = 5'd8,   // spike register = lane[bitsel] of data word
    OP_SHIFT = 5'd9,   // spike register = right neighbour's spike register
    OP_SYN   = 5'd10,  // V[n] += spk ? w[n] : 0 for n in mask
    OP_ADDV  = 5'd11,  // V[d] += V[s]
    OP_SUBV  = 5'd12,  // V[d] -= V[s]
    OP_MAP   = 5'd13,  // if V[s] == key then V[d] = value
    OP_FIRE  = 5'd14,  // for n in mask: spike out if V[n] >= thr, then V[n] = 0
    OP_LDV   = 5'd15,  // V[d] = lane
    OP_STV   = 5'd16,  // lane = V[d]
    OP_STS   = 5'd17,  // lane = output spikes (bits 3:0)
    OP_CLR   = 5'd18,  // V[n] = 0 for n in mask
    OP_DEPTH = 5'd19,  // V[d] = iToF depth code from V0..V3 (multi-cycle)
    OP_SETW  = 5'd20,  // weight pointer = imm
    OP_LDW   = 5'd21,  // weight register = 4 weights at the pointer, pointer++
    OP_SYNW  = 5'd22   // as SYN, with the weights of the weight register
  } op_e;

  typedef struct packed {
    op_e          op;
    logic [1:0]   bsel;
    logic [1:0]   d;
    logic [1:0]   s;
    logic [3:0]   mask;
    logic [3:0]   bitsel;
    logic [12:0]  rsvd;
    logic [31:0]  imm;
  } instr_t;

  // Command broadcast to every PE in one cycle.
  typedef struct packed {
    op_e          op;
    logic [1:0]   d;
    logic [1:0]   s;
    logic [3:0]   mask;
    logic [3:0]   bitsel;
    logic [31:0]  imm;
  } pe_cmd_t;

  // Imaging modes of the gated sensor.
  typedef enum logic [0:0] {
    MODE_2D  = 1'b0,  // intensity: gate open for the whole exposure
    MODE_TOF = 1'b1   // indirect ToF: gate follows the modulation at a phase
  } img_mode_e;

endpackage
