// pe_ctrl: instruction sequencer of the spiking processor.
//
// Reads 64-bit instructions (see vc_pkg) from the instruction SRAM and turns
// each into one command broadcast to all PEs, plus the matching data SRAM
// access. It keeps the program counter, two address base registers, two loop
// counters and the PE-chain length, and waits for spike maps from the sensor.
//
// Timing: a 1-cycle instruction fetch is overlapped with execution, so
// SYN, SHIFT, ALU, FIRE, MAP, CLR, STV, STS and the scalar instructions take
// one cycle each, and taken DJNZ jumps cost no extra cycle. LDS, LDV and LDW
// take two cycles (SRAM read, then the PEs or the weight register capture the
// data). SYNW issues a SYN whose four weights come from the weight register,
// which LDW fills from the data SRAM (layout in vc_pkg), so that a layer's
// shared kernel is stored once in data memory and loops can walk through it. DEPTH holds the
// sequencer until the PE array is no longer busy. WAITF holds it until a
// spike map has been written since the previous WAITF or, for the first
// WAITF, since the program started (frame_tick is remembered). HALT returns to idle and pulses done. start (in idle) begins at
// start_pc. The sequencer and its instruction set are this design's own; the
// modelled chip only says that the processor runs from a 64 kB instruction
// memory under an MPU.
module pe_ctrl
  import vc_pkg::*;
#(
  parameter int unsigned IS_DEPTH = 8192,
  parameter int unsigned DS_DEPTH = 512,
  parameter int unsigned LANES    = 256,
  localparam int unsigned IAW     = $clog2(IS_DEPTH),
  localparam int unsigned DAW     = $clog2(DS_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IAW-1:0]  start_pc,
  output logic            running,
  output logic            done,
  input  logic            frame_tick,
  // instruction SRAM read port
  output logic            i_re,
  output logic [IAW-1:0]  i_addr,
  input  logic [IW-1:0]   i_rdata,
  // data SRAM port A
  output logic            d_en,
  output logic            d_we,
  output logic [DAW-1:0]  d_addr,
  input  logic [LANES*VW-1:0] d_rdata,
  // PE array
  output pe_cmd_t         cmd,
  output logic [2:0]      chain_log,
  input  logic            array_busy
);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_LOAD2, S_WAITB} state_e;

  state_e          state;
  logic [IAW-1:0]  pc;
  logic [15:0]     base [2];
  logic [15:0]     cnt  [2];
  logic            frame_pend;
  logic [15:0]     wptr;         // weight group pointer
  logic [31:0]     wreg;         // four 8-bit weights
  localparam int unsigned GPW = LANES / 2;   // weight groups per word
  instr_t          ir;
  logic [15:0]     ea;
  logic            advance;      // fetch pc+1 and stay in EXEC
  logic            jump;

  assign ir = instr_t'(i_rdata);

  always_comb begin
    unique case (ir.bsel)
      2'd1:    ea = ir.imm[15:0] + base[0];
      2'd2:    ea = ir.imm[15:0] + base[1];
      default: ea = ir.imm[15:0];
    endcase
  end

  assign jump = (state == S_EXEC) && (ir.op == OP_DJNZ) && (cnt[ir.d[0]] != 16'd1);

  // what this cycle does
  always_comb begin
    cmd     = '0;
    cmd.op  = OP_NOP;
    d_en    = 1'b0;
    d_we    = 1'b0;
    d_addr  = DAW'(ea);
    advance = 1'b0;
    unique case (state)
      S_EXEC: begin
        unique case (ir.op)
          OP_LDS, OP_LDV: d_en = 1'b1;        // read now, PEs capture next cycle
          OP_LDW: begin
            d_en   = 1'b1;
            d_addr = DAW'(32'(wptr) / GPW);
          end
          OP_SYNW: begin
            cmd = '{op: OP_SYN, d: ir.d, s: ir.s, mask: ir.mask, bitsel: ir.bitsel, imm: wreg};
            advance = 1'b1;
          end
          OP_STV, OP_STS: begin
            d_en = 1'b1;
            d_we = 1'b1;
            cmd  = '{op: ir.op, d: ir.d, s: ir.s, mask: ir.mask, bitsel: ir.bitsel, imm: ir.imm};
            advance = 1'b1;
          end
          OP_HALT, OP_DEPTH: begin
            if (ir.op == OP_DEPTH)
              cmd = '{op: ir.op, d: ir.d, s: ir.s, mask: ir.mask, bitsel: ir.bitsel, imm: ir.imm};
          end
          OP_WAITF: advance = frame_pend;
          OP_DJNZ:  advance = !jump;
          OP_NOP, OP_SETB, OP_ADDB, OP_SETC, OP_CFG, OP_SETW: advance = 1'b1;
          default: begin
            cmd = '{op: ir.op, d: ir.d, s: ir.s, mask: ir.mask, bitsel: ir.bitsel, imm: ir.imm};
            advance = 1'b1;
          end
        endcase
      end
      S_LOAD2: begin
        if (ir.op != OP_LDW)
          cmd   = '{op: ir.op, d: ir.d, s: ir.s, mask: ir.mask, bitsel: ir.bitsel, imm: ir.imm};
        advance = 1'b1;
      end
      S_WAITB: advance = !array_busy;
      default: ;
    endcase
  end

  // instruction fetch
  always_comb begin
    i_re   = 1'b0;
    i_addr = pc;
    if (state == S_IDLE && start) begin
      i_re   = 1'b1;
      i_addr = start_pc;
    end else if (jump) begin
      i_re   = 1'b1;
      i_addr = IAW'(ir.imm[15:0]);
    end else if (advance) begin
      i_re   = 1'b1;
      i_addr = pc + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pc         <= '0;
      base[0]    <= '0;
      base[1]    <= '0;
      cnt[0]     <= '0;
      cnt[1]     <= '0;
      frame_pend <= 1'b0;
      wptr       <= '0;
      wreg       <= '0;
      chain_log  <= 3'd5;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (frame_tick) frame_pend <= 1'b1;
      if (i_re) pc <= i_addr;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_EXEC;
          frame_pend <= frame_tick;
        end
        S_EXEC: begin
          unique case (ir.op)
            OP_HALT: begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
            OP_LDS, OP_LDV, OP_LDW: state <= S_LOAD2;
            OP_SETW: wptr <= ir.imm[15:0];
            OP_DEPTH:       state <= S_WAITB;
            OP_WAITF: if (frame_pend && !frame_tick) frame_pend <= 1'b0;
            OP_SETB: base[ir.d[0]] <= ir.imm[15:0];
            OP_ADDB: base[ir.d[0]] <= base[ir.d[0]] + ir.imm[15:0];
            OP_SETC: cnt[ir.d[0]]  <= ir.imm[15:0];
            OP_DJNZ: cnt[ir.d[0]]  <= cnt[ir.d[0]] - 16'd1;
            OP_CFG:  chain_log     <= (ir.imm[2:0] > 3'd5) ? 3'd5 : ir.imm[2:0];
            default: ;
          endcase
        end
        S_LOAD2: begin
          state <= S_EXEC;
          if (ir.op == OP_LDW) begin
            wreg <= d_rdata[(32'(wptr) % GPW) * 2 * VW +: 32];
            wptr <= wptr + 16'd1;
          end
        end
        S_WAITB: if (!array_busy) state <= S_EXEC;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign running = (state != S_IDLE);

  // the array is only commanded while a program runs
  a_idle_nop: assert property (@(posedge clk) disable iff (!rst_n)
                               state == S_IDLE |-> cmd.op == OP_NOP && !d_en);
  // a write and a read never share a cycle on port A
  a_we_en: assert property (@(posedge clk) disable iff (!rst_n) d_we |-> d_en);

endmodule
