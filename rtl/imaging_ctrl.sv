// imaging_ctrl: rolling-shutter gating sequencer of the SPAD image sensor.
//
// Each gated pixel row is first held in reset (RST) for RST_CYCLES, then its
// gate (SEL) is opened for `exposure` cycles, after which the row is read out.
// Rows follow the same schedule, each ROW_CYCLES later than the row above, so
// only a few rows are exposed at a time (the rolling shutter keeps the SPAD
// bias load steady) and one spike map of ROWS rows leaves every FRAME_CYCLES
// (800 cycles = 10 us = 100,000 spike maps/s at 80 MHz).
//
// Modes: MODE_2D keeps the gate open for the whole exposure. MODE_TOF drives
// laser_mod, a square wave of MOD_CYCLES, and opens the gate only while the
// modulation delayed by phase * MOD_CYCLES/4 (0/90/180/270 deg) is high, which
// gives the phase counts of indirect time of flight.
//
// The gated pixels, RST/SEL control, configurable exposure, rolling shutter
// and 100k maps/s follow the modelled chip; ROW_CYCLES, RST_CYCLES,
// MOD_CYCLES (10 MHz) and the phase-gating scheme are this design's choices.
//
// Interface/timing: each row samples exposure and phase in the first cycle
// of its reset, so a change applies from the next row to be reset onwards and
// never cuts a row's exposure short; exposure is clamped to FRAME_CYCLES -
// RST_CYCLES - 1. mode is sampled while en is low. A row is only gated and read after it has been reset once
// since enable. rd_en/rd_row strobe the row to read in that cycle; frame_done
// pulses with the read of the last row, and frame_idx then increments.
module imaging_ctrl
  import vc_pkg::*;
#(
  parameter int unsigned ROWS         = 128,
  parameter int unsigned FRAME_CYCLES = 800,
  parameter int unsigned ROW_CYCLES   = 6,
  parameter int unsigned RST_CYCLES   = 1,
  parameter int unsigned MOD_CYCLES   = 8,
  localparam int unsigned RAW         = $clog2(ROWS),
  localparam int unsigned TW          = $clog2(FRAME_CYCLES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  img_mode_e       mode,
  input  logic [1:0]      phase,
  input  logic [15:0]     exposure,
  output logic [ROWS-1:0] row_rst,
  output logic [ROWS-1:0] row_gate,
  output logic            rd_en,
  output logic [RAW-1:0]  rd_row,
  output logic            frame_start,
  output logic            frame_done,
  output logic [15:0]     frame_idx,
  output logic            laser_mod,
  output logic [15:0]     exp_cur     // exposure of the current frame period
);

  localparam int unsigned EXP_MAX = FRAME_CYCLES - RST_CYCLES - 1;
  localparam int unsigned MW      = $clog2(MOD_CYCLES);

  logic [TW-1:0]   t;
  logic [MW-1:0]   m;
  logic [15:0]     exp_in;
  logic [15:0]     exp_row [ROWS];
  logic [1:0]      ph_row  [ROWS];
  img_mode_e       mode_q;
  logic [ROWS-1:0] armed;
  logic [MW-1:0]   m_ph;

  assert property (@(posedge clk) ROWS * ROW_CYCLES <= FRAME_CYCLES);

  assign exp_in = (32'(exposure) > EXP_MAX) ? 16'(EXP_MAX) : exposure;
  assign laser_mod = en && (mode_q == MODE_TOF) && (m < MW'(MOD_CYCLES / 2));
  assign frame_start = en && (t == '0);
  assign exp_cur   = exp_in;

  // per-row position in the frame schedule
  logic [TW:0] trel [ROWS];
  always_comb begin
    rd_en  = 1'b0;
    rd_row = '0;
    for (int r = 0; r < ROWS; r++) begin
      if ({1'b0, t} >= (TW+1)'(r * ROW_CYCLES))
        trel[r] = {1'b0, t} - (TW+1)'(r * ROW_CYCLES);
      else
        trel[r] = {1'b0, t} + (TW+1)'(FRAME_CYCLES - r * ROW_CYCLES);
      // modulation delayed by this row's phase
      m_ph        = m - MW'(32'(ph_row[r]) * MOD_CYCLES / 4);
      row_rst[r]  = !en || (trel[r] < (TW+1)'(RST_CYCLES));
      row_gate[r] = en && armed[r] &&
                    (mode_q == MODE_2D || m_ph < MW'(MOD_CYCLES / 2)) &&
                    (trel[r] >= (TW+1)'(RST_CYCLES)) &&
                    (32'(trel[r]) < RST_CYCLES + 32'(exp_row[r]));
      if (en && armed[r] && 32'(trel[r]) == RST_CYCLES + 32'(exp_row[r])) begin
        rd_en  = 1'b1;
        rd_row = RAW'(r);
      end
    end
  end
  assign frame_done = rd_en && (rd_row == RAW'(ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      m         <= '0;
      mode_q    <= MODE_2D;
      for (int r = 0; r < ROWS; r++) begin
        exp_row[r] <= '0;
        ph_row[r]  <= '0;
      end
      armed     <= '0;
      frame_idx <= '0;
    end else if (!en) begin
      t     <= '0;
      m     <= '0;
      armed  <= '0;
      mode_q <= mode;
    end else begin
      t <= (t == TW'(FRAME_CYCLES - 1)) ? '0 : t + 1'b1;
      m <= (m == MW'(MOD_CYCLES - 1))   ? '0 : m + 1'b1;
      for (int r = 0; r < ROWS; r++) begin
        if (row_rst[r]) armed[r] <= 1'b1;
        if (trel[r] == '0) begin
          exp_row[r] <= exp_in;
          ph_row[r]  <= phase;
        end
      end
      if (frame_done) frame_idx <= frame_idx + 1'b1;
    end
  end

endmodule
