// sensor_if: writes the sensor's spike maps into the data SRAM.
//
// Each read-out row of COLS spikes is stored as one bit plane: the row goes to
// word base + row / RPW (RPW = LANES / COLS rows share a word; 2 by default),
// into lanes (row % RPW) * COLS ... + COLS-1, at bit `slot` of each 16-bit
// lane. slot counts the spike maps modulo 16, so the last 16 maps of every
// pixel sit in one lane, where the PE above that column can load any of them
// with a single LDS. Column c of row r thus belongs to PE (r % RPW)*COLS + c.
//
// Interface/timing: rd_valid/rd_row/rd_data come from the pixel array; the
// write to port B is registered (one cycle later). frame_tick pulses with the
// write of the last row, then slot advances. slot restarts at 0 on clear.
// The spiking-map stream follows the modelled chip; the memory layout is
// this design's choice.
module sensor_if #(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned COLS  = 128,
  parameter int unsigned LANES = 256,
  parameter int unsigned LW    = 16,
  parameter int unsigned AW    = 9,
  localparam int unsigned RAW  = $clog2(ROWS),
  localparam int unsigned RPW  = LANES / COLS,
  localparam int unsigned DW   = LANES * LW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [AW-1:0]   base,
  input  logic            rd_valid,
  input  logic [RAW-1:0]  rd_row,
  input  logic [COLS-1:0] rd_data,
  output logic            b_we,
  output logic [AW-1:0]   b_addr,
  output logic [DW-1:0]   b_mask,
  output logic [DW-1:0]   b_wdata,
  output logic            frame_tick,
  output logic [3:0]      slot
);

  initial assert (LANES % COLS == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_we       <= 1'b0;
      b_addr     <= '0;
      b_mask     <= '0;
      b_wdata    <= '0;
      frame_tick <= 1'b0;
      slot       <= '0;
    end else begin
      b_we       <= rd_valid;
      frame_tick <= rd_valid && (rd_row == RAW'(ROWS - 1));
      if (clear)
        slot <= '0;
      else if (rd_valid && rd_row == RAW'(ROWS - 1))
        slot <= slot + 1'b1;
      if (rd_valid) begin
        b_addr <= base + AW'(32'(rd_row) / RPW);
        for (int l = 0; l < LANES; l++) begin
          b_mask [l*LW +: LW] <= '0;
          b_wdata[l*LW +: LW] <= '0;
          if (l / COLS == 32'(rd_row) % RPW) begin
            b_mask [l*LW + 32'(slot)] <= 1'b1;
            b_wdata[l*LW + 32'(slot)] <= rd_data[l % COLS];
          end
        end
      end
    end
  end

endmodule
