// spad_pixel_array: behavioural model of the gated SPAD pixel array.
//
// Behavioural model, not synthesizable hardware: the real part is an analog
// array of single-photon avalanche diodes with passive quenching, an
// external-reset gate transistor and a row-select (SEL) readout. The model
// keeps what the digital side sees. Every pixel holds one bit: while its
// row's gate is open, the first avalanche (photon or dark count, given by the
// photon input for that clock) sets it; further avalanches change nothing
// until the row's reset clears it. Reading a row returns the ROWS x 1-bit
// spike map row one cycle after rd_en.
//
// The gated structure, external reset and SEL/RST control follow the
// modelled chip; the one-bit latch as the pixel memory and the photon input
// are this model's choices.
//
// Ports: photon[r*COLS + c] is an avalanche of pixel (r, c) in this cycle;
// row_rst/row_gate come from imaging_ctrl; rd_valid, rd_row_o and rd_data
// follow rd_en/rd_row by one cycle.
module spad_pixel_array #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 128,
  localparam int unsigned RAW = $clog2(ROWS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ROWS*COLS-1:0] photon,
  input  logic [ROWS-1:0]      row_rst,
  input  logic [ROWS-1:0]      row_gate,
  input  logic                 rd_en,
  input  logic [RAW-1:0]       rd_row,
  output logic                 rd_valid,
  output logic [RAW-1:0]       rd_row_o,
  output logic [COLS-1:0]      rd_data
);

  logic [COLS-1:0] pix [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) pix[r] <= '0;
      rd_valid <= 1'b0;
      rd_row_o <= '0;
      rd_data  <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        if (row_rst[r])
          pix[r] <= '0;
        else if (row_gate[r])
          pix[r] <= pix[r] | photon[r*COLS +: COLS];
      end
      rd_valid <= rd_en;
      rd_row_o <= rd_row;
      if (rd_en)
        rd_data <= pix[rd_row];
    end
  end

endmodule
