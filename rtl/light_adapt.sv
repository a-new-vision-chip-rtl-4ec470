// light_adapt: on-chip light-change detection and exposure feedback.
//
// The block watches the rows leaving the SPAD array and keeps only an
// SUB x SUB subsample of the pixels (every ROWS/SUB-th row and COLS/SUB-th
// column). Over a window of `window` spike maps it counts the spikes of those
// pixels (the avalanche count CNT). The first window after a (re)start gives
// the reference. Every later window is compared with it: if CNT exceeds the
// reference by more than `thr` the scene got brighter and the exposure is
// halved; if it falls short by more than `thr` it got darker and the exposure
// is doubled (within EXP_MIN..EXP_MAX). After a change the next window sets a
// new reference. The exposure register is loaded by the host (exp_load) and
// drives imaging_ctrl.
//
// Subsampled 8x8 data, detection of CNT changes and a programmable threshold
// follow the modelled chip; the window, the factor-of-two step and the
// re-baselining are this design's choices. Loading the exposure from the
// host also restarts the window and takes a new reference.
//
// Timing: the decision is taken when the last subsampled row of a window's
// last spike map is read; exposure and the one-cycle `changed` pulse follow
// one cycle later, well inside one 10 us spike-map period. Rows reset after
// that point use the new exposure.
module light_adapt #(
  parameter int unsigned ROWS    = 128,
  parameter int unsigned COLS    = 128,
  parameter int unsigned SUB     = 8,
  parameter int unsigned EXP_MIN = 1,
  parameter int unsigned EXP_MAX = 798,
  localparam int unsigned RAW    = $clog2(ROWS),
  localparam int unsigned CW     = $clog2(SUB*SUB*16 + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [CW-1:0]   thr,
  input  logic [4:0]      window,     // spike maps per window, 1..16
  input  logic            exp_load,
  input  logic [15:0]     exp_value,
  input  logic            rd_valid,
  input  logic [RAW-1:0]  rd_row,
  input  logic [COLS-1:0] rd_data,
  output logic [15:0]     exposure,
  output logic            changed,
  output logic            brighter,
  output logic [CW-1:0]   cnt_last    // CNT of the last complete window
);

  localparam int unsigned RSTEP = ROWS / SUB;
  localparam int unsigned CSTEP = COLS / SUB;
  localparam int unsigned LAST  = (SUB - 1) * RSTEP;

  logic [CW-1:0] acc, refc;
  logic [4:0]    nmap;
  logic          have_ref;
  logic [$clog2(SUB+1)-1:0] row_pop;
  logic          sub_row, last_row, win_end;
  logic [CW-1:0] acc_new;

  always_comb begin
    row_pop = '0;
    for (int k = 0; k < SUB; k++)
      row_pop += $bits(row_pop)'(rd_data[k * CSTEP]);
  end

  assign sub_row  = rd_valid && (32'(rd_row) % RSTEP == 0);
  assign last_row = rd_valid && (32'(rd_row) == LAST);
  assign acc_new  = acc + CW'(row_pop);
  assign win_end  = last_row && (nmap + 5'd1 >= window);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      refc     <= '0;
      nmap     <= '0;
      have_ref <= 1'b0;
      exposure <= 16'(EXP_MIN);
      changed  <= 1'b0;
      brighter <= 1'b0;
      cnt_last <= '0;
    end else begin
      changed <= 1'b0;
      if (exp_load) begin
        exposure <= exp_value;
        have_ref <= 1'b0;
        acc      <= '0;
        nmap     <= '0;
      end else if (!en) begin
        acc      <= '0;
        nmap     <= '0;
        have_ref <= 1'b0;
      end else if (sub_row) begin
        if (win_end) begin
          acc      <= '0;
          nmap     <= '0;
          cnt_last <= acc_new;
          if (!have_ref) begin
            refc     <= acc_new;
            have_ref <= 1'b1;
          end else if (acc_new > refc + thr) begin
            changed  <= 1'b1;
            brighter <= 1'b1;
            have_ref <= 1'b0;
            exposure <= (exposure / 2 < 16'(EXP_MIN)) ? 16'(EXP_MIN) : exposure / 2;
          end else if (acc_new + thr < refc) begin
            changed  <= 1'b1;
            brighter <= 1'b0;
            have_ref <= 1'b0;
            exposure <= (32'(exposure) * 2 > EXP_MAX) ? 16'(EXP_MAX) : exposure * 2;
          end
        end else begin
          acc <= acc_new;
          if (last_row) nmap <= nmap + 1'b1;
        end
      end
    end
  end

endmodule
