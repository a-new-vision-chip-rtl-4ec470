// tb_imaging_ctrl: runs the rolling-shutter sequencer (8 rows, 64-cycle
// spike-map period) and checks, per row and frame: exactly one reset, a gate
// window of exactly `exposure` cycles (2D) that starts after the reset, one
// read right after the gate closes, reads in row order ROW_CYCLES apart, the
// spike-map period, exposure changes taking effect without cutting a row
// short, exposure clamping, and in iToF mode that the gate only opens while
// the modulation delayed by the selected phase is high.
module tb_imaging_ctrl;
  import vc_pkg::*;
  localparam int ROWS = 8, FRAME = 64, ROWC = 6, RSTC = 1, MOD = 8;
  logic clk = 0, rst_n = 0, en = 0;
  img_mode_e mode = MODE_2D;
  logic [1:0] phase = 0;
  logic [15:0] exposure = 10;
  logic [ROWS-1:0] row_rst, row_gate;
  logic rd_en, frame_start, frame_done, laser_mod;
  logic [2:0] rd_row;
  logic [15:0] frame_idx, exp_cur;
  int checks = 0, failures = 0;

  imaging_ctrl #(.ROWS(ROWS), .FRAME_CYCLES(FRAME), .ROW_CYCLES(ROWC), .RST_CYCLES(RSTC),
                 .MOD_CYCLES(MOD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-row bookkeeping between reads
  int gate_cnt [ROWS], rst_seen [ROWS], last_read_t [ROWS];
  int cyc = 0, last_rd_row = -1, last_rd_t = 0, reads = 0, frames = 0;
  int exp_ok_a = 10, exp_ok_b = 10;   // the allowed gate counts in this phase of the test
  bit tof_check = 0;
  logic [15:0] lmod_hist;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    lmod_hist <= {lmod_hist[14:0], laser_mod};
    for (int r = 0; r < ROWS; r++) begin
      if (row_rst[r] && en) begin
        rst_seen[r]++;
        gate_cnt[r] = 0;
        if (row_gate[r]) begin failures++; $display("FAIL gate during reset"); end
      end
      if (row_gate[r]) begin
        gate_cnt[r]++;
        if (tof_check) begin
          // modulation delayed by the phase must be high
          logic d;
          d = (phase == 0) ? laser_mod : lmod_hist[2*phase - 1];
          checks++;
          if (!d) begin failures++; $display("FAIL tof gate row %0d phase %0d", r, phase); end
        end
      end
    end
    if (rd_en) begin
      reads++;
      if (mode == MODE_2D) begin
        checks++;
        if (gate_cnt[rd_row] != exp_ok_a && gate_cnt[rd_row] != exp_ok_b) begin
          failures++;
          $display("FAIL row %0d gate %0d cycles, expected %0d or %0d", rd_row, gate_cnt[rd_row],
                   exp_ok_a, exp_ok_b);
        end
      end
      checks++;
      if (rst_seen[rd_row] != 1) begin
        failures++; $display("FAIL row %0d reset seen %0d times", rd_row, rst_seen[rd_row]);
      end
      rst_seen[rd_row] = 0;
      if (last_rd_row >= 0) begin
        checks++;
        if (int'(rd_row) != (last_rd_row + 1) % ROWS ||
            (rd_row != 0 && exp_ok_a == exp_ok_b && cyc - last_rd_t != ROWC)) begin
          failures++; $display("FAIL read order %0d after %0d (%0d cycles)", rd_row, last_rd_row, cyc - last_rd_t);
        end
      end
      if (last_read_t[rd_row] > 0 && exp_ok_a == exp_ok_b) begin
        checks++;
        if (cyc - last_read_t[rd_row] != FRAME) begin
          failures++; $display("FAIL frame period %0d", cyc - last_read_t[rd_row]);
        end
      end
      last_read_t[rd_row] = cyc;
      last_rd_row = rd_row;
      last_rd_t = cyc;
    end
    if (frame_done) frames++;
  end

  initial begin
    lmod_hist = 0;
    foreach (gate_cnt[r]) begin gate_cnt[r] = 0; rst_seen[r] = 0; last_read_t[r] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;
    repeat (FRAME * 4) @(negedge clk);
    // change exposure in the middle of a frame
    exp_ok_b = 25;
    exposure = 25;
    repeat (FRAME + FRAME / 2) @(negedge clk);
    exp_ok_a = 25;
    foreach (last_read_t[r]) last_read_t[r] = 0;
    repeat (FRAME * 2) @(negedge clk);
    checks++;
    if (frames < 6 || frame_idx != 16'(frames)) begin
      failures++; $display("FAIL frames %0d idx %0d", frames, frame_idx);
    end
    // clamping
    exposure = 1000;
    exp_ok_a = FRAME - RSTC - 1;
    exp_ok_b = 25;
    repeat (FRAME * 2) @(negedge clk);
    exp_ok_b = exp_ok_a;
    foreach (last_read_t[r]) last_read_t[r] = 0;
    repeat (FRAME * 2) @(negedge clk);
    checks++;
    if (exp_cur != 16'(FRAME - RSTC - 1)) begin failures++; $display("FAIL clamp"); end
    // iToF, four phases
    for (int p = 0; p < 4; p++) begin
      en = 0;
      mode = MODE_TOF;
      phase = 2'(p);
      exposure = 32;
      @(negedge clk);
      en = 1;
      foreach (last_read_t[r]) begin last_read_t[r] = 0; rst_seen[r] = 0; end
      last_rd_row = -1;
      // the modulation history is only complete one period after enable
      repeat (MOD) @(negedge clk);
      tof_check = 1;
      repeat (FRAME * 3) @(negedge clk);
      tof_check = 0;
    end
    checks++;
    if (reads < 60) begin failures++; $display("FAIL reads %0d", reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
