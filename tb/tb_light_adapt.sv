// tb_light_adapt: feeds spike maps (16x16 pixels, 8x8 subsample) of changing
// brightness to the light-change detector. The testbench counts the
// subsampled spikes itself and checks: the per-window count, no action while
// the change stays within the threshold, halving the exposure on a brighter
// scene and doubling it on a darker one, re-baselining after each change,
// the EXP_MIN/EXP_MAX limits, and that the new exposure is out one cycle after
// the last subsampled row of the window is read (well inside the 3.85 us,
// 308-cycle adaptation budget at 80 MHz).
module tb_light_adapt;
  localparam int ROWS = 16, COLS = 16, SUB = 8, CW = $clog2(SUB*SUB*16 + 1);
  logic clk = 0, rst_n = 0, en = 0, exp_load = 0;
  logic [CW-1:0] thr = 6;
  logic [4:0] window = 2;
  logic [15:0] exp_value = 64;
  logic rd_valid = 0;
  logic [3:0] rd_row = 0;
  logic [COLS-1:0] rd_data = 0;
  logic [15:0] exposure;
  logic changed, brighter;
  logic [CW-1:0] cnt_last;
  int checks = 0, failures = 0;
  int changes = 0, max_lat = 0;

  light_adapt #(.ROWS(ROWS), .COLS(COLS), .SUB(SUB), .EXP_MIN(4), .EXP_MAX(200)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one spike map where each subsampled pixel fires with `n_on` of 64
  // positions; returns the subsampled count
  task automatic send_map(int n_on, output int cnt);
    cnt = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      rd_valid = 1;
      rd_row = 4'(r);
      for (int c = 0; c < COLS; c++) begin
        rd_data[c] = 1'($urandom);
        if (r % 2 == 0 && c % 2 == 0) begin
          rd_data[c] = ((r / 2) * 8 + c / 2) < n_on;
          cnt += int'(rd_data[c]);
        end
      end
      @(negedge clk);
      rd_valid = 0;
    end
  endtask

  // one window; expect: 0 none, 1 brighter, 2 darker
  task automatic window_run(int n_on, int expect_kind, int exp_after);
    int c0, c1, total;
    logic [15:0] e0;
    e0 = exposure;
    send_map(n_on, c0);
    send_map(n_on, c1);
    total = c0 + c1;
    checks++;
    if (int'(cnt_last) != total) begin failures++; $display("FAIL cnt %0d exp %0d", cnt_last, total); end
    checks++;
    if (exposure != 16'(exp_after)) begin
      failures++; $display("FAIL exposure %0d exp %0d (from %0d)", exposure, exp_after, e0);
    end
  endtask

  // latency: changed must follow the read of the last subsampled row by one cycle
  int last_sub_t = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rd_valid && rd_row == 4'(ROWS - 2)) last_sub_t = cyc;
    if (changed) begin
      changes++;
      if (cyc - last_sub_t > max_lat) max_lat = cyc - last_sub_t;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) exp_load = 1;
    @(negedge clk) exp_load = 0;
    en = 1;
    window_run(20, 0, 64);   // reference
    window_run(22, 0, 64);   // within threshold (44 vs 40)
    window_run(18, 0, 64);
    window_run(40, 1, 32);   // brighter: 80 vs 40
    window_run(40, 0, 32);   // new reference
    window_run(10, 2, 64);   // darker
    window_run(10, 0, 64);   // reference
    window_run(60, 1, 32);
    window_run(60, 0, 32);
    window_run(62, 0, 32);   // 124 vs 120: within threshold
    window_run(0, 2, 64);
    // limits
    window_run(0, 0, 64);
    exp_value = 190;
    @(negedge clk) exp_load = 1;
    @(negedge clk) exp_load = 0;
    window_run(64, 0, 190);
    window_run(0, 2, 200);   // clamped at EXP_MAX
    exp_value = 6;
    @(negedge clk) exp_load = 1;
    @(negedge clk) exp_load = 0;
    window_run(0, 0, 6);
    window_run(64, 1, 4);    // clamped at EXP_MIN
    checks++;
    if (changes < 6 || max_lat > 1) begin
      failures++; $display("FAIL changes %0d latency %0d", changes, max_lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
