// tb_sensor_if: streams spike-map rows (4 rows of 8 pixels, 16 lanes) into
// the spike-map writer and checks each masked write: word base + row/2,
// lanes of the row's half, bit = spike-map slot, data = the row's spikes;
// checks frame_tick on the last row, slot wrap-around after 16 maps and clear.
module tb_sensor_if;
  localparam int ROWS = 4, COLS = 8, LANES = 16, LW = 16, AW = 5, DW = LANES * LW;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [AW-1:0] base = 5'd7;
  logic rd_valid = 0;
  logic [1:0] rd_row = 0;
  logic [COLS-1:0] rd_data = 0;
  logic b_we, frame_tick;
  logic [AW-1:0] b_addr;
  logic [DW-1:0] b_mask, b_wdata;
  logic [3:0] slot;
  int checks = 0, failures = 0;

  sensor_if #(.ROWS(ROWS), .COLS(COLS), .LANES(LANES), .LW(LW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_slot = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      if (f == 35) begin
        @(negedge clk) clear = 1;
        @(negedge clk) clear = 0;
        exp_slot = 0;
      end
      for (int r = 0; r < ROWS; r++) begin
        logic [DW-1:0] em, ed;
        @(negedge clk);
        rd_valid = 1;
        rd_row = 2'(r);
        rd_data = 8'($urandom);
        em = 0;
        ed = 0;
        for (int c = 0; c < COLS; c++) begin
          em[((r % 2) * COLS + c) * LW + exp_slot] = 1'b1;
          ed[((r % 2) * COLS + c) * LW + exp_slot] = rd_data[c];
        end
        @(negedge clk);
        rd_valid = 0;
        checks++;
        if (!b_we || b_addr != base + 5'(r / 2) || b_mask != em || b_wdata != ed ||
            frame_tick != (r == ROWS - 1)) begin
          failures++;
          $display("FAIL frame %0d row %0d addr %0d", f, r, b_addr);
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      exp_slot = (exp_slot + 1) % 16;
      checks++;
      if (slot != 4'(exp_slot)) begin failures++; $display("FAIL slot %0d", slot); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
