// tb_spad_pixel_array: random photon arrivals, row resets and gates on an
// 8x16 pixel model; each row read must return, one cycle later, exactly the
// pixels that saw a photon while gated since the row's last reset.
module tb_spad_pixel_array;
  localparam int ROWS = 8, COLS = 16;
  logic clk = 0, rst_n = 0;
  logic [ROWS*COLS-1:0] photon = 0;
  logic [ROWS-1:0] row_rst = 0, row_gate = 0;
  logic rd_en = 0, rd_valid;
  logic [2:0] rd_row = 0, rd_row_o;
  logic [COLS-1:0] rd_data;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  spad_pixel_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[r]) model[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      logic [COLS-1:0] exp_d;
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        row_rst[r]  = ($urandom_range(0, 15) == 0);
        row_gate[r] = 1'($urandom);
      end
      for (int i = 0; i < ROWS * COLS; i++) photon[i] = ($urandom_range(0, 7) == 0);
      rd_en = 1'($urandom);
      rd_row = 3'($urandom);
      exp_d = model[rd_row];
      for (int r = 0; r < ROWS; r++)
        if (row_rst[r]) model[r] = 0;
        else if (row_gate[r]) model[r] |= photon[r*COLS +: COLS];
      if (rd_en) begin
        @(negedge clk);
        rd_en = 0;
        row_rst = 0;
        row_gate = 0;
        checks++;
        if (!rd_valid || rd_row_o != rd_row || rd_data != exp_d) begin
          failures++;
          $display("FAIL row %0d: %h exp %h", rd_row, rd_data, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
