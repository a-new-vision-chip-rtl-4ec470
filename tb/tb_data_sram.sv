// tb_data_sram: random full-word reads/writes on port A and bit-masked
// writes on port B (also to the same word in the same cycle) against a
// reference array; checks the one-cycle read latency.
module tb_data_sram;
  localparam int DEPTH = 32, LANES = 8, LW = 16, DW = LANES * LW;
  logic clk = 0;
  logic a_en, a_we, b_we;
  logic [4:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, a_rdata, b_mask, b_wdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  data_sram #(.DEPTH(DEPTH), .LANES(LANES), .LW(LW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] rnd();
    logic [DW-1:0] x;
    for (int i = 0; i < DW / 32; i++) x[i*32 +: 32] = $urandom;
    return x;
  endfunction

  initial begin
    a_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_mask = 0; b_wdata = 0;
    // initialise through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 5'(i); a_wdata = rnd();
      ref_mem[i] = a_wdata;
    end
    for (int it = 0; it < 4000; it++) begin
      logic [DW-1:0] exp_rd;
      bit rd;
      @(negedge clk);
      a_en = 1'($urandom);
      a_we = 1'($urandom);
      a_addr = 5'($urandom);
      a_wdata = rnd();
      b_we = 1'($urandom);
      b_addr = ($urandom_range(0, 3) == 0) ? a_addr : 5'($urandom);
      b_mask = rnd() & rnd();
      b_wdata = rnd();
      rd = a_en && !a_we;
      exp_rd = ref_mem[a_addr];
      if (a_en && a_we) ref_mem[a_addr] = a_wdata;
      if (b_we) ref_mem[b_addr] = (ref_mem[b_addr] & ~b_mask) | (b_wdata & b_mask);
      @(negedge clk);
      if (rd) begin
        checks++;
        if (a_rdata !== exp_rd) begin
          failures++;
          $display("FAIL read addr %0d", a_addr);
        end
      end
      a_en = 0; b_we = 0;
    end
    // final sweep
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 0; a_addr = 5'(i);
      @(negedge clk);
      checks++;
      if (a_rdata !== ref_mem[i]) begin failures++; $display("FAIL sweep %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
