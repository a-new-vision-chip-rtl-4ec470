// tb_inst_sram: writes random instruction words, reads them back in random
// order with the one-cycle latency, and checks that the read data holds while
// no read is enabled.
module tb_inst_sram;
  localparam int DEPTH = 256, W = 64;
  logic clk = 0, we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  inst_sram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int it = 0; it < 1000; it++) begin
      logic [W-1:0] e;
      @(negedge clk);
      re = 1; raddr = 8'($urandom);
      e = ref_mem[raddr];
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL read %0d", raddr); end
      raddr = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
