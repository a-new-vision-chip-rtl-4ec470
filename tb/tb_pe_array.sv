// tb_pe_array: a 32-PE array computes one kernel row of a column-parallel
// convolution (load a spike row, then SYN / SHIFT / SYN ... over up to 7
// kernel columns, four output channels at once) for every chain length, and
// the membrane potentials are compared with the convolution computed in the
// testbench with zero padding at each chain's right end. Fire-reset spikes,
// the store path and the busy flag of the depth solvers are checked too.
module tb_pe_array;
  import vc_pkg::*;
  localparam int NPE = 32;
  logic clk = 0, rst_n = 0;
  pe_cmd_t cmd;
  logic [2:0] chain_log;
  logic [NPE*VW-1:0] rd_data, wr_data;
  logic [NPE-1:0] spk;
  logic [NPE*NN-1:0] spk_out;
  logic busy;
  int checks = 0, failures = 0;

  pe_array #(.NPE(NPE)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(op_e op, logic [3:0] mask = 4'hf, logic [31:0] imm = 0, logic [3:0] bsel = 0,
                      logic [1:0] d = 0);
    @(negedge clk);
    cmd = '{op: op, d: d, s: 2'd0, mask: mask, bitsel: bsel, imm: imm};
    @(negedge clk);
    cmd.op = OP_NOP;
  endtask

  bit in_row [NPE];
  int w [7][NN];
  int acc [NPE][NN];

  initial begin
    cmd = '0;
    rd_data = '0;
    chain_log = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cl = 0; cl < 3; cl++) begin
      int len, k;
      len = 8 << cl;
      k = 3 + 2 * (cl % 3);        // kernel widths 3, 5, 7
      chain_log = 3'(cl);
      step(OP_CLR, 4'hf);
      for (int i = 0; i < NPE; i++) begin
        in_row[i] = 1'($urandom);
        rd_data[i*VW +: VW] = 16'($urandom);
        rd_data[i*VW + 3] = in_row[i];
      end
      for (int kx = 0; kx < k; kx++)
        for (int n = 0; n < NN; n++) w[kx][n] = $urandom_range(0, 255) - 128;
      // reference: output column x of each chain sees inputs x .. x+k-1 of the same chain
      for (int x = 0; x < NPE; x++)
        for (int n = 0; n < NN; n++) begin
          acc[x][n] = 0;
          for (int kx = 0; kx < k; kx++)
            if ((x % len) + kx < len && in_row[x + kx]) acc[x][n] += w[kx][n];
        end
      step(OP_LDS, 4'h0, 0, 4'd3);
      for (int kx = 0; kx < k; kx++) begin
        if (kx > 0) step(OP_SHIFT);
        step(OP_SYN, 4'hf, {8'(w[kx][3]), 8'(w[kx][2]), 8'(w[kx][1]), 8'(w[kx][0])});
      end
      // read every membrane potential through the store path
      for (int n = 0; n < NN; n++) begin
        @(negedge clk);
        cmd.op = OP_STV;
        cmd.d = 2'(n);
        #1;
        for (int x = 0; x < NPE; x++) begin
          checks++;
          if (int'($signed(wr_data[x*VW +: VW])) != acc[x][n]) begin
            failures++;
            $display("FAIL len %0d x %0d n %0d: %0d exp %0d", len, x, n,
                     $signed(wr_data[x*VW +: VW]), acc[x][n]);
          end
        end
      end
      @(negedge clk);
      cmd.op = OP_NOP;
      // fire at threshold 50 and store the spikes
      step(OP_FIRE, 4'hf, 32'd50);
      @(negedge clk);
      cmd.op = OP_STS;
      #1;
      for (int x = 0; x < NPE; x++)
        for (int n = 0; n < NN; n++) begin
          checks++;
          if (spk_out[x*NN + n] != (acc[x][n] >= 50) || wr_data[x*VW + n] != (acc[x][n] >= 50)) begin
            failures++;
            $display("FAIL fire len %0d x %0d n %0d", len, x, n);
          end
        end
      @(negedge clk);
      cmd.op = OP_NOP;
    end
    // depth solvers report busy until all finish
    step(OP_DEPTH, 4'h0, 0, 0, 2'd1);
    checks++;
    if (!busy) begin failures++; $display("FAIL busy"); end
    repeat (12) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
