// tb_pe_ctrl: runs small programs on the sequencer with a 16-PE array, a
// 64-word data memory and the instruction memory, and checks: a counted loop
// with a moving base address (LDV/ADDV/ADDB/DJNZ), the one-instruction-per-
// cycle issue of back-to-back SYN instructions, two-cycle loads, chain-length
// configuration, WAITF holding until a spike map arrives, DEPTH holding until
// the PEs finish, stores of potentials and spikes, and HALT/done.
module tb_pe_ctrl;
  import vc_pkg::*;
  localparam int NPE = 16, DS = 64, IS = 256;
  logic clk = 0, rst_n = 0;
  logic start = 0, running, done, frame_tick = 0;
  logic i_re, d_en, d_we, iwe = 0;
  logic [7:0] i_addr, iwaddr = 0;
  logic [IW-1:0] i_rdata, iwdata = 0;
  logic [5:0] d_addr;
  pe_cmd_t cmd;
  logic [2:0] chain_log;
  logic array_busy;
  logic [NPE*VW-1:0] rdata, wdata;
  logic [NPE-1:0] spk;
  logic [NPE*NN-1:0] spk_out;
  int checks = 0, failures = 0;

  pe_ctrl #(.IS_DEPTH(IS), .DS_DEPTH(DS), .LANES(NPE)) dut (
    .clk, .rst_n, .start, .start_pc(8'd0), .running, .done, .frame_tick,
    .i_re, .i_addr, .i_rdata, .d_en, .d_we, .d_addr, .d_rdata(rdata), .cmd, .chain_log, .array_busy);
  inst_sram #(.DEPTH(IS)) u_is (.clk, .we(iwe), .waddr(iwaddr), .wdata(iwdata), .re(i_re),
                                .raddr(i_addr), .rdata(i_rdata));
  pe_array #(.NPE(NPE)) u_arr (.clk, .rst_n, .cmd, .chain_log, .rd_data(rdata), .wr_data(wdata),
                               .spk, .spk_out, .busy(array_busy));
  data_sram #(.DEPTH(DS), .LANES(NPE)) u_ds (.clk, .a_en(d_en), .a_we(d_we), .a_addr(d_addr),
                                             .a_wdata(wdata), .a_rdata(rdata), .b_we(1'b0),
                                             .b_addr('0), .b_mask('0), .b_wdata('0));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // assembler
  int pc = 0;
  task automatic emit(op_e op, int d = 0, int s = 0, int mask = 0, int bsel = 0, int bitsel = 0,
                      logic [31:0] imm = 0);
    instr_t ins;
    ins = '{op: op, bsel: 2'(bsel), d: 2'(d), s: 2'(s), mask: 4'(mask), bitsel: 4'(bitsel),
            rsvd: '0, imm: imm};
    @(negedge clk);
    iwe = 1; iwaddr = 8'(pc); iwdata = ins;
    @(negedge clk);
    iwe = 0;
    pc++;
  endtask

  int syn_first = -1, syn_last = -1, syn_n = 0, cyc = 0, waitf_t = 0, tick_t = 0;
  int depth_issue = -1, after_depth = -1;
  logic [2:0] chain_seen;
  always @(posedge clk) begin
    cyc++;
    if (cmd.op == OP_SYN) begin
      if (syn_first < 0) syn_first = cyc;
      if (syn_n < 10) syn_last = cyc;
      syn_n++;
    end
    if (cmd.op == OP_DEPTH) depth_issue = cyc;
    if (depth_issue > 0 && after_depth < 0 && cmd.op == OP_STV) after_depth = cyc;
    if (cmd.op == OP_SYN) chain_seen = chain_log;
  end

  initial begin
    int sum [NPE];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // data: words 0..3 random potentials, word 8 spike bits
    for (int w = 0; w < 4; w++)
      for (int l = 0; l < NPE; l++) begin
        u_ds.mem[w][l*VW +: VW] = 16'($urandom_range(0, 1000));
      end
    for (int l = 0; l < NPE; l++) begin
      sum[l] = 0;
      for (int w = 0; w < 4; w++) sum[l] += int'(u_ds.mem[w][l*VW +: VW]);
      u_ds.mem[8][l*VW +: VW] = 16'(l % 3 == 0 ? 16'h0004 : 16'h0000);
      u_ds.mem[30][l*VW +: VW] = 16'($urandom);
    end
    // program
    emit(OP_CLR, .mask(4'hf));
    emit(OP_SETB, .d(0), .imm(0));
    emit(OP_SETC, .d(1), .imm(4));
    emit(OP_LDV, .d(0), .bsel(1), .imm(0));        // pc 3: loop
    emit(OP_ADDV, .d(1), .s(0));
    emit(OP_ADDB, .d(0), .imm(1));
    emit(OP_DJNZ, .d(1), .imm(3));
    emit(OP_STV, .d(1), .imm(20));                 // sums
    emit(OP_CFG, .imm(1));                         // chains of 16
    emit(OP_LDS, .bitsel(2), .imm(8));
    for (int i = 0; i < 10; i++) emit(OP_SYN, .mask(4'b0100), .imm(32'h00030000));
    emit(OP_FIRE, .mask(4'b0100), .imm(30));
    emit(OP_STS, .imm(21));
    // weights from data memory: groups 243 and 244 (word 30, lanes 6..9)
    emit(OP_CLR, .mask(4'b0001));
    emit(OP_SETW, .imm(243));
    emit(OP_LDW);
    emit(OP_SYNW, .mask(4'b0001));
    emit(OP_LDW);
    emit(OP_SYNW, .mask(4'b0001));
    emit(OP_STV, .d(0), .imm(23));
    emit(OP_WAITF);
    emit(OP_DEPTH, .d(3));
    emit(OP_STV, .d(3), .imm(22));
    emit(OP_HALT);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // a spike map arrives a while later
    repeat (60) @(negedge clk);
    checks++;
    if (!running) begin failures++; $display("FAIL WAITF did not hold"); end
    tick_t = cyc;
    frame_tick = 1;
    @(negedge clk) frame_tick = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (running) begin failures++; $display("FAIL still running"); end
    for (int l = 0; l < NPE; l++) begin
      checks++;
      if (int'(u_ds.mem[20][l*VW +: VW]) != sum[l]) begin
        failures++; $display("FAIL loop sum lane %0d: %0d exp %0d", l, u_ds.mem[20][l*VW +: VW], sum[l]);
      end
      checks++;
      if (u_ds.mem[21][l*VW +: VW] != ((l % 3 == 0) ? 16'h0004 : 16'h0000)) begin
        failures++; $display("FAIL spikes lane %0d: %h", l, u_ds.mem[21][l*VW +: VW]);
      end
    end
    begin
      int wsum;
      wsum = int'($signed(u_ds.mem[30][6*VW +: 8])) + int'($signed(u_ds.mem[30][8*VW +: 8]));
      for (int l = 0; l < NPE; l++) begin
        checks++;
        if (int'($signed(u_ds.mem[23][l*VW +: VW])) != ((l % 3 == 0) ? wsum : 0)) begin
          failures++; $display("FAIL SYNW lane %0d: %0d exp %0d", l, $signed(u_ds.mem[23][l*VW +: VW]), wsum);
        end
      end
    end
    checks++;
    if (syn_n != 12 || syn_last - syn_first != 9) begin
      failures++; $display("FAIL SYN issue: %0d over %0d cycles", syn_n, syn_last - syn_first + 1);
    end
    checks++;
    if (chain_seen != 3'd1) begin failures++; $display("FAIL chain_log"); end
    checks++;
    if (depth_issue <= tick_t || after_depth - depth_issue < 10) begin
      failures++; $display("FAIL depth/waitf timing %0d %0d %0d", tick_t, depth_issue, after_depth);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
