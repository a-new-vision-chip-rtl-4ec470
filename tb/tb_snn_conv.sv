// tb_snn_conv: the first layer of the MNIST spiking CNN (conv5-12: 5x5
// kernels, 1 input channel, 12 output channels, 28x28 input, 24x24 output)
// on the full-size chip, over 4 time steps of rate-coded input spikes.
//
// Layout: the array is configured as 8 chains of 32 PEs (CFG 2); chain j
// computes output rows 3j, 3j+1, 3j+2, column x on PE 32j+x, four output
// channels at a time, so 1024 neurons integrate in parallel. The host stores,
// per time step s, seven input words where chain j of word 7s+w holds input
// row 3j+w, and the 300 kernel weights as 75 weight groups (word 100). The
// program walks the 5x5 kernel with LDS/SHIFT and LDW/SYNW, fires the IF
// neurons (threshold TH, reset to zero), stores the output spikes, and keeps
// the membrane potentials in memory between time steps. Output spikes and
// final potentials of all 24x24x12 neurons are compared with the layer
// computed in the testbench.
module tb_snn_conv;
  import vc_pkg::*;
  localparam int NPE = 256, DW = NPE * VW, TS = 4, TH = 60;

  logic clk = 0, rst_n = 0;
  logic [128*128-1:0] photon = '0;
  logic laser_mod;
  logic [15:0] host_frame_idx, host_exposure;
  logic [3:0] host_map_slot;
  logic host_light_changed, host_light_brighter;
  logic [10:0] host_light_cnt;
  logic host_iwe = 0;
  logic [12:0] host_iaddr = 0;
  logic [IW-1:0] host_iwdata = 0;
  logic host_den = 0, host_dwe = 0;
  logic [8:0] host_daddr = 0;
  logic [DW-1:0] host_dwdata = 0, host_drdata;
  logic host_start = 0, host_running, host_done;
  int checks = 0, failures = 0;

  vision_chip_top dut (
    .clk, .rst_n, .photon, .laser_mod,
    .host_img_en(1'b0), .host_img_mode(MODE_2D), .host_img_phase(2'd0), .host_map_base(9'd0),
    .host_map_clear(1'b0), .host_frame_idx, .host_map_slot,
    .host_la_en(1'b0), .host_la_thr(11'd0), .host_la_window(5'd1), .host_exp_load(1'b0),
    .host_exp_value(16'd0), .host_exposure, .host_light_changed, .host_light_brighter,
    .host_light_cnt, .host_iwe, .host_iaddr, .host_iwdata,
    .host_den, .host_dwe, .host_daddr, .host_dwdata, .host_drdata,
    .host_start, .host_start_pc(13'd0), .host_running, .host_done);

  always #6.25 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit in_sp [TS][28][28];
  int w [12][5][5];

  int pc = 0;
  task automatic emit(op_e op, int d = 0, int s = 0, int mask = 0, int bsel = 0, int bitsel = 0,
                      logic [31:0] imm = 0);
    @(negedge clk);
    host_iwe = 1;
    host_iaddr = 13'(pc);
    host_iwdata = instr_t'{op: op, bsel: 2'(bsel), d: 2'(d), s: 2'(s), mask: 4'(mask),
                           bitsel: 4'(bitsel), rsvd: '0, imm: imm};
    pc++;
    @(negedge clk);
    host_iwe = 0;
  endtask

  task automatic write_word(int a, logic [DW-1:0] v);
    @(negedge clk);
    host_den = 1; host_dwe = 1; host_daddr = 9'(a); host_dwdata = v;
    @(negedge clk);
    host_den = 0; host_dwe = 0;
  endtask

  task automatic read_word(int a, output logic [DW-1:0] v);
    @(negedge clk);
    host_den = 1; host_dwe = 0; host_daddr = 9'(a);
    @(negedge clk);
    host_den = 0;
    v = host_drdata;
  endtask

  int syn_cycles = 0, run_cycles = 0;
  always @(posedge clk) if (host_running) begin
    run_cycles++;
    if (dut.cmd.op == OP_SYN) syn_cycles++;
  end

  initial begin
    logic [DW-1:0] word;
    // input: a blob-shaped digit-like pattern with rate coding
    for (int s = 0; s < TS; s++)
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) begin
          int dx, dy;
          dx = x - 14; dy = y - 14;
          in_sp[s][y][x] = ((dx * dx + dy * dy) < 90 && (dx * dx + dy * dy) > 25) ?
                           ($urandom_range(0, 3) != 0) : ($urandom_range(0, 15) == 0);
        end
    for (int o = 0; o < 12; o++)
      for (int ky = 0; ky < 5; ky++)
        for (int kx = 0; kx < 5; kx++) w[o][ky][kx] = $urandom_range(0, 80) - 30;

    // ---------- program ----------
    emit(OP_CFG, .imm(2));                              // chains of 32
    for (int s = 0; s < TS; s++) begin
      int outer, inner;
      emit(OP_SETB, .d(0), .imm(0));                    // base0 = t
      emit(OP_SETB, .d(1), .imm(0));                    // base1 = 4*(3t+g)
      emit(OP_SETC, .d(1), .imm(3));
      outer = pc;
      emit(OP_SETC, .d(0), .imm(3));
      emit(OP_SETW, .imm(100 * 128));                   // weight groups start at word 100
      inner = pc;
      if (s == 0) emit(OP_CLR, .mask(4'hf));
      else for (int n = 0; n < 4; n++) emit(OP_LDV, .d(n), .bsel(2), .imm(200 + n));
      for (int ky = 0; ky < 5; ky++) begin
        emit(OP_LDS, .bsel(1), .bitsel(0), .imm(7 * s + ky));
        for (int kx = 0; kx < 5; kx++) begin
          if (kx > 0) emit(OP_SHIFT);
          emit(OP_LDW);
          emit(OP_SYNW, .mask(4'hf));
        end
      end
      emit(OP_FIRE, .mask(4'hf), .imm(TH));
      emit(OP_STS, .bsel(2), .imm(300 + 36 * s));
      for (int n = 0; n < 4; n++) emit(OP_STV, .d(n), .bsel(2), .imm(200 + n));
      emit(OP_ADDB, .d(1), .imm(4));
      emit(OP_DJNZ, .d(0), .imm(inner));
      emit(OP_ADDB, .d(0), .imm(1));
      emit(OP_DJNZ, .d(1), .imm(outer));
    end
    emit(OP_HALT);

    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- data ----------
    for (int s = 0; s < TS; s++)
      for (int wd = 0; wd < 7; wd++) begin
        word = '0;
        for (int j = 0; j < 8; j++)
          for (int x = 0; x < 28; x++)
            if (3 * j + wd < 28) word[(32 * j + x) * VW] = in_sp[s][3 * j + wd][x];
        write_word(7 * s + wd, word);
      end
    word = '0;
    for (int g = 0; g < 3; g++)
      for (int ky = 0; ky < 5; ky++)
        for (int kx = 0; kx < 5; kx++)
          for (int n = 0; n < 4; n++)
            word[((g * 5 + ky) * 5 + kx) * 32 + 8 * n +: 8] = 8'(w[4 * g + n][ky][kx]);
    write_word(100, word);

    // ---------- run ----------
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    while (!host_done) @(negedge clk);

    // ---------- reference and compare ----------
    begin
      int v [24][24][12];
      int nspk = 0;
      logic [DW-1:0] sw [36][TS];
      logic [DW-1:0] vw [36];
      for (int a = 0; a < 36; a++) begin
        read_word(200 + a, vw[a]);
        for (int s = 0; s < TS; s++) read_word(300 + 36 * s + a, sw[a][s]);
      end
      foreach (v[y, x, o]) v[y][x][o] = 0;
      for (int s = 0; s < TS; s++)
        for (int y = 0; y < 24; y++)
          for (int x = 0; x < 24; x++)
            for (int o = 0; o < 12; o++) begin
              int j, t, g, n, a, sp;
              for (int ky = 0; ky < 5; ky++)
                for (int kx = 0; kx < 5; kx++)
                  if (in_sp[s][y + ky][x + kx]) v[y][x][o] += w[o][ky][kx];
              sp = 0;
              if (v[y][x][o] >= TH) begin sp = 1; v[y][x][o] = 0; nspk++; end
              j = y / 3; t = y % 3; g = o / 4; n = o % 4;
              a = 4 * (3 * t + g);
              checks++;
              if (int'(sw[a][s][(32 * j + x) * VW + n]) != sp) begin
                failures++;
                if (failures < 10) $display("FAIL spike s%0d y%0d x%0d o%0d", s, y, x, o);
              end
              if (s == TS - 1) begin
                checks++;
                if (int'($signed(vw[a + n][(32 * j + x) * VW +: VW])) != v[y][x][o]) begin
                  failures++;
                  if (failures < 10) $display("FAIL potential y%0d x%0d o%0d: %0d exp %0d", y, x, o,
                                              $signed(vw[a + n][(32 * j + x) * VW +: VW]), v[y][x][o]);
                end
              end
            end
      $display("conv5-12 on 28x28, %0d time steps: %0d cycles, %0d SYN cycles, %0d output spikes",
               TS, run_cycles, syn_cycles, nspk);
      checks++;
      if (nspk == 0) begin failures++; $display("FAIL no output spikes"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
