// tb_snn_pool_fc: the later layers of the MNIST spiking CNN on the full-size
// chip, run on the PE array by the sequencer: 2x2 average pooling, a
// fully connected layer with ten outputs, and the spike-counting layer that
// turns output spikes into class scores.
//
// Pooling: four 24x24 input channels (one per neuron of a PE), 4 time steps.
// With chains of 32 PEs (CFG 2), chain j computes pooled row py = 8p + j in
// pass p; the pooling neuron for column px sits on PE 32j + 2px and receives
// the 2x2 window through LDS (two input rows) and SHIFT (right neighbour),
// each spike adding weight WP; FIRE with threshold THP makes the pooled
// spike. Potentials are kept in memory between time steps.
// Fully connected: four images of 64 input spikes each are processed side by
// side on four chains of 64 PEs (CFG 3). The input vector walks along its
// chain by SHIFT, so PE 64k sees input i in step i and integrates it with the
// weight group of that input (LDW + SYNW, one loop iteration per input, four
// outputs per pass, three passes for ten outputs).
// Spike counting: the stored FC output spikes are read back bit by bit and
// accumulated with weight 1 into the neurons, giving per-class spike counts.
// Every pooled spike, every FC output spike and potential, and every count is
// compared with the layers computed in the testbench. The inputs are random
// spike trains, not the outputs of the conv layers; trained weights are not
// modelled.
module tb_snn_pool_fc;
  import vc_pkg::*;
  localparam int NPE = 256, DW = NPE * VW, TS = 4;

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


  localparam int WP = 16, THP = 32, THF = 40, NIN = 64;
  bit pin [TS][4][24][24];
  bit fin [TS][4][NIN];
  int wf [12][NIN];

  int syn_cycles = 0, run_cycles = 0;
  always @(posedge clk) if (host_running) begin
    run_cycles++;
    if (dut.cmd.op == OP_SYN) syn_cycles++;
  end

  task automatic run_program();
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    while (!host_done) @(negedge clk);
  endtask

  // memory map (words): pooling input 0..15, pooled spikes 20..27, pooling
  // potentials 30..37, FC input 40..43, FC spikes 50..61, FC potentials
  // 70..81, counts 90..101, FC weights 400..401
  initial begin
    logic [DW-1:0] word;
    int lp;
    foreach (pin[s, n, y, x]) pin[s][n][y][x] = ($urandom_range(0, 2) == 0);
    foreach (fin[s, k, i]) fin[s][k][i] = ($urandom_range(0, 3) == 0);
    foreach (wf[o, i]) wf[o][i] = (o < 10) ? ($urandom_range(0, 60) - 28) : 0;

    // ---------- pooling program ----------
    emit(OP_CFG, .imm(2));
    for (int s = 0; s < TS; s++)
      for (int p = 0; p < 2; p++) begin
        if (s == 0) emit(OP_CLR, .mask(4'hf));
        else for (int n = 0; n < 4; n++) emit(OP_LDV, .d(n), .imm(30 + 4 * p + n));
        for (int r = 0; r < 2; r++)
          for (int n = 0; n < 4; n++) begin
            emit(OP_LDS, .bitsel(n), .imm(4 * s + 2 * p + r));
            emit(OP_SYN, .mask(1 << n), .imm(WP << (8 * n)));
            emit(OP_SHIFT);
            emit(OP_SYN, .mask(1 << n), .imm(WP << (8 * n)));
          end
        emit(OP_FIRE, .mask(4'hf), .imm(THP));
        emit(OP_STS, .imm(20 + 2 * s + p));
        for (int n = 0; n < 4; n++) emit(OP_STV, .d(n), .imm(30 + 4 * p + n));
      end
    // ---------- fully connected program ----------
    emit(OP_CFG, .imm(3));
    for (int s = 0; s < TS; s++)
      for (int g = 0; g < 3; g++) begin
        emit(OP_SETW, .imm(400 * 128 + NIN * g));
        if (s == 0) emit(OP_CLR, .mask(4'hf));
        else for (int n = 0; n < 4; n++) emit(OP_LDV, .d(n), .imm(70 + 4 * g + n));
        emit(OP_LDS, .bitsel(0), .imm(40 + s));
        emit(OP_SETC, .d(0), .imm(NIN));
        lp = pc;
        emit(OP_LDW);
        emit(OP_SYNW, .mask(4'hf));
        emit(OP_SHIFT);
        emit(OP_DJNZ, .d(0), .imm(lp));
        emit(OP_FIRE, .mask(4'hf), .imm(THF));
        emit(OP_STS, .imm(50 + 3 * s + g));
        for (int n = 0; n < 4; n++) emit(OP_STV, .d(n), .imm(70 + 4 * g + n));
      end
    // ---------- spike counting program ----------
    for (int g = 0; g < 3; g++) begin
      emit(OP_CLR, .mask(4'hf));
      for (int s = 0; s < TS; s++)
        for (int n = 0; n < 4; n++) begin
          emit(OP_LDS, .bitsel(n), .imm(50 + 3 * s + g));
          emit(OP_SYN, .mask(1 << n), .imm(1 << (8 * n)));
        end
      for (int n = 0; n < 4; n++) emit(OP_STV, .d(n), .imm(90 + 4 * g + n));
    end
    emit(OP_HALT);

    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- data ----------
    for (int s = 0; s < TS; s++)
      for (int p = 0; p < 2; p++)
        for (int r = 0; r < 2; r++) begin
          word = '0;
          for (int j = 0; j < 8; j++)
            if (8 * p + j < 12)
              for (int x = 0; x < 24; x++)
                for (int n = 0; n < 4; n++)
                  word[(32 * j + x) * VW + n] = pin[s][n][2 * (8 * p + j) + r][x];
          write_word(4 * s + 2 * p + r, word);
        end
    for (int s = 0; s < TS; s++) begin
      word = '0;
      for (int k = 0; k < 4; k++)
        for (int i = 0; i < NIN; i++) word[(64 * k + i) * VW] = fin[s][k][i];
      write_word(40 + s, word);
    end
    for (int wd = 0; wd < 2; wd++) begin
      word = '0;
      for (int gi = 0; gi < 128; gi++) begin
        int grp, g, i;
        grp = 128 * wd + gi;
        g = grp / NIN; i = grp % NIN;
        if (g < 3)
          for (int n = 0; n < 4; n++) word[gi * 32 + 8 * n +: 8] = 8'(wf[4 * g + n][i]);
      end
      write_word(400 + wd, word);
    end

    run_program();

    // ---------- pooling reference ----------
    begin
      int v [12][12][4];
      int npool = 0;
      foreach (v[y, x, n]) v[y][x][n] = 0;
      for (int s = 0; s < TS; s++)
        for (int py = 0; py < 12; py++) begin
          int p, j;
          p = py / 8; j = py % 8;
          read_word(20 + 2 * s + p, word);
          for (int px = 0; px < 12; px++)
            for (int n = 0; n < 4; n++) begin
              int sp;
              for (int dy = 0; dy < 2; dy++)
                for (int dx = 0; dx < 2; dx++)
                  if (pin[s][n][2 * py + dy][2 * px + dx]) v[py][px][n] += WP;
              sp = 0;
              if (v[py][px][n] >= THP) begin sp = 1; v[py][px][n] = 0; npool++; end
              checks++;
              if (int'(word[(32 * j + 2 * px) * VW + n]) != sp) begin
                failures++;
                if (failures < 10) $display("FAIL pool spike s%0d y%0d x%0d n%0d", s, py, px, n);
              end
            end
        end
      for (int p = 0; p < 2; p++)
        for (int n = 0; n < 4; n++) begin
          read_word(30 + 4 * p + n, word);
          for (int j = 0; j < 8; j++)
            if (8 * p + j < 12)
              for (int px = 0; px < 12; px++) begin
                checks++;
                if (int'($signed(word[(32 * j + 2 * px) * VW +: VW])) != v[8 * p + j][px][n]) begin
                  failures++;
                  if (failures < 10) $display("FAIL pool potential y%0d x%0d n%0d", 8 * p + j, px, n);
                end
              end
        end
      $display("avg-pool/2: %0d pooled spikes", npool);
      checks++;
      if (npool == 0) begin failures++; $display("FAIL no pooled spikes"); end
    end

    // ---------- fully connected and spike counting reference ----------
    begin
      int v [4][12], cnt [4][12];
      int nfc = 0;
      foreach (v[k, o]) begin v[k][o] = 0; cnt[k][o] = 0; end
      for (int s = 0; s < TS; s++)
        for (int g = 0; g < 3; g++) begin
          read_word(50 + 3 * s + g, word);
          for (int k = 0; k < 4; k++)
            for (int n = 0; n < 4; n++) begin
              int o, sp;
              o = 4 * g + n;
              for (int i = 0; i < NIN; i++) if (fin[s][k][i]) v[k][o] += wf[o][i];
              sp = 0;
              if (v[k][o] >= THF) begin sp = 1; v[k][o] = 0; cnt[k][o]++; nfc++; end
              checks++;
              if (int'(word[64 * k * VW + n]) != sp) begin
                failures++;
                if (failures < 10) $display("FAIL fc spike s%0d img%0d out%0d", s, k, o);
              end
            end
        end
      for (int a = 0; a < 12; a++) begin
        logic [DW-1:0] cw;
        read_word(70 + a, word);
        read_word(90 + a, cw);
        for (int k = 0; k < 4; k++) begin
          checks += 2;
          if (int'($signed(word[64 * k * VW +: VW])) != v[k][a]) begin
            failures++;
            if (failures < 10) $display("FAIL fc potential img%0d out%0d", k, a);
          end
          if (int'(cw[64 * k * VW +: VW]) != cnt[k][a]) begin
            failures++;
            if (failures < 10) $display("FAIL spike count img%0d out%0d: %0d exp %0d", k, a,
                                        cw[64 * k * VW +: VW], cnt[k][a]);
          end
        end
      end
      for (int k = 0; k < 4; k++) begin
        int best;
        best = 0;
        for (int o = 1; o < 10; o++) if (cnt[k][o] > cnt[k][best]) best = o;
        $display("image %0d: class %0d (%0d of %0d steps)", k, best, cnt[k][best], TS);
      end
      $display("FC-%0d over %0d inputs, 4 images: %0d output spikes", 10, NIN, nfc);
      checks++;
      if (nfc == 0) begin failures++; $display("FAIL no FC output spikes"); end
    end
    $display("pool + FC + spike count: %0d cycles, %0d SYN cycles", run_cycles, syn_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
