// tb_vision_chip_top: end-to-end run of the full-size chip (128x128 SPAD
// array, 256 PEs, 256 kB data and 64 kB instruction memory, default
// parameters).
//
// Part 1, 2D dim-light preprocessing: a scene of per-pixel brightness levels
// is imaged for four 10 us spike maps in 2D mode. A program accumulates the
// four maps per pixel (temporal accumulation), maps the count through the
// denoising f-function table f(R) = log_(1-PDE)((1-R)/(1-dt*DCR)) with
// R = CNT/4 (MAP sequence), stores the enhanced value, and rate-codes it with
// an IF neuron for 8 steps, counting the output spikes. Every pixel's stored
// value and spike count is compared with the testbench's own computation from
// the scene. The scene then gets brighter and the light-change detector must
// halve the exposure.
//
// Part 2, 3D iToF: the scene becomes reflected modulated light with a
// per-pixel delay; four spike maps are taken at each of the four gate phases
// (mode switch, phase switch), a second program accumulates the per-phase
// counts and runs the depth solver in every PE. The result is compared with
// the depth function applied to the counts read back from the stored maps,
// and the average depth must grow with the delay.
//
// Mechanisms counted (each must occur): spike maps written, WAITF stalls,
// loop iterations, MAP hits, output spikes, light-change adaptations, depth
// solves, iToF maps.
module tb_vision_chip_top;
  import vc_pkg::*;
  localparam int ROWS = 128, COLS = 128, NPE = 256, DW = NPE * VW;
  localparam int T = 4, S = 8, TH = 64;

  logic clk = 0, rst_n = 0;
  logic [ROWS*COLS-1:0] photon;
  logic laser_mod;
  logic host_img_en = 0;
  img_mode_e host_img_mode = MODE_2D;
  logic [1:0] host_img_phase = 0;
  logic [8:0] host_map_base = 0;
  logic host_map_clear = 0;
  logic [15:0] host_frame_idx;
  logic [3:0] host_map_slot;
  logic host_la_en = 0;
  logic [10:0] host_la_thr = 11'd40;
  logic [4:0] host_la_window = 5'd4;
  logic host_exp_load = 0;
  logic [15:0] host_exp_value = 16'd24;
  logic [15:0] host_exposure;
  logic host_light_changed, host_light_brighter;
  logic [10:0] host_light_cnt;
  logic host_iwe = 0;
  logic [12:0] host_iaddr = 0;
  logic [IW-1:0] host_iwdata = 0;
  logic host_den = 0, host_dwe = 0;
  logic [8:0] host_daddr = 0;
  logic [DW-1:0] host_dwdata = 0, host_drdata;
  logic host_start = 0;
  logic [12:0] host_start_pc = 0;
  logic host_running, host_done;

  int checks = 0, failures = 0;

  vision_chip_top dut (.*);

  always #6.25 clk = ~clk;   // 80 MHz
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scene ----------------
  int lvl [ROWS][COLS];       // 2D brightness level 0..4 (maps out of 4 that fire)
  int dly [ROWS][COLS];       // 3D reflection delay, cycles 0..7
  int rowframe [ROWS];        // spike map each row is exposing
  bit tof_scene = 0;
  bit bright_boost = 0;
  logic [ROWS-1:0] rst_prev;
  logic [15:0] lhist;

  function automatic bit pix_on(int r, int c, int f);
    int h;
    h = ((r * 131 + c * 71 + f * 29) ^ (r * c)) % 4;
    return (bright_boost ? 4 : lvl[r][c]) > h;
  endfunction

  always @(negedge clk) begin
    lhist <= {lhist[14:0], laser_mod};
    for (int r = 0; r < ROWS; r++) begin
      if (rst_prev[r] && !dut.row_rst[r]) rowframe[r]++;
      if (!tof_scene) begin
        if (rst_prev[r] != dut.row_rst[r])
          for (int c = 0; c < COLS; c++) photon[r*COLS + c] = pix_on(r, c, rowframe[r]);
      end else begin
        for (int c = 0; c < COLS; c++)
          photon[r*COLS + c] = ((dly[r][c] == 0) ? laser_mod : lhist[dly[r][c] - 1]) &&
                               ($urandom_range(0, 15) == 0);
      end
    end
    rst_prev = dut.row_rst;
  end

  // ---------------- mechanism counters ----------------
  int n_maps = 0, n_waitf = 0, n_loops = 0, n_map_hits = 0, n_spikes = 0, n_adapt = 0,
      n_depth = 0, n_tof_maps = 0, n_bright = 0;
  int cyc_now = 0, last_tick = 0, img_on_since = 0, n_period_checks = 0;
  logic [15:0] exp_prev = 0;
  always @(posedge clk) begin
    // a new exposure moves the read-out of the map in progress
    if (!host_img_en || host_exposure != exp_prev) img_on_since = cyc_now + 800;
    exp_prev <= host_exposure;
  end
  always @(posedge clk) begin
    cyc_now++;
    if (dut.frame_tick) begin
      // with imaging running at a steady exposure, maps must leave every 800 cycles (100,000 maps/s)
      if (last_tick > 0 && host_img_en && img_on_since < last_tick) begin
        checks++;
        if (cyc_now - last_tick != 800) begin
          failures++; $display("FAIL spike-map period %0d cycles", cyc_now - last_tick);
        end
        n_period_checks++;
      end
      last_tick = cyc_now;
      n_maps++;
      if (dut.u_img.mode_q == MODE_TOF) n_tof_maps++;
    end
    if (dut.u_ctrl.state == 1 && dut.u_ctrl.ir.op == OP_WAITF && !dut.u_ctrl.frame_pend) n_waitf++;
    if (dut.u_ctrl.jump) n_loops++;
    if (dut.cmd.op == OP_FIRE) n_spikes += $countones(dut.u_array.spk_out);
    if (dut.cmd.op == OP_DEPTH) n_depth++;
    if (host_light_changed) begin
      n_adapt++;
      if (host_light_brighter) n_bright++;
    end
  end

  // ---------------- helpers ----------------
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

  task automatic read_word(int a, output logic [DW-1:0] w);
    @(negedge clk);
    host_den = 1; host_dwe = 0; host_daddr = 9'(a);
    @(negedge clk);
    host_den = 0;
    w = host_drdata;
  endtask

  task automatic run_program(int start_pc, output int cycles);
    @(negedge clk);
    host_start_pc = 13'(start_pc);
    host_start = 1;
    @(negedge clk);
    host_start = 0;
    cycles = 1;
    while (!host_done) begin @(negedge clk); cycles++; end
  endtask

  // f-function table: enhanced value of a count of CNT out of T maps
  int ftab [T+1];
  function automatic void make_ftab();
    real pde, ddcr, rr, f;
    pde = 0.1575;
    ddcr = 0.05;   // dark-count probability per map
    for (int k = 0; k <= T; k++) begin
      rr = (k == T) ? (real'(T) - 0.5) / T : real'(k) / T;
      f = $ln((1.0 - rr) / (1.0 - ddcr)) / $ln(1.0 - pde);
      if (f < 0.0) f = 0.0;
      ftab[k] = int'(f * 4.0 + 0.5);
    end
  endfunction

  function automatic int expect_depth(int c0, int c90, int c180, int c270);
    int a, b, q, num, den;
    a = c0 - c180;
    b = c90 - c270;
    if (a == 0 && b == 0)     begin q = 0; num = 0;  den = 0;     end
    else if (a > 0 && b >= 0) begin q = 0; num = b;  den = a + b; end
    else if (a <= 0 && b > 0) begin q = 1; num = -a; den = b - a; end
    else if (a < 0 && b <= 0) begin q = 2; num = b;  den = a + b; end
    else                      begin q = 3; num = a;  den = a - b; end
    if (den == 0) return q << 8;
    return (q << 8) + (num * 256) / den;
  endfunction

  initial begin
    int cyc2d, cyc3d, pc3d;
    logic [DW-1:0] w;
    make_ftab();
    foreach (rowframe[r]) rowframe[r] = 0;
    rst_prev = '1;
    lhist = 0;
    photon = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        lvl[r][c] = (r / 8 + c / 16 + ((r * c) % 3)) % 5;
        dly[r][c] = (c / 4 + r / 32) % 8;
      end

    // ---------- program 1: 2D preprocessing ----------
    emit(OP_CFG, .imm(5));
    for (int i = 0; i < T; i++) emit(OP_WAITF);
    emit(OP_SETB, .d(0), .imm(0));
    emit(OP_SETC, .d(0), .imm(ROWS / 2));
    begin
      int loop_pc;
      loop_pc = pc;
      emit(OP_CLR, .mask(4'hf));
      for (int f = 0; f < T; f++) begin
        emit(OP_LDS, .bsel(1), .bitsel(f), .imm(0));
        emit(OP_SYN, .mask(4'b0001), .imm(32'h00000001));
      end
      for (int k = 0; k <= T; k++) emit(OP_MAP, .s(0), .d(1), .imm({16'(k), 16'(ftab[k])}));
      emit(OP_STV, .d(1), .bsel(1), .imm(64));
      for (int st = 0; st < S; st++) begin
        emit(OP_ADDV, .d(2), .s(1));
        emit(OP_FIRE, .mask(4'b0100), .imm(TH));
        emit(OP_STS, .imm(200));
        emit(OP_LDS, .bitsel(2), .imm(200));
        emit(OP_SYN, .mask(4'b1000), .imm(32'h01000000));   // spike counting
      end
      emit(OP_STV, .d(3), .bsel(1), .imm(128));
      emit(OP_ADDB, .d(0), .imm(1));
      emit(OP_DJNZ, .d(0), .imm(loop_pc));
      emit(OP_HALT);
    end
    // ---------- program 2: iToF depth ----------
    pc3d = pc;
    for (int i = 0; i < 16; i++) emit(OP_WAITF);
    emit(OP_SETB, .d(1), .imm(0));
    emit(OP_SETC, .d(1), .imm(ROWS / 2));
    begin
      int loop_pc;
      loop_pc = pc;
      emit(OP_CLR, .mask(4'hf));
      for (int p = 0; p < 4; p++)
        for (int m = 0; m < 4; m++) begin
          emit(OP_LDS, .bsel(2), .bitsel(4 * p + m), .imm(0));
          emit(OP_SYN, .mask(1 << p), .imm(32'(1) << (8 * p)));
        end
      emit(OP_DEPTH, .d(0));
      emit(OP_STV, .d(0), .bsel(2), .imm(256));
      emit(OP_ADDB, .d(1), .imm(1));
      emit(OP_DJNZ, .d(1), .imm(loop_pc));
      emit(OP_HALT);
    end

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    host_exp_load = 1;
    @(negedge clk);
    host_exp_load = 0;
    host_map_clear = 1;
    @(negedge clk);
    host_map_clear = 0;
    host_la_en = 1;
    host_img_en = 1;

    // ---------- part 1 ----------
    run_program(0, cyc2d);
    $display("2D preprocessing: %0d cycles (%0d maps seen)", cyc2d, n_maps);
    for (int k = 0; k < ROWS / 2; k++) begin
      logic [DW-1:0] wv, ws;
      read_word(64 + k, wv);
      read_word(128 + k, ws);
      for (int l = 0; l < NPE; l++) begin
        int r, c, cnt, v, nsp, e;
        r = 2 * k + l / COLS;
        c = l % COLS;
        cnt = 0;
        for (int f = 1; f <= T; f++) cnt += int'(pix_on(r, c, f));
        e = ftab[cnt];
        v = 0; nsp = 0;
        for (int st = 0; st < S; st++) begin
          v += e;
          if (v >= TH) begin nsp++; v = 0; end
        end
        n_map_hits += int'(e != 0);
        checks++;
        if (int'(wv[l*VW +: VW]) != e || int'(ws[l*VW +: VW]) != nsp) begin
          failures++;
          if (failures < 10)
            $display("FAIL 2D pixel (%0d,%0d): value %0d exp %0d, spikes %0d exp %0d", r, c,
                     wv[l*VW +: VW], e, ws[l*VW +: VW], nsp);
        end
      end
    end
    // brighter scene: the light-change detector must react
    begin
      int e0;
      e0 = host_exposure;
      checks++;
      if (n_adapt != 0) begin failures++; $display("FAIL %0d adaptations on a steady scene", n_adapt); end
      bright_boost = 1;
      repeat (800 * 10) @(negedge clk);
      checks++;
      if (n_bright == 0 || host_exposure != 16'(e0 / 2)) begin
        failures++; $display("FAIL adaptation: exposure %0d from %0d", host_exposure, e0);
      end
    end

    // ---------- part 2 ----------
    host_la_en = 0;
    @(posedge clk iff dut.frame_done);
    @(negedge clk);
    // switch to iToF at a spike-map boundary
    host_img_en = 0;
    host_img_mode = MODE_TOF;
    host_img_phase = 0;
    host_exp_value = 16'd32;
    host_exp_load = 1;
    host_map_clear = 1;
    tof_scene = 1;
    @(negedge clk);
    host_exp_load = 0;
    host_map_clear = 0;
    host_img_en = 1;
    @(negedge clk);
    host_start_pc = 13'(pc3d);
    host_start = 1;
    @(negedge clk);
    host_start = 0;
    for (int p = 0; p < 4; p++) begin
      // four maps per phase; change phase right after the 4th map's last row
      for (int m = 0; m < 4; m++) @(posedge clk iff dut.frame_done);
      @(negedge clk);
      host_img_phase = 2'(p + 1);
    end
    host_img_en = 0;     // sixteen maps taken: stop imaging
    cyc3d = 0;
    while (!host_done) begin @(negedge clk); cyc3d++; end
    host_img_en = 0;
    begin
      real sum_d [8];
      int n_d [8];
      foreach (sum_d[i]) begin sum_d[i] = 0; n_d[i] = 0; end
      for (int k = 0; k < ROWS / 2; k++) begin
        logic [DW-1:0] wd;
        int cnts [NPE][4];
        for (int l = 0; l < NPE; l++) foreach (cnts[l][p]) cnts[l][p] = 0;
        read_word(k, w);
        read_word(256 + k, wd);
        for (int l = 0; l < NPE; l++) begin
          int e, r, c;
          for (int p = 0; p < 4; p++)
            for (int m = 0; m < 4; m++) cnts[l][p] += int'(w[l*VW + 4*p + m]);
          e = expect_depth(cnts[l][0], cnts[l][1], cnts[l][2], cnts[l][3]);
          checks++;
          if (int'(wd[l*VW +: VW]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL depth lane %0d word %0d: %0d exp %0d", l, k, wd[l*VW +: VW], e);
          end
          r = 2 * k + l / COLS;
          c = l % COLS;
          sum_d[dly[r][c]] += real'(e);
          n_d[dly[r][c]]++;
        end
      end
      for (int d = 0; d < 8; d++) begin
        $display("delay %0d cycles: mean depth code %0.1f", d, sum_d[d] / n_d[d]);
        if (d > 2 && d < 7) begin
          checks++;
          if (sum_d[d] / n_d[d] <= sum_d[d-1] / n_d[d-1]) begin
            failures++; $display("FAIL depth not increasing with delay at %0d", d);
          end
        end
      end
    end

    $display("mechanisms: maps=%0d tof_maps=%0d waitf_stall_cycles=%0d loops=%0d map_hits=%0d spikes=%0d adapt=%0d depth=%0d",
             n_maps, n_tof_maps, n_waitf, n_loops, n_map_hits, n_spikes, n_adapt, n_depth);
    $display("cycles: 2D program %0d, 3D program %0d", cyc2d, cyc3d);
    foreach (ftab[k]) $display("f(%0d/4) = %0d", k, ftab[k]);
    checks++;
    if (n_period_checks == 0 || n_maps == 0 || n_tof_maps < 16 || n_waitf == 0 || n_loops == 0 || n_map_hits == 0 ||
        n_spikes == 0 || n_adapt == 0 || n_depth == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
