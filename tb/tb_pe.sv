// tb_pe: drives one PE with directed and random commands and compares its
// membrane potentials, spike registers and lane outputs with a model of the
// integrate-and-fire rules kept in the testbench (saturating 16-bit
// integration of 8-bit weights, fire-reset at the threshold, table mapping,
// neighbour shift, loads and stores, depth solving).
module tb_pe;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0;
  pe_cmd_t cmd;
  logic [VW-1:0] lane_rd, lane_wr;
  logic spk_right, spk, busy;
  logic [NN-1:0] spk_out;
  logic signed [VW-1:0] v_mon [NN];
  int checks = 0, failures = 0;

  pe dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int mv [NN];
  bit mspk;
  bit [NN-1:0] mout;

  function automatic int sat16(int x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction

  function automatic int s16(logic [15:0] x);
    return int'($signed(x));
  endfunction

  task automatic check_state(string what);
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (int'(v_mon[n]) != mv[n]) begin
        failures++;
        $display("FAIL %s: V[%0d]=%0d exp %0d", what, n, v_mon[n], mv[n]);
      end
    end
    checks++;
    if (spk != mspk || spk_out != mout) begin
      failures++;
      $display("FAIL %s: spk=%b/%b out=%b/%b", what, spk, mspk, spk_out, mout);
    end
  endtask

  task automatic issue(op_e op, logic [1:0] d = 0, logic [1:0] s = 0, logic [3:0] mask = 4'hf,
                       logic [3:0] bsel = 0, logic [31:0] imm = 0, logic [15:0] lane = 0, bit right = 0);
    @(negedge clk);
    cmd = '{op: op, d: d, s: s, mask: mask, bitsel: bsel, imm: imm};
    lane_rd = lane;
    spk_right = right;
    // lane output, combinational
    #1;
    if (op == OP_STV || op == OP_STS) begin
      checks++;
      if (op == OP_STV ? (s16(lane_wr) != mv[d]) : (lane_wr != 16'(mout))) begin
        failures++;
        $display("FAIL store %s lane_wr=%h", op.name(), lane_wr);
      end
    end
    // model
    case (op)
      OP_LDS: mspk = lane[bsel];
      OP_SHIFT: mspk = right;
      OP_SYN: for (int n = 0; n < NN; n++)
                if (mask[n] && mspk) mv[n] = sat16(mv[n] + int'($signed(imm[8*n +: 8])));
      OP_ADDV: mv[d] = sat16(mv[d] + mv[s]);
      OP_SUBV: mv[d] = sat16(mv[d] - mv[s]);
      OP_MAP: if (mv[s] == s16(imm[31:16])) mv[d] = s16(imm[15:0]);
      OP_FIRE: for (int n = 0; n < NN; n++) begin
                 mout[n] = mask[n] && (mv[n] >= s16(imm[15:0]));
                 if (mout[n]) mv[n] = 0;
               end
      OP_LDV: mv[d] = s16(lane);
      OP_CLR: for (int n = 0; n < NN; n++) if (mask[n]) mv[n] = 0;
      default: ;
    endcase
    @(negedge clk);
    cmd.op = OP_NOP;
    check_state(op.name());
  endtask

  initial begin
    cmd = '0;
    lane_rd = '0;
    spk_right = 0;
    foreach (mv[n]) mv[n] = 0;
    mspk = 0;
    mout = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // integrate-and-fire: weights 10, -3, 127, -128 driven by one spike
    issue(OP_LDS, .bsel(4'd5), .lane(16'h0020));
    repeat (5) issue(OP_SYN, .imm({8'h80, 8'h7f, 8'hfd, 8'h0a}));
    issue(OP_FIRE, .mask(4'hf), .imm(32'd40));
    // no spike: no integration
    issue(OP_LDS, .bsel(4'd0), .lane(16'hfffe));
    issue(OP_SYN, .imm(32'h01010101));
    // saturation
    issue(OP_LDV, .d(2'd1), .lane(16'h7ff0));
    issue(OP_LDS, .bsel(4'd15), .lane(16'h8000));
    issue(OP_SYN, .mask(4'b0010), .imm(32'h00007f00));
    issue(OP_LDV, .d(2'd3), .lane(16'h8005));
    issue(OP_SYN, .mask(4'b1000), .imm(32'h80000000));
    // ALU, map, store
    issue(OP_ADDV, .d(2'd0), .s(2'd1));
    issue(OP_SUBV, .d(2'd2), .s(2'd1));
    issue(OP_LDV, .d(2'd0), .lane(16'd3));
    issue(OP_MAP, .d(2'd2), .s(2'd0), .imm({16'd3, 16'd777}));
    issue(OP_MAP, .d(2'd1), .s(2'd0), .imm({16'd4, 16'd555}));
    issue(OP_STV, .d(2'd2));
    issue(OP_FIRE, .mask(4'b0101), .imm(32'd700));
    issue(OP_STS);
    issue(OP_SHIFT, .right(1'b1));
    issue(OP_SHIFT, .right(1'b0));
    issue(OP_CLR, .mask(4'b1010));
    // depth: counts 30,70,60,10 -> quadrant 1, ratio 30/90
    issue(OP_LDV, .d(2'd0), .lane(16'd30));
    issue(OP_LDV, .d(2'd1), .lane(16'd70));
    issue(OP_LDV, .d(2'd2), .lane(16'd60));
    issue(OP_LDV, .d(2'd3), .lane(16'd10));
    @(negedge clk);
    cmd.op = OP_DEPTH;
    cmd.d = 2'd2;
    @(negedge clk);
    cmd.op = OP_NOP;
    begin
      int cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 10) begin failures++; $display("FAIL depth busy %0d cycles", cyc); end
    end
    mv[2] = (1 << 8) + (30 * 256) / 90;
    check_state("DEPTH");
    // random commands
    for (int i = 0; i < 3000; i++) begin
      op_e op;
      int k;
      k = $urandom_range(0, 9);
      case (k)
        0: op = OP_LDS; 1: op = OP_SHIFT; 2, 3: op = OP_SYN; 4: op = OP_ADDV; 5: op = OP_SUBV;
        6: op = OP_MAP; 7: op = OP_FIRE; 8: op = OP_LDV; default: op = OP_CLR;
      endcase
      if (op == OP_MAP)
        issue(op, 2'($urandom), 2'($urandom), 4'($urandom), 4'($urandom),
              {16'(mv[$urandom_range(0, 3)]), 16'($urandom)}, 16'($urandom), 1'($urandom));
      else if (op == OP_FIRE)
        issue(op, 2'($urandom), 2'($urandom), 4'($urandom), 4'($urandom),
              32'($urandom_range(0, 300)), 16'($urandom), 1'($urandom));
      else
        issue(op, 2'($urandom), 2'($urandom), 4'($urandom), 4'($urandom), $urandom,
              16'($urandom_range(0, 600) - 300), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
