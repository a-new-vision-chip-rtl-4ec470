// tb_depth_solver: checks the four-phase iToF depth solver against the
// piecewise depth function evaluated directly in the testbench, for corner
// cases and random counts, and checks the FRAC+1 cycle latency.
module tb_depth_solver;
  localparam int W = 16, FRAC = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [W-1:0] c0, c90, c180, c270;
  logic busy, done;
  logic [FRAC+1:0] depth;
  int checks = 0, failures = 0;

  depth_solver #(.W(W), .FRAC(FRAC)) dut (.*, .cnt0(c0), .cnt90(c90), .cnt180(c180), .cnt270(c270));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_code(int p0, int p90, int p180, int p270);
    longint a, b, num, den;
    int q;
    a = p0 - p180;
    b = p90 - p270;
    if (a == 0 && b == 0)      begin q = 0; num = 0;  den = 0;     end
    else if (a > 0 && b >= 0)  begin q = 0; num = b;  den = a + b; end
    else if (a <= 0 && b > 0)  begin q = 1; num = -a; den = b - a; end
    else if (a < 0 && b <= 0)  begin q = 2; num = b;  den = a + b; end
    else                       begin q = 3; num = a;  den = a - b; end
    if (den == 0) return q << FRAC;
    return (q << FRAC) + int'((num * (1 << FRAC)) / den);
  endfunction

  task automatic run(int p0, int p90, int p180, int p270);
    int cyc, exp_c;
    c0 = 16'(p0); c90 = 16'(p90); c180 = 16'(p180); c270 = 16'(p270);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_c = expect_code(p0, p90, p180, p270);
    checks++;
    if (int'(depth) != exp_c) begin
      failures++;
      $display("FAIL depth %0d %0d %0d %0d: got %0d exp %0d", p0, p90, p180, p270, depth, exp_c);
    end
    checks++;
    if (cyc != FRAC + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(100, 50, 0, 50);     // a>0, b=0
    run(50, 100, 50, 0);     // a=0, b>0
    run(30, 70, 60, 10);     // a<0, b>0
    run(0, 10, 40, 50);      // a<0, b<0
    run(80, 0, 10, 40);      // a>0, b<0
    run(20, 20, 20, 20);     // no signal
    run(32767, 32767, 0, 0); // largest counts
    for (int i = 0; i < 400; i++)
      run($urandom_range(0, 3000), $urandom_range(0, 3000), $urandom_range(0, 3000), $urandom_range(0, 3000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
