// depth_solver: four-phase indirect time-of-flight depth for one pixel.
//
// From the avalanche counts taken with the gate at 0, 90, 180 and 270 degrees
// of the light modulation it forms a = CNT0 - CNT180 and b = CNT90 - CNT270
// and returns the depth as quadrant + ratio, the phase of the reflected light
// in quarter periods:
//   a>0,  b>=0 :      b/(a+b)            a<0,  b<=0 : b/(a+b) + 2
//   a<=0, b>0  :  -a/(b-a) + 1           a>=0, b<0  : a/(a-b) + 3
// which is d * 8f/c. In every quadrant the denominator is |a|+|b|, and the
// numerator is |b| (quadrants 0 and 2) or |a| (quadrants 1 and 3). The
// piecewise function is the one of the modelled chip. Where a or b is zero
// the quadrant is chosen as above so that the ratio stays below 1 and the
// code is continuous (a = b = 0 gives 0); that and the restoring divider are
// this design's choices.
//
// Output code: {quadrant[1:0], ratio[FRAC-1:0]}, so one LSB is c/(8f)/2^FRAC
// and full scale is c/(2f). A zero denominator gives ratio 0.
//
// Timing: pulse start with the counts valid; busy is high for FRAC+1 cycles;
// done pulses for one cycle with depth valid and holding until next start.
module depth_solver #(
  parameter int unsigned W    = 16,  // count width (signed)
  parameter int unsigned FRAC = 8    // fraction bits of the ratio
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] cnt0,
  input  logic signed [W-1:0] cnt90,
  input  logic signed [W-1:0] cnt180,
  input  logic signed [W-1:0] cnt270,
  output logic                busy,
  output logic                done,
  output logic [FRAC+1:0]     depth
);

  localparam int unsigned MW = W + 2;  // |a|+|b| fits W+2 bits

  logic signed [W:0] a, b;
  logic [W:0]        abs_a, abs_b;
  logic [1:0]        quad;
  logic [MW-1:0]     num0, den0;

  always_comb begin
    a     = (W+1)'(cnt0)  - (W+1)'(cnt180);
    b     = (W+1)'(cnt90) - (W+1)'(cnt270);
    abs_a = a[W] ? (W+1)'(-a) : (W+1)'(a);
    abs_b = b[W] ? (W+1)'(-b) : (W+1)'(b);
    if (b[W])                      // b < 0
      quad = (a[W]) ? 2'd2 : 2'd3;
    else if (a[W] || a == '0)      // a <= 0, b >= 0
      quad = (b == '0 && a == '0) ? 2'd0 : (b == '0 ? 2'd2 : 2'd1);
    else                           // a > 0, b >= 0
      quad = 2'd0;
    den0 = MW'(abs_a) + MW'(abs_b);
    num0 = quad[0] ? MW'(abs_a) : MW'(abs_b);
  end

  logic [MW-1:0]   rem, den;
  logic [FRAC-1:0] q;
  logic [1:0]      quad_q;
  logic [$clog2(FRAC+1)-1:0] step;

  // trial subtraction of the shifted remainder
  logic [MW:0] rem2;
  assign rem2 = {rem, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      rem    <= '0;
      den    <= '0;
      q      <= '0;
      quad_q <= '0;
      step   <= '0;
      depth  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        rem    <= num0;
        den    <= den0;
        quad_q <= quad;
        q      <= '0;
        step   <= '0;
      end else if (busy) begin
        if (step == FRAC[$clog2(FRAC+1)-1:0]) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          depth <= {quad_q, (den == '0) ? FRAC'(0) : q};
        end else begin
          step <= step + 1'b1;
          if (den != '0 && rem2 >= {1'b0, den}) begin
            rem <= MW'(rem2 - {1'b0, den});
            q   <= {q[FRAC-2:0], 1'b1};
          end else begin
            rem <= rem2[MW-1:0];
            q   <= {q[FRAC-2:0], 1'b0};
          end
        end
      end
    end
  end

endmodule
