// cordic_scan: a fully pipelined rotation-mode CORDIC of N-bit data with N
// stages (16 by default), every pipeline register on the scan chain.
//
// Stage i performs one micro-rotation: if the residual angle z is
// non-negative, (x, y) is rotated by +atan(2**-i) and that angle is
// subtracted from z, otherwise the opposite. With the shifts arithmetic:
//   x' = x -/+ (y >>> i),  y' = y +/- (x >>> i),  z' = z -/+ ATAN[i].
// After N stages (x, y) is the input vector rotated by the input angle z and
// scaled by the CORDIC gain K = 1.6468; the pipeline accepts one vector per
// cycle and has a latency of N cycles. Angles are N-bit two's complement
// with 2**(N-1) units = pi; inputs must satisfy |z| <= pi/2 and
// K * |(x, y)| < 2**(N-1).
//
// Each stage registers x, y and z, so there are 3*N*N = 768 flip-flops at
// N = 16 and nothing else; they are chained stage 0 first (x, then y, then z
// of each stage). The size, rotation mode and full pipelining follow the
// evaluated example; the number formats and the chain order are this
// design's choices. The arctangent table is computed at elaboration:
// ATAN[0] = pi/4, ATAN[i] = atan(2**-i) for i >= 1 from its power series,
// scaled by 2**(N-1)/pi and rounded.
module cordic_scan #(
  parameter int unsigned N = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [N-1:0] x_in,
  input  logic signed [N-1:0] y_in,
  input  logic signed [N-1:0] z_in,
  output logic signed [N-1:0] x_out,
  output logic signed [N-1:0] y_out,
  output logic signed [N-1:0] z_out,
  input  logic                scan_en,
  input  logic                scan_in,
  output logic                scan_out
);

  localparam real PI = 3.141592653589793;

  function automatic logic [N-1:0] atan_units(input int i);
    real x, term, s;
    if (i == 0) begin
      s = PI / 4.0;
    end else begin
      x    = 1.0 / (2.0 ** i);
      term = x;
      s    = 0.0;
      for (int n = 0; n < 12; n++) begin
        s    = (n % 2 == 0) ? s + term / (2.0 * n + 1.0) : s - term / (2.0 * n + 1.0);
        term = term * x * x;
      end
    end
    return N'(longint'(s * (2.0 ** (N - 1)) / PI + 0.5));
  endfunction

  logic signed [N-1:0] x_q [N];
  logic signed [N-1:0] y_q [N];
  logic signed [N-1:0] z_q [N];
  logic [N:0]          chain;

  assign chain[0] = scan_in;

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam logic [N-1:0] ATAN = atan_units(i);
    logic signed [N-1:0] xi, yi, zi, xd, yd, zd;
    logic                s0, s1;

    if (i == 0) begin : g_first
      assign xi = x_in;
      assign yi = y_in;
      assign zi = z_in;
    end else begin : g_next
      assign xi = x_q[i-1];
      assign yi = y_q[i-1];
      assign zi = z_q[i-1];
    end

    always_comb begin
      if (!zi[N-1]) begin
        xd = xi - (yi >>> i);
        yd = yi + (xi >>> i);
        zd = zi - ATAN;
      end else begin
        xd = xi + (yi >>> i);
        yd = yi - (xi >>> i);
        zd = zi + ATAN;
      end
    end

    scan_reg #(.WIDTH(N)) u_x (.clk, .rst, .ce(1'b1), .d(xd), .q(x_q[i]),
                               .scan_en, .scan_in(chain[i]), .scan_out(s0));
    scan_reg #(.WIDTH(N)) u_y (.clk, .rst, .ce(1'b1), .d(yd), .q(y_q[i]),
                               .scan_en, .scan_in(s0), .scan_out(s1));
    scan_reg #(.WIDTH(N)) u_z (.clk, .rst, .ce(1'b1), .d(zd), .q(z_q[i]),
                               .scan_en, .scan_in(s1), .scan_out(chain[i+1]));
  end

  assign x_out    = x_q[N-1];
  assign y_out    = y_q[N-1];
  assign z_out    = z_q[N-1];
  assign scan_out = chain[N];

endmodule
