// mult_scan: a fully pipelined unsigned N x N array multiplier (16 x 16 by
// default) of which only the upper N product bits are used, with every
// pipeline register on the scan chain.
//
// Stage k (k = 0..N-1) adds row k of the partial-product array: if bit k of
// b is set, a is added at weight 2**k. Once row k is added, product bits
// 0..k can no longer change and only feed the unused lower half, so each
// stage keeps just the N running-sum bits of weight 2**(k+1) .. 2**(k+N).
// The operand a and the bits of b not yet used travel along in skew
// registers. A new operand pair can enter every cycle; p = upper half of
// a*b appears N cycles later (in_valid/out_valid mark the pairs).
//
// Register count: N*(N + N + 1) + N*(N-1)/2 = 648 flip-flops at N = 16
// (sum, a, valid and b skew), all scannable. The chain runs through the
// stages in order, stage 0 first, so a scan-out session shows the last stage
// first. The multiplier's function, size and use of the upper half follow the
// evaluated example; the row-per-stage structure, the dropping of finished
// low bits and the valid tag are this design's choices.
module mult_scan #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] p,          // bits 2N-1..N of a*b
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  // per-stage register contents: {valid, b bits still to use, a, sum}
  logic [N-1:0] sum_q [N];
  logic [N-1:0] a_q   [N];
  logic [N-1:0] b_q   [N];   // stage k uses bits k+1..N-1 (others unused)
  logic         v_q   [N];
  logic [N:0]   chain;

  assign chain[0] = scan_in;

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic [N-1:0] a_in, b_in, sum_in;
    logic         v_in, bit_k;
    logic [N:0]   add;
    logic [N-1:0] sum_d;
    logic         s0, s1, s2;

    if (k == 0) begin : g_first
      assign a_in   = a;
      assign b_in   = b;
      assign sum_in = '0;
      assign v_in   = in_valid;
    end else begin : g_next
      assign a_in   = a_q[k-1];
      assign b_in   = b_q[k-1];
      assign sum_in = sum_q[k-1];
      assign v_in   = v_q[k-1];
    end

    // sum_in holds weights 2**k .. 2**(k+N-1); add a at weight 2**k, then
    // drop the now-final bit of weight 2**k
    assign bit_k = b_in[k];
    assign add   = {1'b0, sum_in} + ({(N+1){bit_k}} & {1'b0, a_in});
    assign sum_d = add[N:1];

    scan_reg #(.WIDTH(N)) u_sum (.clk, .rst, .ce(1'b1), .d(sum_d), .q(sum_q[k]),
                                 .scan_en, .scan_in(chain[k]), .scan_out(s0));
    scan_reg #(.WIDTH(N)) u_a   (.clk, .rst, .ce(1'b1), .d(a_in), .q(a_q[k]),
                                 .scan_en, .scan_in(s0), .scan_out(s1));
    scan_reg #(.WIDTH(1)) u_v   (.clk, .rst, .ce(1'b1), .d(v_in), .q(v_q[k]),
                                 .scan_en, .scan_in(s1), .scan_out(s2));

    if (k < N - 1) begin : g_skew
      localparam int unsigned BW = N - 1 - k;   // bits k+1 .. N-1
      logic [BW-1:0] bq;
      scan_reg #(.WIDTH(BW)) u_b (.clk, .rst, .ce(1'b1), .d(b_in[N-1:k+1]), .q(bq),
                                  .scan_en, .scan_in(s2), .scan_out(chain[k+1]));
      assign b_q[k] = {bq, (k+1)'(0)};
    end else begin : g_last
      assign b_q[k]     = '0;
      assign chain[k+1] = s2;
    end
  end

  assign p         = sum_q[N-1];
  assign out_valid = v_q[N-1];
  assign scan_out  = chain[N];

endmodule
