// cnt_scan: a WIDTH-bit up-counter (4 bits by default) whose flip-flops are
// all scan flip-flops.
//
// Each count bit is a scan_ff with the incrementer output on D, the user
// count enable on CE and the synchronous reset on the set/reset pin (loading
// 0). The bits are chained bit 0 -> bit 1 -> ... -> bit WIDTH-1, so a
// scan-out session presents the most significant bit first and a scan-in
// session loads the last bit shifted in into bit 0. While scan_en is high the
// counter neither counts nor resets; afterwards it continues from whatever
// value was scanned in.
// The 4-bit counter is the smallest example the scan costs were measured on;
// the chain order and the use of the set pin as a reset are this design's
// choices. Timing: count advances on each rising edge with ce high.
module cnt_scan #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  output logic [WIDTH-1:0] count,
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out
);

  logic [WIDTH-1:0] next;
  logic [WIDTH:0]   chain;

  assign next     = count + 1'b1;
  assign chain[0] = scan_in;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    scan_ff #(.SR_VALUE(1'b0)) u_ff (
      .clk     (clk),
      .d       (next[i]),
      .ce      (ce),
      .set     (rst),
      .scan_en (scan_en),
      .scan_in (chain[i]),
      .q       (count[i])
    );
    assign chain[i+1] = count[i];
  end

  assign scan_out = chain[WIDTH];

endmodule
