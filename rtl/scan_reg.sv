// scan_reg: a WIDTH-bit register made of scan flip-flops sharing one clock
// enable, with its bits chained bit 0 -> bit WIDTH-1 (scan_out is bit
// WIDTH-1). It is the building block for instrumenting pipeline registers:
// normal operation is q <= d when ce, or q <= 0 on the synchronous reset;
// with scan_en high it shifts one bit per clock, scan_in entering bit 0.
// The shared enable and reset gates serve all bits, as the scan scheme allows
// when one enable or reset feeds many flip-flops.
module scan_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out
);

  logic [WIDTH:0] chain;
  assign chain[0] = scan_in;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    scan_ff #(.SR_VALUE(1'b0)) u_ff (
      .clk     (clk),
      .d       (d[i]),
      .ce      (ce),
      .set     (rst),
      .scan_en (scan_en),
      .scan_in (chain[i]),
      .q       (q[i])
    );
    assign chain[i+1] = q[i];
  end

  assign scan_out = chain[WIDTH];

endmodule
