// scan_ff: a user flip-flop instrumented for design-level scan.
//
// Three gates are placed in front of an ordinary clock-enabled flip-flop with
// a synchronous set/reset pin:
//   * a 2:1 mux on D selects scan_in while scan_en is high,
//   * an OR gate forces the clock enable on while scan_en is high,
//   * an AND gate with an inverted scan_en input blocks the set pin during
//     scan, so scanning never disturbs the state it is shifting.
// With scan_en high a row of these forms a shift register: q is both the user
// output and the scan_out of this stage, to be wired to the scan_in of the
// next memory element. With scan_en low the flip-flop behaves exactly as the
// uninstrumented one: q <= SR_VALUE when set, else q <= d when ce.
//
// The gate structure is the one of the classic scannable flip-flop (mux, OR
// on the enable, AND-NOT on the set). Making the set pin synchronous and
// letting a parameter choose whether it sets or resets are this design's
// choices. Timing: one clock per shift; q changes only on the rising edge.
module scan_ff #(
  parameter bit SR_VALUE = 1'b1   // value loaded by the set/reset pin
) (
  input  logic clk,
  input  logic d,        // user data input
  input  logic ce,       // user clock enable
  input  logic set,      // user synchronous set (or reset, see SR_VALUE)
  input  logic scan_en,  // ScanEnable
  input  logic scan_in,  // ScanOut of the previous element in the chain
  output logic q         // user output, also ScanOut of this stage
);

  logic d_mux, ce_or, set_and;

  always_comb begin
    d_mux   = scan_en ? scan_in : d;
    ce_or   = scan_en | ce;
    set_and = ~scan_en & set;
  end

  always_ff @(posedge clk) begin
    if (set_and)    q <= SR_VALUE;
    else if (ce_or) q <= d_mux;
  end

endmodule
