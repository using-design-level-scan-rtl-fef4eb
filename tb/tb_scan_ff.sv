// tb_scan_ff: randomised self-check of the scan flip-flop against a
// reference model, plus a directed shift through a 3-stage chain.
// The model: set (masked by scan_en) loads SR_VALUE, else the forced or user
// clock enable loads scan_in (scan) or d (normal).
module tb_scan_ff;
  logic clk = 0;
  logic d, ce, set, scan_en, scan_in;
  logic q, q1, q2;
  logic model, m1, m2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_ff #(.SR_VALUE(1'b1)) dut (.clk, .d, .ce, .set, .scan_en, .scan_in, .q);
  scan_ff #(.SR_VALUE(1'b0)) s1  (.clk, .d(1'b0), .ce(1'b0), .set(1'b0), .scan_en, .scan_in(q),  .q(q1));
  scan_ff #(.SR_VALUE(1'b0)) s2  (.clk, .d(1'b0), .ce(1'b0), .set(1'b0), .scan_en, .scan_in(q1), .q(q2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0; ce = 0; set = 1; scan_en = 0; scan_in = 0;
    @(negedge clk);
    model = 1'b1; set = 0;
    // random phase
    for (int i = 0; i < 2000; i++) begin
      d = 1'($urandom); ce = 1'($urandom); set = ($urandom % 8) == 0;
      scan_en = 1'($urandom); scan_in = 1'($urandom);
      @(posedge clk);
      if (!scan_en && set) model = 1'b1;
      else if (scan_en || ce) model = scan_en ? scan_in : d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("step %0d: q=%b expected %b", i, q, model);
      end
    end
    // directed: with set held high and ce low, scan still shifts a pattern
    set = 1; ce = 0; scan_en = 1;
    scan_in = 1; @(negedge clk);
    scan_in = 0; @(negedge clk);
    scan_in = 1; @(negedge clk);
    checks++;
    if ({q, q1, q2} !== 3'b101) begin
      failures++;
      $display("chain holds %b, expected 101", {q, q1, q2});
    end
    scan_en = 0; @(negedge clk);
    checks++;
    if (q !== 1'b1 || q1 !== 1'b0 || q2 !== 1'b1) begin
      failures++; $display("state after scan wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
