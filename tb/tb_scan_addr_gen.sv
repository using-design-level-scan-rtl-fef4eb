// tb_scan_addr_gen: checks the start value of the shared scan counter for
// both session kinds and that it advances by one per scan cycle.
// With POS_W = 12 and CHAIN_LEN = 4132 the scan-in start is
// (4096 - 4132 mod 4096) = 4060, so a 4132-cycle session ends at 0 mod 4096.
module tb_scan_addr_gen;
  import scan_pkg::*;
  localparam int POS_W = 12;
  localparam int LEN   = 4132;
  logic clk = 0;
  logic scan_en;
  scan_mode_e scan_mode;
  logic [POS_W-1:0] pos;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_addr_gen #(.POS_W(POS_W), .CHAIN_LEN(LEN)) dut (.clk, .scan_en, .scan_mode, .pos);

  task automatic session(input scan_mode_e m, input int start);
    scan_mode = m; scan_en = 0;
    repeat (2) @(negedge clk);
    scan_en = 1;
    for (int c = 0; c < LEN; c++) begin
      checks++;
      if (int'(pos) != (start + c) % (1 << POS_W)) begin
        failures++;
        if (failures < 10) $display("mode %s cycle %0d pos=%0d", m.name(), c, pos);
      end
      @(negedge clk);
    end
    scan_en = 0;
    checks++;
    if (pos != '0) begin failures++; $display("session did not end at 0"); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // scan-out ends at 4132 mod 4096 = 36, so only check it starts at 0
    scan_mode = SCAN_OUT; scan_en = 0;
    repeat (2) @(negedge clk);
    scan_en = 1;
    for (int c = 0; c < 100; c++) begin
      checks++;
      if (int'(pos) != c) failures++;
      @(negedge clk);
    end
    session(SCAN_IN, (1 << POS_W) - (LEN % (1 << POS_W)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
