// tb_cnt_scan: the 4-bit scan counter counts, resets and holds with ce low;
// a scan session of 4 cycles must present the count MSB first on scan_out
// while loading a new value (the last bit shifted in becomes bit 0), after
// which counting resumes from the loaded value. Repeated for many values.
module tb_cnt_scan;
  localparam int W = 4;
  logic clk = 0, rst = 1, ce = 0, scan_en = 0, scan_in = 0;
  logic [W-1:0] count;
  logic scan_out;
  logic [W-1:0] model, newv, outv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cnt_scan #(.WIDTH(W)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0; model = '0;
    check(count == '0, "reset");
    for (int n = 0; n < 300; n++) begin
      // some normal cycles
      repeat ($urandom_range(0, 20)) begin
        ce = 1'($urandom); rst = ($urandom % 32) == 0;
        @(negedge clk);
        if (rst) model = '0; else if (ce) model = model + 1'b1;
        check(count == model, $sformatf("count %0d expected %0d", count, model));
      end
      rst = 0;
      // scan session: user reset asserted too, must be ignored
      newv = W'($urandom);
      scan_en = 1; rst = 1; ce = 0;
      for (int c = 0; c < W; c++) begin
        scan_in = newv[W-1-c];
        #1 outv[W-1-c] = scan_out;
        @(negedge clk);
      end
      scan_en = 0; rst = 0;
      check(outv == model, $sformatf("scanned out %0d expected %0d", outv, model));
      check(count == newv, "scanned-in value");
      model = newv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
