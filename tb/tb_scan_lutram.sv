// tb_scan_lutram: a 16x3 LUT RAM is filled through its user port, then one
// scan session of DEPTH*WIDTH cycles (address counter from 0) shifts the old
// contents out while a new image shifts in. Expected order: cycle c carries
// bit WIDTH-1-(c / DEPTH) of word c mod DEPTH, for both directions. The
// image is then read back through the asynchronous user port.
module tb_scan_lutram;
  localparam int DEPTH = 16, WIDTH = 3, AW = 4;
  logic clk = 0;
  logic we = 0, scan_en = 0, scan_in = 0;
  logic [AW-1:0] addr = '0, scan_addr = '0;
  logic [WIDTH-1:0] din = '0, dout;
  logic scan_out;
  logic [WIDTH-1:0] old_img [DEPTH], new_img [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_lutram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (old_img[i]) begin old_img[i] = WIDTH'($urandom); new_img[i] = WIDTH'($urandom); end
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; addr = AW'(i); din = old_img[i];
      @(negedge clk);
    end
    we = 0;
    // asynchronous read
    for (int i = 0; i < DEPTH; i++) begin
      addr = AW'(i); #1;
      checks++;
      if (dout !== old_img[i]) failures++;
    end
    // scan session; user inputs hold garbage that must be ignored
    we = 0; addr = AW'(5); din = '1;
    scan_en = 1;
    for (int c = 0; c < DEPTH * WIDTH; c++) begin
      scan_addr = AW'(c % DEPTH);
      scan_in   = new_img[c % DEPTH][WIDTH - 1 - c / DEPTH];
      #1;
      checks++;
      if (scan_out !== old_img[c % DEPTH][WIDTH - 1 - c / DEPTH]) begin
        failures++;
        if (failures < 10) $display("cycle %0d scan_out=%b", c, scan_out);
      end
      @(negedge clk);
    end
    scan_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = AW'(i); #1;
      checks++;
      if (dout !== new_img[i]) begin
        failures++;
        $display("word %0d = %b, expected %b", i, dout, new_img[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
