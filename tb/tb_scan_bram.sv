// tb_scan_bram: a 16x4 BlockRAM placed in a small chain between two
// upstream and three downstream testbench flip-flops (chain length
// 2 + 17*4 + 3 = 73), driven by the shared address generator.
//  1. Fill the RAM and leave word 5 in the output register; a scan-out
//     session must deliver: downstream bits, output register, words 0..15
//     (MSB first), upstream bits.
//  2. A scan-in session of a random image must leave every bit in place:
//     the output register value is checked before any read, the words by
//     user reads after a second, identical scan-in.
//  3. A scan-out right after the first scan-in must return the image.
module tb_scan_bram;
  import scan_pkg::*;
  localparam int M = 16, W = 4, AW = 4, PW = 6, U = 2, D = 3;
  localparam int L = U + (M + 1) * W + D;
  logic clk = 0;
  logic en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0] din = '0, dout;
  logic scan_en = 0, scan_in = 0, scan_out;
  scan_mode_e scan_mode = SCAN_OUT;
  logic [PW-1:0] pos;
  logic [U-1:0] up;
  logic [D-1:0] dn;
  logic chain_out;
  logic [W-1:0] old_mem [M];
  logic [W-1:0] old_do;
  logic img [L];
  logic got [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_addr_gen #(.POS_W(PW), .CHAIN_LEN(L)) u_gen (.clk, .scan_en, .scan_mode, .pos);

  scan_bram #(.DEPTH(M), .WIDTH(W)) dut (
    .clk, .en, .we, .addr, .din, .dout,
    .scan_en, .scan_pos(pos), .scan_in(up[U-1]), .scan_out);

  always_ff @(posedge clk) if (scan_en) begin
    up <= {up[U-2:0], scan_in};
    dn <= {dn[D-2:0], scan_out};
  end
  assign chain_out = dn[D-1];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_session(input scan_mode_e m, input logic src [L]);
    scan_mode = m;
    @(negedge clk);
    @(negedge clk);
    scan_en = 1;
    en = 1; we = 1; din = '1;              // user logic garbage during scan
    for (int c = 0; c < L; c++) begin
      scan_in = src[c];
      #1 got[c] = chain_out;
      @(negedge clk);
    end
    scan_en = 0;
    en = 0; we = 0;
  endtask

  function automatic logic expect_bit(input int k, input logic [D-1:0] dn0,
                                      input logic [U-1:0] up0,
                                      input logic [W-1:0] do0);
    if (k < D) return dn0[D-1-k];
    if (k < D + W) return do0[W-1-(k-D)];
    if (k < D + (M + 1) * W) return old_mem[(k - D - W) / W][W-1-((k - D - W) % W)];
    return up0[U-1-(k - D - (M + 1) * W)];
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] dn0;
    logic [U-1:0] up0;
    logic zeros [L];
    foreach (zeros[i]) zeros[i] = 1'b0;
    foreach (old_mem[i]) old_mem[i] = W'($urandom);
    // the scan flip-flops outside the RAM start from known values
    up = 2'b10; dn = 3'b011;
    repeat (2) @(negedge clk);
    for (int i = 0; i < M; i++) begin
      en = 1; we = 1; addr = AW'(i); din = old_mem[i];
      @(negedge clk);
    end
    // user reads: write-first output register, then word 5 left in it
    we = 0; addr = AW'(9);
    @(negedge clk);
    check(dout == old_mem[9], "user read of word 9");
    addr = AW'(5);
    @(negedge clk);
    en = 0;
    old_do = dout;
    check(old_do == old_mem[5], "user read of word 5");
    dn0 = dn; up0 = up;
    // 1. scan out; user port shows garbage that must be ignored
    run_session(SCAN_OUT, zeros);
    for (int k = 0; k < L; k++)
      check(got[k] == expect_bit(k, dn0, up0, old_do), $sformatf("scan-out bit %0d", k));
    // 2. scan in a random image
    foreach (img[i]) img[i] = 1'($urandom);
    run_session(SCAN_IN, img);
    @(negedge clk);                       // the last word is written here
    for (int k = 0; k < D; k++) check(dn[D-1-k] == img[k], $sformatf("downstream bit %0d", k));
    for (int k = 0; k < U; k++) check(up[k] == img[L-1-k], $sformatf("upstream bit %0d", k));
    for (int b = 0; b < W; b++) check(dout[W-1-b] == img[D+b], $sformatf("output register bit %0d", b));
    // 3. round trip: scan out again, expect the image
    run_session(SCAN_OUT, zeros);
    for (int k = 0; k < L; k++) check(got[k] == img[k], $sformatf("round-trip bit %0d", k));
    // load the image again and read every word through the user port
    run_session(SCAN_IN, img);
    @(negedge clk);
    for (int i = 0; i < M; i++) begin
      en = 1; addr = AW'(i);
      @(negedge clk);
      for (int b = 0; b < W; b++)
        check(dout[W-1-b] == img[D + W + i*W + b], $sformatf("word %0d bit %0d", i, b));
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
