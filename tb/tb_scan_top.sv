// tb_scan_top: end-to-end test of the scan wrapper at its default sizes
// (4-bit counter, 16x16 multiplier, 16-bit CORDIC, 16x1 LUT RAM,
// 256x16 BlockRAM: a 5 548-bit chain).
//  1. User operation fills both RAMs, runs the counter, uses the external
//     memory, and performs a device readback, modelled by forcing garbage
//     into the BlockRAM output register. The output shadow must take over
//     until the next user read.
//  2. A scan-out session, started while an external write is waiting and a
//     read is in flight, must deliver the whole state in chain order.
//  3. A random image is scanned in, scanned out again (round trip) and
//     scanned in once more; the user ports must then show that image.
//     The multiplier and CORDIC pipelines (idle with zero inputs) are part
//     of the scanned-out state.
//  4. Normal operation resumes: the counter counts on from the loaded value,
//     the held write and the buffered read complete.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_scan_top;
  localparam int CNT_W = 4, LD = 16, BD = 256, BW = 16, MAW = 16, MDW = 16, RD_LAT = 2;
  localparam int DW = 16;
  localparam int MUL_L = DW * (2 * DW + 1) + DW * (DW - 1) / 2;   // 648
  localparam int COR_L = 3 * DW * DW;                             // 768
  localparam real PI = 3.141592653589793;
  localparam int L = LD + (BD + 1) * BW + COR_L + MUL_L + CNT_W;
  localparam int P_DO = CNT_W + MUL_L + COR_L;    // output register in the stream
  logic clk = 0, rst = 1;
  logic cnt_ce = 0;
  logic [CNT_W-1:0] cnt_q;
  logic lr_we = 0;
  logic [3:0] lr_addr = '0;
  logic [0:0] lr_din = '0, lr_dout;
  logic br_en = 0, br_we = 0;
  logic [7:0] br_addr = '0;
  logic [BW-1:0] br_din = '0, br_dout;
  logic readback = 0;
  logic xm_req = 0, xm_req_we = 0;
  logic [MAW-1:0] xm_req_addr = '0;
  logic [MDW-1:0] xm_req_wdata = '0;
  logic xm_rvalid;
  logic [MDW-1:0] xm_rdata;
  logic [MAW-1:0] mem_addr;
  logic [MDW-1:0] mem_wdata;
  logic mem_we_n_o, mem_we_n_oe;
  logic [MDW-1:0] mem_rdata;
  logic scan_en = 0, scan_mode = 0, scan_in = 0, scan_out;
  logic mul_in_valid = 0, mul_out_valid;
  logic [DW-1:0] mul_a = '0, mul_b = '0, mul_p;
  logic signed [DW-1:0] cor_x_in = '0, cor_y_in = '0, cor_z_in = '0, cor_x_out, cor_y_out, cor_z_out;
  logic signed [DW-1:0] cor_z [DW];   // idle CORDIC: z of each stage

  logic [0:0]    lut_m [LD];
  logic [BW-1:0] bram_m [BD];
  logic [BW-1:0] do_m;
  logic [CNT_W-1:0] cnt_m;
  logic img [L];
  logic got [L];
  logic [MDW-1:0] xmem [256];
  logic [MDW-1:0] rpipe [RD_LAT];
  logic [MDW-1:0] xm_last;
  int xm_reads = 0;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_scan_out = 0, n_scan_in = 0, n_inhibit = 0, n_flush = 0;
  int n_pipes = 0, n_held_write = 0, n_buffered_read = 0, n_shadow = 0, n_resume = 0, n_we_tristate = 0;

  always #5 clk = ~clk;

  scan_top dut (.*);

  // external memory model, 256 words, pulled-up write enable
  assign mem_rdata = rpipe[RD_LAT-1];
  always_ff @(posedge clk) begin
    if (mem_we_n_oe && !mem_we_n_o) xmem[mem_addr[7:0]] <= mem_wdata;
    rpipe[0] <= xmem[mem_addr[7:0]];
    for (int i = 1; i < RD_LAT; i++) rpipe[i] <= rpipe[i-1];
    if (xm_rvalid && !rst) begin xm_reads <= xm_reads + 1; xm_last <= xm_rdata; end
  end

  // mechanism monitors (internal nets)
  always @(posedge clk) begin
    if (scan_en && dut.u_bram.slot_start && !dut.u_bram.scan_en_d) n_inhibit++;
    if (!scan_en && dut.u_bram.b_we) n_flush++;
    if (scan_en && !mem_we_n_oe) n_we_tristate++;
    if (readback && dut.u_shadow.use_shadow) n_shadow++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic session(input logic mode, input logic src [L]);
    scan_mode = mode;
    @(negedge clk);
    @(negedge clk);
    scan_en = 1;
    for (int c = 0; c < L; c++) begin
      scan_in = src[c];
      #1 got[c] = scan_out;
      @(negedge clk);
    end
    scan_en = 0;
    if (mode) n_scan_in++; else n_scan_out++;
  endtask

  function automatic logic model_bit(input int k);
    if (k < CNT_W) return cnt_m[CNT_W-1-k];
    k -= CNT_W;
    if (k < MUL_L) return 1'b0;                 // idle multiplier: all zero
    k -= MUL_L;
    if (k < COR_L) begin                        // idle CORDIC: x = y = 0
      int st = DW - 1 - k / (3 * DW);
      int r  = k % (3 * DW);
      return (r < DW) ? cor_z[st][DW-1-r] : 1'b0;
    end
    k -= COR_L;
    if (k < BW) return do_m[BW-1-k];
    k -= BW;
    if (k < BD * BW) return bram_m[k / BW][BW-1-(k % BW)];
    k -= BD * BW;
    return lut_m[k][0];
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic zeros [L];
    foreach (zeros[i]) zeros[i] = 1'b0;
    foreach (xmem[i]) xmem[i] = '0;
    begin
      int z = 0, a;
      for (int i = 0; i < DW; i++) begin
        a = int'($atan(1.0 / (2.0 ** i)) * 32768.0 / PI + 0.5);
        z = (z >= 0) ? z - a : z + a;
        cor_z[i] = DW'(z);
      end
    end
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. user operation
    for (int i = 0; i < LD; i++) begin
      lut_m[i] = 1'($urandom);
      lr_we = 1; lr_addr = 4'(i); lr_din = lut_m[i];
      @(negedge clk);
    end
    lr_we = 0;
    for (int i = 0; i < BD; i++) begin
      bram_m[i] = BW'($urandom);
      br_en = 1; br_we = 1; br_addr = 8'(i); br_din = bram_m[i];
      @(negedge clk);
    end
    br_we = 0; br_addr = 8'd77;
    @(negedge clk);
    br_en = 0; do_m = bram_m[77];
    check(br_dout == do_m, "BlockRAM user read");
    cnt_ce = 1;
    repeat (11) @(negedge clk);
    cnt_ce = 0; cnt_m = 4'd11;
    check(cnt_q == cnt_m, "counter counts");
    // device readback: user side must keep the output register value
    // (the readback overwrites the real output register: modelled by a force)
    readback = 1;
    force dut.u_bram.dout_r = ~do_m;
    repeat (5) @(negedge clk);
    check(br_dout == do_m, "output kept during readback");
    readback = 0;
    release dut.u_bram.dout_r;
    @(negedge clk);
    check(br_dout == do_m, "output kept across readback");
    // a user read ends the substitution and refills the real register
    br_en = 1; br_addr = 8'd77;
    @(negedge clk);
    br_en = 0;
    check(br_dout == do_m && !dut.u_shadow.use_shadow, "user read after readback");
    // external memory: write 0x1111 at 3 normally, read it back
    xm_req = 1; xm_req_we = 1; xm_req_addr = 16'd3; xm_req_wdata = 16'h1111;
    @(negedge clk);
    xm_req_we = 0;                       // read of address 3
    @(negedge clk);
    xm_req = 0;
    repeat (6) @(negedge clk);
    check(xm_reads == 1 && xm_last == 16'h1111, "external read");
    // 2. scan out, with a read in flight and a write waiting
    xm_req = 1; xm_req_we = 0; xm_req_addr = 16'd3;
    @(negedge clk);
    xm_req = 1; xm_req_we = 1; xm_req_addr = 16'd4; xm_req_wdata = 16'h2222;
    scan_mode = 0;
    @(negedge clk);
    xm_req = 0; xm_req_we = 0;
    // the session's first two cycles are the mode setup
    scan_en = 1;
    for (int c = 0; c < L; c++) begin
      #1 got[c] = scan_out;
      if (c == 5) check(xmem[4] == '0, "write waiting during scan");
      @(negedge clk);
    end
    scan_en = 0; n_scan_out++;
    check(xm_reads == 1, "no read delivered during scan");
    for (int k = 0; k < L; k++) check(got[k] == model_bit(k), $sformatf("scan-out bit %0d", k));
    repeat (4) @(negedge clk);
    if (xmem[4] == 16'h2222) n_held_write++;
    check(xmem[4] == 16'h2222, "held write completed after scan");
    if (xm_reads == 2 && xm_last == 16'h1111) n_buffered_read++;
    check(xm_reads == 2 && xm_last == 16'h1111, "buffered read delivered after scan");
    // 3. scan in a random image, round trip, scan it in again
    foreach (img[i]) img[i] = 1'($urandom);
    session(1'b1, img);
    @(negedge clk);
    for (int b = 0; b < CNT_W; b++) check(cnt_q[CNT_W-1-b] == img[b], $sformatf("counter bit %0d", b));
    for (int b = 0; b < BW; b++) check(br_dout[BW-1-b] == img[P_DO+b], $sformatf("output register bit %0d", b));
    for (int i = 0; i < LD; i++) begin
      lr_addr = 4'(i); #1;
      check(lr_dout[0] == img[P_DO + BW + BD*BW + i], $sformatf("LUT RAM word %0d", i));
    end
    session(1'b0, zeros);
    // the pipelines advance in the cycles between two sessions (they run
    // with idle inputs), so their part of the chain is left out here
    for (int k = 0; k < L; k++)
      if (k < CNT_W || k >= P_DO) check(got[k] == img[k], $sformatf("round-trip bit %0d", k));
    session(1'b1, img);
    @(negedge clk);
    for (int i = 0; i < BD; i++) begin
      br_en = 1; br_addr = 8'(i);
      @(negedge clk);
      for (int b = 0; b < BW; b++)
        check(br_dout[BW-1-b] == img[P_DO + BW + i*BW + b], $sformatf("BlockRAM word %0d bit %0d", i, b));
    end
    br_en = 0;
    // 4. the counter continues from the loaded value
    for (int b = 0; b < CNT_W; b++) cnt_m[CNT_W-1-b] = img[b];
    cnt_ce = 1;
    repeat (3) @(negedge clk);
    cnt_ce = 0;
    if (cnt_q == CNT_W'(cnt_m + 3)) n_resume++;
    check(cnt_q == CNT_W'(cnt_m + 3), "counter resumes after scan-in");
    // the pipelines compute again after the scan-in
    mul_in_valid = 1; mul_a = 16'd40000; mul_b = 16'd50000;
    cor_x_in = 16'sd10000; cor_y_in = 16'sd0; cor_z_in = 16'sd8192;   // 45 degrees
    repeat (DW) @(negedge clk);
    mul_in_valid = 0;
    check(mul_out_valid && mul_p == 16'(32'(40000 * 50000) >> 16), "multiplier after scan-in");
    check(cor_x_out > 11500 && cor_x_out < 11800 && cor_y_out > 11500 && cor_y_out < 11800,
          $sformatf("CORDIC after scan-in: %0d %0d", cor_x_out, cor_y_out));
    if (mul_out_valid && cor_x_out > 11500) n_pipes++;

    $display("mechanisms: scan_out=%0d scan_in=%0d first_write_inhibit=%0d flush_write=%0d we_tristate=%0d held_write=%0d buffered_read=%0d readback_shadow=%0d resume=%0d pipelines=%0d",
             n_scan_out, n_scan_in, n_inhibit, n_flush, n_we_tristate, n_held_write, n_buffered_read, n_shadow, n_resume, n_pipes);
    check(n_scan_out > 0, "scan-out session happened");
    check(n_scan_in > 0, "scan-in session happened");
    check(n_inhibit > 0, "first-cycle write inhibit happened");
    check(n_flush > 0, "post-session write happened");
    check(n_we_tristate > 0, "write-enable tri-state happened");
    check(n_held_write > 0, "held write happened");
    check(n_buffered_read > 0, "buffered read happened");
    check(n_shadow > 0, "readback shadow happened");
    check(n_resume > 0, "resume happened");
    check(n_pipes > 0, "pipelines ran after scan-in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
