// tb_scan_top_ffonly: the wrapper in its flip-flop-only configuration
// (SCAN_RAMS = 0: the chain holds only flip-flops, the counter bits first,
// then the multiplier and CORDIC pipelines, 1 420 bits). RAM contents are meant to be
// read and set through the device configuration here, so scan must leave
// them untouched even while the user ports carry garbage writes.
// Before the scans a device readback is modelled by forcing garbage into the
// BlockRAM output register. The readback shadow must then feed the user the
// old output through all the flip-flop scans, since none of them reloads the
// register; the next user read ends the substitution.
// Checked: the counter is scanned out and a new value scanned in, the LUT
// RAM, the BlockRAM words and the user's view of its output register are
// unchanged afterwards.
module tb_scan_top_ffonly;
  localparam int CNT_W = 4, LD = 16, BD = 256, BW = 16, DW = 16;
  localparam int FF_LEN = CNT_W + 3 * DW * DW + DW * (2 * DW + 1) + DW * (DW - 1) / 2;
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
  logic [15:0] xm_req_addr = '0, xm_req_wdata = '0;
  logic xm_rvalid;
  logic [15:0] xm_rdata, mem_addr, mem_wdata;
  logic mem_we_n_o, mem_we_n_oe;
  logic [15:0] mem_rdata = '0;
  logic scan_en = 0, scan_mode = 0, scan_in = 0, scan_out;
  logic mul_in_valid = 0, mul_out_valid;
  logic [DW-1:0] mul_a = '0, mul_b = '0, mul_p;
  logic signed [DW-1:0] cor_x_in = '0, cor_y_in = '0, cor_z_in = '0, cor_x_out, cor_y_out, cor_z_out;
  logic [0:0] lut_m [LD];
  logic [BW-1:0] bram_m [BD];
  logic [CNT_W-1:0] outv, newv, prev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_top #(.SCAN_RAMS(1'b0)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
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
    br_we = 0; br_addr = 8'd9;
    @(negedge clk);
    br_en = 0;
    cnt_ce = 1;
    repeat (6) @(negedge clk);
    cnt_ce = 0;
    // device readback: the output register is overwritten while it runs
    readback = 1;
    force dut.u_bram.dout_r = ~bram_m[9];
    repeat (3) @(negedge clk);
    check(br_dout == bram_m[9], "shadow feeds the user during readback");
    readback = 0;
    release dut.u_bram.dout_r;
    @(negedge clk);
    check(dut.u_bram.dout_r == ~bram_m[9], "readback left the register corrupted");
    check(br_dout == bram_m[9], "shadow feeds the user after readback");
    prev = 4'd6;
    for (int n = 0; n < 20; n++) begin
      newv = CNT_W'($urandom);
      scan_en = 1;
      for (int c = 0; c < FF_LEN; c++) begin
        // garbage from the user side of both RAMs
        lr_we = 1; lr_din = 1'($urandom); lr_addr = 4'($urandom);
        br_en = 1; br_we = 1; br_din = BW'($urandom); br_addr = 8'($urandom);
        scan_in = (c < CNT_W) ? newv[CNT_W-1-c] : 1'b0;
        #1 if (c < CNT_W) outv[CNT_W-1-c] = scan_out;
        @(negedge clk);
      end
      scan_en = 0; lr_we = 0; br_en = 0; br_we = 0;
      check(outv == prev, $sformatf("scan-out value %0d expected %0d", outv, prev));
      prev = newv;
      check(cnt_q == newv, "scanned-in counter value");
      check(br_dout == bram_m[9], "user view of the BlockRAM output kept");
    end
    check(dut.u_shadow.use_shadow, "substitution still active after the scans");
    for (int i = 0; i < LD; i++) begin
      lr_addr = 4'(i); #1;
      check(lr_dout == lut_m[i], $sformatf("LUT RAM word %0d kept", i));
    end
    @(negedge clk);
    for (int i = 0; i < BD; i++) begin
      br_en = 1; br_addr = 8'(i);
      @(negedge clk);
      check(br_dout == bram_m[i], $sformatf("BlockRAM word %0d kept: %h vs %h", i, br_dout, bram_m[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
