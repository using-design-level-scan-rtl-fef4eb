// tb_ext_mem_guard: drives the guard against a model of an external
// synchronous SRAM with read latency RD_LAT and an active-low write enable
// whose pin is pulled high when not driven. Checked:
//  * normal write/read, with the read latency of RD_LAT + 2 cycles from
//    request to rvalid;
//  * a write requested the cycle before scan does not reach the memory during
//    scan and does reach it afterwards;
//  * reads in flight when scan starts are delivered, in order, after scan;
//  * garbage requests during scan never write; no rvalid during scan.
module tb_ext_mem_guard;
  localparam int AW = 8, DW = 16, RD_LAT = 2;
  logic clk = 0, rst = 1, scan_en = 0;
  logic req = 0, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [DW-1:0] req_wdata = '0;
  logic rvalid;
  logic [DW-1:0] rdata;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata;
  logic mem_we_n_o, mem_we_n_oe;
  logic [DW-1:0] mem_rdata;
  logic we_pin;
  logic [DW-1:0] sram [1 << AW];
  logic [DW-1:0] rpipe [RD_LAT];
  int checks = 0, failures = 0;
  int cycle = 0;
  logic [DW-1:0] rq [$];   // expected read data, in order
  int writes_in_scan = 0;

  always #5 clk = ~clk;

  ext_mem_guard #(.AW(AW), .DW(DW), .RD_LAT(RD_LAT)) dut (.*);

  // board: weak pull-up on the write enable
  assign we_pin = mem_we_n_oe ? mem_we_n_o : 1'b1;
  assign mem_rdata = rpipe[RD_LAT-1];
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (!we_pin) begin
      sram[mem_addr] <= mem_wdata;
      if (scan_en) writes_in_scan <= writes_in_scan + 1;
    end
    rpipe[0] <= sram[mem_addr];
    for (int i = 1; i < RD_LAT; i++) rpipe[i] <= rpipe[i-1];
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // compare every delivered read with the queue of expected data
  always @(negedge clk) if (!rst) begin
    if (rvalid) begin
      check(!scan_en, "rvalid during scan");
      check(rq.size() > 0, "unexpected rvalid");
      if (rq.size() > 0) check(rdata == rq.pop_front(), "read data");
    end
  end

  task automatic wr(input int a, input logic [DW-1:0] v);
    req = 1; req_we = 1; req_addr = AW'(a); req_wdata = v;
    @(negedge clk); req = 0;
  endtask
  task automatic rd(input int a, input logic [DW-1:0] expect_v);
    req = 1; req_we = 0; req_addr = AW'(a);
    rq.push_back(expect_v);
    @(negedge clk); req = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    foreach (sram[i]) sram[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // normal write then read, with latency check
    wr(10, 16'h1234);
    @(negedge clk);
    t0 = cycle;
    rd(10, 16'h1234);
    while (!rvalid) @(negedge clk);
    check(cycle - t0 == RD_LAT + 2, $sformatf("read latency %0d", cycle - t0));
    @(negedge clk);
    // a write issued in the cycle before scan
    req = 1; req_we = 1; req_addr = 8'd20; req_wdata = 16'hbeef;
    @(negedge clk);
    req = 0; scan_en = 1;
    for (int i = 0; i < 10; i++) begin
      // garbage from the scanned user logic
      req = 1'($urandom); req_we = 1; req_addr = AW'($urandom); req_wdata = DW'($urandom);
      @(negedge clk);
      check(sram[20] == '0, "held write reached memory during scan");
      check(!mem_we_n_oe, "write enable driven during scan");
    end
    req = 0; scan_en = 0;
    repeat (2) @(negedge clk);
    check(sram[20] == 16'hbeef, "held write performed after scan");
    // two reads in flight when scan begins
    wr(30, 16'h0a0a);
    wr(31, 16'h0b0b);
    rd(30, 16'h0a0a);
    req = 1; req_we = 0; req_addr = 8'd31; rq.push_back(16'h0b0b);
    @(negedge clk);
    req = 0; scan_en = 1;
    repeat (6) @(negedge clk);
    check(rq.size() == 2, "reads delivered during scan");
    scan_en = 0;
    repeat (6) @(negedge clk);
    check(rq.size() == 0, "buffered reads not delivered after scan");
    // random traffic with random scan sessions
    for (int n = 0; n < 200; n++) begin
      int a = $urandom_range(0, 15);
      logic [DW-1:0] v = DW'($urandom);
      wr(a, v);
      rd(a, v);
      if ($urandom_range(0, 3) == 0) begin
        scan_en = 1;
        repeat ($urandom_range(1, 6)) @(negedge clk);
        scan_en = 0;
      end
    end
    repeat (8) @(negedge clk);
    check(rq.size() == 0, "reads lost");
    check(writes_in_scan == 0, "memory written during scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
