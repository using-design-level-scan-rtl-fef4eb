// tb_mult_scan: streams random operand pairs into the 16 x 16 pipelined
// multiplier, one per cycle, and checks every result (upper half of a*b) and
// its latency of N cycles. In the middle of the stream the pipeline is
// paused and debugged through the chain:
//  * observe: a scan-out session (feeding the stream back in, so the state is
//    restored) must show the last stage's valid bit, a operand and sum first;
//  * control: a second session loads an image with the last stage's sum
//    replaced by 16'hbeef, which must then appear on p;
//  * a third session puts the original state back, and the stream continues
//    as if it had never stopped.
module tb_mult_scan;
  localparam int N = 16;
  localparam int L = N * (2 * N + 1) + N * (N - 1) / 2;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [N-1:0] a = '0, b = '0, p;
  logic scan_en = 0, scan_in = 0, scan_out;
  logic [N-1:0] exp_q [$];
  logic img [L];
  logic mod_img [L];
  int checks = 0, failures = 0, cycle = 0, sent = 0, got_n = 0;
  int t_in [$];
  logic pause = 0;   // checker off while the pipeline is being debugged

  always #5 clk = ~clk;

  mult_scan #(.N(N)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // result checker: runs only while not scanning
  always @(negedge clk) begin
    cycle++;
    if (!rst && !pause && !scan_en && out_valid) begin
      check(exp_q.size() > 0, "unexpected result");
      if (exp_q.size() > 0) begin
        logic [N-1:0] e;
        int t0;
        e  = exp_q.pop_front();
        t0 = t_in.pop_front();
        check(p == e, $sformatf("p=%h expected %h", p, e));
        if (got_n < 40) check(cycle - t0 == N, $sformatf("latency %0d", cycle - t0));
        got_n++;
      end
    end
  end

  task automatic feed(input int n);
    repeat (n) begin
      logic [2*N-1:0] full;
      a = N'($urandom); b = N'($urandom); in_valid = 1'($urandom) | (sent < 40);
      full = a * b;
      if (in_valid) begin exp_q.push_back(full[2*N-1:N]); t_in.push_back(cycle + 1); sent++; end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] sum_seen;
    repeat (2) @(negedge clk);
    rst = 0;
    feed(60);
    // observe (loopback keeps the state)
    pause = 1;
    scan_en = 1;
    for (int c = 0; c < L; c++) begin
      #1 img[c] = scan_out;
      scan_in = scan_out;
      @(negedge clk);
    end
    scan_en = 0;
    for (int j = 0; j < N; j++) sum_seen[N-1-j] = img[1 + N + j];
    check(img[0] == out_valid, "observed valid bit of the last stage");
    check(sum_seen == p, "observed sum of the last stage equals p");
    // control: replace the last stage sum, shift in the modified image
    foreach (img[i]) mod_img[i] = img[i];
    for (int j = 0; j < N; j++) mod_img[1 + N + j] = 1'(16'hbeef >> (N-1-j));
    scan_en = 1;
    for (int c = 0; c < L; c++) begin scan_in = mod_img[c]; @(negedge clk); end
    scan_en = 0;
    #1 check(p == 16'hbeef, "modified state visible on p");
    // restore the original state and continue the stream
    scan_en = 1;
    for (int c = 0; c < L; c++) begin scan_in = img[c]; @(negedge clk); end
    scan_en = 0;
    pause = 0;
    feed(200);
    repeat (N + 2) @(negedge clk);
    check(exp_q.size() == 0, "results missing");
    check(got_n == sent, "result count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
