// tb_cordic_scan: streams random vectors and angles (|z| <= pi/2) through
// the 16-stage CORDIC, one per cycle, and compares each output bit for bit
// with a reference computed here (same iteration, arctangent table from
// $atan), and roughly with K*(x cos z - y sin z), K*(x sin z + y cos z).
// Latency must be N cycles. Mid-stream, the pipeline is debugged through the
// chain: a loopback scan-out shows the last stage's z first; a modified image
// with that z replaced is scanned in and must appear on z_out; the original
// image is scanned back and the stream continues unharmed.
module tb_cordic_scan;
  localparam int N = 16;
  localparam int L = 3 * N * N;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst = 1;
  logic signed [N-1:0] x_in = '0, y_in = '0, z_in = '0, x_out, y_out, z_out;
  logic scan_en = 0, scan_in = 0, scan_out;
  logic signed [N-1:0] ex [$], ey [$], ez [$];
  real rx [$], ry [$];
  int due [$];        // pipeline step at which each result is expected
  int tick = 0;       // pipeline steps taken in normal operation
  logic img [L], mod_img [L];
  int atab [N];
  int checks = 0, failures = 0, cycle = 0, sent = 0, got_n = 0;

  always #5 clk = ~clk;

  cordic_scan #(.N(N)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  always @(negedge clk) cycle++;

  task automatic model(input int x0, input int y0, input int z0);
    int x = x0, y = y0, z = z0, xn, yn;
    for (int i = 0; i < N; i++) begin
      if (z >= 0) begin xn = x - (y >>> i); yn = y + (x >>> i); z = z - atab[i]; end
      else        begin xn = x + (y >>> i); yn = y - (x >>> i); z = z + atab[i]; end
      x = int'(16'(xn)); y = int'(16'(yn));
      x = (x > 32767) ? x - 65536 : x; y = (y > 32767) ? y - 65536 : y;
    end
    ex.push_back(N'(x)); ey.push_back(N'(y)); ez.push_back(N'(z));
  endtask

  // drive one input per cycle for n cycles and check outputs as they emerge
  task automatic stream(input int n, input bit feed_inputs);
    repeat (n) begin
      if (feed_inputs) begin
        real ang, mag, ph;
        ang = ($urandom_range(0, 20000) / 20000.0 - 0.5) * PI;
        mag = $urandom_range(1000, 18000);
        ph  = ($urandom_range(0, 20000) / 20000.0) * 2.0 * PI;
        x_in = N'(int'(mag * $cos(ph)));
        y_in = N'(int'(mag * $sin(ph)));
        z_in = N'(int'(ang * 32768.0 / PI));
        model(x_in, y_in, z_in);
        rx.push_back(1.64676 * (x_in * $cos(ang) - y_in * $sin(ang)));
        ry.push_back(1.64676 * (x_in * $sin(ang) + y_in * $cos(ang)));
        due.push_back(tick + N);
        sent++;
      end
      @(negedge clk);
      tick++;
      if (due.size() > 0 && due[0] == tick) begin
        real dx, dy;
        void'(due.pop_front());
        check(x_out == ex[0] && y_out == ey[0] && z_out == ez[0],
              $sformatf("out (%0d,%0d,%0d) expected (%0d,%0d,%0d)", x_out, y_out, z_out, ex[0], ey[0], ez[0]));
        dx = x_out - rx[0]; dy = y_out - ry[0];
        check(dx < 40.0 && dx > -40.0 && dy < 40.0 && dy > -40.0,
              $sformatf("rotation off by (%f,%f)", dx, dy));
        void'(ex.pop_front()); void'(ey.pop_front()); void'(ez.pop_front());
        void'(rx.pop_front()); void'(ry.pop_front());
        got_n++;
      end
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] z_seen;
    for (int i = 0; i < N; i++) atab[i] = int'($atan(1.0 / (2.0 ** i)) * 32768.0 / PI + 0.5);
    repeat (2) @(negedge clk);
    rst = 0;
    stream(40, 1'b1);
    check(got_n == 40 - N + 1, $sformatf("latency: %0d results after 40 inputs", got_n));
    // observe by loopback: z of the last stage leaves first (MSB first)
    scan_en = 1;
    for (int c = 0; c < L; c++) begin
      #1 img[c] = scan_out;
      scan_in = scan_out;
      @(negedge clk);
    end
    scan_en = 0;
    for (int j = 0; j < N; j++) z_seen[N-1-j] = img[j];
    check(z_seen == z_out, "observed z of the last stage");
    // control: replace it
    foreach (img[i]) mod_img[i] = img[i];
    for (int j = 0; j < N; j++) mod_img[j] = 1'(16'h1234 >> (N-1-j));
    scan_en = 1;
    for (int c = 0; c < L; c++) begin scan_in = mod_img[c]; @(negedge clk); end
    scan_en = 0;
    #1 check(z_out == 16'sh1234, "modified z visible on z_out");
    scan_en = 1;
    for (int c = 0; c < L; c++) begin scan_in = img[c]; @(negedge clk); end
    scan_en = 0;
    // resume: the results in flight must come out unchanged
    stream(300, 1'b1);
    stream(N, 1'b0);
    check(got_n == sent, $sformatf("%0d of %0d results", got_n, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
