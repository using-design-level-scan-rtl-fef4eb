// tb_bram_readback_shadow: the testbench plays the RAM output register.
// It corrupts that register while readback is high and checks that the user
// side keeps seeing the pre-readback value until the next read, then follows
// the register again.
module tb_bram_readback_shadow;
  localparam int W = 16;
  logic clk = 0;
  logic readback = 0, rd_en = 0;
  logic [W-1:0] ram_dout = '0, user_dout;
  logic [W-1:0] good;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_readback_shadow #(.WIDTH(W)) dut (.*);

  task automatic expect_out(input logic [W-1:0] v, input string what);
    #1;
    checks++;
    if (user_dout !== v) begin
      failures++;
      $display("%s: user_dout=%h expected %h", what, user_dout, v);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 20; round++) begin
      // a normal read
      @(negedge clk); rd_en = 1;
      @(negedge clk); rd_en = 0; good = W'($urandom); ram_dout = good;
      expect_out(good, "after read");
      repeat (2) @(negedge clk);
      expect_out(good, "idle");
      // readback corrupts the output register
      readback = 1;
      repeat ($urandom_range(1, 5)) begin
        @(negedge clk); ram_dout = W'($urandom) ^ 16'h5a5a;
        expect_out(good, "during readback");
      end
      @(negedge clk); readback = 0;
      repeat (3) begin
        expect_out(good, "after readback");
        @(negedge clk);
      end
      // next user read restores normal path
      rd_en = 1;
      @(negedge clk); rd_en = 0; good = W'($urandom); ram_dout = good;
      expect_out(good, "read after readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
