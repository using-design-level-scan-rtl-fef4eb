// bram_readback_shadow: keeps a BlockRAM output register's value alive
// across a configuration readback.
//
// Device readback observes every flip-flop and RAM bit, but it overwrites
// the BlockRAM output registers. Used on its own (without full scan), this
// block restores full observability at the cost of one WIDTH-bit register
// and a mux per BlockRAM:
//   * while readback is low and the shadow is not in use, it copies the RAM's output
//     register every cycle;
//   * while readback is high, the shadow holds, and a flag is set so that
//     user logic is fed from the shadow instead of the corrupted register;
//   * the flag clears on the first user read (rd_en) after readback, whose
//     result refills the real output register on the same clock edge.
// user_dout is combinational; everything else changes on the rising edge.
// The capture-and-substitute behaviour follows the shadow-register scheme;
// the flag and its clearing on the next read are this design's choice.
module bram_readback_shadow #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             readback,   // configuration readback in progress
  input  logic             rd_en,      // user enable to the RAM's port
  input  logic [WIDTH-1:0] ram_dout,   // the RAM's output register
  output logic [WIDTH-1:0] user_dout   // what user logic sees
);

  logic [WIDTH-1:0] shadow;
  logic             use_shadow;

  always_ff @(posedge clk) begin
    if (!readback && !use_shadow) shadow <= ram_dout;
    if (readback)   use_shadow <= 1'b1;
    else if (rd_en) use_shadow <= 1'b0;
  end

  assign user_dout = use_shadow ? shadow : ram_dout;

endmodule
