// scan_addr_gen: the address generator shared by all scanned RAMs.
//
// A free-running up-counter that advances once per scan cycle. Each RAM takes
// the low bits it needs: an ARSW RAM of depth m uses pos mod m as its scan
// address, a BlockRAM of M words by W bits uses pos mod W as its bit index
// and (pos / W) mod M as its word address. All depths and M*W must be powers
// of two no larger than 2**POS_W, so one counter serves every RAM.
//
// While scan_en is low the counter is held at the start value of the coming
// session, chosen by scan_mode:
//   SCAN_OUT: 0, so the first scan cycle reads address zero and the RAM bits
//             leave in a predictable order;
//   SCAN_IN:  (-CHAIN_LEN) mod 2**POS_W, so that after exactly CHAIN_LEN
//             cycles the counter is back at a multiple of every RAM size and
//             each RAM bit has been written back at its own address.
// Starting at zero for scan-out follows the design-level scan scheme; the
// scan-in offset is how this design meets the requirement that contents go
// back to their correct addresses. scan_mode must be stable at least one
// cycle before scan_en rises and for the whole session.
module scan_addr_gen
  import scan_pkg::*;
#(
  parameter int unsigned POS_W     = 12,  // counter width: log2 of largest RAM in bits
  parameter int unsigned CHAIN_LEN = 16   // total scan chain length in bits
) (
  input  logic             clk,
  input  logic             scan_en,
  input  scan_mode_e       scan_mode,
  output logic [POS_W-1:0] pos
);

  localparam logic [POS_W-1:0] LEN_MOD = POS_W'(CHAIN_LEN);
  localparam logic [POS_W-1:0] IN_START = POS_W'(0) - LEN_MOD;

  always_ff @(posedge clk) begin
    if (scan_en)                pos <= pos + 1'b1;
    else if (scan_mode == SCAN_IN) pos <= IN_START;
    else                        pos <= '0;
  end

endmodule
