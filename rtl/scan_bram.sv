// scan_bram: a fully synchronous BlockRAM (DEPTH words of WIDTH bits, with
// an output register) instrumented for design-level scan.
//
// Because reads are synchronous, a word read and written in the same cycle
// would be lost, so the RAM is used in its dual-port form: port A serves the
// user, and during scan it performs the scan reads; port B only performs the
// scan writes, one word address behind the reads. A parallel-to-serial
// register (sh) turns each word read into WIDTH serial bits and a
// serial-to-parallel register (in_sr) assembles WIDTH scan_in bits into the
// word that is written back.
//
// Scan cycles are grouped in slots of WIDTH cycles, given by the shared
// counter scan_pos: bit = scan_pos mod WIDTH, word address a = (scan_pos /
// WIDTH) mod DEPTH. At the first cycle of each slot the block
//   * puts the output register's top bit on scan_out and copies the register
//     into sh, whose remaining bits leave in the next WIDTH-1 cycles,
//   * reads word a on port A into the output register,
//   * writes the word assembled during the previous slot to that slot's
//     address on port B. This write is suppressed in the very first cycle of
//     a session, when there is no previous slot; the word of the last slot
//     is written in the first cycle after scan_en falls.
// The segment therefore behaves as a FIFO of (DEPTH+1)*WIDTH bits. In a
// scan-out session (address generator starting at zero) it emits the user's
// output register first, then words 0..DEPTH-1, each most significant bit
// first. In a scan-in session the generator's start offset makes the last
// slot land on address DEPTH-1, so the image ends up at the right addresses
// and the final read leaves the scanned-in output-register value in the
// output register, where user logic expects it.
//
// With IN_CHAIN = 0 the BlockRAM stays out of the chain (flip-flop-only
// scan): port A is disabled while scan_en is high, so neither contents nor
// output register change, and scan_in goes straight to scan_out.
//
// What follows the scheme: the dual-port replacement, the inhibited first
// write, writes one address behind reads, serial/parallel converters and a
// capture register for the output register. This design's own choices: the
// slot timing, the extra write after scan_en falls, port A write-first
// behaviour (dout takes din on a write), and that a user write to port A in
// the cycle right after a session must not target the word being flushed.
module scan_bram #(
  parameter int unsigned DEPTH = 256,  // words; 256 x 16 is one 4-kbit Virtex block
  parameter int unsigned WIDTH = 16,   // bits per word
  parameter bit          IN_CHAIN = 1'b1,  // 0: hold contents during scan, bypass
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned PW   = $clog2(DEPTH * WIDTH)
) (
  input  logic             clk,
  // user port (port A)
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  // scan
  input  logic             scan_en,
  input  logic [PW-1:0]    scan_pos,
  input  logic             scan_in,
  output logic             scan_out
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] dout_r;     // the BlockRAM output register
  logic [WIDTH-1:0] sh;         // parallel-to-serial / output-register capture
  logic [WIDTH-1:0] in_sr;      // serial-to-parallel
  logic             scan_en_d;
  logic [AW-1:0]    slot_addr, slot_addr_d;
  logic             slot_start;

  logic             a_en, a_we;
  logic [AW-1:0]    a_addr;
  logic             b_we;

  always_comb begin
    slot_addr  = AW'(scan_pos / PW'(WIDTH));
    slot_start = (scan_pos % PW'(WIDTH)) == '0;

    if (IN_CHAIN) begin
      a_en   = scan_en ? slot_start : en;
      a_we   = scan_en ? 1'b0       : we;
      a_addr = scan_en ? slot_addr  : addr;
      // previous-slot write during scan (never in a session's first cycle),
      // and the last slot's write in the cycle after the session
      b_we   = scan_en_d & (slot_start | ~scan_en);
      scan_out = slot_start ? dout_r[WIDTH-1] : sh[WIDTH-1];
    end else begin
      a_en   = en & ~scan_en;
      a_we   = we;
      a_addr = addr;
      b_we   = 1'b0;
      scan_out = scan_in;
    end
    dout     = dout_r;
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        mem[a_addr] <= din;
        dout_r      <= din;
      end else begin
        dout_r      <= mem[a_addr];
      end
    end
    if (b_we) mem[slot_addr_d] <= in_sr;
  end

  always_ff @(posedge clk) begin
    scan_en_d   <= scan_en;
    slot_addr_d <= slot_addr;
    if (scan_en) begin
      in_sr <= WIDTH'({in_sr, scan_in});
      sh    <= slot_start ? WIDTH'({dout_r, 1'b0}) : WIDTH'({sh, 1'b0});
    end
  end

endmodule
