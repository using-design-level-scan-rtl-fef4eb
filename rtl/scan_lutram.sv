// scan_lutram: an asynchronously-read, synchronously-written (ARSW) LUT RAM
// instrumented for design-level scan.
//
// During scan the RAM becomes a FIFO segment of the scan chain, DEPTH*WIDTH
// bits long:
//   * the address input is muxed to the shared scan address generator, which
//     steps through every word, one per cycle;
//   * the write enable is ORed with scan_en so a word is written every cycle;
//   * each data input bit is muxed: bit 0 takes scan_in, bit i takes bit i-1
//     of the word being read at the same address.
// So every scan cycle the addressed word shifts up by one bit, its top bit
// leaves on scan_out and scan_in enters at the bottom. After DEPTH cycles
// each word has shifted by one bit; after DEPTH*WIDTH cycles the whole
// contents have left, top bit of every word first (pass 1: bit WIDTH-1 of
// words 0..DEPTH-1, pass 2: bit WIDTH-2, ...). This costs log2(DEPTH)
// address muxes, WIDTH data muxes and one OR gate, as in the scheme it
// follows; chaining the bit columns of a multi-bit word through one another
// is this design's reading of how a WIDTH-bit RAM yields one bit per cycle.
//
// With IN_CHAIN = 0 the RAM stays out of the chain (flip-flop-only scan,
// where RAM contents are set through the device's bitstream instead): writes
// are blocked while scan_en is high and scan_in goes straight to scan_out.
//
// Interface: user port (we, addr, din, dout with combinational read) and
// scan port (scan_en, scan_addr from scan_addr_gen, scan_in, scan_out).
// Writes happen on the rising edge; dout and scan_out are combinational from
// the addressed word.
module scan_lutram #(
  parameter int unsigned DEPTH = 16,  // words (a 16x1 LUT RAM)
  parameter int unsigned WIDTH = 1,   // bits per word
  parameter bit          IN_CHAIN = 1'b1,  // 0: hold contents during scan, bypass
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  input  logic             scan_en,
  input  logic [AW-1:0]    scan_addr,
  input  logic             scan_in,
  output logic             scan_out
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addr_mux;
  logic             we_or;
  logic [WIDTH-1:0] din_mux;
  logic [WIDTH-1:0] shifted;

  if (IN_CHAIN) begin : g_chain
    always_comb begin
      addr_mux = scan_en ? scan_addr : addr;
      we_or    = scan_en | we;
      dout     = mem[addr_mux];
      shifted  = WIDTH'({dout, scan_in});  // {dout[WIDTH-2:0], scan_in}
      din_mux  = scan_en ? shifted : din;
      scan_out = dout[WIDTH-1];
    end
  end else begin : g_hold
    always_comb begin
      addr_mux = addr;
      we_or    = we & ~scan_en;
      dout     = mem[addr_mux];
      shifted  = '0;
      din_mux  = din;
      scan_out = scan_in;
    end
  end

  always_ff @(posedge clk) begin
    if (we_or) mem[addr_mux] <= din_mux;
  end

endmodule
