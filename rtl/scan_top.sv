// scan_top: the scan wrapper around an instrumented example user design.
//
// The wrapper brings the scan control wires out to pins next to the user's
// own pins: scan_en (ScanEnable), scan_in (ScanIn), scan_out (ScanOut) and,
// because a BlockRAM is present, scan_mode (ScanMode: 0 = scan out, 1 = scan
// in). Every memory element of the user design sits on one serial chain:
//
//   scan_in -> LUT RAM (LUT_DEPTH*LUT_WIDTH bits)
//           -> BlockRAM (output register + BRAM_DEPTH*BRAM_WIDTH bits)
//           -> CORDIC pipeline (3*DW*DW bits, stage 0 first)
//           -> multiplier pipeline (DW*(2*DW+1) + DW*(DW-1)/2 bits)
//           -> counter flip-flops (CNT_W bits, bit 0 first) -> scan_out
//
// so CHAIN_LEN = LUT_DEPTH*LUT_WIDTH + (BRAM_DEPTH+1)*BRAM_WIDTH
// + 3*DW*DW + DW*(2*DW+1) + DW*(DW-1)/2 + CNT_W (5 548 bits at the
// defaults). One address generator serves both RAMs. A scan-out session is
// exactly CHAIN_LEN cycles with scan_mode = 0 and delivers, in order: the
// counter (MSB first), the multiplier and CORDIC registers (last stage
// first), the BlockRAM output register, BlockRAM words 0..BRAM_DEPTH-1, then
// LUT RAM bit LUT_WIDTH-1 of words 0..LUT_DEPTH-1, bit LUT_WIDTH-2 of all
// words, and so on. A scan-in session
// is CHAIN_LEN cycles with scan_mode = 1, feeding the same stream in the same
// order; afterwards the design resumes from the loaded state. A scan-out
// session leaves the chain shifted, so it is followed by a scan-in session
// (of the same or of a modified image) before normal operation resumes.
// scan_mode must be set one cycle before scan_en rises.
//
// Around the chain, the wrapper applies the system-level protections: the
// external memory port goes through ext_mem_guard (write enable tri-stated
// and in-flight accesses buffered during scan), and the BlockRAM's output
// reaches the user pins through bram_readback_shadow, so that a device
// readback (readback pin high) does not corrupt what user logic sees.
//
// SCAN_RAMS = 0 selects the cheaper flip-flop-only configuration, meant to be
// combined with the device's own means of reading and setting RAM contents
// (configuration readback and bitstream modification): only the flip-flops
// of the counter, multiplier and CORDIC are on the chain (CHAIN_LEN =
// FF_LEN), and both RAMs are frozen during scan. A scan then leaves the
// BlockRAM output register as it was, so it does not end a readback
// substitution; only a user read does.
// Together with the readback shadow this gives full observability and
// controllability at lower cost than full scan. The default is full scan.
//
// The example user design holds the three small library circuits the scan
// costs were first measured on (a 4-bit counter, a 16x16 pipelined
// multiplier keeping the upper product half, a 16-bit pipelined rotation
// CORDIC) next to a 16x1 LUT RAM, a 256x16 BlockRAM and one external memory
// port, each brought out to pins. Putting them side by side is this design's
// choice; the wrapper, the four scan pins, the depth-first chaining
// of every memory element and the shared address generator follow the
// design-level scan scheme.
module scan_top
  import scan_pkg::*;
#(
  parameter int unsigned CNT_W      = 4,
  parameter int unsigned LUT_DEPTH  = 16,
  parameter int unsigned LUT_WIDTH  = 1,
  parameter int unsigned BRAM_DEPTH = 256,
  parameter int unsigned BRAM_WIDTH = 16,
  parameter int unsigned MEM_AW     = 16,
  parameter int unsigned MEM_DW     = 16,
  parameter int unsigned RD_LAT     = 2,
  parameter bit          SCAN_RAMS  = 1'b1,   // 0: flip-flop-only scan
  parameter int unsigned DW         = 16,     // multiplier and CORDIC data width
  localparam int unsigned LAW       = $clog2(LUT_DEPTH),
  localparam int unsigned BAW       = $clog2(BRAM_DEPTH),
  localparam int unsigned BPW       = $clog2(BRAM_DEPTH * BRAM_WIDTH),
  localparam int unsigned POS_W     = (BPW > LAW) ? BPW : LAW,
  localparam int unsigned FF_LEN    = CNT_W + 3 * DW * DW
                                    + DW * (2 * DW + 1) + DW * (DW - 1) / 2,
  localparam int unsigned CHAIN_LEN = SCAN_RAMS
                                    ? LUT_DEPTH * LUT_WIDTH
                                      + (BRAM_DEPTH + 1) * BRAM_WIDTH + FF_LEN
                                    : FF_LEN
) (
  input  logic                  clk,
  input  logic                  rst,
  // counter
  input  logic                  cnt_ce,
  output logic [CNT_W-1:0]      cnt_q,
  // multiplier
  input  logic                  mul_in_valid,
  input  logic [DW-1:0]         mul_a,
  input  logic [DW-1:0]         mul_b,
  output logic                  mul_out_valid,
  output logic [DW-1:0]         mul_p,
  // CORDIC
  input  logic signed [DW-1:0]  cor_x_in,
  input  logic signed [DW-1:0]  cor_y_in,
  input  logic signed [DW-1:0]  cor_z_in,
  output logic signed [DW-1:0]  cor_x_out,
  output logic signed [DW-1:0]  cor_y_out,
  output logic signed [DW-1:0]  cor_z_out,
  // LUT RAM
  input  logic                  lr_we,
  input  logic [LAW-1:0]        lr_addr,
  input  logic [LUT_WIDTH-1:0]  lr_din,
  output logic [LUT_WIDTH-1:0]  lr_dout,
  // BlockRAM
  input  logic                  br_en,
  input  logic                  br_we,
  input  logic [BAW-1:0]        br_addr,
  input  logic [BRAM_WIDTH-1:0] br_din,
  output logic [BRAM_WIDTH-1:0] br_dout,
  input  logic                  readback,
  // external memory, user side
  input  logic                  xm_req,
  input  logic                  xm_req_we,
  input  logic [MEM_AW-1:0]     xm_req_addr,
  input  logic [MEM_DW-1:0]     xm_req_wdata,
  output logic                  xm_rvalid,
  output logic [MEM_DW-1:0]     xm_rdata,
  // external memory, pins
  output logic [MEM_AW-1:0]     mem_addr,
  output logic [MEM_DW-1:0]     mem_wdata,
  output logic                  mem_we_n_o,
  output logic                  mem_we_n_oe,
  input  logic [MEM_DW-1:0]     mem_rdata,
  // scan pins
  input  logic                  scan_en,
  input  logic                  scan_mode,
  input  logic                  scan_in,
  output logic                  scan_out
);

  logic [POS_W-1:0]      pos;
  logic                  s_lut2bram, s_bram2cor, s_cor2mul, s_mul2cnt;
  logic [BRAM_WIDTH-1:0] bram_do;

  scan_addr_gen #(.POS_W(POS_W), .CHAIN_LEN(CHAIN_LEN)) u_addr_gen (
    .clk       (clk),
    .scan_en   (scan_en),
    .scan_mode (scan_mode_e'(scan_mode)),
    .pos       (pos)
  );

  scan_lutram #(.DEPTH(LUT_DEPTH), .WIDTH(LUT_WIDTH), .IN_CHAIN(SCAN_RAMS)) u_lutram (
    .clk       (clk),
    .we        (lr_we),
    .addr      (lr_addr),
    .din       (lr_din),
    .dout      (lr_dout),
    .scan_en   (scan_en),
    .scan_addr (pos[LAW-1:0]),
    .scan_in   (scan_in),
    .scan_out  (s_lut2bram)
  );

  scan_bram #(.DEPTH(BRAM_DEPTH), .WIDTH(BRAM_WIDTH), .IN_CHAIN(SCAN_RAMS)) u_bram (
    .clk       (clk),
    .en        (br_en),
    .we        (br_we),
    .addr      (br_addr),
    .din       (br_din),
    .dout      (bram_do),
    .scan_en   (scan_en),
    .scan_pos  (pos[BPW-1:0]),
    .scan_in   (s_lut2bram),
    .scan_out  (s_bram2cor)
  );

  cordic_scan #(.N(DW)) u_cordic (
    .clk      (clk),
    .rst      (rst),
    .x_in     (cor_x_in),
    .y_in     (cor_y_in),
    .z_in     (cor_z_in),
    .x_out    (cor_x_out),
    .y_out    (cor_y_out),
    .z_out    (cor_z_out),
    .scan_en  (scan_en),
    .scan_in  (s_bram2cor),
    .scan_out (s_cor2mul)
  );

  mult_scan #(.N(DW)) u_mult (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (mul_in_valid),
    .a         (mul_a),
    .b         (mul_b),
    .out_valid (mul_out_valid),
    .p         (mul_p),
    .scan_en   (scan_en),
    .scan_in   (s_cor2mul),
    .scan_out  (s_mul2cnt)
  );

  // A full scan reloads the output register, so it ends a substitution. In
  // the flip-flop-only configuration the register is frozen during scan and
  // only a user read outside scan refills it.
  logic shadow_release;
  assign shadow_release = SCAN_RAMS ? (br_en | scan_en) : (br_en & ~scan_en);

  bram_readback_shadow #(.WIDTH(BRAM_WIDTH)) u_shadow (
    .clk       (clk),
    .readback  (readback),
    .rd_en     (shadow_release),
    .ram_dout  (bram_do),
    .user_dout (br_dout)
  );

  cnt_scan #(.WIDTH(CNT_W)) u_cnt (
    .clk      (clk),
    .rst      (rst),
    .ce       (cnt_ce),
    .count    (cnt_q),
    .scan_en  (scan_en),
    .scan_in  (s_mul2cnt),
    .scan_out (scan_out)
  );

  ext_mem_guard #(.AW(MEM_AW), .DW(MEM_DW), .RD_LAT(RD_LAT)) u_guard (
    .clk         (clk),
    .rst         (rst),
    .scan_en     (scan_en),
    .req         (xm_req),
    .req_we      (xm_req_we),
    .req_addr    (xm_req_addr),
    .req_wdata   (xm_req_wdata),
    .rvalid      (xm_rvalid),
    .rdata       (xm_rdata),
    .mem_addr    (mem_addr),
    .mem_wdata   (mem_wdata),
    .mem_we_n_o  (mem_we_n_o),
    .mem_we_n_oe (mem_we_n_oe),
    .mem_rdata   (mem_rdata)
  );

endmodule
