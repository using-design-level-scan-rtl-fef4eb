// ext_mem_guard: keeps an external memory safe while the design is scanned.
//
// During a scan session the user logic's flip-flops are being shifted, so
// whatever it asks of an external memory is meaningless. This block sits
// between the user logic and the memory pins and
//   * tri-states the active-low write-enable pin while scan_en is high
//     (mem_we_n_oe = 0); the board's weak pull-up then holds the pin high,
//     so no write can happen;
//   * ignores user requests while scan_en is high;
//   * buffers a request issued just before scan began: requests go to the
//     pins one cycle after they are accepted, and a request still waiting
//     when scan_en rises is held and sent on the first cycle after scan;
//   * buffers read data returning from the memory during scan, in a small
//     FIFO, and hands it to the user logic once scan_en is low again.
// Timing: a request accepted in cycle t drives the pins in cycle t+1 (or
// later, if scan intervenes); the memory returns read data RD_LAT cycles
// after the address is on the pins; that data appears on rvalid/rdata one
// cycle later when no scan is running. Disabling the write enable with a
// tri-state and pull-up and buffering in-flight reads and writes follow the
// scheme; the one-entry request register, the FIFO and all timing are this
// design's choices.
module ext_mem_guard #(
  parameter int unsigned AW     = 16,
  parameter int unsigned DW     = 16,
  parameter int unsigned RD_LAT = 2     // memory read latency in cycles
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          scan_en,
  // user side
  input  logic          req,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [DW-1:0] req_wdata,
  output logic          rvalid,
  output logic [DW-1:0] rdata,
  // memory pins
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  output logic          mem_we_n_o,
  output logic          mem_we_n_oe,
  input  logic [DW-1:0] mem_rdata
);

  localparam int unsigned FD = RD_LAT + 1;          // read FIFO depth
  localparam int unsigned FW = $clog2(FD + 1);

  logic          pend_valid, pend_we;
  logic [AW-1:0] pend_addr;
  logic [DW-1:0] pend_wdata;
  logic          issue;
  logic [RD_LAT-1:0] lat_sr;                        // reads in flight
  logic [DW-1:0] fifo [FD];
  logic [FW-1:0] count;
  logic          push, pop;

  always_comb begin
    issue       = pend_valid & ~scan_en;
    mem_addr    = pend_addr;
    mem_wdata   = pend_wdata;
    mem_we_n_o  = ~(issue & pend_we);
    mem_we_n_oe = ~scan_en;
    push        = lat_sr[RD_LAT-1];
    pop         = (count != '0) & ~scan_en;
    rvalid      = pop;
    rdata       = fifo[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_valid <= 1'b0;
      lat_sr     <= '0;
      count      <= '0;
    end else begin
      if (!scan_en) begin
        pend_valid <= req;
        pend_we    <= req_we;
        pend_addr  <= req_addr;
        pend_wdata <= req_wdata;
      end
      lat_sr <= RD_LAT'({lat_sr, issue & ~pend_we});
      // FIFO: shift out at the head, append at the tail
      if (pop) begin
        for (int i = 0; i < FD - 1; i++) fifo[i] <= fifo[i+1];
      end
      if (push) fifo[FW'(count - FW'(pop))] <= mem_rdata;
      count <= count + FW'(push) - FW'(pop);
    end
  end

  property p_no_overflow;
    @(posedge clk) disable iff (rst) push |-> (count < FW'(FD)) || pop;
  endproperty
  a_no_overflow: assert property (p_no_overflow);

  property p_no_write_in_scan;
    @(posedge clk) scan_en |-> !mem_we_n_oe;
  endproperty
  a_no_write_in_scan: assert property (p_no_write_in_scan);

endmodule
