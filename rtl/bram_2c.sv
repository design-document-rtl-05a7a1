// bram_2c: on-chip memory with one write port and one read port whose read
// takes two clock cycles.
//
// The read address is captured in a register on the first clock edge and the
// addressed word is captured in the output register on the second, so rdata
// shows mem[raddr] two cycles after raddr was presented. This is the
// latency the controller's *_WAIT states are built around. Writes land on
// the clock edge at which we is high; a write to an address at or above
// DEPTH is dropped. Neither the memory nor the read pipeline is reset;
// the read pipeline holds valid data two cycles after the first read, and
// an address at or above DEPTH reads as zero. Shape (DEPTH x WIDTH) is set
// per instance.
module bram_2c #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    raddr_q;
  logic [WIDTH-1:0] rdata_q;

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH))
      mem[waddr] <= wdata;
  end

  // first cycle: register the address
  always_ff @(posedge clk)
    raddr_q <= raddr;

  // second cycle: register the data
  always_ff @(posedge clk) begin
    if (32'(raddr_q) < DEPTH)
      rdata_q <= mem[raddr_q];
    else
      rdata_q <= '0;
  end

  assign rdata = rdata_q;

endmodule
