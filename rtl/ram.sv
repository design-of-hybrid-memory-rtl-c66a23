// ram - single-port word memory that holds the ECC codewords.
//
// DEPTH locations of WIDTH bits (64 x 22 by default: 64 data words of 16
// bits, each stored with its 6 check bits). Writes take effect at the rising
// clock edge when `we` is high. A read is requested with `re`; the word is
// registered and appears on `rdata` one cycle later, where it stays until the
// next read. `we` and `re` should not be high together; if they are, the read
// returns the old contents. The 64-location size follows the source design;
// the port protocol and one-cycle read latency are this design's choice.
// The array itself has no reset.
module ram #(
  parameter int unsigned DEPTH  = hm_pkg::HM_DEPTH,
  parameter int unsigned WIDTH  = hm_pkg::HM_CODE_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata     <= mem[addr];
  end

endmodule
