// pe_mem: 128 x 8 bit data memory of one column processing element.
//
// Each of the chip's 1024 column PEs owns 128 bytes (128 kB in total). The
// silicon uses dynamic memory; this model is a plain register array with no
// refresh. Reading is combinational, so a load delivers its data in the
// cycle of the instruction; a write takes effect at the clock edge. The
// contents are not reset.
module pe_mem #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
endmodule
