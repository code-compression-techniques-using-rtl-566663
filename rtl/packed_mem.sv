// packed_mem: byte-wide RAM read as a bit stream.
//
// The dictionaries and the compressed code are stored as bytes, but their
// entries are packed side by side at arbitrary bit positions. A read takes a
// bit address and returns the WIN bits that start there, most significant
// bit first (bit 7 of a byte comes first in the stream). The read is
// synchronous: rdata is valid one cycle after raddr. Addresses wrap at the
// end of the memory. One byte write port is used to load the contents.
// Packing entries at bit granularity is what the compression format asks
// for; the MSB-first bit order and the synchronous read are this design's
// choices.
module packed_mem #(
  parameter int unsigned BYTES = 4096,
  parameter int unsigned WIN   = 16,
  localparam int unsigned AW   = $clog2(BYTES),
  localparam int unsigned NB   = (WIN + 7) / 8 + 1    // bytes covering a window
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [7:0]      wdata,
  input  logic [AW+2:0]   raddr,    // bit address
  output logic [WIN-1:0]  rdata
);

  logic [7:0] mem [BYTES];

  logic [NB*8-1:0] bytes_q;
  logic [2:0]      boff_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int i = 0; i < NB; i++) begin
      bytes_q[(NB-1-i)*8 +: 8] <= mem[AW'(raddr[AW+2:3] + AW'(i))];
    end
    boff_q <= raddr[2:0];
  end

  logic [NB*8-1:0] shifted;
  always_comb begin
    shifted = bytes_q << boff_q;
    rdata   = shifted[NB*8-1 -: WIN];
  end

endmodule
