// code_reader: compressed-code memory and its bit pointer.
//
// The compressed program is a bit stream of codewords, each made of four
// Huffman-coded fields [CC Idx_OPD Idx_ORD Idx_OLD]; codewords are packed
// without padding and may straddle byte boundaries. A branch target names a
// codeword by byte address and bit offset ({byte, bit[2:0]}, the split the
// patched branch offsets use). The reader shows the MAXLEN bits that start at
// the pointer, enough for any one Huffman code, and steps the pointer by the
// length of each field the decoder recognises. The codeword format and the
// {byte, bit} addressing follow the compression scheme; the window width and
// the read timing are this design's choices. Addresses past the end of the
// memory wrap around.
//
// Timing: `start` loads the pointer with `start_addr`, `advance` adds `len`.
// The memory is addressed with the pointer's next value, so `window` belongs
// to the current pointer one cycle after any change.
module code_reader #(
  parameter int unsigned BYTES  = 131072,
  parameter int unsigned MAXLEN = 16,
  localparam int unsigned AW    = $clog2(BYTES),
  localparam int unsigned LW    = $clog2(MAXLEN + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [7:0]        wdata,
  input  logic              start,
  input  logic [AW+2:0]     start_addr,   // {byte address, bit offset}
  input  logic              advance,
  input  logic [LW-1:0]     len,
  output logic [AW+2:0]     ptr,          // current bit address
  output logic [MAXLEN-1:0] window        // window[MAXLEN-1] is the next bit
);

  logic [AW+2:0] ptr_q, ptr_d;

  always_comb begin
    ptr_d = ptr_q;
    if (start)        ptr_d = start_addr;
    else if (advance) ptr_d = ptr_q + (AW+3)'(len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;
  end

  assign ptr = ptr_q;

  packed_mem #(.BYTES(BYTES), .WIN(MAXLEN)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr(ptr_d), .rdata(window)
  );

endmodule
