// ord_dict: operand remapping dictionary (ORD) with its read pointer.
//
// One ORD entry per instruction holds the five 3-bit mapping tags of its
// operand fields OF2..OF6 (15 bits, OF2's tag first in the stream). A
// sequence's first entry starts on a byte boundary (Idx_ORD is that byte
// address); the entries after it follow bit by bit. The condition field has
// no tag because the condition is coded once per sequence in the codeword.
//
// Timing: `start` loads the pointer with Idx_ORD*8, `advance` steps it by 15.
// The memory is addressed with the pointer's next value, so `tags` shows the
// entry at the current pointer one cycle after any change.
module ord_dict
  import ofr_pkg::*;
#(
  parameter int unsigned BYTES = 8192,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [7:0]      wdata,
  input  logic            start,
  input  logic [AW-1:0]   start_idx,   // Idx_ORD (byte address)
  input  logic            advance,
  output tag_t            tags [NUM_OF] // tags[0] belongs to OF2
);

  logic [AW+2:0] ptr_q, ptr_d;

  always_comb begin
    ptr_d = ptr_q;
    if (start)        ptr_d = {start_idx, 3'b000};
    else if (advance) ptr_d = ptr_q + (AW+3)'(ORD_ENTRY_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;
  end

  logic [ORD_ENTRY_W-1:0] raw;
  packed_mem #(.BYTES(BYTES), .WIN(ORD_ENTRY_W)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr(ptr_d), .rdata(raw)
  );

  always_comb begin
    for (int i = 0; i < NUM_OF; i++) tags[i] = raw[ORD_ENTRY_W-1-i*TAG_W -: TAG_W];
  end

endmodule
