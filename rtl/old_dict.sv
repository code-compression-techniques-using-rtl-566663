// old_dict: operand list dictionary (OLD) with its read pointer.
//
// The OLD holds the 4-bit operands that load tags fetch, in the order the
// tags ask for them. A sequence's list starts on a byte boundary (Idx_OLD is
// that byte address); its operands follow nibble by nibble. Since one
// instruction has at most five load tags, the dictionary presents the next
// five operands at once, `ops[0]` being the next one to load.
//
// Timing: `start` loads the pointer with Idx_OLD*8; `advance` with `n_used`
// steps it past the operands the current instruction loaded. The memory is
// addressed with the pointer's next value, so `ops` is valid one cycle after
// any change.
module old_dict
  import ofr_pkg::*;
#(
  parameter int unsigned BYTES = 16384,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [7:0]      wdata,
  input  logic            start,
  input  logic [AW-1:0]   start_idx,   // Idx_OLD (byte address)
  input  logic            advance,
  input  logic [2:0]      n_used,      // operands consumed (0..5)
  output operand_t        ops [NUM_OF]
);

  logic [AW+2:0] ptr_q, ptr_d;

  always_comb begin
    ptr_d = ptr_q;
    if (start)        ptr_d = {start_idx, 3'b000};
    else if (advance) ptr_d = ptr_q + (AW+3)'({n_used, 2'b00});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;
  end

  logic [OLD_WIN_W-1:0] raw;
  packed_mem #(.BYTES(BYTES), .WIN(OLD_WIN_W)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr(ptr_d), .rdata(raw)
  );

  always_comb begin
    for (int i = 0; i < NUM_OF; i++) ops[i] = raw[OLD_WIN_W-1-i*OF_W -: OF_W];
  end

endmodule
