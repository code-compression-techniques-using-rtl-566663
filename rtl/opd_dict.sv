// opd_dict: opcode dictionary (OPD) with its read pointer.
//
// Each OPD entry is 9 bits, {boundary, opcode}: the 8-bit new opcode of one
// instruction and a bit that marks the last instruction of a sequence. The
// first entry of a sequence starts on a byte boundary (Idx_OPD is that byte
// address); the entries after it follow bit by bit. The entry size and the
// byte alignment follow the compression format; the pointer/read timing is
// this design's choice.
//
// Timing: `start` loads the pointer with Idx_OPD*8, `advance` steps it by 9.
// The memory is addressed with the pointer's next value, so `entry` always
// shows the entry at the current pointer one cycle after any change, with no
// bubble. Loading (`we`) is meant to happen while the engine is idle.
module opd_dict
  import ofr_pkg::*;
#(
  parameter int unsigned BYTES = 4096,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [7:0]      wdata,
  input  logic            start,
  input  logic [AW-1:0]   start_idx,   // Idx_OPD (byte address)
  input  logic            advance,
  output opd_entry_t      entry
);

  logic [AW+2:0] ptr_q, ptr_d;

  always_comb begin
    ptr_d = ptr_q;
    if (start)        ptr_d = {start_idx, 3'b000};
    else if (advance) ptr_d = ptr_q + (AW+3)'(OPD_ENTRY_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;
  end

  logic [OPD_ENTRY_W-1:0] raw;
  packed_mem #(.BYTES(BYTES), .WIN(OPD_ENTRY_W)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr(ptr_d), .rdata(raw)
  );

  assign entry = opd_entry_t'(raw);

endmodule
