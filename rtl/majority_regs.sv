// majority_regs: the majority registers (MR).
//
// The most frequent operands of a program (first, second, third majority)
// are kept in registers so that a mapping tag can name them without any
// dictionary storage. The compressor chooses them per program; here they are
// written through a small port before the program runs and cleared by reset.
// Which values go in is the compressor's business, not the hardware's.
//
// Timing: a write takes effect at the next clock edge; reads are direct.
module majority_regs
  import ofr_pkg::*;
#(
  parameter int unsigned NUM = NUM_MR,
  localparam int unsigned IW = (NUM > 1) ? $clog2(NUM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [IW-1:0] widx,
  input  operand_t      wdata,
  output operand_t      mr [NUM]     // mr[0] = first majority
);

  operand_t mr_q [NUM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM; i++) mr_q[i] <= '0;
    end else if (we && widx < IW'(NUM)) begin
      mr_q[widx] <= wdata;
    end
  end

  assign mr = mr_q;

endmodule
