// mapping_queue: the mapping queue (MQ) of the operand remapper.
//
// Every operand that a load tag fetches from the operand list dictionary is
// pushed into the queue, so later mapping tags can refer to it instead of
// loading it again. Positions are numbered 1..DEPTH from the oldest entry
// held; entry[0] is position 1. Pushing into a full queue drops the oldest
// entry and moves the others down one position. These rules follow the
// compression scheme; clearing the queue at the start of every instruction
// sequence is this design's reading of it, since a dictionary entry shared
// by many occurrences cannot depend on what came before.
//
// Timing: one instruction's loads (0..NPUSH operands, in order) are pushed
// in one clock with `push_n`/`push_val`; `clear` wins over a push.
module mapping_queue
  import ofr_pkg::*;
#(
  parameter int unsigned DEPTH = MQ_DEPTH,
  parameter int unsigned NPUSH = NUM_OF,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = $clog2(NPUSH + 1),
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [PW-1:0]   push_n,
  input  operand_t        push_val [NPUSH],
  output operand_t        entry [DEPTH],   // entry[0] = position 1 (oldest)
  output logic [CW-1:0]   count
);

  operand_t        q_q [DEPTH];
  operand_t        q_d [DEPTH];
  logic [CW-1:0]   cnt_q, cnt_d;

  always_comb begin
    q_d   = q_q;
    cnt_d = cnt_q;
    for (int k = 0; k < NPUSH; k++) begin
      if (PW'(k) < push_n) begin
        if (cnt_d == CW'(DEPTH)) begin
          for (int i = 0; i < DEPTH - 1; i++) q_d[i] = q_d[i+1];
          q_d[DEPTH-1] = push_val[k];
        end else begin
          q_d[cnt_d[IW-1:0]] = push_val[k];
          cnt_d = cnt_d + 1'b1;
        end
      end
    end
    if (clear) begin
      for (int i = 0; i < DEPTH; i++) q_d[i] = '0;
      cnt_d = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q_q[i] <= '0;
      cnt_q <= '0;
    end else begin
      q_q   <= q_d;
      cnt_q <= cnt_d;
    end
  end

  assign entry = q_q;
  assign count = cnt_q;

endmodule
