// operand_remapper: turns the five mapping tags of one instruction into its
// five operand fields.
//
// A tag says where an operand comes from: 000 loads the next operand of the
// operand list dictionary (and that operand enters the mapping queue),
// 1..MQ_N takes mapping-queue position 1..MQ_N, oldest first, and
// MQ_N+1..MQ_N+NMR takes majority register 1..NMR. This tag assignment is the
// one the scheme found best for 3-bit tags (one load, four queue positions,
// three majorities). Tags are taken from OF2 to OF6, so a tag may map to an
// operand loaded by an earlier tag of the same instruction.
//
// The queue seen by each tag is worked out here as the last MQ_N items of
// "queue contents at the start of the instruction, then the loads so far";
// the mapping_queue register applies the same pushes at the end of the
// instruction. A tag that names an empty queue position yields 0 and raises
// `map_err`. Purely combinational.
module operand_remapper
  import ofr_pkg::*;
#(
  parameter int unsigned MQ_N = MQ_DEPTH,
  parameter int unsigned NMR  = NUM_MR,
  localparam int unsigned CW  = $clog2(MQ_N + 1)
) (
  input  tag_t            tags    [NUM_OF],  // tags[0] is OF2's
  input  operand_t        old_ops [NUM_OF],  // next operands of the OLD
  input  operand_t        mq      [MQ_N],    // mq[0] = position 1
  input  logic [CW-1:0]   mq_count,
  input  operand_t        mr      [NMR],
  output operand_t        ops     [NUM_OF],  // ops[0] = OF2
  output logic [2:0]      n_loads,
  output logic            map_err
);

  localparam int unsigned LIST = MQ_N + NUM_OF;

  always_comb begin
    operand_t list [LIST];
    int len;
    int nl;
    int p;
    int base;
    p    = 0;
    base = 0;
    for (int i = 0; i < LIST; i++) list[i] = '0;
    for (int i = 0; i < MQ_N; i++) list[i] = mq[i];
    len     = int'(mq_count);
    nl      = 0;
    map_err = 1'b0;
    for (int f = 0; f < NUM_OF; f++) begin
      ops[f] = '0;
      if (tags[f] == '0) begin
        ops[f] = old_ops[nl];
        list[len] = old_ops[nl];
        len = len + 1;
        nl  = nl + 1;
      end else if (int'(tags[f]) <= MQ_N) begin
        p    = int'(tags[f]) - 1;
        base = (len > MQ_N) ? len - MQ_N : 0;
        if (p < len - base) ops[f] = list[base + p];
        else                map_err = 1'b1;
      end else if (int'(tags[f]) <= MQ_N + NMR) begin
        ops[f] = mr[int'(tags[f]) - MQ_N - 1];
      end else begin
        map_err = 1'b1;
      end
    end
    n_loads = 3'(nl);
  end

endmodule
