// ofr_decompressor: front-end decompression engine for code compressed by
// operand field remapping.
//
// The compressed program is a bit stream of codewords [CC Idx_OPD Idx_ORD
// Idx_OLD], each field Huffman-coded on its own. One codeword stands for one
// instruction sequence: the opcode dictionary (OPD) gives the opcodes and
// where the sequence ends, the operand remapping dictionary (ORD) gives five
// 3-bit mapping tags per instruction, and the operand list dictionary (OLD)
// gives the operands that the load tags fetch. The mapping queue and the
// majority registers supply the rest. Each instruction is rebuilt as
// {CC, opcode, OF2..OF6} and handed to the processor over a valid/ready port.
// The dictionary layout, tag meanings and codeword format follow the
// compression scheme; the pipeline, the handshake, the load bus and the
// error handling are this design's choices.
//
// Operation:
//   * Tables and memories are written through `ld` while the engine idles:
//     LD_CODE/LD_OPD/LD_ORD/LD_OLD take a byte at addr, LD_MR takes majority
//     register addr[1:0], LD_HCNT takes the count of codes of length
//     addr[4:0] for field addr[19:18], LD_HSYM the symbol of rank addr[13:0]
//     for field addr[19:18] (fields: 0 CC, 1 Idx_OPD, 2 Idx_ORD, 3 Idx_OLD).
//   * `redirect` with `redirect_addr` = {byte address, bit offset} starts
//     decompression at that codeword (reset start or taken branch).
//   * Timing: the four fields take one cycle each, one more cycle starts the
//     three dictionaries, then the sequence's instructions leave at one per
//     cycle while `insn_ready` is high. The first instruction is valid six
//     cycles after the redirect; the next codeword is decoded right after an
//     instruction with `insn_last` is taken. `next_cw_addr` is the bit address
//     of the codeword after the current sequence (a return address).
//   * A field that matches no Huffman code, or a tag naming an empty queue
//     position, stops the engine with `error` high until the next redirect.
module ofr_decompressor
  import ofr_pkg::*;
#(
  parameter int unsigned CODE_BYTES = 131072,
  parameter int unsigned OPD_BYTES  = 4096,
  parameter int unsigned ORD_BYTES  = 8192,
  parameter int unsigned OLD_BYTES  = 16384,
  parameter int unsigned MAXLEN     = 16,
  parameter int unsigned NSYM       = 16384,
  localparam int unsigned CAW   = $clog2(CODE_BYTES),
  localparam int unsigned OPDAW = $clog2(OPD_BYTES),
  localparam int unsigned ORDAW = $clog2(ORD_BYTES),
  localparam int unsigned OLDAW = $clog2(OLD_BYTES),
  localparam int unsigned SYM_W = (OLDAW > ORDAW) ? ((OLDAW > OPDAW) ? OLDAW : OPDAW)
                                                  : ((ORDAW > OPDAW) ? ORDAW : OPDAW),
  localparam int unsigned LW    = $clog2(MAXLEN + 1),
  localparam int unsigned RW    = $clog2(NSYM),
  localparam int unsigned CNTW  = $clog2(NSYM + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ld_bus_t     ld,
  input  logic        redirect,
  input  logic [23:0] redirect_addr,
  output logic        insn_valid,
  input  logic        insn_ready,
  output logic [31:0] insn,
  output logic        insn_last,
  output logic [23:0] next_cw_addr,
  output logic        busy,
  output logic        error
);

  typedef enum logic [2:0] {
    S_IDLE, S_CC, S_OPD, S_ORD, S_OLD, S_START, S_INS, S_ERR
  } state_e;

  state_e state_q, state_d;

  // ---------------------------------------------------------------- load bus
  logic we_code, we_opd, we_ord, we_old, we_mr, we_hcnt, we_hsym;
  always_comb begin
    we_code = ld.we && ld.target == LD_CODE;
    we_opd  = ld.we && ld.target == LD_OPD;
    we_ord  = ld.we && ld.target == LD_ORD;
    we_old  = ld.we && ld.target == LD_OLD;
    we_mr   = ld.we && ld.target == LD_MR;
    we_hcnt = ld.we && ld.target == LD_HCNT;
    we_hsym = ld.we && ld.target == LD_HSYM;
  end

  // -------------------------------------------------------- code + Huffman
  logic              cr_start, cr_adv;
  logic [CAW+2:0]    cptr;
  logic [MAXLEN-1:0] window;
  logic              h_hit;
  logic [LW-1:0]     h_len;
  logic [SYM_W-1:0]  h_sym;
  logic [1:0]        h_field;

  code_reader #(.BYTES(CODE_BYTES), .MAXLEN(MAXLEN)) u_code (
    .clk, .rst_n,
    .we(we_code), .waddr(ld.addr[CAW-1:0]), .wdata(ld.data[7:0]),
    .start(cr_start), .start_addr(redirect_addr[CAW+2:0]),
    .advance(cr_adv), .len(h_len),
    .ptr(cptr), .window
  );

  huffman_decoder #(.MAXLEN(MAXLEN), .NSYM(NSYM), .SYM_W(SYM_W)) u_huff (
    .clk, .rst_n,
    .cnt_we(we_hcnt), .cnt_field(ld.addr[19:18]), .cnt_len(ld.addr[LW-1:0]),
    .cnt_val(ld.data[CNTW-1:0]),
    .sym_we(we_hsym), .sym_field(ld.addr[19:18]), .sym_rank(ld.addr[RW-1:0]),
    .sym_val(ld.data[SYM_W-1:0]),
    .field(h_field), .window, .hit(h_hit), .len(h_len), .sym(h_sym)
  );

  // ------------------------------------------------------------ dictionaries
  logic            d_start, d_adv;
  logic [CC_W-1:0] cc_q;
  logic [OPDAW-1:0] opd_idx_q;
  logic [ORDAW-1:0] ord_idx_q;
  opd_entry_t      opd_e;
  tag_t            tags    [NUM_OF];
  operand_t        old_ops [NUM_OF];
  logic [2:0]      n_loads;

  opd_dict #(.BYTES(OPD_BYTES)) u_opd (
    .clk, .rst_n, .we(we_opd), .waddr(ld.addr[OPDAW-1:0]), .wdata(ld.data[7:0]),
    .start(d_start), .start_idx(opd_idx_q), .advance(d_adv), .entry(opd_e)
  );

  ord_dict #(.BYTES(ORD_BYTES)) u_ord (
    .clk, .rst_n, .we(we_ord), .waddr(ld.addr[ORDAW-1:0]), .wdata(ld.data[7:0]),
    .start(d_start), .start_idx(ord_idx_q), .advance(d_adv), .tags
  );

  old_dict #(.BYTES(OLD_BYTES)) u_old (
    .clk, .rst_n, .we(we_old), .waddr(ld.addr[OLDAW-1:0]), .wdata(ld.data[7:0]),
    .start(d_start), .start_idx(h_sym[OLDAW-1:0]), .advance(d_adv), .n_used(n_loads),
    .ops(old_ops)
  );

  // ------------------------------------------------- mapping queue and MRs
  localparam int unsigned MQCW = $clog2(MQ_DEPTH + 1);
  operand_t        mq [MQ_DEPTH];
  logic [MQCW-1:0] mq_count;
  operand_t        mr [NUM_MR];
  operand_t        ops [NUM_OF];
  logic            map_err;

  mapping_queue #(.DEPTH(MQ_DEPTH), .NPUSH(NUM_OF)) u_mq (
    .clk, .rst_n, .clear(d_start), .push_n(d_adv ? n_loads : 3'd0),
    .push_val(old_ops), .entry(mq), .count(mq_count)
  );

  majority_regs #(.NUM(NUM_MR)) u_mr (
    .clk, .rst_n, .we(we_mr), .widx(ld.addr[1:0]), .wdata(ld.data[OF_W-1:0]), .mr
  );

  operand_remapper #(.MQ_N(MQ_DEPTH), .NMR(NUM_MR)) u_remap (
    .tags, .old_ops, .mq, .mq_count, .mr, .ops, .n_loads, .map_err
  );

  // ------------------------------------------------------------------- FSM
  logic fire;
  assign fire = insn_valid && insn_ready;

  always_comb begin
    state_d  = state_q;
    cr_start = 1'b0;
    cr_adv   = 1'b0;
    d_start  = 1'b0;
    d_adv    = 1'b0;
    h_field  = F_CC;
    unique case (state_q)
      S_CC:  h_field = F_CC;
      S_OPD: h_field = F_OPD;
      S_ORD: h_field = F_ORD;
      S_OLD: h_field = F_OLD;
      default: h_field = F_CC;
    endcase
    if (redirect) begin
      cr_start = 1'b1;
      state_d  = S_CC;
    end else begin
      unique case (state_q)
        S_IDLE, S_ERR: ;
        S_CC, S_OPD, S_ORD, S_OLD: begin
          if (h_hit) begin
            cr_adv  = 1'b1;
            state_d = (state_q == S_OLD) ? S_START : state_e'(state_q + 3'd1);
          end else begin
            state_d = S_ERR;
          end
        end
        S_START: begin
          d_start = 1'b1;
          state_d = S_INS;
        end
        S_INS: begin
          if (map_err) begin
            state_d = S_ERR;
          end else if (fire) begin
            d_adv   = 1'b1;
            state_d = opd_e.last ? S_CC : S_INS;
          end
        end
        default: state_d = S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cc_q      <= '0;
      opd_idx_q <= '0;
      ord_idx_q <= '0;
    end else begin
      state_q <= state_d;
      // A field's symbol appears one cycle after the field was decoded.
      if (state_q == S_OPD) cc_q      <= h_sym[CC_W-1:0];
      if (state_q == S_ORD) opd_idx_q <= h_sym[OPDAW-1:0];
      if (state_q == S_OLD) ord_idx_q <= h_sym[ORDAW-1:0];
    end
  end

  // ---------------------------------------------------------------- output
  logic [NUM_OF*OF_W-1:0] ops_flat;
  always_comb begin
    for (int i = 0; i < NUM_OF; i++) ops_flat[(NUM_OF-1-i)*OF_W +: OF_W] = ops[i];
  end

  assign insn_valid   = (state_q == S_INS) && !map_err;
  assign insn         = assemble(cc_q, opd_e.opcode, ops_flat);
  assign insn_last    = opd_e.last;
  assign next_cw_addr = 24'(cptr);
  assign busy         = (state_q != S_IDLE) && (state_q != S_ERR);
  assign error        = (state_q == S_ERR);

  // An offered instruction stays offered, unchanged, until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (insn_valid && !insn_ready && !redirect) |=> (insn_valid && $stable(insn));
  endproperty
  a_hold: assert property (p_hold);

endmodule
