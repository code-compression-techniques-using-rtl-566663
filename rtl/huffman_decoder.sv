// huffman_decoder: decodes one Huffman-coded codeword field per cycle.
//
// The four parts of a codeword (condition code, Idx_OPD, Idx_ORD, Idx_OLD)
// are Huffman-coded separately, so the decoder keeps one code table per
// field. The compressor builds the codes; this design stores them as
// canonical Huffman tables, the usual compact form: for each code length L
// the number of codes of that length, count[L], and the symbols in code
// order. Canonical codes of one length are consecutive numbers, the first
// code of length L+1 being (first(L) + count[L]) * 2, so a code can be
// recognised by comparing the first L bits of the window with first(L) for
// every L in parallel and taking the shortest match.
//
// Interface: tables are written through the cnt_* and sym_* ports while the
// decoder is not in use. `window` holds the next MAXLEN stream bits, MSB
// first. `hit`/`len` are combinational for the field `field`; `sym` is the
// decoded symbol one clock later (the symbol table is a synchronous RAM).
// `hit` low means the window does not start with a valid code.
module huffman_decoder #(
  parameter int unsigned MAXLEN = 16,
  parameter int unsigned NSYM   = 16384,   // symbols per field
  parameter int unsigned SYM_W  = 14,
  localparam int unsigned NFIELD = 4,
  localparam int unsigned LW    = $clog2(MAXLEN + 1),
  localparam int unsigned RW    = $clog2(NSYM),
  localparam int unsigned CNTW  = $clog2(NSYM + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // table load
  input  logic              cnt_we,
  input  logic [1:0]        cnt_field,
  input  logic [LW-1:0]     cnt_len,
  input  logic [CNTW-1:0]   cnt_val,
  input  logic              sym_we,
  input  logic [1:0]        sym_field,
  input  logic [RW-1:0]     sym_rank,
  input  logic [SYM_W-1:0]  sym_val,
  // decode
  input  logic [1:0]        field,
  input  logic [MAXLEN-1:0] window,
  output logic              hit,
  output logic [LW-1:0]     len,
  output logic [SYM_W-1:0]  sym
);

  logic [CNTW-1:0]  cnt_q [NFIELD][MAXLEN+1];
  logic [SYM_W-1:0] sym_mem [NFIELD*NSYM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NFIELD; f++)
        for (int l = 0; l <= MAXLEN; l++) cnt_q[f][l] <= '0;
    end else if (cnt_we && cnt_len != '0 && cnt_len <= LW'(MAXLEN)) begin
      cnt_q[cnt_field][cnt_len] <= cnt_val;
    end
  end

  // Parallel canonical decode.
  logic [RW-1:0] rank;
  always_comb begin
    logic [MAXLEN:0] first;
    logic [MAXLEN:0] code;
    logic [MAXLEN:0] c;
    logic [RW:0]     base;
    first = '0;
    base  = '0;
    hit   = 1'b0;
    len   = '0;
    rank  = '0;
    for (int l = 1; l <= MAXLEN; l++) begin
      code = (MAXLEN+1)'(window >> (MAXLEN - l));
      c    = (MAXLEN+1)'(cnt_q[field][l]);
      if (!hit && code >= first && (code - first) < c) begin
        hit  = 1'b1;
        len  = LW'(l);
        rank = RW'(base + (RW+1)'(code - first));
      end
      base  = base + (RW+1)'(c);
      first = (first + c) << 1;
    end
  end

  always_ff @(posedge clk) begin
    if (sym_we) sym_mem[{sym_field, sym_rank}] <= sym_val;
    sym <= sym_mem[{field, rank}];
  end

endmodule
