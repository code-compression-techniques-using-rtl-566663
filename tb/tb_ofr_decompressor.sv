// tb_ofr_decompressor: end-to-end test of the decompression engine at its
// default sizes.
//
// The testbench contains its own compressor. It makes up a set of ARM-style
// instruction sequences (one condition per sequence, random opcodes, operand
// values drawn so that some repeat often), picks the three most frequent
// operands as majorities, and compresses each sequence: a 9-bit OPD entry per
// instruction, five 3-bit tags per instruction (majority if the value is one,
// else a mapping-queue position if the queue holds it, else a load), and the
// loaded operands in the OLD. Identical ORD or OLD byte strings are shared.
// Every field gets a random canonical Huffman code; the condition code's is
// left incomplete so that an all-ones window is invalid. A program of many
// occurrences of the sequences is encoded as a bit stream.
//
// Everything is written through the load bus, then the engine is run over
// the whole program with the consumer always ready (latency and rate are
// checked), again with random back-pressure, then with branches to random
// codewords (some taken in the middle of a sequence), and finally with a
// branch into an invalid code, which must raise `error`. Every instruction,
// `insn_last` and the return address on a sequence's last instruction are
// compared with the original program. Each mechanism is counted and must
// occur at least once.
module tb_ofr_decompressor;
  import ofr_pkg::*;

  localparam int NSEQ = 24;
  localparam int NOCC = 160;
  localparam int MAXLEN = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  ld_bus_t     ld;
  logic        redirect = 0;
  logic [23:0] redirect_addr = 0;
  logic        insn_valid, insn_ready = 0, insn_last, busy, error;
  logic [31:0] insn;
  logic [23:0] next_cw_addr;

  ofr_decompressor dut (
    .clk, .rst_n, .ld, .redirect, .redirect_addr, .insn_valid, .insn_ready,
    .insn, .insn_last, .next_cw_addr, .busy, .error
  );

  // ------------------------------------------------------------ program
  int          seq_len [NSEQ];
  logic [31:0] seq_insn [NSEQ][4];
  operand_t    mrv [NUM_MR];

  bit opd_bits [$];
  bit ord_bits [$];
  bit old_bits [$];
  bit code_bits [$];
  int opd_base [NSEQ], ord_base [NSEQ], old_base [NSEQ];

  int occ_seq [NOCC];
  int occ_addr [NOCC + 1];

  // mechanism counters
  int n_load = 0, n_mqmap = 0, n_mrmap = 0, n_overflow = 0, n_shared = 0;
  int n_multi = 0, n_stall = 0, n_abort = 0, n_unaligned = 0, n_error = 0;

  function automatic operand_t pick_operand();
    int r = $urandom_range(0, 99);
    if (r < 45) return operand_t'($urandom_range(0, 2) * 5 + 1);   // frequent: 1, 6, 11
    return operand_t'($urandom);
  endfunction

  task automatic make_sequences();
    int freq [16];
    foreach (freq[i]) freq[i] = 0;
    for (int s = 0; s < NSEQ; s++) begin
      logic [3:0] cc;
      cc = ($urandom_range(0, 2) == 0) ? 4'(3'($urandom_range(0, 3))) : 4'hE;
      seq_len[s] = (s < 3) ? 1 : $urandom_range(1, 4);
      for (int i = 0; i < seq_len[s]; i++) begin
        logic [19:0] ops;
        for (int f = 0; f < NUM_OF; f++) begin
          operand_t v = pick_operand();
          // Repeat an earlier operand of the sequence now and then.
          if (f > 0 && $urandom_range(0, 3) == 0) v = ops[19 - 4 * ($urandom_range(0, f - 1)) -: 4];
          ops[19 - 4 * f -: 4] = v;
          freq[v]++;
        end
        seq_insn[s][i] = {cc, 8'($urandom), ops};
      end
    end
    // Three most frequent values are the majorities.
    for (int k = 0; k < NUM_MR; k++) begin
      int best = 0;
      for (int v = 1; v < 16; v++) if (freq[v] > freq[best]) best = v;
      mrv[k] = operand_t'(best);
      freq[best] = -1;
    end
  endtask

  function automatic void put(ref bit q[$], input int v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  function automatic void align(ref bit q[$]);
    while (q.size() % 8 != 0) q.push_back(1'b0);
  endfunction

  // Look for an identical, byte-aligned bit string already in q.
  function automatic int find_same(ref bit q[$], ref bit s[$]);
    for (int b = 0; b + s.size() <= q.size(); b += 8) begin
      bit same = 1;
      for (int i = 0; i < s.size(); i++) if (q[b + i] != s[i]) begin same = 0; break; end
      if (same) return b / 8;
    end
    return -1;
  endfunction

  task automatic compress();
    for (int s = 0; s < NSEQ; s++) begin
      operand_t q [$];
      bit tb_ord [$];
      bit tb_old [$];
      int at;
      align(opd_bits);
      opd_base[s] = opd_bits.size() / 8;
      for (int i = 0; i < seq_len[s]; i++) begin
        logic [31:0] w = seq_insn[s][i];
        put(opd_bits, int'(i == seq_len[s] - 1), 1);
        put(opd_bits, int'(w[27:20]), 8);
        for (int f = 0; f < NUM_OF; f++) begin
          operand_t v = w[19 - 4 * f -: 4];
          int tag = -1;
          for (int k = 0; k < NUM_MR; k++) if (tag < 0 && mrv[k] == v) tag = MQ_DEPTH + 1 + k;
          if (tag >= 0) n_mrmap++;
          if (tag < 0) for (int p = 0; p < q.size(); p++) if (tag < 0 && q[p] == v) tag = p + 1;
          if (tag > 0 && tag <= MQ_DEPTH) n_mqmap++;
          if (tag < 0) begin
            tag = 0;
            n_load++;
            put(tb_old, int'(v), 4);
            q.push_back(v);
            if (q.size() > MQ_DEPTH) begin void'(q.pop_front()); n_overflow++; end
          end
          put(tb_ord, tag, 3);
        end
      end
      align(tb_ord);
      at = find_same(ord_bits, tb_ord);
      if (at >= 0) begin ord_base[s] = at; n_shared++; end
      else begin ord_base[s] = ord_bits.size() / 8; foreach (tb_ord[i]) ord_bits.push_back(tb_ord[i]); end
      align(tb_old);
      at = (tb_old.size() == 0) ? -1 : find_same(old_bits, tb_old);
      if (at >= 0) begin old_base[s] = at; n_shared++; end
      else begin old_base[s] = old_bits.size() / 8; foreach (tb_old[i]) old_bits.push_back(tb_old[i]); end
    end
  endtask

  // ------------------------------------------------------------ Huffman
  int hsyms [4][$];       // symbols of each field in rank order
  int hlen  [4][$];
  int hcode [4][$];

  task automatic make_lengths(int n, output int lens[$]);
    lens.delete();
    lens.push_back(0);
    while (lens.size() < n) begin
      int k;
      do k = $urandom_range(0, lens.size() - 1); while (lens[k] >= 10);
      lens[k] = lens[k] + 1;
      lens.push_back(lens[k]);
    end
    if (n == 1) lens[0] = 1;
    lens.sort();
  endtask

  task automatic add_symbol(int f, int v);
    foreach (hsyms[f][i]) if (hsyms[f][i] == v) return;
    hsyms[f].push_back(v);
  endtask

  task automatic build_code(int f, bit drop_last);
    int lens[$];
    int code, prev;
    hsyms[f].shuffle();
    make_lengths(hsyms[f].size() + (drop_last ? 1 : 0), lens);
    code = 0; prev = lens[0];
    for (int r = 0; r < lens.size(); r++) begin
      if (r > 0) code = (code + 1) << (lens[r] - prev);
      prev = lens[r];
      if (r < hsyms[f].size()) begin hlen[f].push_back(lens[r]); hcode[f].push_back(code); end
    end
  endtask

  task automatic emit(int f, int v);
    foreach (hsyms[f][i]) if (hsyms[f][i] == v) begin put(code_bits, hcode[f][i], hlen[f][i]); return; end
    $fatal(1, "symbol missing");
  endtask

  task automatic encode_program();
    for (int s = 0; s < NSEQ; s++) begin
      add_symbol(0, int'(seq_insn[s][0][31:28]));
      add_symbol(1, opd_base[s]);
      add_symbol(2, ord_base[s]);
      add_symbol(3, old_base[s]);
    end
    build_code(0, 1);
    for (int f = 1; f < 4; f++) build_code(f, 0);
    for (int o = 0; o < NOCC; o++) begin
      int s = (o < NSEQ) ? o : $urandom_range(0, NSEQ - 1);
      occ_seq[o]  = s;
      occ_addr[o] = code_bits.size();
      if (occ_addr[o] % 8 != 0) n_unaligned++;
      emit(0, int'(seq_insn[s][0][31:28]));
      emit(1, opd_base[s]);
      emit(2, ord_base[s]);
      emit(3, old_base[s]);
    end
    occ_addr[NOCC] = code_bits.size();
    align(code_bits);
    // An invalid region: all ones matches no condition code.
    for (int i = 0; i < 32; i++) code_bits.push_back(1'b1);
  endtask

  // ------------------------------------------------------------ loading
  task automatic ld_write(ld_target_e t, int addr, int data);
    @(negedge clk);
    ld.we = 1; ld.target = t; ld.addr = 20'(addr); ld.data = 16'(data);
  endtask

  task automatic ld_bytes(ld_target_e t, ref bit q[$]);
    for (int b = 0; b < q.size() / 8; b++) begin
      int v = 0;
      for (int i = 0; i < 8; i++) v = (v << 1) | int'(q[8 * b + i]);
      ld_write(t, b, v);
    end
  endtask

  task automatic load_all();
    align(opd_bits); align(ord_bits); align(old_bits);
    ld_bytes(LD_CODE, code_bits);
    ld_bytes(LD_OPD, opd_bits);
    ld_bytes(LD_ORD, ord_bits);
    ld_bytes(LD_OLD, old_bits);
    for (int k = 0; k < NUM_MR; k++) ld_write(LD_MR, k, int'(mrv[k]));
    for (int f = 0; f < 4; f++) begin
      for (int l = 1; l <= MAXLEN; l++) begin
        int c = 0;
        foreach (hlen[f][i]) if (hlen[f][i] == l) c++;
        ld_write(LD_HCNT, (f << 18) | l, c);
      end
      foreach (hsyms[f][i]) ld_write(LD_HSYM, (f << 18) | i, hsyms[f][i]);
    end
    @(negedge clk);
    ld.we = 0;
  endtask

  // ------------------------------------------------------------ running
  typedef struct { logic [31:0] w; bit last; int next; } exp_t;
  exp_t expq [$];
  bit   taken_last;   // the last instruction taken ended its sequence

  task automatic expect_from(int o, int n_occ);
    expq.delete();
    for (int k = o; k < o + n_occ && k < NOCC; k++) begin
      int s = occ_seq[k];
      for (int i = 0; i < seq_len[s]; i++) begin
        exp_t e;
        e.w = seq_insn[s][i]; e.last = (i == seq_len[s] - 1); e.next = occ_addr[k + 1];
        expq.push_back(e);
      end
    end
  endtask

  task automatic do_redirect(int addr);
    @(negedge clk);
    redirect = 1; redirect_addr = 24'(addr); insn_ready = 0;
    @(negedge clk);
    redirect = 0;
  endtask

  // Consume `n` instructions (or all expected); ready with probability p%.
  // With check_timing, the first must arrive 6 cycles after the redirect,
  // later ones one cycle apart inside a sequence and six apart across.
  task automatic consume(int n, int p, bit check_timing, longint t_redirect);
    longint last_fire;
    bit prev_last;
    int got = 0;
    int guard = 0;
    last_fire = t_redirect; prev_last = 1;
    while (got < n && expq.size() > 0) begin
      insn_ready = ($urandom_range(1, 100) <= p);
      #1;
      if (insn_valid && !insn_ready) n_stall++;
      if (insn_valid && insn_ready) begin
        exp_t e = expq.pop_front();
        checks++;
        if (insn != e.w || insn_last != e.last || (e.last && int'(next_cw_addr) != e.next)) begin
          failures++;
          $display("t %0d insn %h last %0d next %0d, exp %h %0d %0d", cycle, insn, insn_last,
                   next_cw_addr, e.w, e.last, e.next);
        end
        if (check_timing) begin
          longint want = (got == 0) ? 6 : (prev_last ? 6 : 1);
          checks++;
          if (cycle - last_fire != want) begin
            failures++;
            $display("timing: %0d cycles, expected %0d", cycle - last_fire, want);
          end
        end
        if (!e.last) n_multi++;
        prev_last = e.last;
        taken_last = e.last;
        last_fire = cycle;
        got++;
        guard = 0;
      end
      if (error) begin failures++; $display("unexpected error"); break; end
      if (++guard > 100) begin failures++; $display("engine stuck"); break; end
      @(negedge clk);
    end
    insn_ready = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = '0;
    make_sequences();
    compress();
    encode_program();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();

    // 1. Whole program, consumer always ready: latency and rate.
    expect_from(0, NOCC);
    do_redirect(0);
    consume(1 << 30, 100, 1, cycle - 1);
    checks++;
    if (expq.size() != 0) begin failures++; $display("program 1 incomplete"); end

    // 2. Whole program with back-pressure.
    expect_from(0, NOCC);
    do_redirect(0);
    consume(1 << 30, 40, 0, 0);
    checks++;
    if (expq.size() != 0) begin failures++; $display("program 2 incomplete"); end

    // 3. Branches to random codewords, some cut short mid-sequence.
    for (int b = 0; b < 60; b++) begin
      int o, take;
      o    = $urandom_range(0, NOCC - 1);
      take = $urandom_range(1, 8);
      expect_from(o, 4);
      do_redirect(occ_addr[o]);
      consume(take, 70, 0, 0);
      // The next branch cuts the current sequence short.
      if (!taken_last) n_abort++;
    end

    // 4. Branch into an invalid code.
    do_redirect((occ_addr[NOCC] + 7) / 8 * 8);
    repeat (4) @(negedge clk);
    checks++;
    if (!error || insn_valid) begin failures++; $display("invalid code not flagged"); end
    else n_error++;
    // Recovers on the next branch.
    expect_from(0, 2);
    do_redirect(0);
    consume(1 << 30, 100, 0, 0);
    checks++;
    if (expq.size() != 0 || error) begin failures++; $display("no recovery after error"); end

    $display("mechanisms: load=%0d mq_map=%0d mr_map=%0d mq_overflow=%0d shared_entry=%0d multi=%0d stall=%0d abort=%0d unaligned=%0d error=%0d",
             n_load, n_mqmap, n_mrmap, n_overflow, n_shared, n_multi, n_stall, n_abort, n_unaligned, n_error);
    checks++;
    if (n_load == 0 || n_mqmap == 0 || n_mrmap == 0 || n_overflow == 0 || n_shared == 0 ||
        n_multi == 0 || n_stall == 0 || n_abort == 0 || n_unaligned == 0 || n_error == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("code %0d bytes, OPD %0d, ORD %0d, OLD %0d", code_bits.size() / 8,
             opd_bits.size() / 8, ord_bits.size() / 8, old_bits.size() / 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
