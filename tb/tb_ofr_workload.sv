// tb_ofr_workload: runs the decompression engine, at its default sizes, on a
// synthetic program as large as the largest MediaBench programs compressed
// with this scheme: at least 70172 bytes of compressed code (djpeg),
// 2432 bytes of OPD (djpeg), 4085 bytes of ORD (mpeg2enc) and 9023 bytes of
// OLD (mpeg2enc); the ORD is taken a little past 4 KB. These sizes follow from the published per-program
// percentages of compressed size.
//
// The program is generated from the dictionary side, as a real compressor's
// output would look: a pool of opcode sequences (OPD), a smaller pool of tag
// patterns (ORD, shared widely, as tag patterns repeat far more than
// operands), and many operand lists (OLD). A codeword combines an opcode
// sequence, a tag pattern of the same length and an operand list with as
// many operands as the pattern loads. The expected instructions are worked
// out by a reference model of the tag rules (queue of the last four loads,
// oldest first; three majority registers). Each field gets a canonical
// Huffman code of up to 16 bits.
//
// The whole program is decoded once with random back-pressure, and then
// 200 branches go to random codewords. Instructions from codewords above
// 64 KB, and from OLD and ORD entries above 4 KB, must occur.
module tb_ofr_workload;
  import ofr_pkg::*;

  localparam int CODE_TARGET = 70172;
  localparam int OPD_TARGET  = 2432;
  localparam int ORD_TARGET  = 4085;
  localparam int OLD_TARGET  = 9023;
  localparam int MAXLEN      = 16;
  localparam int MAXOCC      = 40000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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

  // ------------------------------------------------------------ pools
  bit opd_bits [$];
  bit ord_bits [$];
  bit old_bits [$];
  bit code_bits [$];

  // OPD pool: base byte, length, opcodes
  int opd_base [$];
  int opd_len  [$];
  logic [7:0] opd_opc [$][4];
  // ORD pool per length 1..4: base byte, tags, loads
  int ord_base [5][$];
  int ord_loads [5][$];
  logic [2:0] ord_tags [5][$][20];
  // OLD pool per load count 0..20: base byte, operands
  int old_base [21][$];
  logic [3:0] old_ops [21][$][20];
  logic [3:0] mrv [NUM_MR];

  // occurrences
  int occ_cc [MAXOCC], occ_opd [MAXOCC], occ_len [MAXOCC], occ_ord [MAXOCC];
  int occ_old [MAXOCC], occ_addr [MAXOCC + 1];
  int nocc = 0;

  int n_load = 0, n_mqmap = 0, n_mrmap = 0, n_overflow = 0, n_stall = 0;
  int n_hi_code = 0, n_hi_old = 0, n_hi_ord = 0, n_branch = 0;

  function automatic void put(ref bit q[$], input int v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  function automatic void align(ref bit q[$]);
    while (q.size() % 8 != 0) q.push_back(1'b0);
  endfunction

  task automatic make_opd();
    while (opd_bits.size() / 8 < OPD_TARGET) begin
      int l = $urandom_range(1, 4);
      logic [7:0] o [4];
      align(opd_bits);
      opd_base.push_back(opd_bits.size() / 8);
      opd_len.push_back(l);
      for (int i = 0; i < 4; i++) o[i] = 8'($urandom);
      opd_opc.push_back(o);
      for (int i = 0; i < l; i++) begin
        put(opd_bits, int'(i == l - 1), 1);
        put(opd_bits, int'(o[i]), 8);
      end
    end
  endtask

  // Legal random tag pattern for l instructions: a queue tag only names a
  // position that holds an operand.
  task automatic make_ord();
    // A little beyond the target, so that some entries sit above 4 KB.
    while (ord_bits.size() / 8 < ORD_TARGET + 128) begin
      int l = $urandom_range(1, 4);
      logic [2:0] t [20];
      int fill = 0, loads = 0;
      for (int k = 0; k < 5 * l; k++) begin
        int r = $urandom_range(0, 99);
        if (r < 50 || fill == 0) t[k] = 3'd0;
        else if (r < 75) t[k] = 3'($urandom_range(1, (fill < MQ_DEPTH) ? fill : MQ_DEPTH));
        else t[k] = 3'($urandom_range(MQ_DEPTH + 1, MQ_DEPTH + NUM_MR));
        if (t[k] == 0) begin loads++; fill++; end
      end
      for (int k = 5 * l; k < 20; k++) t[k] = '0;
      align(ord_bits);
      ord_base[l].push_back(ord_bits.size() / 8);
      ord_loads[l].push_back(loads);
      ord_tags[l].push_back(t);
      for (int k = 0; k < 5 * l; k++) put(ord_bits, int'(t[k]), 3);
    end
  endtask

  task automatic add_old(int k);
    logic [3:0] v [20];
    align(old_bits);
    old_base[k].push_back(old_bits.size() / 8);
    for (int i = 0; i < 20; i++) v[i] = 4'($urandom);
    old_ops[k].push_back(v);
    for (int i = 0; i < k; i++) put(old_bits, int'(v[i]), 4);
  endtask

  // ------------------------------------------------------------ Huffman
  int hsyms [4][$];
  int hrank [4][int];
  int hlen  [4][$];
  int hcode [4][$];

  task automatic add_symbol(int f, int v);
    if (!hrank[f].exists(v)) begin hrank[f][v] = hsyms[f].size(); hsyms[f].push_back(v); end
  endtask

  task automatic build_code(int f);
    int lens[$];
    int code, prev, n;
    n = hsyms[f].size();
    lens.push_back(0);
    while (lens.size() < n) begin
      int a, b, k;
      do begin
        a = $urandom_range(0, lens.size() - 1);
        b = $urandom_range(0, lens.size() - 1);
        k = (lens[a] <= lens[b]) ? a : b;
      end while (lens[k] >= MAXLEN);
      lens[k] = lens[k] + 1;
      lens.push_back(lens[k]);
    end
    if (n == 1) lens[0] = 1;
    lens.sort();
    code = 0; prev = lens[0];
    for (int r = 0; r < n; r++) begin
      if (r > 0) code = (code + 1) << (lens[r] - prev);
      prev = lens[r];
      hlen[f].push_back(lens[r]);
      hcode[f].push_back(code);
    end
  endtask

  task automatic emit(int f, int v);
    int r = hrank[f][v];
    put(code_bits, hcode[f][r], hlen[f][r]);
  endtask

  // ------------------------------------------------------------ program
  task automatic make_program();
    int ccs [4] = '{14, 0, 1, 10};
    // Pick codewords until the code is large enough. Encoding needs the
    // codes, so first choose the occurrences, then build codes, then emit.
    int est_bits = 0;
    while (est_bits < CODE_TARGET * 8 + 4000 && nocc < MAXOCC) begin
      int p, l, r, k;
      p = $urandom_range(0, opd_base.size() - 1);
      l = opd_len[p];
      r = $urandom_range(0, ord_base[l].size() - 1);
      k = ord_loads[l][r];
      // New operand lists until the OLD is large enough, then reuse.
      if (old_bits.size() / 8 < OLD_TARGET || old_base[k].size() == 0) add_old(k);
      occ_cc[nocc]  = ccs[$urandom_range(0, 3)];
      occ_opd[nocc] = p;
      occ_len[nocc] = l;
      occ_ord[nocc] = r;
      occ_old[nocc] = $urandom_range(0, old_base[k].size() - 1);
      // Make sure the last operand lists (the highest addresses) are used.
      if ($urandom_range(0, 1) == 0) occ_old[nocc] = old_base[k].size() - 1;
      add_symbol(0, occ_cc[nocc]);
      add_symbol(1, opd_base[p]);
      add_symbol(2, ord_base[l][r]);
      add_symbol(3, old_base[k][occ_old[nocc]]);
      est_bits += 31;
      nocc++;
    end
    for (int f = 0; f < 4; f++) build_code(f);
    for (int o = 0; o < nocc; o++) begin
      int l, k;
      l = occ_len[o];
      k = ord_loads[l][occ_ord[o]];
      occ_addr[o] = code_bits.size();
      emit(0, occ_cc[o]);
      emit(1, opd_base[occ_opd[o]]);
      emit(2, ord_base[l][occ_ord[o]]);
      emit(3, old_base[k][occ_old[o]]);
    end
    occ_addr[nocc] = code_bits.size();
    align(code_bits);
  endtask

  // Reference model: instructions of occurrence o.
  task automatic expand(int o, ref logic [31:0] w [$]);
    logic [3:0] q [$];
    int l, r, k, nl;
    l = occ_len[o]; r = occ_ord[o];
    k = ord_loads[l][r];
    nl = 0;
    w.delete();
    for (int i = 0; i < l; i++) begin
      logic [19:0] ops;
      for (int f = 0; f < 5; f++) begin
        logic [2:0] t = ord_tags[l][r][5 * i + f];
        logic [3:0] v;
        if (t == 0) begin
          v = old_ops[k][occ_old[o]][nl]; nl++;
          q.push_back(v);
          if (q.size() > MQ_DEPTH) begin void'(q.pop_front()); n_overflow++; end
          n_load++;
        end else if (t <= MQ_DEPTH) begin
          v = q[t - 1]; n_mqmap++;
        end else begin
          v = mrv[t - MQ_DEPTH - 1]; n_mrmap++;
        end
        ops[19 - 4 * f -: 4] = v;
      end
      w.push_back({4'(occ_cc[o]), opd_opc[occ_opd[o]][i], ops});
    end
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
  task automatic do_redirect(int addr);
    @(negedge clk);
    redirect = 1; redirect_addr = 24'(addr); insn_ready = 0;
    @(negedge clk);
    redirect = 0;
  endtask

  // Take the instructions of occurrences o .. o+n-1 and compare.
  task automatic run_from(int o, int n, int p);
    int guard = 0;
    for (int k = o; k < o + n && k < nocc; k++) begin
      logic [31:0] w [$];
      int i = 0;
      expand(k, w);
      if (occ_addr[k] / 8 >= 65536) n_hi_code++;
      if (old_base[ord_loads[occ_len[k]][occ_ord[k]]][occ_old[k]] >= 4096) n_hi_old++;
      if (ord_base[occ_len[k]][occ_ord[k]] >= 4096) n_hi_ord++;
      while (i < w.size()) begin
        insn_ready = ($urandom_range(1, 100) <= p);
        #1;
        if (insn_valid && !insn_ready) n_stall++;
        if (insn_valid && insn_ready) begin
          bit lst = (i == w.size() - 1);
          checks++;
          if (insn != w[i] || insn_last != lst || (lst && int'(next_cw_addr) != occ_addr[k + 1])) begin
            failures++;
            if (failures < 10)
              $display("occ %0d insn %0d: got %h last %0d next %0d, exp %h %0d %0d", k, i, insn,
                       insn_last, next_cw_addr, w[i], lst, occ_addr[k + 1]);
          end
          i++;
          guard = 0;
        end
        if (error || ++guard > 100) begin
          failures++;
          $display("engine stopped at occurrence %0d (error %0d)", k, error);
          insn_ready = 0;
          return;
        end
        @(negedge clk);
      end
    end
    insn_ready = 0;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = '0;
    mrv = '{4'h0, 4'hD, 4'h1};
    make_opd();
    make_ord();
    make_program();
    $display("program: %0d codewords, code %0d B, OPD %0d B, ORD %0d B, OLD %0d B, symbols %0d/%0d/%0d/%0d",
             nocc, code_bits.size() / 8, opd_bits.size() / 8, ord_bits.size() / 8, old_bits.size() / 8,
             hsyms[0].size(), hsyms[1].size(), hsyms[2].size(), hsyms[3].size());
    checks++;
    if (code_bits.size() / 8 < CODE_TARGET || opd_bits.size() / 8 < OPD_TARGET ||
        ord_bits.size() / 8 < ORD_TARGET || old_bits.size() / 8 < OLD_TARGET) begin
      failures++;
      $display("program smaller than the workload");
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();

    do_redirect(0);
    run_from(0, nocc, 80);

    for (int b = 0; b < 200; b++) begin
      int o;
      o = (b % 2 == 0) ? $urandom_range(0, nocc - 1) : $urandom_range(nocc * 15 / 16, nocc - 1);
      do_redirect(occ_addr[o]);
      run_from(o, 3, 70);
      n_branch++;
    end

    $display("mechanisms: load=%0d mq_map=%0d mr_map=%0d overflow=%0d stall=%0d code>64KB=%0d OLD>4KB=%0d ORD>4KB=%0d branches=%0d",
             n_load, n_mqmap, n_mrmap, n_overflow, n_stall, n_hi_code, n_hi_old, n_hi_ord, n_branch);
    checks++;
    if (n_load == 0 || n_mqmap == 0 || n_mrmap == 0 || n_overflow == 0 || n_stall == 0 ||
        n_hi_code == 0 || n_hi_old == 0 || n_hi_ord == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
