// tb_huffman_decoder: builds a random prefix code for each of the four
// fields (by splitting leaves of a code tree at random), stores it as
// canonical tables, and decodes windows that start with each code followed
// by random bits. The expected symbol and length come from searching the
// tb's own code list for the codeword that prefixes the window. Field 0's
// code is left incomplete (its last, all-ones, leaf unused) so windows of
// all ones must miss.
module tb_huffman_decoder;
  localparam int unsigned MAXLEN = 16;
  localparam int unsigned NSYM   = 64;
  localparam int unsigned SYM_W  = 14;
  localparam int unsigned LW = $clog2(MAXLEN + 1);
  localparam int unsigned RW = $clog2(NSYM);
  localparam int unsigned CNTW = $clog2(NSYM + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cnt_we = 0, sym_we = 0;
  logic [1:0] cnt_field = 0, sym_field = 0, field = 0;
  logic [LW-1:0] cnt_len = 0;
  logic [CNTW-1:0] cnt_val = 0;
  logic [RW-1:0] sym_rank = 0;
  logic [SYM_W-1:0] sym_val = 0;
  logic [MAXLEN-1:0] window = 0;
  logic hit;
  logic [LW-1:0] len;
  logic [SYM_W-1:0] sym;

  huffman_decoder #(.MAXLEN(MAXLEN), .NSYM(NSYM), .SYM_W(SYM_W)) dut (
    .clk, .rst_n, .cnt_we, .cnt_field, .cnt_len, .cnt_val, .sym_we, .sym_field,
    .sym_rank, .sym_val, .field, .window, .hit, .len, .sym
  );

  // Per field: code length and code value of each symbol (rank order).
  int nsym   [4];
  int clen   [4][NSYM];
  int cval   [4][NSYM];
  int symv   [4][NSYM];

  // Random code tree with n leaves of depth <= MAXLEN, as a list of lengths.
  task automatic make_lengths(int n, output int lens[$]);
    lens.delete();
    lens.push_back(0);
    while (lens.size() < n) begin
      int k;
      do k = $urandom_range(0, lens.size() - 1); while (lens[k] >= MAXLEN);
      lens[k] = lens[k] + 1;
      lens.push_back(lens[k]);
    end
    if (n == 1) lens[0] = 1;
    lens.sort();
  endtask

  task automatic build(int f, int n, bit drop_last);
    int lens[$];
    int code, prev;
    make_lengths(n + (drop_last ? 1 : 0), lens);
    // Canonical assignment in rank order.
    code = 0; prev = lens[0];
    code = 0;
    for (int r = 0; r < lens.size(); r++) begin
      if (r > 0) begin
        code = code + 1;
        code = code << (lens[r] - prev);
      end
      prev = lens[r];
      if (r < n) begin
        clen[f][r] = lens[r];
        cval[f][r] = code;
        symv[f][r] = $urandom_range(0, (1 << SYM_W) - 1);
      end
    end
    nsym[f] = n;
  endtask

  task automatic load(int f);
    for (int l = 1; l <= MAXLEN; l++) begin
      int c = 0;
      for (int r = 0; r < nsym[f]; r++) if (clen[f][r] == l) c++;
      @(negedge clk);
      cnt_we = 1; cnt_field = 2'(f); cnt_len = LW'(l); cnt_val = CNTW'(c);
    end
    @(negedge clk); cnt_we = 0;
    for (int r = 0; r < nsym[f]; r++) begin
      @(negedge clk);
      sym_we = 1; sym_field = 2'(f); sym_rank = RW'(r); sym_val = SYM_W'(symv[f][r]);
    end
    @(negedge clk); sym_we = 0;
  endtask

  // Expected decode of a window by prefix search.
  task automatic expect_of(int f, logic [MAXLEN-1:0] w, output bit h, output int l, output int s);
    h = 0; l = 0; s = 0;
    for (int r = 0; r < nsym[f]; r++) begin
      if (int'(w >> (MAXLEN - clen[f][r])) == cval[f][r]) begin
        h = 1; l = clen[f][r]; s = symv[f][r];
      end
    end
  endtask

  int misses = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    build(0, 13, 1);
    build(1, 40, 0);
    build(2, 1, 0);
    build(3, NSYM, 0);
    for (int f = 0; f < 4; f++) load(f);
    for (int it = 0; it < 4000; it++) begin
      bit h; int l, s;
      int f, r;
      f = $urandom_range(0, 3);
      r = $urandom_range(0, nsym[f] - 1);
      @(negedge clk);
      field = 2'(f);
      if ($urandom_range(0, 9) == 0 && f == 0) window = '1;
      else window = MAXLEN'((cval[f][r] << (MAXLEN - clen[f][r])) |
                            ($urandom & ((1 << (MAXLEN - clen[f][r])) - 1)));
      #1;
      expect_of(f, window, h, l, s);
      checks++;
      if (hit != h || (h && int'(len) != l)) begin
        failures++;
        $display("it %0d f %0d window %h hit %0d/%0d len %0d/%0d", it, f, window, hit, h, len, l);
      end
      if (!h) misses++;
      @(negedge clk);
      if (h) begin
        checks++;
        if (int'(sym) != s) begin
          failures++;
          $display("it %0d f %0d sym %0d exp %0d", it, f, sym, s);
        end
      end
    end
    checks++;
    if (misses == 0) begin failures++; $display("no invalid code exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
