// tb_code_reader: fills a small code memory with random bytes, then loads
// the bit pointer with random byte+bit addresses and advances it by random
// field lengths (0..MAXLEN), checking the pointer and the MAXLEN-bit window
// after every step against a bit-by-bit reading of the same bytes.
module tb_code_reader;
  localparam int unsigned BYTES  = 64;
  localparam int unsigned MAXLEN = 16;
  localparam int unsigned AW = $clog2(BYTES);
  localparam int unsigned LW = $clog2(MAXLEN + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0;
  logic [AW-1:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic start = 0;
  logic [AW+2:0] start_addr = 0;
  logic advance = 0;
  logic [LW-1:0] len = 0;
  logic [AW+2:0] ptr;
  logic [MAXLEN-1:0] window;

  code_reader #(.BYTES(BYTES), .MAXLEN(MAXLEN)) dut (
    .clk, .rst_n, .we, .waddr, .wdata, .start, .start_addr, .advance, .len, .ptr, .window
  );

  logic [7:0] ref_mem [BYTES];
  int mptr;

  function automatic int getbits(int bitaddr, int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      int a = (bitaddr + i) % (BYTES * 8);
      v = (v << 1) | int'(ref_mem[a / 8][7 - (a % 8)]);
    end
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    mptr = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      start = 0; advance = 0;
      if ($urandom_range(0, 7) == 0) begin
        start = 1; start_addr = (AW+3)'($urandom); mptr = int'(start_addr);
      end else if ($urandom_range(0, 3) != 0) begin
        advance = 1; len = LW'($urandom_range(0, MAXLEN));
        mptr = (mptr + int'(len)) % (BYTES * 8);
      end
      @(negedge clk);
      start = 0; advance = 0;
      checks++;
      if (int'(ptr) != mptr || int'(window) != getbits(mptr, MAXLEN)) begin
        failures++;
        $display("it %0d ptr %0d/%0d window %h exp %h", it, ptr, mptr, window,
                 getbits(mptr, MAXLEN));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
