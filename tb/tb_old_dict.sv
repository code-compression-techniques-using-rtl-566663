// tb_old_dict: fills a small old_dict with random bytes, then starts the read pointer at
// random byte indices and advances it at random, checking after every step
// the fields shown against a bit-by-bit reading of the same bytes (MSB of a
// byte first, addresses wrapping at the end of the memory).
module tb_old_dict;
  import ofr_pkg::*;
  localparam int unsigned BYTES = 64;
  localparam int unsigned AW = $clog2(BYTES);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0;
  logic [AW-1:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic start = 0;
  logic [AW-1:0] start_idx = 0;
  logic advance = 0;
  logic [2:0] n_used = 0;
  operand_t ops [NUM_OF];
  old_dict #(.BYTES(BYTES)) dut (.clk, .rst_n, .we, .waddr, .wdata, .start, .start_idx, .advance, .n_used, .ops);

  logic [7:0] ref_mem [BYTES];
  int ptr;   // model bit pointer

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
    ptr = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      start = 0; advance = 0;
      if ($urandom_range(0, 7) == 0) begin
        start = 1; start_idx = AW'($urandom); ptr = int'(start_idx) * 8;
      end else if ($urandom_range(0, 1) == 0) begin
        advance = 1;
        n_used = 3'($urandom_range(0, 5)); ptr += 4 * int'(n_used);
      end
      @(negedge clk);
      start = 0; advance = 0;
      for (int f = 0; f < NUM_OF; f++) begin
        checks++;
        if (ops[f] != operand_t'(getbits(ptr + 4 * f, 4))) begin
          failures++;
          $display("it %0d ptr %0d op %0d got %h", it, ptr, f, ops[f]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
