// tb_majority_regs: reset value, random writes to the three majority
// registers (and to the unused index 3, which must change nothing), with all
// three read back after every clock.
module tb_majority_regs;
  import ofr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [1:0] widx;
  operand_t wdata;
  operand_t mr [NUM_MR];
  operand_t model [NUM_MR];

  majority_regs dut (.clk, .rst_n, .we, .widx, .wdata, .mr);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; widx = 0; wdata = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_MR; i++) begin
        checks++;
        if (mr[i] != model[i]) begin
          failures++;
          $display("it %0d mr%0d got %h exp %h", it, i, mr[i], model[i]);
        end
      end
      we    = $urandom_range(0, 1);
      widx  = 2'($urandom_range(0, 3));
      wdata = operand_t'($urandom);
      @(posedge clk);
      if (we && widx < NUM_MR) model[widx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
