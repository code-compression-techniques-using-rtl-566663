// tb_mapping_queue: random pushes of 0..5 operands per clock, with clears,
// against a reference queue that appends and pops from the front when it
// holds more than four entries. Checks every position and the fill count.
module tb_mapping_queue;
  import ofr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear;
  logic [2:0] push_n;
  operand_t push_val [NUM_OF];
  operand_t entry [MQ_DEPTH];
  logic [2:0] count;

  mapping_queue dut (.clk, .rst_n, .clear, .push_n, .push_val, .entry, .count);

  operand_t model [$];
  int overflows = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; push_n = 0;
    foreach (push_val[i]) push_val[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      clear  = ($urandom_range(0, 19) == 0);
      push_n = 3'($urandom_range(0, 5));
      foreach (push_val[i]) push_val[i] = operand_t'($urandom);
      @(posedge clk);
      if (clear) model.delete();
      else for (int k = 0; k < push_n; k++) begin
        model.push_back(push_val[k]);
        if (model.size() > MQ_DEPTH) begin void'(model.pop_front()); overflows++; end
      end
      #1;
      checks++;
      if (count != 3'(model.size())) begin
        failures++;
        $display("it %0d count %0d exp %0d", it, count, model.size());
      end
      for (int i = 0; i < model.size(); i++) begin
        checks++;
        if (entry[i] != model[i]) begin
          failures++;
          $display("it %0d pos %0d got %h exp %h", it, i + 1, entry[i], model[i]);
        end
      end
    end
    checks++;
    if (overflows == 0) begin failures++; $display("no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
