// tb_operand_remapper: random tag sets against a step-by-step reference:
// a queue that is appended on each load and trimmed to four entries, read
// oldest first. Includes the worked example of three loads followed by
// tags naming queue positions 3, 3 and 2.
module tb_operand_remapper;
  import ofr_pkg::*;
  int checks = 0, failures = 0;

  tag_t     tags    [NUM_OF];
  operand_t old_ops [NUM_OF];
  operand_t mq      [MQ_DEPTH];
  logic [2:0] mq_count;
  operand_t mr      [NUM_MR];
  operand_t ops     [NUM_OF];
  logic [2:0] n_loads;
  logic map_err;

  operand_remapper dut (.tags, .old_ops, .mq, .mq_count, .mr, .ops, .n_loads, .map_err);

  operand_t exp_ops [NUM_OF];
  int exp_nl;
  bit exp_err;
  int n_load_tags = 0, n_mq_tags = 0, n_mr_tags = 0, n_err = 0;

  task automatic model();
    operand_t q [$];
    for (int i = 0; i < mq_count; i++) q.push_back(mq[i]);
    exp_nl = 0; exp_err = 0;
    for (int f = 0; f < NUM_OF; f++) begin
      exp_ops[f] = '0;
      if (tags[f] == 0) begin
        exp_ops[f] = old_ops[exp_nl];
        q.push_back(old_ops[exp_nl]);
        if (q.size() > MQ_DEPTH) void'(q.pop_front());
        exp_nl++;
        n_load_tags++;
      end else if (tags[f] <= MQ_DEPTH) begin
        n_mq_tags++;
        if (tags[f] <= q.size()) exp_ops[f] = q[tags[f] - 1];
        else exp_err = 1;
      end else begin
        n_mr_tags++;
        exp_ops[f] = mr[tags[f] - MQ_DEPTH - 1];
      end
    end
    if (exp_err) n_err++;
  endtask

  task automatic compare(int it);
    checks++;
    if (n_loads != 3'(exp_nl) || map_err != exp_err) begin
      failures++;
      $display("it %0d n_loads %0d/%0d err %0d/%0d", it, n_loads, exp_nl, map_err, exp_err);
    end
    if (!exp_err) for (int f = 0; f < NUM_OF; f++) begin
      checks++;
      if (ops[f] != exp_ops[f]) begin
        failures++;
        $display("it %0d OF%0d got %h exp %h", it, f + 2, ops[f], exp_ops[f]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed case: three loads into an empty queue, then tags naming
    // queue positions 3 and 2, which hold operands of this same instruction.
    foreach (mq[i]) mq[i] = '0;
    foreach (mr[i]) mr[i] = operand_t'(4'hE - i);
    mq_count = 0;
    tags = '{3'd0, 3'd0, 3'd0, 3'd3, 3'd2};
    old_ops = '{4'h1, 4'h0, 4'hA, 4'h0, 4'h0};
    #1;
    checks++;
    if (ops != '{4'h1, 4'h0, 4'hA, 4'hA, 4'h0} || n_loads != 3) begin
      failures++;
      $display("worked example mismatch");
    end
    // Random.
    for (int it = 0; it < 20000; it++) begin
      mq_count = 3'($urandom_range(0, MQ_DEPTH));
      foreach (mq[i]) mq[i] = operand_t'($urandom);
      foreach (mr[i]) mr[i] = operand_t'($urandom);
      foreach (old_ops[i]) old_ops[i] = operand_t'($urandom);
      foreach (tags[i]) tags[i] = ($urandom_range(0, 2) == 0) ? 3'd0 : tag_t'($urandom);
      #1;
      model();
      compare(it);
    end
    checks++;
    if (n_load_tags == 0 || n_mq_tags == 0 || n_mr_tags == 0 || n_err == 0) begin
      failures++;
      $display("tag kinds not all exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
