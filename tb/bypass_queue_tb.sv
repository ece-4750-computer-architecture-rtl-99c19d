// bypass_queue_tb: self-checking test of the bypass queue with one and
// with two entries.
//
// Random enqueue and dequeue traffic is checked against a queue model:
// messages leave in order, none is lost or duplicated, a message offered
// to an empty queue is visible on the output in the same cycle, and the
// queue refuses input exactly when all its entries are full.
module bypass_queue_tb;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        enq_val [2], enq_rdy [2], deq_val [2], deq_rdy [2];
  logic [15:0] enq_msg [2], deq_msg [2];

  bypass_queue #(.WIDTH(16), .NUM_ENTRIES(1)) q1 (
    .clk(clk), .reset(reset), .enq_val(enq_val[0]), .enq_rdy(enq_rdy[0]), .enq_msg(enq_msg[0]),
    .deq_val(deq_val[0]), .deq_rdy(deq_rdy[0]), .deq_msg(deq_msg[0]));
  bypass_queue #(.WIDTH(16), .NUM_ENTRIES(2)) q2 (
    .clk(clk), .reset(reset), .enq_val(enq_val[1]), .enq_rdy(enq_rdy[1]), .enq_msg(enq_msg[1]),
    .deq_val(deq_val[1]), .deq_rdy(deq_rdy[1]), .deq_msg(deq_msg[1]));

  logic [15:0] model [2][$];
  logic [15:0] next_msg [2];
  int          bypassed [2];

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    fork
      begin
        repeat (50000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int q = 0; q < 2; q++) begin
      enq_val[q] = 0; deq_rdy[q] = 0; enq_msg[q] = 0; next_msg[q] = 1; bypassed[q] = 0;
    end
    repeat (2) @(negedge clk);
    reset = 0;
    repeat (5000) begin
      @(negedge clk);
      for (int q = 0; q < 2; q++) begin
        enq_val[q] = ($urandom_range(99) < 60);
        enq_msg[q] = next_msg[q];
        deq_rdy[q] = ($urandom_range(99) < 50);
      end
      #1;
      for (int q = 0; q < 2; q++) begin
        check(enq_rdy[q] == (model[q].size() < q + 1), "enq_rdy is not-full");
        if (model[q].size() > 0)
          check(deq_val[q] && deq_msg[q] == model[q][0], "head of queue on output");
        else begin
          check(deq_val[q] == enq_val[q], "empty queue passes valid through");
          if (enq_val[q]) check(deq_msg[q] == enq_msg[q], "empty queue passes message through");
        end
      end
      @(posedge clk);
      for (int q = 0; q < 2; q++) begin
        if (enq_val[q] && enq_rdy[q]) begin
          model[q].push_back(enq_msg[q]);
          next_msg[q]++;
        end
        if (deq_val[q] && deq_rdy[q]) begin
          if (model[q].size() == 1 && enq_val[q] && enq_rdy[q]) bypassed[q]++;
          void'(model[q].pop_front());
        end
      end
    end
    check(bypassed[0] > 0 && bypassed[1] > 0, "same-cycle bypass happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
