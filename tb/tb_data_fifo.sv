// Self-checking test of the data buffer (4-word FIFO).
//
// Random pushes and pops, never popping an empty buffer or pushing a full one
// without a pop, checked against a queue kept here: head must equal the
// oldest word whenever the buffer is not empty, and empty/full must match the
// queue's size. It also streams whole 4-word blocks through with a push and a
// pop in every clock, as the filter does when one block leaves while the next
// arrives. Counts full, empty and simultaneous push/pop clocks and fails if
// one never happened.
//
// The 4-word depth is the architecture's; the push/pop handshake checked here
// is this design's own.
module tb_data_fifo;
  import dbf_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic  rst, push, pop, empty, full;
  word_t din, head;

  data_fifo #(.DEPTH(4)) dut (.*);

  word_t q[$];
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both = 0;

  task automatic check_state();
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == 4) ||
        (q.size() != 0 && head != q[0])) begin
      failures++;
      if (failures < 10)
        $display("mismatch: size %0d empty %0d full %0d head %h", q.size(), empty, full, head);
    end
    if (q.size() == 4) n_full++;
    if (q.size() == 0) n_empty++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; push = 0; pop = 0; din = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      check_state();
      pop  = (q.size() != 0) && ($urandom_range(0, 1) != 0);
      push = ((q.size() < 4) || pop) && ($urandom_range(0, 1) != 0);
      din  = $urandom;
      if (push && pop) n_both++;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    // streaming: one block in while another goes out
    for (int it = 0; it < 64; it++) begin
      @(negedge clk);
      check_state();
      pop  = (q.size() == 4);
      push = 1;
      din  = $urandom;
      if (pop) begin void'(q.pop_front()); n_both++; end
      q.push_back(din);
    end
    @(negedge clk);
    check_state();
    push = 0; pop = 0;
    $display("full %0d, empty %0d, push+pop %0d", n_full, n_empty, n_both);
    checks++;
    if (n_full == 0 || n_empty == 0 || n_both == 0) begin
      failures++;
      $display("a buffer state was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
