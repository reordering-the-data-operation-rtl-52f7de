// Self-checking test of the internal SRAM (one read port, one write port).
//
// Fills all words, then issues random reads and writes, often in the same
// clock and to the same address, and compares every read with a model array
// kept here: rd_data must show the addressed word one clock after rd_en, must
// return the old word when the same address is written in that clock, and
// must hold its value while rd_en is low. Counts same-clock read/write pairs,
// same-address collisions and hold cycles, and fails if one never happened.
//
// The one-read-one-write organisation is the architecture's; the read latency
// and collision rule checked here are this design's own choices.
module tb_dbf_sram;
  import dbf_pkg::*;

  localparam int unsigned DEPTH = 48;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  word_t         rd_data, wr_data;

  dbf_sram #(.DEPTH(DEPTH)) dut (.*);

  word_t model [DEPTH];
  word_t expect_q;
  bit    expect_v = 0;
  int checks = 0, failures = 0;
  int n_both = 0, n_collide = 0, n_hold = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = $urandom;
      model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      // check the result of the previous clock
      if (expect_v) begin
        checks++;
        if (rd_data != expect_q) begin
          failures++;
          if (failures < 10) $display("read mismatch: got %h expected %h", rd_data, expect_q);
        end
      end
      rd_en   = $urandom_range(0, 3) != 0;
      wr_en   = $urandom_range(0, 1) != 0;
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_addr = ($urandom_range(0, 7) == 0) ? rd_addr : AW'($urandom_range(0, DEPTH - 1));
      wr_data = $urandom;
      if (rd_en) begin expect_q = model[rd_addr]; expect_v = 1; end
      else if (expect_v) n_hold++;
      if (rd_en && wr_en) n_both++;
      if (rd_en && wr_en && rd_addr == wr_addr) n_collide++;
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("read+write %0d, same address %0d, hold %0d", n_both, n_collide, n_hold);
    checks++;
    if (n_both == 0 || n_collide == 0 || n_hold == 0) begin
      failures++;
      $display("an access pattern was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
