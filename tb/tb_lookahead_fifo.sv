// Self-checking test of lookahead_fifo at its default size (128 entries,
// 3-bit tags): random pushes, look-ahead advances with random tags and head
// pops against a model.  Checks that the look-ahead port shows the oldest
// entry not yet passed, that the head shows only passed entries together
// with the tag given when they were passed, and that in_ready drops at 128.
module tb_lookahead_fifo;
  localparam int W = 64, D = 128, TW = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, la_valid, la_advance = 0, hd_valid, hd_pop = 0;
  logic [W-1:0] in_data = '0, la_data, hd_data;
  logic [TW-1:0] la_tag = '0, hd_tag;
  int checks = 0, failures = 0;
  logic [W-1:0] mq[$];      // entries not yet popped, oldest first
  logic [TW-1:0] tq[$];     // tags of passed entries not yet popped
  int passed = 0;           // entries of mq already passed by the look-ahead pointer
  bit saw_full = 0;

  lookahead_fifo dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int phase;
      @(negedge clk);
      phase = (i / 2000) % 2;   // alternate between filling and draining
      in_valid   = ($urandom % 100) < (phase == 0 ? 80 : 30);
      in_data    = {$urandom, $urandom};
      la_advance = ($urandom % 100) < (phase == 0 ? 30 : 70);
      la_tag     = TW'($urandom);
      hd_pop     = ($urandom % 100) < (phase == 0 ? 25 : 70);
      check(in_ready == (mq.size() < D), "in_ready");
      if (!in_ready) saw_full = 1;
      check(la_valid == (passed < mq.size()), "la_valid");
      if (la_valid) check(la_data == mq[passed], "la_data");
      check(hd_valid == (passed > 0), "hd_valid");
      if (hd_valid) check(hd_data == mq[0] && hd_tag == tq[0], "head data/tag");
      // model update for this cycle's edge
      if (hd_pop && hd_valid) begin
        void'(mq.pop_front()); void'(tq.pop_front()); passed--;
      end
      if (la_advance && la_valid) begin
        tq.push_back(la_tag); passed++;
      end
      if (in_valid && in_ready) mq.push_back(in_data);
    end
    check(saw_full, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
