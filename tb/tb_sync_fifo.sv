// Self-checking test of sync_fifo at its default size (1024 x 64 bits, the
// sparse matrix buffer): random pushes and pops against a queue model, then
// fill to full and check that in_ready drops exactly at DEPTH entries.
module tb_sync_fifo;
  localparam int W = 64, D = 1024;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = {$urandom, $urandom};
      out_ready = ($urandom % 2) != 0;
      // outputs depend on state only: evaluate this cycle's handshakes now
      if (out_valid && out_ready) begin
        check(out_data == model[0], "head data");
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
      check(32'(count) == model.size() - ((in_valid && in_ready) ? 1 : 0) + ((out_valid && out_ready) ? 1 : 0), "count");
    end
    // drain
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    while (model.size() > 0) begin
      check(out_valid && out_data == model[0], "drain data");
      void'(model.pop_front());
      @(negedge clk);
    end
    check(!out_valid && count == 0, "empty after drain");
    out_ready = 0;
    // fill
    for (int i = 0; i < D; i++) begin
      in_valid = 1; in_data = W'(i);
      check(in_ready, "ready while not full");
      @(posedge clk); @(negedge clk);
    end
    check(!in_ready && count == D, "full at DEPTH");
    in_valid = 0; out_ready = 1;
    for (int i = 0; i < D; i++) begin
      check(out_data == W'(i), "order after fill");
      @(posedge clk); @(negedge clk);
    end
    check(!out_valid, "empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
