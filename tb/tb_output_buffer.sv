// Self-checking test of output_buffer at its default size (1024 x 64 bits):
// random writes and reads against an array model, checking the one-cycle
// read latency and read-before-write on a same-address collision.
module tb_output_buffer;
  import lift_pkg::*;
  localparam int D = 1024;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [9:0] rd_addr = '0, wr_addr = '0;
  word_t rdata, wr_data = '0;
  int checks = 0, failures = 0;
  logic [63:0] model [D];
  logic [63:0] expect_q;
  bit pend = 0;

  output_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(i); wr_data = {$urandom, $urandom}; model[i] = wr_data;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expect_q) begin failures++; $display("FAIL: read %h exp %h", rdata, expect_q); end
      end
      rd_en = ($urandom % 2) != 0; rd_addr = 10'($urandom);
      wr_en = ($urandom % 2) != 0; wr_addr = (i % 7 == 0) ? rd_addr : 10'($urandom);
      wr_data = {$urandom, $urandom};
      pend = rd_en;
      expect_q = model[rd_addr];           // old data on collision
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
