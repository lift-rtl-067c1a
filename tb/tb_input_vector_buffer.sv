// Self-checking test of input_vector_buffer with 8 slots (the LPU size):
// allocates every slot (checking lowest-free order and alloc_ok dropping
// when all are taken), fills slots chunk by chunk in random interleaving
// (loaded must rise exactly with the last chunk), reads every chunk back
// with the one-cycle read latency, then frees slots and re-allocates.
module tb_input_vector_buffer;
  import lift_pkg::*;
  import lift_tb_pkg::*;
  localparam int NS = 8;
  logic clk = 0, rst_n = 0;
  logic alloc_ok, alloc_take = 0, free_valid = 0, wr_valid = 0, rd_en = 0;
  logic [2:0] alloc_slot, free_slot = '0, wr_slot = '0, rd_slot = '0;
  logic [CHUNK_W-1:0] wr_chunk = '0, rd_chunk = '0;
  word_t wr_data = '0, rd_data;
  logic [NS-1:0] loaded;
  int checks = 0, failures = 0;

  input_vector_buffer #(.NSLOT(NS)) dut (.*);
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
    int next_chunk [NS];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      // allocate all slots
      for (int s = 0; s < NS; s++) begin
        @(negedge clk);
        check(alloc_ok && alloc_slot == 3'(s), "lowest free slot");
        alloc_take = 1;
      end
      @(negedge clk);
      alloc_take = 0;
      check(!alloc_ok, "no slot left");
      check(loaded == '0, "nothing loaded after alloc");
      // fill in random interleaving; column of slot s = 100*round + s
      for (int s = 0; s < NS; s++) next_chunk[s] = 0;
      for (int n = 0; n < NS * NCHUNK; n++) begin
        int s;
        do s = $urandom % NS; while (next_chunk[s] == NCHUNK);
        @(negedge clk);
        wr_valid = 1; wr_slot = 3'(s); wr_chunk = CHUNK_W'(next_chunk[s]);
        wr_data = vec_chunk(100 * round + s, next_chunk[s]);
        next_chunk[s]++;
        @(negedge clk);
        wr_valid = 0;
        check(loaded[s] == (next_chunk[s] == NCHUNK), "loaded on last chunk");
      end
      // read back
      for (int s = 0; s < NS; s++)
        for (int c = 0; c < NCHUNK; c++) begin
          @(negedge clk);
          rd_en = 1; rd_slot = 3'(s); rd_chunk = CHUNK_W'(c);
          @(negedge clk);
          rd_en = 0;
          check(rd_data == vec_chunk(100 * round + s, c), "read back");
        end
      // free all slots in a shuffled order
      for (int s = NS - 1; s >= 0; s--) begin
        @(negedge clk);
        free_valid = 1; free_slot = 3'(s);
        @(negedge clk);
        free_valid = 0;
        check(!loaded[s] && alloc_ok && alloc_slot == 3'(s), "freed slot is lowest free");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
