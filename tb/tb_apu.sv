// Self-checking test of the auxiliary processing unit at its default
// configuration (64 MAC arrays of 4 lanes, 1024-entry sparse matrix buffer,
// 128-entry look-ahead FIFO, 64 vector slots, 64 output buffers of 1024
// words).  An initial flush of all 2048 output rows clears the buffers.
// Then the testbench streams a random sparse matrix whose columns are wide
// (high-degree rows share many neighbours), serves input-vector fetches from
// a memory model with latency and random refusals, flushes the used rows
// with random back pressure and compares them with an independently
// computed result.  It checks the MAC rate (32 chunk updates per non-zero,
// 32 busy cycles per pass) and that a column touching every array once is
// done in one pass.
module tb_apu;
  import lift_pkg::*;
  import lift_tb_pkg::*;
  localparam int NA = 64, AW = 10, RW = AW - CHUNK_W + 6;
  localparam int NROWS = 256;

  logic clk = 0, rst_n = 0;
  logic nz_valid = 0, nz_ready;
  nz_t nz_data = '0;
  logic fetch_valid, fetch_ready, vec_valid;
  vid_t fetch_col;
  logic [5:0] fetch_slot, vec_slot;
  logic [CHUNK_W-1:0] vec_chunk, out_chunk;
  word_t vec_data, out_data;
  logic flush_start = 0, out_valid, out_ready = 0, idle;
  logic [RW:0] flush_count = '0;
  logic [RW-1:0] out_row;
  logic [4:0] events;
  logic [0:0] rsp_id;

  apu dut (.*);
  vec_mem_model #(.IDW(1), .SLOT_W(6), .LAT(10), .QDEPTH(4), .STALL_PCT(20)) mem (
    .clk, .req_valid(fetch_valid && rst_n), .req_ready(fetch_ready), .req_id(1'b0),
    .req_col(fetch_col), .req_slot(fetch_slot),
    .rsp_valid(vec_valid), .rsp_id(rsp_id), .rsp_slot(vec_slot), .rsp_chunk(vec_chunk), .rsp_data(vec_data)
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ev_cnt [5];
  int rd_cycles = 0, rd_ops = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 5; k++) if (events[k]) ev_cnt[k]++;
    if (dut.job_issue != '0) begin
      rd_cycles++;
      rd_ops += $countones(dut.job_issue);
    end
  end

  logic [63:0] expect_out [NROWS][NCHUNK];

  task automatic run_layer(int ncols, int seed_col, int max_deg, bit full_col);
    nz_t stream[$];
    int nnz = 0, p0 = ev_cnt[0], rc0 = rd_cycles, ro0 = rd_ops;
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < NCHUNK; c++) expect_out[r][c] = '0;
    for (int c = 0; c < ncols; c++) begin
      int n, rows[$];
      n = 1 + $urandom % max_deg;
      if (full_col && c == 0) n = NA;
      for (int k = 0; k < n; k++) begin
        int r; bit dup;
        if (full_col && c == 0) begin
          rows.push_back(k + NA);   // one row on every array
          continue;
        end
        do begin
          r = $urandom % NROWS; dup = 0;
          foreach (rows[j]) if (rows[j] == r) dup = 1;
        end while (dup);
        rows.push_back(r);
      end
      foreach (rows[k]) begin
        nz_t e;
        e = '0; e.col = vid_t'(seed_col + c); e.row = vid_t'(rows[k]);
        e.val = elem_t'(($urandom % 512) - 256); e.last = (k == n - 1);
        stream.push_back(e);
        nnz++;
        for (int ch = 0; ch < NCHUNK; ch++) begin
          logic [63:0] x;
          x = lift_tb_pkg::vec_chunk(seed_col + c, ch);
          for (int l = 0; l < 4; l++)
            expect_out[rows[k]][ch][l*16 +: 16] = ref_mac(shortint'(expect_out[rows[k]][ch][l*16 +: 16]), e.val, shortint'(x[l*16 +: 16]));
        end
      end
    end
    // stream the non-zeros
    while (stream.size() > 0) begin
      @(negedge clk);
      nz_valid = ($urandom % 5) != 0;
      nz_data  = stream[0];
      #1;
      if (nz_valid && nz_ready) void'(stream.pop_front());
    end
    @(negedge clk);
    nz_valid = 0;
    repeat (2) @(negedge clk);
    while (!idle) @(negedge clk);
    check(rd_ops - ro0 == nnz * NCHUNK, "32 chunk updates per non-zero");
    check(rd_cycles - rc0 == (ev_cnt[0] - p0) * NCHUNK, "32 busy cycles per pass");
    // flush
    flush_count = (RW+1)'(NROWS);
    flush_start = 1;
    @(negedge clk);
    flush_start = 0;
    begin
      int got = 0;
      while (got < NROWS * NCHUNK) begin
        out_ready = ($urandom % 3) != 0;
        #1;
        if (out_valid && out_ready) begin
          check(int'(out_row) == got / NCHUNK && int'(out_chunk) == got % NCHUNK, "flush order");
          check(out_data == expect_out[out_row][out_chunk], $sformatf("row %0d chunk %0d", out_row, out_chunk));
          got++;
        end
        @(negedge clk);
      end
      out_ready = 0;
    end
    repeat (4) @(negedge clk);
    check(idle, "idle after flush");
  endtask

  initial begin
    for (int k = 0; k < 5; k++) ev_cnt[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // clear the output buffers: flush all 2048 rows, discarding the data
    flush_count = (RW+1)'(2048);
    flush_start = 1;
    @(negedge clk);
    flush_start = 0;
    out_ready = 1;
    repeat (2) @(negedge clk);
    while (!idle || out_valid) @(negedge clk);
    out_ready = 0;
    begin
      int p0;
      p0 = ev_cnt[0];
      run_layer(1, 100, 1, 1);
      check(ev_cnt[0] - p0 == 1, "a column spanning all 64 arrays takes one pass");
    end
    run_layer(150, 0, 80, 0);
    run_layer(60, 5000, 3, 0);
    $display("passes=%0d conflicts=%0d vec_waits=%0d noslot=%0d flushes=%0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4]);
    check(ev_cnt[1] > 0 && ev_cnt[2] > 0 && ev_cnt[4] == 4, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
