// Self-checking test of spmm_controller at its default configuration (4 MAC
// arrays, 8 vector slots, store latency 7).  The testbench stands in for the
// look-ahead FIFO (pre-tagged non-zeros, vectors of a column become loaded
// after a random delay), for the MAC arrays (every issued job is applied to
// a model store using the broadcast slot and chunk), and for the stores
// during flush (reads answered 7 cycles later).  Checks:
//  * the model store equals an independently computed SpMM;
//  * every pass broadcasts chunks 0..31 in 32 consecutive cycles;
//  * the number of passes equals the greedy split of each column at the
//    first repeated MAC array;
//  * every column's slot is released once, after its last pass;
//  * the flush returns every row and chunk with the right data, clears the
//    store, and survives random back pressure.
module tb_spmm_controller;
  import lift_pkg::*;
  import lift_tb_pkg::*;
  localparam int NA = 4, NS = 8, LAT = 7, AW = 21, NROWS = 40, NCOLS = 60;
  localparam int RW = AW - CHUNK_W + 2;

  logic clk = 0, rst_n = 0;
  logic hd_valid = 0, hd_pop;
  nz_t hd_data = '0;
  logic [2:0] hd_tag = '0, free_slot, vb_rd_slot;
  logic [NS-1:0] slot_loaded = '0;
  logic free_valid, vb_rd_en;
  logic [CHUNK_W-1:0] vb_rd_chunk, out_chunk;
  logic [NA-1:0] job_issue, fl_rd_en, fl_wr_en;
  logic [AW-1:0] job_addr [NA];
  elem_t job_val [NA];
  logic [AW-1:0] fl_rd_addr, fl_wr_addr;
  word_t acc_rdata [NA];
  logic flush_start = 0, out_valid, out_ready = 0;
  logic [RW:0] flush_count = '0;
  logic [RW-1:0] out_row;
  word_t out_data;
  logic idle, ev_pass, ev_conflict, ev_vec_wait, ev_flush_done;

  spmm_controller dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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

  // stimulus and reference
  typedef struct { nz_t e; int tag; } ent_t;
  ent_t q[$];
  logic [63:0] store [NA][int unsigned];
  logic [63:0] expect_out [NROWS][NCHUNK];
  int slot_col [NS];
  int exp_passes = 0, passes = 0, frees = 0, conflicts = 0, waits = 0;
  int col_last_tag [$];

  function automatic logic [63:0] rd(int a, int unsigned ad);
    return store[a].exists(ad) ? store[a][ad] : 64'd0;
  endfunction

  // ---- model of the MAC arrays and stores ----
  logic [63:0] rpipe [NA][LAT];
  int bcast_run = 0;
  int last_chunk = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int a = 0; a < NA; a++) begin
        if (job_issue[a]) begin
          logic [63:0] w, x;
          w = rd(a, job_addr[a]);
          x = vec_chunk(slot_col[vb_rd_slot], int'(vb_rd_chunk));
          for (int l = 0; l < 4; l++)
            w[l*16 +: 16] = ref_mac(shortint'(w[l*16 +: 16]), job_val[a], shortint'(x[l*16 +: 16]));
          store[a][job_addr[a]] = w;
          check(job_addr[a][CHUNK_W-1:0] == vb_rd_chunk, "job chunk equals broadcast chunk");
        end
        for (int k = LAT - 1; k > 0; k--) rpipe[a][k] <= rpipe[a][k-1];
        rpipe[a][0] <= fl_rd_en[a] ? rd(a, fl_rd_addr) : 64'hBAD0_BAD0_BAD0_BAD0;
        if (fl_wr_en[a]) store[a][fl_wr_addr] = 64'd0;
      end
      // broadcast runs must be 32 consecutive chunks
      if (vb_rd_en) begin
        check(int'(vb_rd_chunk) == last_chunk + 1, "consecutive chunks");
        last_chunk = (vb_rd_chunk == CHUNK_W'(NCHUNK - 1)) ? -1 : int'(vb_rd_chunk);
      end else check(last_chunk == -1, "broadcast not interrupted");
      if (ev_pass) passes++;
      if (ev_conflict) conflicts++;
      if (ev_vec_wait) waits++;
      if (free_valid) begin
        frees++;
        check(col_last_tag.size() > 0 && int'(free_slot) == col_last_tag[0], "slot released after its column");
        if (col_last_tag.size() > 0) void'(col_last_tag.pop_front());
        slot_loaded[free_slot] <= 1'b0;
      end
    end
  end
  for (genvar a = 0; a < NA; a++) assign acc_rdata[a] = rpipe[a][LAT-1];

  initial begin
    // build columns; rows 0..NROWS-1, array = row % 4
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < NCHUNK; c++) expect_out[r][c] = '0;
    for (int c = 0; c < NCOLS; c++) begin
      int n, rows[$], used[NA];
      rows.delete();
      n = 1 + $urandom % 6;
      if (c == 0) n = 4;
      for (int k = 0; k < n; k++) begin
        int r;
        if (c == 0) r = k;                       // one row per array: one pass
        else if (c == 1) r = 4 * k;              // all on array 0: n passes
        else begin
          bit dup;
          do begin
            r = $urandom % NROWS;
            dup = 0;
            foreach (rows[j]) if (rows[j] == r) dup = 1;
          end while (dup);
        end
        rows.push_back(r);
      end
      // greedy pass split
      for (int a = 0; a < NA; a++) used[a] = 0;
      exp_passes++;
      foreach (rows[k]) begin
        if (used[rows[k] % NA]) begin
          exp_passes++;
          for (int a = 0; a < NA; a++) used[a] = 0;
        end
        used[rows[k] % NA] = 1;
      end
      foreach (rows[k]) begin
        ent_t en;
        en.e = '0; en.e.col = vid_t'(500 + c); en.e.row = vid_t'(rows[k]);
        en.e.val = elem_t'(($urandom % 512) - 256); en.e.last = (k == rows.size() - 1);
        en.tag = c % NS;
        q.push_back(en);
        for (int ch = 0; ch < NCHUNK; ch++) begin
          logic [63:0] x;
          x = vec_chunk(500 + c, ch);
          for (int l = 0; l < 4; l++)
            expect_out[rows[k]][ch][l*16 +: 16] = ref_mac(shortint'(expect_out[rows[k]][ch][l*16 +: 16]), en.e.val, shortint'(x[l*16 +: 16]));
        end
      end
      col_last_tag.push_back(c % NS);
    end
    $display("built %0d entries, %0d passes expected", q.size(), exp_passes);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // feed the head port
    while (q.size() > 0) begin
      @(negedge clk);
      hd_valid = 1; hd_data = q[0].e; hd_tag = 3'(q[0].tag);
      if (!slot_loaded[q[0].tag] && ($urandom % 10 == 0)) begin
        slot_col[q[0].tag] = int'(q[0].e.col);
        slot_loaded[q[0].tag] = 1'b1;
      end
      #1;
      if (hd_pop) void'(q.pop_front());
    end
    @(negedge clk);
    hd_valid = 0;
    $display("fed at %0t", $time);
    while (!idle) @(negedge clk);
    check(passes == exp_passes, $sformatf("pass count %0d expected %0d", passes, exp_passes));
    check(frees == NCOLS, "one release per column");
    check(conflicts > 0 && waits > 0, "conflict and vector wait exercised");
    // compare the store
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < NCHUNK; c++)
        check(rd(r % NA, ((r / NA) << CHUNK_W) | c) == expect_out[r][c], $sformatf("row %0d chunk %0d", r, c));
    // flush with random back pressure
    flush_count = (RW+1)'(NROWS);
    flush_start = 1;
    @(negedge clk);
    flush_start = 0;
    begin
      int got = 0, nxt_row = 0, nxt_chunk = 0, cyc = 0;
      bit done_seen = 0;
      while (!done_seen || out_valid) begin
        out_ready = ($urandom % 4) != 0;
        #1;
        if (ev_flush_done) done_seen = 1;
        if (out_valid && out_ready) begin
          check(int'(out_row) == nxt_row && int'(out_chunk) == nxt_chunk, "flush order");
          check(out_data == expect_out[out_row][out_chunk], "flush data");
          got++;
          nxt_chunk++;
          if (nxt_chunk == NCHUNK) begin nxt_chunk = 0; nxt_row++; end
        end
        @(negedge clk);
        cyc++;
      end
      check(got == NROWS * NCHUNK, "every chunk flushed");
      for (int r = 0; r < NROWS; r++)
        for (int c = 0; c < NCHUNK; c++)
          check(rd(r % NA, ((r / NA) << CHUNK_W) | c) == 64'd0, "cleared by flush");
      $display("passes=%0d conflicts=%0d vec_waits=%0d flush_cycles=%0d", passes, conflicts, waits, cyc);
    end
    check(idle, "idle after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
