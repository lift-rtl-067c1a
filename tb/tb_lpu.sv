// Self-checking test of one lightweight processing unit at its default
// configuration (4 banks / MAC arrays, 128-entry look-ahead FIFO, 8 vector
// slots, 7-cycle bank reads).  The testbench supplies the bank group's share
// of a random sparse matrix in CSC order, serves input-vector fetches from a
// memory model with latency and random refusals, and models the four DRAM
// banks.  After the SpMM it flushes all output rows with random back
// pressure and compares them with an independently computed result; then
// it runs a second SpMM on the cleared banks.  It also checks the MAC rate:
// every non-zero costs exactly 32 chunk read-modify-writes, and the arrays
// are busy exactly 32 cycles per pass.
module tb_lpu;
  import lift_pkg::*;
  import lift_tb_pkg::*;
  localparam int NB = 4, AW = 21, LAT = 7, RW = AW - CHUNK_W + 2;
  localparam int NROWS = 64;

  logic clk = 0, rst_n = 0;
  logic nz_valid = 0, nz_ready;
  nz_t nz_data = '0;
  logic fetch_valid, fetch_ready, vec_valid;
  vid_t fetch_col;
  logic [2:0] fetch_slot, vec_slot;
  logic [CHUNK_W-1:0] vec_chunk, out_chunk;
  word_t vec_data, out_data;
  logic [NB-1:0] bank_rd_en, bank_wr_en;
  logic [AW-1:0] bank_rd_addr [NB], bank_wr_addr [NB];
  word_t bank_rdata [NB], bank_wr_data [NB];
  logic flush_start = 0, out_valid, out_ready = 0, idle;
  logic [RW:0] flush_count = '0;
  logic [RW-1:0] out_row;
  logic [4:0] events;
  logic [0:0] rsp_id;

  lpu dut (.*);
  vec_mem_model #(.IDW(1), .SLOT_W(3), .LAT(10), .QDEPTH(4), .STALL_PCT(20)) mem (
    .clk, .req_valid(fetch_valid && rst_n), .req_ready(fetch_ready), .req_id(1'b0),
    .req_col(fetch_col), .req_slot(fetch_slot),
    .rsp_valid(vec_valid), .rsp_id(rsp_id), .rsp_slot(vec_slot), .rsp_chunk(vec_chunk), .rsp_data(vec_data)
  );
  for (genvar b = 0; b < NB; b++) begin : g_bank
    dram_bank_model #(.AW(AW), .LAT(LAT)) bank (
      .clk, .rd_en(bank_rd_en[b]), .rd_addr(bank_rd_addr[b]), .rdata(bank_rdata[b]),
      .wr_en(bank_wr_en[b]), .wr_addr(bank_wr_addr[b]), .wr_data(bank_wr_data[b])
    );
  end
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
    if (bank_rd_en != '0 && !dut.u_ctrl.f_issuing) begin
      rd_cycles++;
      rd_ops += $countones(bank_rd_en);
    end
  end

  logic [63:0] expect_out [NROWS][NCHUNK];

  task automatic run_layer(int ncols, int seed_col, int max_deg);
    nz_t stream[$];
    int nnz = 0, p0 = ev_cnt[0], rc0 = rd_cycles, ro0 = rd_ops;
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < NCHUNK; c++) expect_out[r][c] = '0;
    for (int c = 0; c < ncols; c++) begin
      int n, rows[$];
      n = 1 + $urandom % max_deg;
      for (int k = 0; k < n; k++) begin
        int r; bit dup;
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
    repeat (LAT + 4) @(negedge clk);
    check(idle, "idle after flush");
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < NCHUNK; c++)
        check(g_peek(r % NB, ((r / NB) << CHUNK_W) | c) == 64'd0, "bank cleared");
  endtask

  function automatic logic [63:0] g_peek(int b, int unsigned a);
    case (b)
      0: return g_bank[0].bank.peek(a);
      1: return g_bank[1].bank.peek(a);
      2: return g_bank[2].bank.peek(a);
      default: return g_bank[3].bank.peek(a);
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 5; k++) ev_cnt[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_layer(120, 0, 8);
    run_layer(60, 5000, 3);
    $display("passes=%0d conflicts=%0d vec_waits=%0d noslot=%0d flushes=%0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4]);
    check(ev_cnt[1] > 0 && ev_cnt[2] > 0 && ev_cnt[4] == 2, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
