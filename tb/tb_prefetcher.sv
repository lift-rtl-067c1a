// Self-checking test of the prefetcher (8 slots).  The testbench plays the
// look-ahead FIFO (a stream of CSC non-zeros, columns of 1 to 5 entries),
// the slot allocator of the input vector buffer (lowest free slot, slots
// released at random) and the fetch channel (random ready).  Checks: one
// fetch per column with that column's index, into the slot being claimed;
// every non-zero tagged with its column's slot; nothing advances past a new
// column without a slot and an accepted fetch; ev_noslot seen.
module tb_prefetcher;
  import lift_pkg::*;
  logic clk = 0, rst_n = 0;
  logic la_valid = 0, la_advance, alloc_ok, alloc_take, fetch_valid, fetch_ready = 0, ev_noslot;
  nz_t la_data = '0;
  logic [2:0] la_tag, alloc_slot, fetch_slot;
  vid_t fetch_col;
  int checks = 0, failures = 0;
  logic [7:0] busy = '0;
  nz_t stream[$];
  int  col_of_slot [8];
  int  noslot_seen = 0, fetches = 0, columns = 0;

  prefetcher #(.NSLOT(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_comb begin
    alloc_ok = 1'b0; alloc_slot = '0;
    for (int s = 7; s >= 0; s--) if (!busy[s]) begin alloc_ok = 1'b1; alloc_slot = 3'(s); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit in_col = 0;
    int cur = -1;
    int take_slot = -1;
    // build a stream of 300 columns
    for (int c = 0; c < 300; c++) begin
      int n;
      n = 1 + $urandom % 5;
      for (int k = 0; k < n; k++) begin
        nz_t e;
        e = '0; e.col = vid_t'(1000 + c); e.row = vid_t'($urandom % 64);
        e.val = elem_t'($urandom); e.last = (k == n - 1);
        stream.push_back(e);
      end
    end
    columns = 300;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (stream.size() > 0) begin
      @(negedge clk);
      // the slot claimed at the last edge becomes busy
      if (take_slot >= 0) busy[take_slot] = 1'b1;
      take_slot = -1;
      // random slot release
      if ($urandom % 6 == 0) begin
        int s;
        s = $urandom % 8;
        if (!(in_col && s == cur)) busy[s] = 1'b0;
      end
      la_valid    = ($urandom % 4) != 0;
      la_data     = stream[0];
      fetch_ready = ($urandom % 3) != 0;
      #1;
      if (ev_noslot) noslot_seen++;
      check(!(fetch_valid && in_col), "fetch only at a column start");
      if (!in_col && la_valid)
        check(fetch_valid == alloc_ok, "fetch requested when a slot is free");
      if (fetch_valid) check(fetch_col == la_data.col && fetch_slot == alloc_slot, "fetch col/slot");
      check(alloc_take == (fetch_valid && fetch_ready), "alloc only on accepted fetch");
      if (!la_valid) check(!la_advance, "no advance without entry");
      if (la_valid && in_col) check(la_advance && la_tag == 3'(cur), "tag inside a column");
      if (la_valid && !in_col) check(la_advance == (fetch_valid && fetch_ready), "advance at column start");
      if (la_advance) begin
        if (!in_col) begin
          check(la_tag == alloc_slot, "tag of new column");
          cur = int'(alloc_slot); take_slot = cur;
          col_of_slot[cur] = int'(la_data.col);
          fetches++;
        end
        check(col_of_slot[la_tag] == int'(la_data.col), "tag matches the column's slot");
        in_col = !la_data.last;
        void'(stream.pop_front());
      end
    end
    check(fetches == columns, "one fetch per column");
    check(noslot_seen > 0, "slot exhaustion exercised");
    $display("fetches=%0d noslot_cycles=%0d", fetches, noslot_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
