// Stimulus, memory models and checking for the end-to-end tests of
// lift_top (tb_lift_top, tb_lift_top_full,
// tb_lift_top_cora).  Its ports mirror lift_top's.
//
// Workload: one aggregation step out = A * (XW) of a random undirected graph
// with NV vertices, self loops, NHUB hubs joined to many vertices, and
// random edge weights.  With NE > 0 the random chords are drawn until the
// graph has NE directed edges, to match a given dataset's size.  Mapping (done here, as software would):
//   * capabilities: capA = 256 MACs for the APU, capL = 512 MACs for the
//     lightweight units together (32 units of 16 MACs, also when fewer units
//     are instantiated, so that the APU's share stays the design's);
//   * hubs for the APU: vertices taken in order of falling degree while the
//     edges already taken stay at or below capA / (capA + NL*capL) of all
//     edges, and at most APU_ROWS of them (what the APU's output buffers
//     hold); the degree threshold is the degree of the last one taken;
//   * the other vertices go to the lightweight units by a bounded
//     depth-first search (depth 4) that fills each unit up to
//     edges * capL / ((capL + capA) * NL) before moving on.
// Each unit's share is streamed in CSC order with unit-local row numbers;
// lightweight unit 0 starts HEAD_START cycles before the others.
module lift_top_driver
  import lift_pkg::*;
  import lift_tb_pkg::*;
#(
  parameter int NL   = 4,
  parameter int NV   = 400,
  parameter int NHUB = 6,
  parameter int NE   = 0      // >0: add random edges until the adjacency lists
                              // hold at least NE entries (directed count)
) (
  input  logic                     clk,
  output logic                     rst_n,
  output logic [NL-1:0]            lpu_nz_valid,
  input  logic [NL-1:0]            lpu_nz_ready,
  output nz_t                      lpu_nz_data [NL],
  output logic                     apu_nz_valid,
  input  logic                     apu_nz_ready,
  output nz_t                      apu_nz_data,
  input  logic                     mem_req_valid,
  output logic                     mem_req_ready,
  input  logic [$clog2(NL+1)-1:0]  mem_req_id,
  input  vid_t                     mem_req_col,
  input  logic [5:0]               mem_req_slot,
  output logic                     mem_rsp_valid,
  output logic [$clog2(NL+1)-1:0]  mem_rsp_id,
  output logic [5:0]               mem_rsp_slot,
  output logic [CHUNK_W-1:0]       mem_rsp_chunk,
  output word_t                    mem_rsp_data,
  input  logic [3:0]               bank_rd_en   [NL],
  input  logic [20:0]              bank_rd_addr [NL][4],
  output word_t                    bank_rdata   [NL][4],
  input  logic [3:0]               bank_wr_en   [NL],
  input  logic [20:0]              bank_wr_addr [NL][4],
  input  word_t                    bank_wr_data [NL][4],
  output logic                     flush_start,
  output logic [18:0]              lpu_flush_count [NL],
  output logic [11:0]              apu_flush_count,
  input  logic [NL-1:0]            lpu_out_valid,
  output logic [NL-1:0]            lpu_out_ready,
  input  logic [17:0]              lpu_out_row   [NL],
  input  logic [CHUNK_W-1:0]       lpu_out_chunk [NL],
  input  word_t                    lpu_out_data  [NL],
  input  logic                     apu_out_valid,
  output logic                     apu_out_ready,
  input  logic [10:0]              apu_out_row,
  input  logic [CHUNK_W-1:0]       apu_out_chunk,
  input  word_t                    apu_out_data,
  input  logic                     idle,
  input  logic [4:0]               lpu_events [NL],
  input  logic [4:0]               apu_events,
  input  logic                     ev_bus_contention
);
  localparam int NR = NL + 1, IDW = $clog2(NR);
  localparam int CAP_A = 256, CAP_L = 512;
  localparam int APU_ROWS = 2048;                // 64 arrays x 1024 words / 32 chunks
  localparam int HEAD_START = 2500;

  int checks = 0, failures = 0;
  bit finished = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- memory models ----------------
  vec_mem_model #(.IDW(IDW), .SLOT_W(6), .LAT(12), .QDEPTH(6), .STALL_PCT(10)) u_mem (
    .clk, .req_valid(mem_req_valid && rst_n), .req_ready(mem_req_ready), .req_id(mem_req_id),
    .req_col(mem_req_col), .req_slot(mem_req_slot),
    .rsp_valid(mem_rsp_valid), .rsp_id(mem_rsp_id), .rsp_slot(mem_rsp_slot),
    .rsp_chunk(mem_rsp_chunk), .rsp_data(mem_rsp_data)
  );
  for (genvar u = 0; u < NL; u++) begin : g_u
    for (genvar b = 0; b < 4; b++) begin : g_b
      dram_bank_model #(.AW(21), .LAT(7)) bank (
        .clk, .rd_en(bank_rd_en[u][b]), .rd_addr(bank_rd_addr[u][b]), .rdata(bank_rdata[u][b]),
        .wr_en(bank_wr_en[u][b]), .wr_addr(bank_wr_addr[u][b]), .wr_data(bank_wr_data[u][b])
      );
    end
  end

  // ---------------- graph and mapping ----------------
  int adj [NV][$];
  shortint wgt [NV][int];       // wgt[i][j] = A(i,j)
  int unit_of [NV];             // 0..NL-1 lightweight, NL = APU
  int local_of [NV];
  int n_local [NR];
  int vert_of [NR][int];        // (unit, local row) -> vertex
  bit visit [NV];
  int lpu_edges [NL];
  int exp_l, thr_d, cur_id;
  longint num_e;
  logic [63:0] expect_out [NV][NCHUNK];
  nz_t streams [NR][$];

  function automatic bit connected(int a, int b);
    foreach (adj[a][k]) if (adj[a][k] == b) return 1;
    return 0;
  endfunction

  function automatic void add_edge(int a, int b);
    if (a == b || connected(a, b)) return;
    adj[a].push_back(b); adj[b].push_back(a);
    wgt[a][b] = shortint'(($urandom % 256) - 128);
    wgt[b][a] = shortint'(($urandom % 256) - 128);
  endfunction

  function automatic void assign_vertex(int u, int v);
    unit_of[v] = u;
    local_of[v] = n_local[u];
    vert_of[u][n_local[u]] = v;
    n_local[u]++;
  endfunction

  function automatic void bdfs(int v, int depth);
    if (depth > 0 && lpu_edges[cur_id] < exp_l) begin
      visit[v] = 1;
      if (adj[v].size() <= thr_d) begin
        assign_vertex(cur_id, v);
        lpu_edges[cur_id] += adj[v].size() + 1;
      end
      foreach (adj[v][k]) if (!visit[adj[v][k]]) bdfs(adj[v][k], depth - 1);
    end
  endfunction

  task automatic build();
    int order [$];
    longint taken, exp_a;
    // ring of neighbours plus random chords, and hubs
    for (int v = 0; v < NV; v++) wgt[v][v] = shortint'(($urandom % 256) - 128);
    for (int v = 0; v < NV; v++) begin
      add_edge(v, (v + 1) % NV);
      if (NE == 0 && $urandom % 2 == 0) add_edge(v, ($urandom % NV));
    end
    for (int h = 0; h < NHUB; h++) begin
      int hub;
      hub = h * (NV / NHUB) + 3;
      for (int k = 0; k < NV / 5; k++) add_edge(hub, $urandom % NV);
    end
    if (NE > 0) begin
      longint dir_e = 0;
      for (int v = 0; v < NV; v++) dir_e += adj[v].size();
      while (dir_e < NE) begin
        int a, b;
        a = $urandom % NV;
        b = $urandom % NV;
        if (a != b && !connected(a, b)) begin
          add_edge(a, b);
          dir_e += 2;
        end
      end
    end
    num_e = 0;
    for (int v = 0; v < NV; v++) num_e += adj[v].size() + 1;   // non-zeros incl. self loops
    // threshold: highest degrees to the APU while within its share
    for (int v = 0; v < NV; v++) order.push_back(v);
    order.sort() with (-adj[item].size());
    exp_a = num_e * CAP_A / (CAP_A + CAP_L);
    taken = 0;
    thr_d = adj[order[0]].size();
    for (int k = 0; k < NV; k++) begin
      if (taken > exp_a || k >= APU_ROWS) break;
      taken += adj[order[k]].size() + 1;
      thr_d = adj[order[k]].size() - 1;
    end
    // guard: degree ties on the boundary go to the lightweight units
    for (int u = 0; u < NR; u++) n_local[u] = 0;
    for (int v = 0; v < NV; v++) begin
      visit[v] = 0;
      unit_of[v] = -1;
      if (adj[v].size() > thr_d && n_local[NL] < APU_ROWS) assign_vertex(NL, v);
    end
    exp_l = int'(num_e * CAP_L / ((CAP_A + CAP_L) * NL)) + 1;
    for (int u = 0; u < NL; u++) lpu_edges[u] = 0;
    cur_id = 0;
    for (int v = 0; v < NV; v++) begin
      if (!visit[v]) begin
        bdfs(v, 4);
        if (lpu_edges[cur_id] >= exp_l && cur_id < NL - 1) cur_id++;
      end
    end
    // vertices left unvisited (search stopped at a full unit) go to the last unit
    for (int v = 0; v < NV; v++)
      if (unit_of[v] < 0) assign_vertex(NL - 1, v);
    // CSC streams and the reference result
    for (int v = 0; v < NV; v++)
      for (int c = 0; c < NCHUNK; c++) expect_out[v][c] = '0;
    for (int j = 0; j < NV; j++) begin
      int rows [NR][$];
      rows[unit_of[j]].push_back(j);               // self loop
      foreach (adj[j][k]) rows[unit_of[adj[j][k]]].push_back(adj[j][k]);
      for (int u = 0; u < NR; u++) begin
        foreach (rows[u][k]) begin
          nz_t e;
          int i;
          i = rows[u][k];
          e = '0; e.col = vid_t'(j); e.row = vid_t'(local_of[i]); e.val = wgt[i][j];
          e.last = (k == rows[u].size() - 1);
          streams[u].push_back(e);
          for (int c = 0; c < NCHUNK; c++) begin
            logic [63:0] x;
            x = lift_tb_pkg::vec_chunk(j, c);
            for (int l = 0; l < 4; l++)
              expect_out[i][c][l*16 +: 16] = ref_mac(shortint'(expect_out[i][c][l*16 +: 16]), e.val, shortint'(x[l*16 +: 16]));
          end
        end
      end
    end
    $display("graph: %0d vertices, %0d non-zeros, threshold degree %0d, APU rows %0d, expL %0d",
             NV, num_e, thr_d, n_local[NL], exp_l);
    for (int u = 0; u < NL; u++) $display("  LPU %0d: %0d rows, %0d non-zeros", u, n_local[u], streams[u].size());
    $display("  APU: %0d rows, %0d non-zeros", n_local[NL], streams[NL].size());
  endtask

  // ---------------- event counters ----------------
  int ev_l [5], ev_a [5];
  int contention = 0, nz_bp = 0, out_bp = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 5; k++) begin
      for (int u = 0; u < NL; u++) if (lpu_events[u][k]) ev_l[k]++;
      if (apu_events[k]) ev_a[k]++;
    end
    if (ev_bus_contention) contention++;
    for (int u = 0; u < NL; u++) begin
      if (lpu_nz_valid[u] && !lpu_nz_ready[u]) nz_bp++;
      if (lpu_out_valid[u] && !lpu_out_ready[u]) out_bp++;
    end
    if (apu_nz_valid && !apu_nz_ready) nz_bp++;
    if (apu_out_valid && !apu_out_ready) out_bp++;
  end

  // ---------------- run ----------------
  initial begin
    longint t0, t1;
    rst_n = 0;
    lpu_nz_valid = '0; apu_nz_valid = 0; apu_nz_data = '0;
    flush_start = 0; apu_flush_count = '0;
    lpu_out_ready = '0; apu_out_ready = 0;
    for (int u = 0; u < NL; u++) begin lpu_nz_data[u] = '0; lpu_flush_count[u] = '0; end
    for (int k = 0; k < 5; k++) begin ev_l[k] = 0; ev_a[k] = 0; end
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clear the APU output buffers: flush all 2048 rows, discarding them
    @(negedge clk);
    apu_flush_count = 12'd2048;
    flush_start = 1;
    @(negedge clk);
    flush_start = 0;
    apu_out_ready = 1;
    lpu_out_ready = '1;
    repeat (2) @(negedge clk);
    while (!idle || apu_out_valid) @(negedge clk);
    apu_out_ready = 0;
    lpu_out_ready = '0;
    // SpMM: stream every unit's share
    t0 = $time;
    begin
      bit busy;
      do begin
        @(negedge clk);
        busy = 0;
        for (int u = 0; u < NR; u++) begin
          bit v;
          // unit 0 runs alone at first, so that it can use the whole fetch
          // path and run out of vector slots
          v = (streams[u].size() > 0) && (($urandom % 8) != 0) &&
              (u == 0 || ($time - t0) / 10 > HEAD_START);
          if (u < NL) begin
            lpu_nz_valid[u] = v;
            if (v) lpu_nz_data[u] = streams[u][0];
          end else begin
            apu_nz_valid = v;
            if (v) apu_nz_data = streams[u][0];
          end
          if (streams[u].size() > 0) busy = 1;
        end
        #1;
        for (int u = 0; u < NL; u++)
          if (lpu_nz_valid[u] && lpu_nz_ready[u]) void'(streams[u].pop_front());
        if (apu_nz_valid && apu_nz_ready) void'(streams[NL].pop_front());
      end while (busy);
      lpu_nz_valid = '0; apu_nz_valid = 0;
    end
    repeat (3) @(negedge clk);
    while (!idle) @(negedge clk);
    t1 = $time;
    $display("SpMM took %0d cycles", (t1 - t0) / 10);
    // flush every unit
    for (int u = 0; u < NL; u++) lpu_flush_count[u] = 19'(n_local[u]);
    apu_flush_count = 12'(n_local[NL]);
    flush_start = 1;
    @(negedge clk);
    flush_start = 0;
    begin
      int got, want;
      want = NV * NCHUNK;
      got = 0;
      while (got < want) begin
        for (int u = 0; u < NL; u++) lpu_out_ready[u] = ($urandom % 3) != 0;
        apu_out_ready = ($urandom % 3) != 0;
        #1;
        for (int u = 0; u < NL; u++)
          if (lpu_out_valid[u] && lpu_out_ready[u]) begin
            int v;
            v = vert_of[u][int'(lpu_out_row[u])];
            check(lpu_out_data[u] == expect_out[v][lpu_out_chunk[u]],
                  $sformatf("LPU %0d vertex %0d chunk %0d", u, v, lpu_out_chunk[u]));
            got++;
          end
        if (apu_out_valid && apu_out_ready) begin
          int v;
          v = vert_of[NL][int'(apu_out_row)];
          check(apu_out_data == expect_out[v][apu_out_chunk],
                $sformatf("APU vertex %0d chunk %0d", v, apu_out_chunk));
          got++;
        end
        @(negedge clk);
      end
      check(got == want, "all output vectors flushed");
    end
    repeat (10) @(negedge clk);
    check(idle, "idle at the end");
    $display("events: LPU passes=%0d conflicts=%0d vec_waits=%0d noslot=%0d flushes=%0d",
             ev_l[0], ev_l[1], ev_l[2], ev_l[3], ev_l[4]);
    $display("        APU passes=%0d conflicts=%0d vec_waits=%0d noslot=%0d flushes=%0d",
             ev_a[0], ev_a[1], ev_a[2], ev_a[3], ev_a[4]);
    $display("        bus contention=%0d sparse back pressure=%0d output back pressure=%0d",
             contention, nz_bp, out_bp);
    check(ev_l[0] > 0, "LPU pass");        check(ev_a[0] > 0, "APU pass");
    check(ev_l[1] > 0, "LPU conflict");    check(ev_a[1] > 0, "APU conflict");
    check(ev_l[2] > 0, "LPU vector wait"); check(ev_a[2] > 0, "APU vector wait");
    check(ev_l[3] + ev_a[3] > 0, "slot exhaustion");
    check(ev_l[4] == 2 * NL && ev_a[4] == 2, "flushes");
    check(contention > 0, "bus contention");
    check(nz_bp > 0, "sparse stream back pressure");
    check(out_bp > 0, "output stream back pressure");
    finished = 1;
  end
endmodule
