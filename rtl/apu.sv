// Auxiliary processing unit (APU): the base-die SpMM engine for the
// high-degree vertices.
//
// High-degree vertices are few but each is updated as many times as its
// degree, and their neighbours are spread over many bank groups and
// channels.  The APU therefore keeps their partial output vectors on the base
// die, in one output buffer per MAC array, and runs the same push-based
// dataflow as the lightweight units: non-zeros fetched from the DRAM dies
// collect in the sparse matrix buffer and then the look-ahead FIFO, the
// prefetcher fetches each column's input vector into the input vector
// buffer, and the controller broadcasts that vector to all MAC arrays, each
// of which accumulates into its own output buffer.  A flush streams the
// finished output vectors back towards DRAM and clears the buffers.
//
// Configuration from the design: 256 MACs as 64 arrays of 4, 8 KB sparse
// matrix buffer (1024 non-zeros), 16 KB input vector buffer (64 vectors),
// 512 KB of output buffers (8 KB per array, 2048 output vectors in all).
// The look-ahead FIFO depth (128) is this implementation's choice.
// APU-local output row r is held by array r mod 64.
module apu
  import lift_pkg::*;
#(
  parameter int unsigned NARR      = 64,
  parameter int unsigned SMB_DEPTH = 1024,
  parameter int unsigned LA_DEPTH  = 128,
  parameter int unsigned NSLOT     = 64,
  parameter int unsigned OB_DEPTH  = 1024,
  parameter int unsigned ADDR_W    = $clog2(OB_DEPTH),
  parameter int unsigned ROW_W     = ADDR_W - CHUNK_W + $clog2(NARR)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sparse matrix stream from the DRAM dies
  input  logic                     nz_valid,
  output logic                     nz_ready,
  input  nz_t                      nz_data,
  // input vector fetch over the TSVs
  output logic                     fetch_valid,
  input  logic                     fetch_ready,
  output vid_t                     fetch_col,
  output logic [$clog2(NSLOT)-1:0] fetch_slot,
  input  logic                     vec_valid,
  input  logic [$clog2(NSLOT)-1:0] vec_slot,
  input  logic [CHUNK_W-1:0]       vec_chunk,
  input  word_t                    vec_data,
  // flush of the output vectors
  input  logic                     flush_start,
  input  logic [ROW_W:0]           flush_count,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [ROW_W-1:0]         out_row,
  output logic [CHUNK_W-1:0]       out_chunk,
  output word_t                    out_data,
  // status / events
  output logic                     idle,
  output logic [4:0]               events   // {flush_done, noslot, vec_wait, conflict, pass}
);
  localparam int unsigned SW = $clog2(NSLOT);

  logic          smb_valid, smb_ready;
  logic [$clog2(SMB_DEPTH+1)-1:0] smb_count;   // occupancy, for debug
  logic [$bits(nz_t)-1:0] smb_data;
  logic          la_valid, la_advance, hd_valid, hd_pop;
  nz_t           la_data, hd_data;
  logic [SW-1:0] la_tag, hd_tag, alloc_slot, free_slot, vb_rd_slot;
  logic          alloc_ok, alloc_take, free_valid, vb_rd_en;
  logic [CHUNK_W-1:0] vb_rd_chunk;
  word_t         vb_rd_data;
  logic [NSLOT-1:0] loaded;
  logic [NARR-1:0] job_issue, fl_rd_en, fl_wr_en;
  logic [ADDR_W-1:0] job_addr [NARR];
  elem_t         job_val [NARR];
  logic [ADDR_W-1:0] fl_rd_addr, fl_wr_addr;
  word_t         ob_rdata [NARR];

  sync_fifo #(.WIDTH($bits(nz_t)), .DEPTH(SMB_DEPTH)) u_smb (
    .clk, .rst_n,
    .in_valid(nz_valid), .in_ready(nz_ready), .in_data(nz_data),
    .out_valid(smb_valid), .out_ready(smb_ready), .out_data(smb_data),
    .count(smb_count)
  );

  lookahead_fifo #(.WIDTH($bits(nz_t)), .DEPTH(LA_DEPTH), .TAG_W(SW)) u_fifo (
    .clk, .rst_n,
    .in_valid(smb_valid), .in_ready(smb_ready), .in_data(smb_data),
    .la_valid, .la_data, .la_advance, .la_tag,
    .hd_valid, .hd_data, .hd_tag, .hd_pop
  );

  prefetcher #(.NSLOT(NSLOT)) u_pref (
    .clk, .rst_n,
    .la_valid, .la_data, .la_advance, .la_tag,
    .alloc_ok, .alloc_slot, .alloc_take,
    .fetch_valid, .fetch_ready, .fetch_col, .fetch_slot,
    .ev_noslot(events[3])
  );

  input_vector_buffer #(.NSLOT(NSLOT)) u_ivb (
    .clk, .rst_n,
    .alloc_ok, .alloc_slot, .alloc_take,
    .free_valid, .free_slot,
    .wr_valid(vec_valid), .wr_slot(vec_slot), .wr_chunk(vec_chunk), .wr_data(vec_data),
    .rd_en(vb_rd_en), .rd_slot(vb_rd_slot), .rd_chunk(vb_rd_chunk), .rd_data(vb_rd_data),
    .loaded
  );

  spmm_controller #(.NARR(NARR), .NSLOT(NSLOT), .ACC_LAT(1), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n,
    .hd_valid, .hd_data, .hd_tag, .hd_pop,
    .slot_loaded(loaded), .free_valid, .free_slot,
    .vb_rd_en, .vb_rd_slot, .vb_rd_chunk,
    .job_issue, .job_addr, .job_val,
    .fl_rd_en, .fl_wr_en, .fl_rd_addr, .fl_wr_addr,
    .acc_rdata(ob_rdata),
    .flush_start, .flush_count,
    .out_valid, .out_ready, .out_row, .out_chunk, .out_data,
    .idle,
    .ev_pass(events[0]), .ev_conflict(events[1]), .ev_vec_wait(events[2]),
    .ev_flush_done(events[4])
  );

  for (genvar a = 0; a < NARR; a++) begin : g_arr
    logic              m_rd_en, m_wr_en;
    logic [ADDR_W-1:0] m_rd_addr, m_wr_addr;
    word_t             m_wr_data;

    mac_array #(.ACC_LAT(1), .ADDR_W(ADDR_W)) u_mac (
      .clk, .rst_n,
      .issue(job_issue[a]), .addr(job_addr[a]), .a(job_val[a]), .x(vb_rd_data),
      .acc_rd_en(m_rd_en), .acc_rd_addr(m_rd_addr), .acc_rdata(ob_rdata[a]),
      .acc_wr_en(m_wr_en), .acc_wr_addr(m_wr_addr), .acc_wr_data(m_wr_data)
    );

    output_buffer #(.DEPTH(OB_DEPTH)) u_ob (
      .clk,
      .rd_en  (m_rd_en | fl_rd_en[a]),
      .rd_addr(fl_rd_en[a] ? fl_rd_addr : m_rd_addr),
      .rdata  (ob_rdata[a]),
      .wr_en  (m_wr_en | fl_wr_en[a]),
      .wr_addr(fl_wr_en[a] ? fl_wr_addr : m_wr_addr),
      .wr_data(fl_wr_en[a] ? '0 : m_wr_data)
    );
  end

endmodule
