// Lightweight processing unit (LPU): the near-bank SpMM engine of one CIM
// bank group, running the push-based dataflow.
//
// Non-zeros of the bank group's share of the sparse matrix (CSC order, read
// from the group's own banks) enter the look-ahead FIFO.  The prefetcher
// reads their column indices ahead of use and fetches each column's input
// vector from the non-CIM bank groups over the bank-group/TSV bus into the
// input vector buffer, where it is used once for all non-zeros of the column
// and then dropped.  The controller broadcasts the vector to one MAC array
// per bank; each array read-modify-writes the partial output vectors of its
// bank through the bank's I/O sense amplifiers and write drivers.  After the
// SpMM a flush streams every fully accumulated output vector out (towards
// the non-CIM bank groups) and clears it in the bank.
//
// Configuration from the design: 4 banks per bank group (one MAC array
// each), 16 MACs, 1 KB look-ahead FIFO, 2 KB input vector buffer.  The bank
// column-read latency of 7 cycles is tCAS = 14 ns at the 500 MHz clock.  The
// ports to the banks are plain column reads/writes with a fixed latency; the
// DRAM banks themselves (arrays, sense amplifiers, decoders) are outside.
// Output row r lives in bank r mod 4.
//
// Own choices: the record format, one MAC array of 4 MACs per bank, the
// r mod 4 row placement, and the read-and-clear flush.
module lpu
  import lift_pkg::*;
#(
  parameter int unsigned NBANK      = 4,
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned NSLOT      = 8,
  parameter int unsigned BANK_LAT   = 7,
  parameter int unsigned ADDR_W     = 21,
  parameter int unsigned ROW_W      = ADDR_W - CHUNK_W + $clog2(NBANK)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sparse matrix stream from the bank group's banks
  input  logic                     nz_valid,
  output logic                     nz_ready,
  input  nz_t                      nz_data,
  // input vector fetch over the bank-group / TSV bus
  output logic                     fetch_valid,
  input  logic                     fetch_ready,
  output vid_t                     fetch_col,
  output logic [$clog2(NSLOT)-1:0] fetch_slot,
  input  logic                     vec_valid,
  input  logic [$clog2(NSLOT)-1:0] vec_slot,
  input  logic [CHUNK_W-1:0]       vec_chunk,
  input  word_t                    vec_data,
  // column access to the banks (via IOSA / write drivers)
  output logic [NBANK-1:0]         bank_rd_en,
  output logic [ADDR_W-1:0]        bank_rd_addr [NBANK],
  input  word_t                    bank_rdata   [NBANK],
  output logic [NBANK-1:0]         bank_wr_en,
  output logic [ADDR_W-1:0]        bank_wr_addr [NBANK],
  output word_t                    bank_wr_data [NBANK],
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

  logic          la_valid, la_advance, hd_valid, hd_pop;
  nz_t           la_data, hd_data;
  logic [SW-1:0] la_tag, hd_tag, alloc_slot, free_slot, vb_rd_slot;
  logic          alloc_ok, alloc_take, free_valid, vb_rd_en;
  logic [CHUNK_W-1:0] vb_rd_chunk;
  word_t         vb_rd_data;
  logic [NSLOT-1:0] loaded;
  logic [NBANK-1:0] job_issue, fl_rd_en, fl_wr_en;
  logic [ADDR_W-1:0] job_addr [NBANK];
  elem_t         job_val [NBANK];
  logic [ADDR_W-1:0] fl_rd_addr, fl_wr_addr;
  logic [NBANK-1:0]  m_rd_en, m_wr_en;
  logic [ADDR_W-1:0] m_rd_addr [NBANK];
  logic [ADDR_W-1:0] m_wr_addr [NBANK];
  word_t         m_wr_data [NBANK];

  lookahead_fifo #(.WIDTH($bits(nz_t)), .DEPTH(FIFO_DEPTH), .TAG_W(SW)) u_fifo (
    .clk, .rst_n,
    .in_valid(nz_valid), .in_ready(nz_ready), .in_data(nz_data),
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

  spmm_controller #(.NARR(NBANK), .NSLOT(NSLOT), .ACC_LAT(BANK_LAT), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n,
    .hd_valid, .hd_data, .hd_tag, .hd_pop,
    .slot_loaded(loaded), .free_valid, .free_slot,
    .vb_rd_en, .vb_rd_slot, .vb_rd_chunk,
    .job_issue, .job_addr, .job_val,
    .fl_rd_en, .fl_wr_en, .fl_rd_addr, .fl_wr_addr,
    .acc_rdata(bank_rdata),
    .flush_start, .flush_count,
    .out_valid, .out_ready, .out_row, .out_chunk, .out_data,
    .idle,
    .ev_pass(events[0]), .ev_conflict(events[1]), .ev_vec_wait(events[2]),
    .ev_flush_done(events[4])
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    mac_array #(.ACC_LAT(BANK_LAT), .ADDR_W(ADDR_W)) u_mac (
      .clk, .rst_n,
      .issue(job_issue[b]), .addr(job_addr[b]), .a(job_val[b]), .x(vb_rd_data),
      .acc_rd_en(m_rd_en[b]), .acc_rd_addr(m_rd_addr[b]), .acc_rdata(bank_rdata[b]),
      .acc_wr_en(m_wr_en[b]), .acc_wr_addr(m_wr_addr[b]), .acc_wr_data(m_wr_data[b])
    );
    // SpMM and flush never overlap, so the bank port is shared by OR-ing
    assign bank_rd_en[b]   = m_rd_en[b] | fl_rd_en[b];
    assign bank_rd_addr[b] = fl_rd_en[b] ? fl_rd_addr : m_rd_addr[b];
    assign bank_wr_en[b]   = m_wr_en[b] | fl_wr_en[b];
    assign bank_wr_addr[b] = fl_wr_en[b] ? fl_wr_addr : m_wr_addr[b];
    assign bank_wr_data[b] = fl_wr_en[b] ? '0 : m_wr_data[b];
  end

endmodule
