// Lift: a GCN accelerator inside a 3D-stacked (HBM) memory that adds compute
// where data lives instead of moving data to compute.
//
// One lightweight processing unit (LPU) sits in each of the 32 CIM bank
// groups and accumulates the partial output vectors of its low-degree
// vertices in that bank group's own banks.  One auxiliary processing unit
// (APU) on the base die handles the high-degree vertices, whose output
// vectors it keeps in on-die buffers.  Both run the same push-based SpMM:
// every input vector is fetched once per column of the CSC sparse matrix and
// broadcast to the MAC arrays.  All units share one fetch path (tsv_bus) to
// the non-CIM bank groups that hold the input vectors.  Which vertices go to
// which unit (the hybrid mapping) is decided in software; the hardware sees
// it as the unit-local row numbers in the non-zero records it is given.
//
// Outside this module, and reached through its ports: the DRAM banks of the
// CIM bank groups (column read/write ports, fixed read latency BANK_LAT), the
// non-CIM bank groups that serve input-vector fetches, the readers that
// stream each unit's share of the sparse matrix, and the writers that take
// the flushed output vectors.  Single clock (500 MHz in the design).
// Flush: a flush_start pulse, given while the units are idle, starts the
// flush of every unit with its own row count.
//
// The split into LPUs and one APU, their number and MAC counts follow the
// architecture.  The single shared fetch channel with round-robin
// arbitration, the port-level form of the banks and the flush handshake are
// this implementation's own choices.
module lift_top
  import lift_pkg::*;
#(
  parameter int unsigned NUM_LPU   = 32,
  parameter int unsigned NBANK     = 4,
  parameter int unsigned BANK_LAT  = 7,
  parameter int unsigned BANK_AW   = 21,
  parameter int unsigned LPU_SLOTS = 8,
  parameter int unsigned LPU_FIFO  = 128,
  parameter int unsigned APU_NARR  = 64,
  parameter int unsigned APU_SLOTS = 64,
  parameter int unsigned APU_OB    = 1024,
  // derived
  parameter int unsigned NREQ      = NUM_LPU + 1,
  parameter int unsigned LROW_W    = BANK_AW - CHUNK_W + $clog2(NBANK),
  parameter int unsigned AROW_W    = $clog2(APU_OB) - CHUNK_W + $clog2(APU_NARR),
  parameter int unsigned SLOT_W    = $clog2(APU_SLOTS > LPU_SLOTS ? APU_SLOTS : LPU_SLOTS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sparse matrix streams
  input  logic [NUM_LPU-1:0]       lpu_nz_valid,
  output logic [NUM_LPU-1:0]       lpu_nz_ready,
  input  nz_t                      lpu_nz_data [NUM_LPU],
  input  logic                     apu_nz_valid,
  output logic                     apu_nz_ready,
  input  nz_t                      apu_nz_data,
  // input vector fetch channel to the non-CIM bank groups
  output logic                     mem_req_valid,
  input  logic                     mem_req_ready,
  output logic [$clog2(NREQ)-1:0]  mem_req_id,
  output vid_t                     mem_req_col,
  output logic [SLOT_W-1:0]        mem_req_slot,
  input  logic                     mem_rsp_valid,
  input  logic [$clog2(NREQ)-1:0]  mem_rsp_id,
  input  logic [SLOT_W-1:0]        mem_rsp_slot,
  input  logic [CHUNK_W-1:0]       mem_rsp_chunk,
  input  word_t                    mem_rsp_data,
  // CIM bank column ports, per LPU and bank
  output logic [NBANK-1:0]         bank_rd_en   [NUM_LPU],
  output logic [BANK_AW-1:0]       bank_rd_addr [NUM_LPU][NBANK],
  input  word_t                    bank_rdata   [NUM_LPU][NBANK],
  output logic [NBANK-1:0]         bank_wr_en   [NUM_LPU],
  output logic [BANK_AW-1:0]       bank_wr_addr [NUM_LPU][NBANK],
  output word_t                    bank_wr_data [NUM_LPU][NBANK],
  // flush
  input  logic                     flush_start,
  input  logic [LROW_W:0]          lpu_flush_count [NUM_LPU],
  input  logic [AROW_W:0]          apu_flush_count,
  output logic [NUM_LPU-1:0]       lpu_out_valid,
  input  logic [NUM_LPU-1:0]       lpu_out_ready,
  output logic [LROW_W-1:0]        lpu_out_row   [NUM_LPU],
  output logic [CHUNK_W-1:0]       lpu_out_chunk [NUM_LPU],
  output word_t                    lpu_out_data  [NUM_LPU],
  output logic                     apu_out_valid,
  input  logic                     apu_out_ready,
  output logic [AROW_W-1:0]        apu_out_row,
  output logic [CHUNK_W-1:0]       apu_out_chunk,
  output word_t                    apu_out_data,
  // status
  output logic                     idle,
  output logic [4:0]               lpu_events [NUM_LPU],
  output logic [4:0]               apu_events,
  output logic                     ev_bus_contention
);
  logic [NREQ-1:0]   req_valid, req_ready, rsp_valid;
  vid_t              req_col  [NREQ];
  logic [SLOT_W-1:0] req_slot [NREQ];
  logic [SLOT_W-1:0] rsp_slot;
  logic [CHUNK_W-1:0] rsp_chunk;
  word_t             rsp_data;
  logic [NUM_LPU-1:0] lpu_idle;
  logic              apu_idle;

  tsv_bus #(.NREQ(NREQ), .SLOT_W(SLOT_W)) u_bus (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_col, .req_slot,
    .mem_req_valid, .mem_req_ready, .mem_req_id, .mem_req_col, .mem_req_slot,
    .mem_rsp_valid, .mem_rsp_id, .mem_rsp_slot, .mem_rsp_chunk, .mem_rsp_data,
    .rsp_valid, .rsp_slot, .rsp_chunk, .rsp_data,
    .ev_contention(ev_bus_contention)
  );

  for (genvar i = 0; i < NUM_LPU; i++) begin : g_lpu
    localparam int unsigned LSW = $clog2(LPU_SLOTS);
    logic [LSW-1:0] f_slot;

    lpu #(.NBANK(NBANK), .FIFO_DEPTH(LPU_FIFO), .NSLOT(LPU_SLOTS),
          .BANK_LAT(BANK_LAT), .ADDR_W(BANK_AW)) u_lpu (
      .clk, .rst_n,
      .nz_valid(lpu_nz_valid[i]), .nz_ready(lpu_nz_ready[i]), .nz_data(lpu_nz_data[i]),
      .fetch_valid(req_valid[i]), .fetch_ready(req_ready[i]),
      .fetch_col(req_col[i]), .fetch_slot(f_slot),
      .vec_valid(rsp_valid[i]), .vec_slot(rsp_slot[LSW-1:0]),
      .vec_chunk(rsp_chunk), .vec_data(rsp_data),
      .bank_rd_en(bank_rd_en[i]), .bank_rd_addr(bank_rd_addr[i]), .bank_rdata(bank_rdata[i]),
      .bank_wr_en(bank_wr_en[i]), .bank_wr_addr(bank_wr_addr[i]), .bank_wr_data(bank_wr_data[i]),
      .flush_start, .flush_count(lpu_flush_count[i]),
      .out_valid(lpu_out_valid[i]), .out_ready(lpu_out_ready[i]),
      .out_row(lpu_out_row[i]), .out_chunk(lpu_out_chunk[i]), .out_data(lpu_out_data[i]),
      .idle(lpu_idle[i]), .events(lpu_events[i])
    );
    assign req_slot[i] = SLOT_W'(f_slot);
  end

  apu #(.NARR(APU_NARR), .NSLOT(APU_SLOTS), .OB_DEPTH(APU_OB)) u_apu (
    .clk, .rst_n,
    .nz_valid(apu_nz_valid), .nz_ready(apu_nz_ready), .nz_data(apu_nz_data),
    .fetch_valid(req_valid[NUM_LPU]), .fetch_ready(req_ready[NUM_LPU]),
    .fetch_col(req_col[NUM_LPU]), .fetch_slot(req_slot[NUM_LPU][$clog2(APU_SLOTS)-1:0]),
    .vec_valid(rsp_valid[NUM_LPU]), .vec_slot(rsp_slot[$clog2(APU_SLOTS)-1:0]),
    .vec_chunk(rsp_chunk), .vec_data(rsp_data),
    .flush_start, .flush_count(apu_flush_count),
    .out_valid(apu_out_valid), .out_ready(apu_out_ready),
    .out_row(apu_out_row), .out_chunk(apu_out_chunk), .out_data(apu_out_data),
    .idle(apu_idle), .events(apu_events)
  );

  assign idle = (&lpu_idle) & apu_idle;

endmodule
