// Controller of a processing unit (lightweight or auxiliary): schedules the
// push-based SpMM over the MAC arrays and sequences the final flush of the
// output vectors.
//
// Row mapping: unit-local output row r belongs to MAC array r mod NARR and
// occupies NCHUNK consecutive words from address (r div NARR) * NCHUNK of that
// array's accumulator store (a DRAM bank or an output buffer).
//
// SpMM, one pass at a time:
//   GATHER  the head non-zero of the look-ahead FIFO is taken (one per cycle)
//           once its input vector is loaded, as long as its MAC array has no
//           job yet in this pass.  The pass closes at the column's last
//           non-zero, at a second non-zero for an already busy array (a
//           conflict: the rest of the column follows in a further pass), or
//           when the FIFO runs dry.
//   BCAST   NCHUNK cycles: chunk c of the column's input vector is read from
//           the input vector buffer and broadcast, and every array with a job
//           issues its read-modify-write for chunk c.
//   DRAIN   ACC_LAT+1 cycles so that the last write-back lands before the
//           next pass may read the same rows; the vector's slot is released
//           if the column ended in this pass.
// Flush (flush_start while idle): rows 0..flush_count-1 are read chunk by
// chunk, sent out on the out_* stream (valid/ready) and written back as zero,
// leaving the store cleared for the next layer.  Reads are issued only when
// the output queue has room for everything in flight.
//
// The architecture names a control unit and the broadcast of each input
// vector to the MAC arrays; the gather/broadcast/drain pass schedule, the
// conflict rule and the credit-limited flush are this implementation's own.
module spmm_controller
  import lift_pkg::*;
#(
  parameter int unsigned NARR    = 4,
  parameter int unsigned NSLOT   = 8,
  parameter int unsigned ACC_LAT = 7,
  parameter int unsigned ADDR_W  = 21,
  parameter int unsigned OUTQ    = 16,
  // derived: width of a unit-local row index
  parameter int unsigned ROW_W   = ADDR_W - CHUNK_W + $clog2(NARR)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // head of the look-ahead FIFO
  input  logic                     hd_valid,
  input  nz_t                      hd_data,
  input  logic [$clog2(NSLOT)-1:0] hd_tag,
  output logic                     hd_pop,
  // input vector buffer
  input  logic [NSLOT-1:0]         slot_loaded,
  output logic                     free_valid,
  output logic [$clog2(NSLOT)-1:0] free_slot,
  output logic                     vb_rd_en,
  output logic [$clog2(NSLOT)-1:0] vb_rd_slot,
  output logic [CHUNK_W-1:0]       vb_rd_chunk,
  // MAC array jobs
  output logic [NARR-1:0]          job_issue,
  output logic [ADDR_W-1:0]        job_addr [NARR],
  output elem_t                    job_val  [NARR],
  // flush access to the accumulator stores
  output logic [NARR-1:0]          fl_rd_en,
  output logic [NARR-1:0]          fl_wr_en,
  output logic [ADDR_W-1:0]        fl_rd_addr,
  output logic [ADDR_W-1:0]        fl_wr_addr,
  input  word_t                    acc_rdata [NARR],
  // flush command and output stream
  input  logic                     flush_start,
  input  logic [ROW_W:0]           flush_count,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [ROW_W-1:0]         out_row,
  output logic [CHUNK_W-1:0]       out_chunk,
  output word_t                    out_data,
  // status and events (one-cycle pulses)
  output logic                     idle,
  output logic                     ev_pass,
  output logic                     ev_conflict,
  output logic                     ev_vec_wait,
  output logic                     ev_flush_done
);
  localparam int unsigned LOGA = $clog2(NARR);
  localparam int unsigned SW   = $clog2(NSLOT);
  localparam int unsigned HI_W = ROW_W - LOGA;   // row bits above the array index
  localparam int unsigned DR_W = $clog2(ACC_LAT + 2);
  localparam int unsigned QC_W = $clog2(OUTQ + 1);

  typedef enum logic [1:0] {S_GATHER, S_BCAST, S_DRAIN, S_FLUSH} state_t;
  state_t state;

  // jobs of the current pass
  logic [NARR-1:0] jv;
  logic [HI_W-1:0] jrow [NARR];
  elem_t           jval [NARR];
  logic [SW-1:0]   cur_slot;
  logic            cur_last;
  logic [CHUNK_W-1:0] chunk;
  logic [DR_W-1:0]    drain_cnt;

  // head decode
  logic [ROW_W-1:0] hd_row;
  logic [LOGA-1:0]  hd_arr;
  logic             hd_ready, take;
  assign hd_row   = hd_data.row[ROW_W-1:0];
  assign hd_arr   = (NARR > 1) ? hd_row[LOGA-1:0] : '0;
  assign hd_ready = hd_valid && slot_loaded[hd_tag];
  assign take     = (state == S_GATHER) && hd_ready && !jv[hd_arr];
  assign hd_pop   = take;

  assign idle = (state == S_GATHER) && (jv == '0) && !hd_valid;

  // ---------------- flush sequencer ----------------
  typedef struct packed {
    logic              v;
    logic [LOGA-1:0]   arr;
    logic [ROW_W-1:0]  row;
    logic [CHUNK_W-1:0] chunk;
    logic [ADDR_W-1:0] addr;
  } ftag_t;

  ftag_t            fpipe [ACC_LAT];
  logic [ROW_W:0]   f_row, f_count;
  logic [CHUNK_W-1:0] f_chunk;
  logic             f_issuing, f_issue;
  logic [QC_W-1:0]  inflight, q_count;
  logic             q_in_ready;
  logic [ROW_W-1:0] f_row_l;
  logic [LOGA-1:0]  f_arr;
  ftag_t            f_ret;
  logic [ROW_W+CHUNK_W+WORD_W-1:0] q_out;

  assign f_row_l   = f_row[ROW_W-1:0];
  assign f_arr     = (NARR > 1) ? f_row_l[LOGA-1:0] : '0;
  assign f_issuing = (state == S_FLUSH) && (f_row < f_count);
  assign f_issue   = f_issuing && (32'(inflight) + 32'(q_count) < OUTQ);
  assign f_ret     = fpipe[ACC_LAT-1];
  assign fl_rd_addr = ADDR_W'({f_row_l[ROW_W-1:LOGA], f_chunk});
  assign fl_wr_addr = f_ret.addr;
  always_comb begin
    fl_rd_en = '0;
    fl_wr_en = '0;
    if (f_issue) fl_rd_en[f_arr] = 1'b1;
    if (f_ret.v) fl_wr_en[f_ret.arr] = 1'b1;
  end

  sync_fifo #(.WIDTH(ROW_W + CHUNK_W + WORD_W), .DEPTH(OUTQ)) u_outq (
    .clk, .rst_n,
    .in_valid (f_ret.v),
    .in_ready (q_in_ready),
    .in_data  ({f_ret.row, f_ret.chunk, acc_rdata[f_ret.arr]}),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (q_out),
    .count    (q_count)
  );
  assign {out_row, out_chunk, out_data} = q_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ACC_LAT; k++) fpipe[k] <= '0;
      inflight <= '0;
    end else begin
      fpipe[0] <= '{v: f_issue, arr: f_arr, row: f_row_l, chunk: f_chunk, addr: fl_rd_addr};
      for (int k = 1; k < ACC_LAT; k++) fpipe[k] <= fpipe[k-1];
      inflight <= inflight + QC_W'(f_issue) - QC_W'(f_ret.v);
    end
  end

  // ---------------- pass scheduler ----------------
  assign vb_rd_en    = (state == S_BCAST);
  assign vb_rd_slot  = cur_slot;
  assign vb_rd_chunk = chunk;
  always_comb begin
    for (int a = 0; a < NARR; a++) begin
      job_issue[a] = (state == S_BCAST) && jv[a];
      job_addr[a]  = ADDR_W'({jrow[a], chunk});
      job_val[a]   = jval[a];
    end
  end

  assign free_valid    = (state == S_DRAIN) && (drain_cnt == '0) && cur_last;
  assign free_slot     = cur_slot;
  assign ev_pass       = (state == S_BCAST) && (chunk == '0);
  assign ev_conflict   = (state == S_GATHER) && hd_ready && jv[hd_arr];
  assign ev_vec_wait   = (state == S_GATHER) && hd_valid && !slot_loaded[hd_tag];
  assign ev_flush_done = (state == S_FLUSH) && !f_issuing && (inflight == '0) && !f_ret.v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_GATHER;
      jv        <= '0;
      cur_slot  <= '0;
      cur_last  <= 1'b0;
      chunk     <= '0;
      drain_cnt <= '0;
      f_row     <= '0;
      f_count   <= '0;
      f_chunk   <= '0;
      for (int a = 0; a < NARR; a++) begin
        jrow[a] <= '0;
        jval[a] <= '0;
      end
    end else begin
      unique case (state)
        S_GATHER: begin
          if (take) begin
            jv[hd_arr]   <= 1'b1;
            jrow[hd_arr] <= hd_row[ROW_W-1:LOGA];
            jval[hd_arr] <= hd_data.val;
            cur_slot     <= hd_tag;
            if (hd_data.last) begin
              cur_last <= 1'b1;
              state    <= S_BCAST;
            end
          end else if (jv != '0 && (!hd_valid || ev_conflict)) begin
            state <= S_BCAST;
          end else if (idle && flush_start) begin
            state   <= S_FLUSH;
            f_row   <= '0;
            f_chunk <= '0;
            f_count <= flush_count;
          end
          chunk <= '0;
        end
        S_BCAST: begin
          chunk <= chunk + 1'b1;
          if (chunk == CHUNK_W'(NCHUNK - 1)) begin
            state     <= S_DRAIN;
            drain_cnt <= DR_W'(ACC_LAT);
          end
        end
        S_DRAIN: begin
          if (drain_cnt == '0) begin
            state    <= S_GATHER;
            jv       <= '0;
            cur_last <= 1'b0;
          end else begin
            drain_cnt <= drain_cnt - 1'b1;
          end
        end
        S_FLUSH: begin
          if (f_issue) begin
            f_chunk <= f_chunk + 1'b1;
            if (f_chunk == CHUNK_W'(NCHUNK - 1)) f_row <= f_row + 1'b1;
          end
          if (ev_flush_done) state <= S_GATHER;
        end
      endcase
    end
  end

  // The output queue always has room: reads are issued against its free space.
  a_outq_room: assert property (@(posedge clk) disable iff (!rst_n) f_ret.v |-> q_in_ready)
    else $error("spmm_controller: output queue overflow");

  initial assert (OUTQ > ACC_LAT) else $error("spmm_controller: OUTQ must exceed ACC_LAT");

endmodule
