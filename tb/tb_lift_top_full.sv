// End-to-end test of lift_top: one GCN aggregation step, out = A * (XW), on
// a random graph with hub (high-degree) vertices, with the top at its
// default configuration: 32 lightweight units, one per CIM bank group, and
// the auxiliary unit.
//
// The testbench does the software side: it derives the degree threshold
// from the compute capabilities of the units (the APU gets the vertices of
// highest degree until their edges exceed capA/(capL+capA) of all edges),
// maps the remaining vertices to the lightweight units with a bounded
// depth-first search that fills each unit up to its expected edge count,
// and streams each unit's share of the matrix in CSC order with unit-local
// row numbers.  Memory models stand in for the CIM banks and the non-CIM
// bank groups.  After the SpMM every unit is flushed and every output
// vector is compared with an independently computed result.  Each
// mechanism must occur at least once: passes in both unit types, MAC-array
// conflicts, waits for a vector, waits for a free slot, fetch-bus
// contention, back pressure on a sparse stream and on an output stream, and
// the flushes.
module tb_lift_top_full;
  import lift_pkg::*;
  import lift_tb_pkg::*;
  localparam int NL = 32;
  localparam int NR = NL + 1;

  logic clk = 0;
  logic rst_n;
  logic [NL-1:0] lpu_nz_valid, lpu_nz_ready;
  nz_t lpu_nz_data [NL];
  logic apu_nz_valid, apu_nz_ready;
  nz_t apu_nz_data;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [$clog2(NR)-1:0] mem_req_id, mem_rsp_id;
  vid_t mem_req_col;
  logic [5:0] mem_req_slot, mem_rsp_slot;
  logic [CHUNK_W-1:0] mem_rsp_chunk, apu_out_chunk;
  word_t mem_rsp_data, apu_out_data;
  logic [3:0] bank_rd_en [NL], bank_wr_en [NL];
  logic [20:0] bank_rd_addr [NL][4], bank_wr_addr [NL][4];
  word_t bank_rdata [NL][4], bank_wr_data [NL][4];
  logic flush_start;
  logic [18:0] lpu_flush_count [NL];
  logic [11:0] apu_flush_count;
  logic [NL-1:0] lpu_out_valid, lpu_out_ready;
  logic [17:0] lpu_out_row [NL];
  logic [CHUNK_W-1:0] lpu_out_chunk [NL];
  word_t lpu_out_data [NL];
  logic apu_out_valid, apu_out_ready;
  logic [10:0] apu_out_row;
  logic idle, ev_bus_contention;
  logic [4:0] lpu_events [NL];
  logic [4:0] apu_events;

  always #5 clk = ~clk;

  lift_top dut (.*);
  lift_top_driver #(.NL(NL), .NV(1200), .NHUB(12)) drv (.*);

  initial begin
    fork
      begin
        repeat (4000000) @(posedge clk);
        $display("FAIL: watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
      end
      wait (drv.finished);
    join_any
    if (drv.finished)
      $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end
endmodule
