// Workload-sized end-to-end test of lift_top: one aggregation step,
// out = A * (XW), of the first GCN layer (hidden size 128) on a graph with
// the size of the Cora citation dataset: 2,708 vertices and 10,556 directed
// edges, plus a self loop per vertex.  The dataset itself is not needed to
// exercise the hardware, so the graph is synthetic: a ring through all
// vertices, four hub vertices with 541 neighbours each for the auxiliary
// unit, and random edges up to the dataset's edge count.  The Citeseer
// graph (3,327 vertices, 9,104 edges) is of the same size class and is
// covered by the same test; the larger datasets differ only in size.
//
// The top runs at its default configuration (32 lightweight units and the
// auxiliary unit).  Mapping, streaming, memory models, checking of every
// output vector and the count of each mechanism are the same as in the
// other end-to-end tests.
module tb_lift_top_cora;
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
  lift_top_driver #(.NL(NL), .NV(2708), .NHUB(4), .NE(10556)) drv (.*);

  initial begin
    fork
      begin
        repeat (6000000) @(posedge clk);
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
