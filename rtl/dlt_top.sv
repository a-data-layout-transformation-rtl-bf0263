// dlt_top: the DLT accelerator with the local memory and vector register
// file it moves data between.
//
// The RISC pipeline offers DLT instructions on cmd_* (see dlt_dispatch).
// Data-movement instructions are queued in one of four lanes, each with a
// 16-entry buffer, so four gather/scatter instructions run at once.  Each
// lane streams its elements through the memory router to the 64-bank local
// memory, the 16 x 256 B vector register file or the DRAM port.  The fence
// unit stalls the core's loads and stores (risc_mem_stall) after the fence
// instructions; FLUSH is handed to the cache hierarchy on flush_*.
//
// Four lanes, 16-entry buffers, the 64-bank local memory and the 16 x 256 B
// register file follow the original architecture; the ports, their
// handshakes and the address map are choices of this implementation.
//
// External ports:
//   dram_req/dram_ready/dram_rsp - element requests tagged {lane, write};
//       up to four reads and one write per lane outstanding.  The memory
//       controller answers every read with data and every write with an
//       acknowledge carrying the tag; answers with the same tag come back in
//       request order, answers with different tags in any order.
//   lm_io_*  - the local memory's 256-byte row port (core and accelerators).
//   vr_*     - the vector register file's whole-register port.
// All parts run on one clock with an active-low synchronous reset.
module dlt_top
  import dlt_pkg::*;
#(
  parameter int unsigned LANES   = NUM_LANES,
  parameter int unsigned DEPTH   = BUF_DEPTH,
  parameter int unsigned LM_ROWS = 16384
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // instruction interface from the RISC pipeline
  input  logic                     cmd_valid,
  input  isa_e                     cmd_op,
  input  logic [31:0]              cmd_a,
  input  logic [31:0]              cmd_b,
  input  logic [31:0]              cmd_c,
  output logic                     cmd_ready,
  output logic [31:0]              cmd_result,
  output logic                     risc_mem_stall,
  output logic                     busy,
  // cache hierarchy flush
  output logic                     flush_valid,
  output logic [ADDR_W-1:0]        flush_addr1,
  output logic [ADDR_W-1:0]        flush_addr2,
  input  logic                     flush_done,
  // DRAM (DDR3 / HMC controller)
  output mem_req_t                 dram_req,
  input  logic                     dram_ready,
  input  mem_rsp_t                 dram_rsp,
  // local memory row port
  input  logic                     lm_io_en,
  input  logic                     lm_io_we,
  input  logic [$clog2(LM_ROWS)-1:0] lm_io_row,
  input  logic [63:0]              lm_io_wmask,
  input  logic [2047:0]            lm_io_wdata,
  output logic [2047:0]            lm_io_rdata,
  output logic                     lm_io_rvalid,
  // vector register file register port
  input  logic                     vr_en,
  input  logic                     vr_we,
  input  logic [3:0]               vr_idx,
  input  logic [63:0]              vr_wmask,
  input  logic [2047:0]            vr_wdata,
  output logic [2047:0]            vr_rdata,
  output logic                     vr_rvalid
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic [LANES-1:0]         lane_push, lane_full, lane_busy, lane_done;
  logic [CW-1:0]            lane_count [LANES];
  opc_e                     done_opc   [LANES];
  entry_t                   push_entry;
  logic [$clog2(LANES)-1:0] push_lane;
  lane_req_t                lane_rd_req [LANES], lane_wr_req [LANES];
  logic [LANES-1:0]         lane_rd_gnt, lane_wr_gnt, lane_rd_rsp_valid, lane_wr_ack;
  logic [DATA_W-1:0]        lane_rd_rsp_rdata [LANES];
  mem_req_t                 tgt_req    [NUM_TGT];
  logic [NUM_TGT-1:0]       tgt_ready;
  mem_rsp_t                 tgt_rsp    [NUM_TGT];
  logic                     dlt_stall, g_fence, s_fence, f_fence;
  logic                     gathers_pending, scatters_pending;

  dlt_dispatch #(.LANES(LANES), .DEPTH(DEPTH)) u_dispatch (
    .cmd_valid, .cmd_op, .cmd_a, .cmd_b, .cmd_c, .cmd_ready, .cmd_result,
    .lane_full, .lane_count, .lane_push, .push_entry, .push_lane,
    .dlt_stall,
    .gather_fence (g_fence), .scatter_fence (s_fence), .full_fence (f_fence),
    .flush_valid, .flush_addr1, .flush_addr2, .flush_done
  );

  dlt_fence_unit #(.LANES(LANES), .DEPTH(DEPTH)) u_fence (
    .clk, .rst_n,
    .issue      (|lane_push),
    .issue_lane (push_lane),
    .issue_opc  (push_entry.opc),
    .done       (lane_done),
    .done_opc,
    .gather_fence (g_fence), .scatter_fence (s_fence), .full_fence (f_fence),
    .gathers_pending, .scatters_pending,
    .risc_mem_stall, .dlt_stall
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    dlt_lane #(.DEPTH(DEPTH)) u_lane (
      .clk, .rst_n,
      .push       (lane_push[l]),
      .push_entry,
      .full       (lane_full[l]),
      .count      (lane_count[l]),
      .busy       (lane_busy[l]),
      .done       (lane_done[l]),
      .done_opc   (done_opc[l]),
      .rd_req       (lane_rd_req[l]),
      .rd_gnt       (lane_rd_gnt[l]),
      .rd_rsp_valid (lane_rd_rsp_valid[l]),
      .rd_rsp_rdata (lane_rd_rsp_rdata[l]),
      .wr_req       (lane_wr_req[l]),
      .wr_gnt       (lane_wr_gnt[l]),
      .wr_ack       (lane_wr_ack[l])
    );
  end

  dlt_mem_router #(.LANES(LANES)) u_router (
    .clk, .rst_n,
    .lane_rd_req, .lane_wr_req, .lane_rd_gnt, .lane_wr_gnt,
    .lane_rd_rsp_valid, .lane_rd_rsp_rdata, .lane_wr_ack,
    .tgt_req, .tgt_ready, .tgt_rsp
  );

  dlt_banked_mem #(.BANKS(64), .ROWS(LM_ROWS)) u_lm (
    .clk, .rst_n,
    .io_en (lm_io_en), .io_we (lm_io_we), .io_row (lm_io_row),
    .io_wmask (lm_io_wmask), .io_wdata (lm_io_wdata),
    .io_rdata (lm_io_rdata), .io_rvalid (lm_io_rvalid),
    .dlt_req   (tgt_req[TGT_LM]),
    .dlt_ready (tgt_ready[TGT_LM]),
    .dlt_rsp   (tgt_rsp[TGT_LM])
  );

  dlt_vrf u_vrf (
    .clk, .rst_n,
    .vr_en, .vr_we, .vr_idx, .vr_wmask, .vr_wdata, .vr_rdata, .vr_rvalid,
    .dlt_req   (tgt_req[TGT_VRF]),
    .dlt_ready (tgt_ready[TGT_VRF]),
    .dlt_rsp   (tgt_rsp[TGT_VRF])
  );

  assign dram_req            = tgt_req[TGT_DRAM];
  assign tgt_ready[TGT_DRAM] = dram_ready;
  assign tgt_rsp[TGT_DRAM]   = dram_rsp;

  assign busy = (|lane_busy) || gathers_pending || scatters_pending;
endmodule
