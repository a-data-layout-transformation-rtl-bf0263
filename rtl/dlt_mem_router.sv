// dlt_mem_router: connects the DLT lanes to the three memories they can reach.
//
// Each lane has a read channel and a write channel, and its decoder has
// already chosen a target for each request: the local memory banks, the
// vector register file or DRAM.  For every target a round-robin arbiter
// picks one of the 2 x LANES channels that address it, and the winner's
// request goes out tagged id = {lane, write}.  Different targets serve
// different channels in the same cycle, so up to three requests progress at
// once.  A channel is granted when its target's `tgt_ready` is high.
// Completions come back on each target's response channel with the tag and
// are steered to that lane's read data or write acknowledge.  A target
// returns at most one completion per cycle, and the targets serve different
// channels, so two completions never meet at one channel in one cycle.  The
// router holds no per-request state: completions reach a channel in the
// order the targets return them.
//
// The structure (per-target arbiters, tag-based return) is this
// implementation's choice: the design only shows the lanes' read and write
// paths fanning out to Bank0..Bank63, VR0..VR15 and DRAM.
module dlt_mem_router
  import dlt_pkg::*;
#(
  parameter int unsigned LANES = NUM_LANES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  lane_req_t             lane_rd_req [LANES],
  input  lane_req_t             lane_wr_req [LANES],
  output logic      [LANES-1:0] lane_rd_gnt,
  output logic      [LANES-1:0] lane_wr_gnt,
  output logic      [LANES-1:0] lane_rd_rsp_valid,
  output logic [DATA_W-1:0]     lane_rd_rsp_rdata [LANES],
  output logic      [LANES-1:0] lane_wr_ack,
  output mem_req_t              tgt_req    [NUM_TGT],
  input  logic    [NUM_TGT-1:0] tgt_ready,
  input  mem_rsp_t              tgt_rsp    [NUM_TGT]
);
  localparam int unsigned CH = 2 * LANES;       // channel r = 2*lane + write
  localparam int unsigned IW = $clog2(CH);

  lane_req_t        ch_req [CH];
  logic [CH-1:0]    want  [NUM_TGT];
  logic [CH-1:0]    grant [NUM_TGT];
  logic [IW-1:0]    gidx  [NUM_TGT];
  logic             any   [NUM_TGT];
  logic [CH-1:0]    ch_gnt;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      ch_req[2*l]     = lane_rd_req[l];
      ch_req[2*l + 1] = lane_wr_req[l];
    end
  end

  for (genvar t = 0; t < NUM_TGT; t++) begin : g_tgt
    always_comb begin
      for (int r = 0; r < CH; r++)
        want[t][r] = ch_req[r].valid && (ch_req[r].tgt == tgt_e'(t));
    end

    dlt_rr_arb #(.N(CH)) u_arb (
      .clk, .rst_n,
      .req       (want[t]),
      .accept    (tgt_ready[t]),
      .grant     (grant[t]),
      .grant_idx (gidx[t]),
      .any       (any[t])
    );

    always_comb begin
      tgt_req[t].valid = any[t];
      tgt_req[t].we    = ch_req[gidx[t]].we;
      tgt_req[t].addr  = ch_req[gidx[t]].addr;
      tgt_req[t].size  = ch_req[gidx[t]].size;
      tgt_req[t].wdata = ch_req[gidx[t]].wdata;
      tgt_req[t].id    = TAG_W'(gidx[t]);
    end
  end

  always_comb begin
    ch_gnt            = '0;
    lane_rd_rsp_valid = '0;
    lane_wr_ack       = '0;
    for (int l = 0; l < LANES; l++) lane_rd_rsp_rdata[l] = '0;
    for (int t = 0; t < NUM_TGT; t++) begin
      if (tgt_ready[t]) ch_gnt = ch_gnt | grant[t];
      if (tgt_rsp[t].valid) begin
        if (tgt_rsp[t].id[0]) lane_wr_ack[tgt_rsp[t].id[TAG_W-1:1]] = 1'b1;
        else begin
          lane_rd_rsp_valid[tgt_rsp[t].id[TAG_W-1:1]] = 1'b1;
          lane_rd_rsp_rdata[tgt_rsp[t].id[TAG_W-1:1]] = tgt_rsp[t].rdata;
        end
      end
    end
    for (int l = 0; l < LANES; l++) begin
      lane_rd_gnt[l] = ch_gnt[2*l];
      lane_wr_gnt[l] = ch_gnt[2*l + 1];
    end
  end
endmodule
