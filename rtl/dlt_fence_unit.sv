// dlt_fence_unit: memory ordering between the RISC core and the DLT lanes.
//
// It counts, per lane, the gather-class (GATHER, VGATHER) and scatter-class
// (SCATTER, VSCATTER) instructions that have been dispatched and not yet
// completed.  The three fence instructions take a snapshot of those counts:
//   GATHERFENCE  - the core's loads and stores stall until every gather that
//                  was in flight when the fence issued has completed;
//   SCATTERFENCE - the same for scatters;
//   FENCE        - waits for both, and while it waits also holds back every
//                  further DLT memory instruction (dlt_stall).
// Because a lane executes its buffer in order, the first N completions of a
// class in a lane are exactly the N that were pending at the snapshot, so
// instructions dispatched after a GATHERFENCE or SCATTERFENCE do not extend
// it.  That precise reading of "concurrent" instructions is this
// implementation's choice.
// Inputs are single-cycle pulses; outputs are combinational from registers.
module dlt_fence_unit
  import dlt_pkg::*;
#(
  parameter int unsigned LANES = NUM_LANES,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   issue,
  input  logic [$clog2(LANES)-1:0] issue_lane,
  input  opc_e                   issue_opc,
  input  logic [LANES-1:0]       done,
  input  opc_e                   done_opc [LANES],
  input  logic                   gather_fence,
  input  logic                   scatter_fence,
  input  logic                   full_fence,
  output logic                   gathers_pending,
  output logic                   scatters_pending,
  output logic                   risc_mem_stall,
  output logic                   dlt_stall
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic [CW-1:0] g_cnt [LANES], s_cnt [LANES];   // in flight per lane
  logic [CW-1:0] g_rem [LANES], s_rem [LANES];   // still blocking a fence
  logic          full_q;
  logic          g_block, s_block;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        g_cnt[l] <= '0; s_cnt[l] <= '0; g_rem[l] <= '0; s_rem[l] <= '0;
      end
      full_q <= 1'b0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        logic gi, si, gd, sd;
        gi = issue && (int'(issue_lane) == l) && is_gather_class(issue_opc);
        si = issue && (int'(issue_lane) == l) && is_scatter_class(issue_opc);
        gd = done[l] && is_gather_class(done_opc[l]);
        sd = done[l] && is_scatter_class(done_opc[l]);
        g_cnt[l] <= g_cnt[l] + CW'(gi) - CW'(gd);
        s_cnt[l] <= s_cnt[l] + CW'(si) - CW'(sd);
        // A fence snapshots what is in flight after this cycle's completions.
        if (gather_fence || full_fence) g_rem[l] <= g_cnt[l] - CW'(gd);
        else if (gd && g_rem[l] != '0)  g_rem[l] <= g_rem[l] - CW'(1);
        if (scatter_fence || full_fence) s_rem[l] <= s_cnt[l] - CW'(sd);
        else if (sd && s_rem[l] != '0)   s_rem[l] <= s_rem[l] - CW'(1);
      end
      if (full_fence) full_q <= 1'b1;
      else if (!g_block && !s_block) full_q <= 1'b0;
    end
  end

  always_comb begin
    g_block = 1'b0; s_block = 1'b0;
    gathers_pending = 1'b0; scatters_pending = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      g_block          |= (g_rem[l] != '0);
      s_block          |= (s_rem[l] != '0);
      gathers_pending  |= (g_cnt[l] != '0);
      scatters_pending |= (s_cnt[l] != '0);
    end
    risc_mem_stall = g_block || s_block;
    dlt_stall      = full_q && (g_block || s_block);
  end

  for (genvar l = 0; l < LANES; l++) begin : g_chk
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
        !(done[l] && is_gather_class(done_opc[l]) && g_cnt[l] == '0))
      else $error("gather completion with none in flight");
  end
endmodule
