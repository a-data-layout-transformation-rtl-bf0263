// tb_dlt_mem_router: self-checking test of the lane-to-memory router.
// Four model lanes, each with a read and a write channel (eight channels),
// issue random requests to the three targets; three model targets accept
// with random ready and answer after random delays.  Checks: a granted
// request reaches the target it named with the channel's tag {lane, write}
// and unchanged fields, at most one channel is granted per target per cycle,
// channels on different targets are served in the same cycle, every read
// completion comes back as data to the channel that asked and every write
// completion as an acknowledge, and round-robin service (while channels
// compete for one target none waits more than eight grants).
module tb_dlt_mem_router;
  import dlt_pkg::*;

  localparam int CH = 8;
  logic clk = 0, rst_n = 0;
  lane_req_t lane_rd_req [4], lane_wr_req [4];
  logic [3:0] lane_rd_gnt, lane_wr_gnt, lane_rd_rsp_valid, lane_wr_ack;
  logic [DATA_W-1:0] lane_rd_rsp_rdata [4];
  mem_req_t tgt_req [3];
  logic [2:0] tgt_ready;
  mem_rsp_t tgt_rsp [3];
  int checks = 0, failures = 0, parallel = 0;
  int ready_pct = 70;
  // model channels: c = 2 * lane + write
  lane_req_t req [CH];
  logic outstanding [CH];
  int wait_grants [CH];
  // pending completions per target (data = tag in the low byte + address)
  mem_rsp_t q [3][$];

  dlt_mem_router dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int l = 0; l < 4; l++) begin
      lane_rd_req[l] = req[2*l];
      lane_wr_req[l] = req[2*l + 1];
    end

  function automatic logic gnt(input int c);
    return c[0] ? lane_wr_gnt[c/2] : lane_rd_gnt[c/2];
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // targets: sample at posedge, drive outputs at negedge
  always @(posedge clk) if (rst_n) begin
    int ng;
    for (int t = 0; t < 3; t++) begin
      if (tgt_req[t].valid && tgt_ready[t]) begin
        mem_rsp_t r;
        int id;
        id = int'(tgt_req[t].id);
        check(gnt(id), "granted channel matches the tag");
        check(req[id].valid && req[id].tgt == tgt_e'(t), "request reached its target");
        check(tgt_req[t].addr == req[id].addr && tgt_req[t].we == req[id].we &&
              tgt_req[t].size == req[id].size && tgt_req[t].wdata == req[id].wdata,
              "request fields forwarded");
        r.valid = 1; r.id = TAG_W'(id); r.rdata = {DATA_W{1'b0}} | {tgt_req[t].addr, 8'(id)};
        q[t].push_back(r);
      end
    end
    ng = 0;
    for (int c = 0; c < CH; c++) if (gnt(c)) ng++;
    if (ng > 1) parallel++;
    for (int t = 0; t < 3; t++) begin
      int n;
      n = 0;
      for (int c = 0; c < CH; c++) if (gnt(c) && req[c].tgt == tgt_e'(t)) n++;
      check(n <= 1, "at most one grant per target");
    end
  end

  always @(negedge clk) begin
    for (int t = 0; t < 3; t++) begin
      tgt_ready[t] <= ($urandom_range(99) < ready_pct);
      tgt_rsp[t]   <= '0;
      if (q[t].size() > 0 && $urandom_range(1)) tgt_rsp[t] <= q[t].pop_front();
    end
  end

  // model channels
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 4; l++) begin
      if (lane_rd_rsp_valid[l]) begin
        check(outstanding[2*l], "read data only to a waiting read channel");
        check(lane_rd_rsp_rdata[l][7:0] == 8'(2*l) &&
              lane_rd_rsp_rdata[l][39:8] == req[2*l].addr,
              "read data reach the right lane");
        outstanding[2*l] = 0;
      end
      if (lane_wr_ack[l]) begin
        check(outstanding[2*l + 1], "acknowledge only to a waiting write channel");
        outstanding[2*l + 1] = 0;
      end
    end
    for (int c = 0; c < CH; c++)
      if (req[c].valid && !outstanding[c] && gnt(c)) begin
        outstanding[c] = 1;
        req[c].valid <= 0;
        check(wait_grants[c] <= CH, "round-robin bound");
        wait_grants[c] = 0;
      end
  end

  // count grants given to others while a channel waits on the same target
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < CH; c++)
      if (req[c].valid && !outstanding[c] && !gnt(c))
        for (int o = 0; o < CH; o++)
          if (gnt(o) && req[o].tgt == req[c].tgt) wait_grants[c]++;
  end

  initial begin
    for (int c = 0; c < CH; c++) begin
      req[c] = '0; outstanding[c] = 0; wait_grants[c] = 0;
    end
    for (int t = 0; t < 3; t++) tgt_rsp[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      for (int c = 0; c < CH; c++)
        if (!req[c].valid && !outstanding[c] && $urandom_range(2) == 0) begin
          req[c].valid = 1;
          req[c].we    = c[0];
          req[c].tgt   = (k < 2000) ? TGT_DRAM : tgt_e'($urandom_range(2));
          req[c].addr  = $urandom;
          req[c].size  = 7'($urandom_range(1, 64));
          req[c].wdata = {16{$urandom}};
        end
    end
    check(parallel > 50, "several channels served in the same cycle");
    $display("cycles with parallel grants: %0d", parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
