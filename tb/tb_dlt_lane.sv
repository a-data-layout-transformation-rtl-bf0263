// tb_dlt_lane: self-checking test of one DLT lane.
// The lane talks to three byte-array memories kept here (DRAM, local memory,
// vector registers), one per target, so a request routed to the wrong
// target leaves its data in the wrong array and is caught.  The test queues
// a strided GATHER (DRAM -> local memory), a SCATTER back to DRAM, a VGATHER
// and a VSCATTER, then random instructions with a randomly stalling memory,
// and compares every destination byte with a reference move done here.
// The read and the write channel are granted independently; read data come
// back in order after 1 cycle, or after a random 1..6 cycles in the random
// part, so several reads are outstanding.  With grants always high and
// single-cycle memories, reads and writes overlap and an instruction of n
// elements takes n + 2 cycles.  Random instructions keep
// source and destination apart: overlap within an instruction is outside
// the lane's contract (reads run ahead of writes).
module tb_dlt_lane;
  import dlt_pkg::*;

  localparam int MB = 65536;
  logic clk = 0, rst_n = 0;
  logic push = 0;
  entry_t push_entry = '0;
  logic full, busy, done;
  logic [4:0] count;
  opc_e done_opc;
  lane_req_t rd_req, wr_req;
  logic rd_gnt, wr_gnt, rd_rsp_valid, wr_ack;
  logic [DATA_W-1:0] rd_rsp_rdata;
  int checks = 0, failures = 0, cycles = 0, done_cnt = 0, q_full_cycles = 0;
  int max_rd_out = 0, max_lat = 1, last_due = 0, now = 0;
  typedef struct { int due; logic [DATA_W-1:0] data; } rd_rsp_t;
  rd_rsp_t rd_q [$];
  int gnt_pct = 100;

  logic [7:0] mem [3][MB];   // indexed by tgt_e
  logic [7:0] ref_mem [3][MB];

  dlt_lane dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) if (done) done_cnt++;
  always @(posedge clk) if (rst_n && dut.q_cnt == 4) q_full_cycles++;
  always @(posedge clk) if (rst_n && int'(dut.rd_cnt) > max_rd_out) max_rd_out = int'(dut.rd_cnt);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  // memory responder: random grant per channel; a write completes one cycle
  // after its grant, a read after 1..max_lat cycles, in order
  always @(negedge clk) begin
    rd_gnt <= ($urandom_range(99) < gnt_pct);
    wr_gnt <= ($urandom_range(99) < gnt_pct);
  end
  always_ff @(posedge clk) begin
    rd_rsp_valid <= 1'b0;
    wr_ack       <= 1'b0;
    if (rst_n && rd_req.valid && rd_gnt) begin
      rd_rsp_t r;
      check(!rd_req.we, "read channel carries reads");
      r.data = '0;
      for (int p = 0; p < int'(rd_req.size); p++)
        r.data[p*8 +: 8] = mem[rd_req.tgt][(rd_req.addr + p) % MB];
      r.due = now + $urandom_range(max_lat - 1);
      if (r.due < last_due) r.due = last_due;
      last_due = r.due;
      rd_q.push_back(r);
    end
    if (rd_q.size() > 0 && rd_q[0].due <= now) begin
      rd_rsp_valid <= 1'b1;
      rd_rsp_rdata <= rd_q.pop_front().data;
    end
    now++;
    if (rst_n && wr_req.valid && wr_gnt) begin
      check(wr_req.we, "write channel carries writes");
      wr_ack <= 1'b1;
      for (int p = 0; p < int'(wr_req.size); p++)
        mem[wr_req.tgt][(wr_req.addr + p) % MB] <= wr_req.wdata[p*8 +: 8];
    end
  end

  function automatic int tgt_of(input logic [31:0] a);
    return (a[31:22] == 10'h200) ? 0 : 2;
  endfunction

  // reference move, applied to ref_mem in program order
  task automatic ref_move(input entry_t e);
    int n, fs, st, ts, td;
    logic [31:0] s, d;
    n  = (e.desc.nelem == 0) ? 4096 : e.desc.nelem;
    fs = (e.desc.fsize == 0) ? 64 : e.desc.fsize;
    st = e.desc.stride;
    ts = (e.opc == OPC_VSCATTER) ? 1 : tgt_of(e.src);
    td = (e.opc == OPC_VGATHER)  ? 1 : tgt_of(e.dst);
    s = e.src; d = e.dst;
    for (int i = 0; i < n; i++) begin
      for (int p = 0; p < fs; p++) ref_mem[td][(d + p) % MB] = ref_mem[ts][(s + p) % MB];
      if (e.opc == OPC_GATHER || e.opc == OPC_VGATHER) begin s += st; d += fs; end
      else begin s += fs; d += st; end
    end
  endtask

  // source and destination extents meet in the same memory
  function automatic logic overlaps(input entry_t e);
    int n, fs, st, ts, td;
    int s0, s1, d0, d1;
    n  = e.desc.nelem;
    fs = (e.desc.fsize == 0) ? 64 : e.desc.fsize;
    st = e.desc.stride;
    ts = (e.opc == OPC_VSCATTER) ? 1 : tgt_of(e.src);
    td = (e.opc == OPC_VGATHER)  ? 1 : tgt_of(e.dst);
    s0 = e.src % MB; d0 = e.dst % MB;
    if (e.opc == OPC_GATHER || e.opc == OPC_VGATHER) begin
      s1 = s0 + (n - 1) * st + fs; d1 = d0 + n * fs;
    end else begin
      s1 = s0 + n * fs; d1 = d0 + (n - 1) * st + fs;
    end
    return ts == td && s0 < d1 && d0 < s1;
  endfunction

  task automatic issue(input entry_t e);
    @(negedge clk);
    while (full) @(negedge clk);
    push = 1; push_entry = e;
    @(negedge clk);
    push = 0;
    ref_move(e);
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic compare_all(input string what);
    int bad = 0;
    for (int t = 0; t < 3; t++)
      for (int a = 0; a < MB; a++)
        if (mem[t][a] !== ref_mem[t][a]) bad++;
    check(bad == 0, what);
    if (bad != 0) $display("  %0d bytes differ", bad);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    entry_t e;
    int t0, t1;
    for (int t = 0; t < 3; t++)
      for (int a = 0; a < MB; a++) begin
        mem[t][a] = 8'($urandom);
        ref_mem[t][a] = mem[t][a];
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!busy && !rd_req.valid && !wr_req.valid, "idle after reset");

    // GATHER: 16 elements of 4 bytes, stride 64, DRAM -> local memory
    e = '{opc: OPC_GATHER, src: 32'h0000_1000, dst: 32'h8000_2000,
          desc: '{nelem: 12'd16, stride: 14'd64, fsize: 6'd4}};
    t0 = cycles;
    issue(e);
    @(posedge clk);
    while (busy) @(posedge clk);
    t1 = cycles;
    check(done_cnt == 1, "one completion for the gather");
    // 16 elements + 2 cycles of read/write latency, plus the push cycle and
    // the final idle sample
    check(t1 - t0 >= 18 && t1 - t0 <= 20, "one element per cycle with an ideal memory");
    $display("gather of 16 elements took %0d cycles", t1 - t0);
    wait_idle();
    compare_all("strided gather into local memory");

    // SCATTER back with 64-byte elements, VGATHER and VSCATTER
    issue('{opc: OPC_SCATTER, src: 32'h8000_2000, dst: 32'h0000_8000,
            desc: '{nelem: 12'd3, stride: 14'd200, fsize: 6'd0}});
    issue('{opc: OPC_VGATHER, src: 32'h0000_3001, dst: 32'h0000_0300,
            desc: '{nelem: 12'd64, stride: 14'd24, fsize: 6'd4}});
    issue('{opc: OPC_VSCATTER, src: 32'h0000_0300, dst: 32'h8000_4003,
            desc: '{nelem: 12'd32, stride: 14'd9, fsize: 6'd8}});
    wait_idle();
    compare_all("scatter, vgather and vscatter");
    check(done_cnt == 4, "four completions");

    // random instructions, stalling memory
    gnt_pct = 60;
    max_lat = 6;
    for (int i = 0; i < 40; i++) begin
      e.opc = opc_e'($urandom_range(1, 4));
      do begin
        e.src = ($urandom_range(1) ? 32'h8000_0000 : 32'h0) | $urandom_range(0, MB - 8192);
        e.dst = ($urandom_range(1) ? 32'h8000_0000 : 32'h0) | $urandom_range(0, MB - 8192);
        e.desc.nelem  = 12'($urandom_range(1, 20));
        e.desc.stride = 14'($urandom_range(0, 300));
        e.desc.fsize  = 6'($urandom_range(0, 63));
      end while (overlaps(e));
      issue(e);
    end
    wait_idle();
    compare_all("random instructions");
    check(done_cnt == 44, "every instruction completed once");
    check(q_full_cycles > 0, "read-ahead queue filled while writes stalled");
    check(max_rd_out == 4, "four reads outstanding at once");
    $display("most reads outstanding: %0d, cycles with a full queue: %0d", max_rd_out, q_full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
