// tb_dlt_top: end-to-end test of the DLT accelerator at its full size
// (four lanes, 16-entry buffers, 4 MiB local memory, 16 x 256 B vector
// registers) with a behavioural DRAM.
//
// A program of DLT instructions is issued as the RISC pipeline would:
// descriptors are made with FORMDESC, then strided gathers from DRAM into
// local memory, 64-byte elements, a 4096-element gather, VGATHER from DRAM
// and from local memory, a 16 x 16 transpose inside local memory, scatters
// and VSCATTERs back out, separated by GATHERFENCE / SCATTERFENCE / FENCE as
// software must between dependent steps, and a FLUSH.  Every instruction is
// replayed on reference byte arrays here; DRAM, the touched local memory and
// all vector registers are compared at the end, and the transpose is also
// checked against its definition.  The test counts how often each mechanism
// happened and fails if one never did: all-lanes-full back-pressure, a
// core stall after a fence, a FENCE holding the DLT, the flush handshake,
// the row port holding the lanes off, DRAM back-pressure and four lanes busy
// at once.  It also checks the element rates of a lone instruction: two
// cycles per element local memory to local memory (one shared element port),
// one cycle per element vector registers to local memory.
module tb_dlt_top;
  import dlt_pkg::*;

  localparam int DRAM_B = 65536;
  localparam int LM_B   = 4 * 1024 * 1024;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  isa_e cmd_op = ISA_FORMDESC;
  logic [31:0] cmd_a = 0, cmd_b = 0, cmd_c = 0, cmd_result;
  logic cmd_ready, risc_mem_stall, busy;
  logic flush_valid, flush_done = 0;
  logic [31:0] flush_addr1, flush_addr2;
  mem_req_t dram_req;
  logic dram_ready;
  mem_rsp_t dram_rsp;
  logic lm_io_en = 0, lm_io_we = 0;
  logic [13:0] lm_io_row = '0;
  logic [63:0] lm_io_wmask = '0;
  logic [2047:0] lm_io_wdata = '0, lm_io_rdata;
  logic lm_io_rvalid;
  logic vr_en = 0, vr_we = 0;
  logic [3:0] vr_idx = '0;
  logic [63:0] vr_wmask = '0;
  logic [2047:0] vr_wdata = '0, vr_rdata;
  logic vr_rvalid;

  logic [7:0] ref_dram [DRAM_B];
  logic [7:0] ref_lm   [LM_B];
  logic [7:0] ref_vr   [4096];

  int checks = 0, failures = 0, cycles = 0;
  // mechanism counters
  int n_full_stall = 0, n_fence_stall = 0, n_dlt_stall = 0, n_flush = 0;
  int n_row_holdoff = 0, n_dram_busy = 0, n_four_busy = 0, n_instr = 0;
  logic row_traffic = 0;

  dlt_top dut (.*);
  tb_dram_model #(.BYTES(DRAM_B), .LAT(6), .READY_PCT(70)) dram (
    .clk, .rst_n, .req(dram_req), .ready(dram_ready), .rsp(dram_rsp)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (risc_mem_stall) n_fence_stall++;
    if (dut.dlt_stall && cmd_valid) n_dlt_stall++;
    if (cmd_valid && !cmd_ready && (&dut.lane_full)) n_full_stall++;
    if (lm_io_en && dut.tgt_req[TGT_LM].valid) n_row_holdoff++;
    if (dram_req.valid && !dram_ready) n_dram_busy++;
    if (&dut.lane_busy) n_four_busy++;
    if (flush_valid && flush_done) n_flush++;
  end

  // cache hierarchy stand-in: acknowledge a flush three cycles later
  always @(posedge clk) begin
    int d;
    if (!flush_valid) d = 0;
    else d++;
    flush_done <= flush_valid && (d == 3);
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ------------------------------------------------------
  function automatic logic is_lm(input logic [31:0] a);
    return a[31:22] == 10'h200;
  endfunction

  function automatic logic [7:0] rd_ref(input int kind, input logic [31:0] a);
    case (kind)
      0: return ref_lm[a[21:0]];
      1: return ref_vr[a[11:0]];
      default: return ref_dram[a % DRAM_B];
    endcase
  endfunction

  task automatic wr_ref(input int kind, input logic [31:0] a, input logic [7:0] v);
    case (kind)
      0: ref_lm[a[21:0]] = v;
      1: ref_vr[a[11:0]] = v;
      default: ref_dram[a % DRAM_B] = v;
    endcase
  endtask

  task automatic ref_move(input opc_e opc, input logic [31:0] src, dst, input desc_t d);
    int n, fs, st, ks, kd;
    logic [31:0] s, t;
    logic [7:0] el [64];
    n  = (d.nelem == 0) ? 4096 : d.nelem;
    fs = (d.fsize == 0) ? 64 : d.fsize;
    st = d.stride;
    ks = (opc == OPC_VSCATTER) ? 1 : (is_lm(src) ? 0 : 2);
    kd = (opc == OPC_VGATHER)  ? 1 : (is_lm(dst) ? 0 : 2);
    s = src; t = dst;
    for (int i = 0; i < n; i++) begin
      for (int p = 0; p < fs; p++) el[p] = rd_ref(ks, s + p);
      for (int p = 0; p < fs; p++) wr_ref(kd, t + p, el[p]);
      if (opc == OPC_GATHER || opc == OPC_VGATHER) begin s += st; t += fs; end
      else begin s += fs; t += st; end
    end
  endtask

  // ---- instruction issue ----------------------------------------------------
  task automatic send(input isa_e op, input logic [31:0] a, b, c);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_a = a; cmd_b = b; cmd_c = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1;
    cmd_valid = 0;
    n_instr++;
  endtask

  task automatic formdesc(input int n, st, fs, output logic [31:0] d);
    @(negedge clk);
    cmd_valid = 1; cmd_op = ISA_FORMDESC; cmd_a = n; cmd_b = st; cmd_c = fs;
    #1;
    d = cmd_result;
    check(cmd_ready && d == {12'(n), 14'(st), 6'(fs)}, "FORMDESC result");
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  task automatic move(input isa_e op, input logic [31:0] a, b, c);
    opc_e o;
    logic [31:0] src, dst;
    send(op, a, b, c);
    case (op)
      ISA_GATHER:   begin o = OPC_GATHER;   dst = a; src = b; end
      ISA_SCATTER:  begin o = OPC_SCATTER;  dst = a; src = b; end
      ISA_VGATHER:  begin o = OPC_VGATHER;  dst = {20'd0, a[3:0], 8'd0}; src = b; end
      default:      begin o = OPC_VSCATTER; dst = a; src = {20'd0, b[3:0], 8'd0}; end
    endcase
    ref_move(o, src, dst, desc_t'(c));
  endtask

  task automatic wait_risc();
    @(posedge clk);
    while (risc_mem_stall) @(posedge clk);
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (8) @(posedge clk);
  endtask

  // ---- result readback ----------------------------------------------------
  task automatic compare_lm_rows(input int r0, input int r1, input string what);
    int bad = 0;
    for (int r = r0; r < r1; r++) begin
      @(negedge clk);
      lm_io_en = 1; lm_io_we = 0; lm_io_row = 14'(r);
      @(negedge clk);
      lm_io_en = 0;
      for (int a = 0; a < 256; a++) if (lm_io_rdata[a*8 +: 8] != ref_lm[r*256 + a]) bad++;
    end
    check(bad == 0, what);
    if (bad) $display("  %0d local-memory bytes differ", bad);
  endtask

  task automatic compare_vr(input string what);
    int bad = 0;
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      vr_en = 1; vr_we = 0; vr_idx = 4'(r);
      @(negedge clk);
      vr_en = 0;
      for (int a = 0; a < 256; a++) if (vr_rdata[a*8 +: 8] != ref_vr[r*256 + a]) bad++;
    end
    check(bad == 0, what);
    if (bad) $display("  %0d vector-register bytes differ", bad);
  endtask

  task automatic compare_dram(input string what);
    int bad = 0;
    for (int a = 0; a < DRAM_B; a++) if (dram.mem[a] != ref_dram[a]) bad++;
    check(bad == 0, what);
    if (bad) $display("  %0d DRAM bytes differ", bad);
  endtask

  // background traffic on the local memory row port
  always @(negedge clk) begin
    if (row_traffic && !lm_io_en && $urandom_range(7) == 0) begin
      lm_io_en <= 1; lm_io_we <= 0; lm_io_row <= 14'd200;
    end else if (row_traffic) begin
      lm_io_en <= 0;
    end
  end

  // ---- program ------------------------------------------------------------
  initial begin
    logic [31:0] d1, d2, d3, d4, dt, ds, dv, dw, dsmall, dbig, dl;
    int t0;
    for (int a = 0; a < DRAM_B; a++) ref_dram[a] = dram.init_byte(a);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!busy && !risc_mem_stall, "idle after reset");

    // Known contents: local memory rows 0..255 (64 KiB) and all vector registers.
    for (int r = 0; r < 256; r++) begin
      @(negedge clk);
      lm_io_en = 1; lm_io_we = 1; lm_io_row = 14'(r); lm_io_wmask = '1;
      for (int i = 0; i < 64; i++) lm_io_wdata[i*32 +: 32] = $urandom;
      for (int a = 0; a < 256; a++) ref_lm[r*256 + a] = lm_io_wdata[a*8 +: 8];
    end
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      lm_io_en = 0;
      vr_en = 1; vr_we = 1; vr_idx = 4'(r); vr_wmask = '1;
      for (int i = 0; i < 64; i++) vr_wdata[i*32 +: 32] = $urandom;
      for (int a = 0; a < 256; a++) ref_vr[r*256 + a] = vr_wdata[a*8 +: 8];
    end
    @(negedge clk);
    vr_en = 0; lm_io_en = 0;

    // Element rate: one local-memory to local-memory gather in an idle DLT.
    formdesc(16, 64, 4, dl);
    t0 = cycles;
    move(ISA_GATHER, 32'h8000_7000, 32'h8000_6000, dl);
    @(posedge clk);
    while (busy) @(posedge clk);
    $display("16-element local gather: %0d cycles", cycles - t0);
    // Read and write of consecutive elements share the one local-memory
    // element port: two accesses per element.
    check(cycles - t0 >= 32 && cycles - t0 <= 36, "two cycles per element, local to local");
    wait_idle();

    // Vector register file to local memory: reads and writes overlap, one
    // element per cycle.
    t0 = cycles;
    move(ISA_VSCATTER, 32'h8000_6800, 32'h0000_0300, dl);
    @(posedge clk);
    while (busy) @(posedge clk);
    $display("16-element vector scatter: %0d cycles", cycles - t0);
    check(cycles - t0 >= 16 && cycles - t0 <= 20, "one cycle per element, register to local");
    wait_idle();

    // Phase 1: gathers into local memory and the vector registers.
    formdesc(32, 256, 8, d1);
    formdesc(8, 512, 64, d2);      // 64-byte elements (fsize field 0)
    formdesc(64, 12, 4, d3);       // fills one 256-byte vector register
    formdesc(16, 16, 16, d4);
    row_traffic = 1;
    move(ISA_GATHER,  32'h8000_0000, 32'h0000_1000, d1);
    move(ISA_GATHER,  32'h8000_1000, 32'h0000_4000, d2);
    move(ISA_VGATHER, 32'd3,         32'h0000_6000, d3);
    move(ISA_VGATHER, 32'd5,         32'h8000_2000, d4);
    send(ISA_GATHERFENCE, 0, 0, 0);
    wait_risc();
    check(!dut.gathers_pending, "gather fence released after the gathers");

    // Phase 2: 16 x 16 transpose of 4-byte words inside local memory,
    // one GATHER per output row, spread over the four lanes.
    formdesc(16, 64, 4, dt);
    for (int c = 0; c < 16; c++)
      move(ISA_GATHER, 32'h8000_3400 + c * 64, 32'h8000_3000 + c * 4, dt);
    formdesc(32, 100, 8, ds);
    formdesc(64, 20, 4, dv);
    formdesc(20, 40, 3, dw);
    move(ISA_SCATTER,  32'h0000_9000, 32'h8000_0000, ds);
    move(ISA_VSCATTER, 32'h0000_A000, 32'd3, dv);
    move(ISA_VSCATTER, 32'h8000_5000, 32'd5, dw);
    send(ISA_SCATTERFENCE, 0, 0, 0);
    send(ISA_FENCE, 0, 0, 0);
    send(ISA_FLUSH, 32'h0000_9000, 32'h0000_B000, 0);
    wait_idle();

    // Phase 3: more instructions than the four 16-entry buffers hold.
    formdesc(4, 8, 4, dsmall);
    for (int i = 0; i < 80; i++)
      move(ISA_GATHER, 32'h8000_8000 + i * 16, 32'h0000_C000 + i * 64, dsmall);
    // one instruction of 4096 two-byte elements (nelem field 0)
    formdesc(4096, 2, 2, dbig);
    move(ISA_GATHER, 32'h8000_C000, 32'h0000_0000, dbig);
    send(ISA_FENCE, 0, 0, 0);
    send(ISA_FLUSH, 32'h0, 32'h1000, 0);
    wait_idle();
    row_traffic = 0;
    repeat (2) @(negedge clk);

    // ---- results ----
    compare_dram("DRAM contents");
    compare_lm_rows(0, 256, "local memory contents");
    compare_vr("vector register contents");
    begin
      int bad = 0;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          for (int b = 0; b < 4; b++)
            if (ref_lm[32'h3400 + r * 64 + c * 4 + b] != ref_lm[32'h3000 + c * 64 + r * 4 + b]) bad++;
      check(bad == 0, "transpose matches its definition");
    end
    check(dram.n_reads > 0 && dram.n_writes > 0, "DRAM was read and written");

    $display("instructions %0d, all-lanes-full stalls %0d, fence stall cycles %0d, FENCE holds %0d",
             n_instr, n_full_stall, n_fence_stall, n_dlt_stall);
    $display("flushes %0d, row-port hold-offs %0d, DRAM busy cycles %0d, four-lanes-busy cycles %0d, cycles %0d",
             n_flush, n_row_holdoff, n_dram_busy, n_four_busy, cycles);
    check(n_full_stall > 0, "all lanes full back-pressure happened");
    check(n_fence_stall > 0, "fence stall happened");
    check(n_dlt_stall > 0, "FENCE held the DLT");
    check(n_flush == 2, "two flushes completed");
    check(n_row_holdoff > 0, "row port held the lanes off");
    check(n_dram_busy > 0, "DRAM back-pressure happened");
    check(n_four_busy > 0, "four lanes busy at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
