// tb_dlt_workloads: the data movements of the evaluated applications, at
// reduced sizes, on the full-size accelerator with a behavioural DRAM.
// Results are checked against each movement's definition (a transpose is a
// transpose), not against a replay of the instructions.
//   2D FFT  : a 32 x 32 matrix of 16-bit samples is gathered row by row from
//             DRAM into local memory, transposed inside local memory with one
//             column GATHER per output row, and scattered back to DRAM.
//   DWT/2DCon: 8-int-wide column tiles of a 24 x 40 int image are gathered
//             (stride = image row) into packed local-memory tiles and
//             scattered back into a second image in DRAM.
//   MS      : 8 streams of 64 ints are moved contiguously (64-byte elements)
//             into local memory and scattered back interleaved by stream.
//   MM      : rows of A go to local memory and then by VGATHER into vector
//             registers; columns of B are gathered straight from DRAM into
//             vector registers (stride = row of B).
// Each application is separated from the next by fences, as software would.
module tb_dlt_workloads;
  import dlt_pkg::*;

  localparam int DRAM_B = 65536;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  isa_e cmd_op = ISA_FORMDESC;
  logic [31:0] cmd_a = 0, cmd_b = 0, cmd_c = 0, cmd_result;
  logic cmd_ready, risc_mem_stall, busy;
  logic flush_valid, flush_done;
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
  int checks = 0, failures = 0, cycles = 0;

  assign flush_done = flush_valid;

  dlt_top dut (.*);
  tb_dram_model #(.BYTES(DRAM_B), .LAT(8), .READY_PCT(90)) dram (
    .clk, .rst_n, .req(dram_req), .ready(dram_ready), .rsp(dram_rsp)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] orig(input int a);   // DRAM contents at start
    return dram.init_byte(a);
  endfunction

  task automatic send(input isa_e op, input logic [31:0] a, b, c);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_a = a; cmd_b = b; cmd_c = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1;
    cmd_valid = 0;
  endtask

  function automatic logic [31:0] desc(input int n, st, fs);
    return {12'(n), 14'(st), 6'(fs)};
  endfunction

  task automatic drain();
    send(ISA_FENCE, 0, 0, 0);
    @(posedge clk);
    while (busy || risc_mem_stall) @(posedge clk);
    repeat (10) @(posedge clk);
  endtask

  task automatic read_vr(input int r, output logic [2047:0] d);
    @(negedge clk);
    vr_en = 1; vr_we = 0; vr_idx = 4'(r);
    @(negedge clk);
    vr_en = 0;
    d = vr_rdata;
  endtask

  task automatic read_lm_byte(input int a, output logic [7:0] v);
    @(negedge clk);
    lm_io_en = 1; lm_io_we = 0; lm_io_row = 14'(a / 256);
    @(negedge clk);
    lm_io_en = 0;
    v = lm_io_rdata[(a % 256) * 8 +: 8];
  endtask

  initial begin
    int t0, bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // ---------------- 2D FFT: 32 x 32 x 16-bit transpose ----------------
    // A at DRAM 0x0000 (row = 64 B); local copy at LM+0x0000, transposed at
    // LM+0x1000; result back to DRAM 0x2000.
    t0 = cycles;
    for (int r = 0; r < 32; r++)
      send(ISA_GATHER, 32'h8000_0000 + r * 64, r * 64, desc(1, 64, 64));
    send(ISA_GATHERFENCE, 0, 0, 0);
    for (int c = 0; c < 32; c++)
      send(ISA_GATHER, 32'h8000_1000 + c * 64, 32'h8000_0000 + c * 2, desc(32, 64, 2));
    drain();
    for (int r = 0; r < 32; r++)
      send(ISA_SCATTER, 32'h2000 + r * 64, 32'h8000_1000 + r * 64, desc(2, 32, 32));
    send(ISA_FLUSH, 32'h2000, 32'h2800, 0);
    drain();
    bad = 0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++)
        for (int b = 0; b < 2; b++)
          if (dram.mem[32'h2000 + r * 64 + c * 2 + b] != orig(c * 64 + r * 2 + b)) bad++;
    check(bad == 0, "2D FFT: DRAM holds the transpose");
    $display("2D FFT 32x32 transpose round trip: %0d cycles", cycles - t0);

    // ---------------- DWT / 2DCon: column tiles of a 24 x 40 int image ----
    // image at DRAM 0x3000 (row = 160 B); tiles at LM+0x4000 (24 x 32 B each);
    // copy to DRAM 0x5000.
    t0 = cycles;
    for (int tcol = 0; tcol < 5; tcol++)
      send(ISA_GATHER, 32'h8000_4000 + tcol * 24 * 32, 32'h3000 + tcol * 32, desc(24, 160, 32));
    drain();
    bad = 0;
    for (int k = 0; k < 40; k++) begin
      int tcol, y, x, b;
      logic [7:0] v;
      tcol = $urandom_range(4); y = $urandom_range(23); x = $urandom_range(7); b = $urandom_range(3);
      read_lm_byte(32'h4000 + tcol * 768 + y * 32 + x * 4 + b, v);
      if (v != orig(32'h3000 + y * 160 + (tcol * 8 + x) * 4 + b)) bad++;
    end
    check(bad == 0, "DWT: packed column tiles in local memory");
    for (int tcol = 0; tcol < 5; tcol++)
      send(ISA_SCATTER, 32'h5000 + tcol * 32, 32'h8000_4000 + tcol * 24 * 32, desc(24, 160, 32));
    drain();
    bad = 0;
    for (int a = 0; a < 24 * 160; a++) if (dram.mem[32'h5000 + a] != orig(32'h3000 + a)) bad++;
    check(bad == 0, "DWT: tiles scattered back rebuild the image");
    $display("DWT 24x40 tile round trip: %0d cycles", cycles - t0);

    // ---------------- MS: 8 streams x 64 ints -------------------------------
    // streams at DRAM 0x7000 (256 B each) -> LM+0x8000 contiguous; back to
    // DRAM 0x8000 interleaved: 16-byte chunk j of stream s at (j*8 + s)*16.
    t0 = cycles;
    for (int s = 0; s < 8; s++)
      send(ISA_GATHER, 32'h8000_8000 + s * 256, 32'h7000 + s * 256, desc(4, 64, 0));
    drain();
    for (int s = 0; s < 8; s++)
      send(ISA_SCATTER, 32'h8000 + s * 16, 32'h8000_8000 + s * 256, desc(16, 128, 16));
    drain();
    bad = 0;
    for (int s = 0; s < 8; s++)
      for (int j = 0; j < 16; j++)
        for (int b = 0; b < 16; b++)
          if (dram.mem[32'h8000 + (j * 8 + s) * 16 + b] != orig(32'h7000 + s * 256 + j * 16 + b)) bad++;
    check(bad == 0, "MS: streams moved and interleaved");
    $display("MS 8 streams: %0d cycles", cycles - t0);

    // ---------------- MM: rows of A and columns of B into vector registers --
    // A: 16 rows of 64 ints at DRAM 0x9000 (a row is 256 B); B: 64 x 64 ints
    // at DRAM 0xB000.  A rows 0..3 -> LM+0xA000 -> V0..V3; B columns 0..3
    // (64 ints each, stride 256 B) -> V8..V11, one full register per column.
    t0 = cycles;
    send(ISA_GATHER, 32'h8000_A000, 32'h9000, desc(16, 64, 0));
    send(ISA_GATHERFENCE, 0, 0, 0);
    @(posedge clk);
    while (risc_mem_stall) @(posedge clk);
    for (int r = 0; r < 4; r++)
      send(ISA_VGATHER, r, 32'h8000_A000 + r * 256, desc(4, 64, 0));
    for (int c = 0; c < 4; c++)
      send(ISA_VGATHER, 8 + c, 32'hB000 + c * 4, desc(64, 256, 4));
    drain();
    bad = 0;
    for (int r = 0; r < 4; r++) begin
      logic [2047:0] d;
      read_vr(r, d);
      for (int a = 0; a < 256; a++) if (d[a*8 +: 8] != orig(32'h9000 + r * 256 + a)) bad++;
    end
    check(bad == 0, "MM: rows of A in V0..V3");
    bad = 0;
    for (int c = 0; c < 4; c++) begin
      logic [2047:0] d;
      read_vr(8 + c, d);
      for (int k = 0; k < 64; k++)
        for (int b = 0; b < 4; b++)
          if (d[(k * 4 + b) * 8 +: 8] != orig(32'hB000 + k * 256 + c * 4 + b)) bad++;
    end
    check(bad == 0, "MM: columns of B packed in V8..V11");
    $display("MM vector loads: %0d cycles", cycles - t0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
