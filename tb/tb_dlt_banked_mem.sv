// tb_dlt_banked_mem: self-checking test of the local memory (64 banks of
// 4 B x 16k, the default size).
// Random element writes and reads of 1..64 bytes at any byte address, and
// random whole-row reads and writes with word masks, are compared with a
// byte-array reference.  Checks the one-cycle latency of both ports, the
// tag returned with each response, and that the row port holds the
// element port off (dlt_ready low) when both are used.
module tb_dlt_banked_mem;
  import dlt_pkg::*;

  localparam int BANKS = 64, ROWS = 16384, BYTES = BANKS * ROWS * 4;
  logic clk = 0, rst_n = 0;
  logic io_en = 0, io_we = 0;
  logic [13:0] io_row = '0;
  logic [63:0] io_wmask = '0;
  logic [2047:0] io_wdata = '0, io_rdata;
  logic io_rvalid, dlt_ready;
  mem_req_t dlt_req;
  mem_rsp_t dlt_rsp;
  logic [7:0] ref_mem [BYTES];
  int checks = 0, failures = 0, blocked = 0;

  dlt_banked_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Element access: drive at negedge, sample the response one cycle later.
  task automatic elem(input logic we, input int unsigned addr, input int size, input logic [TAG_W-1:0] id);
    logic [DATA_W-1:0] wd, exp;
    for (int i = 0; i < 16; i++) wd[i*32 +: 32] = $urandom;
    @(negedge clk);
    dlt_req = '{valid: 1'b1, we: we, addr: 32'h8000_0000 | addr, size: 7'(size), wdata: wd, id: id};
    @(negedge clk);
    dlt_req.valid = 0;
    check(dlt_rsp.valid && dlt_rsp.id == id, "response one cycle after the request, with its tag");
    exp = '0;
    for (int p = 0; p < size; p++) begin
      if (we) ref_mem[(addr + p) % BYTES] = wd[p*8 +: 8];
      else    exp[p*8 +: 8] = ref_mem[(addr + p) % BYTES];
    end
    if (!we) check(dlt_rsp.rdata == exp, "element read data");
    if (!we && dlt_rsp.rdata != exp) $display("addr=%h size=%0d\n got=%h\n exp=%h", addr, size, dlt_rsp.rdata, exp);
  endtask

  task automatic row(input logic we, input int r);
    logic [2047:0] wd;
    logic [63:0] m;
    for (int i = 0; i < 64; i++) wd[i*32 +: 32] = $urandom;
    m = {$urandom, $urandom};
    @(negedge clk);
    io_en = 1; io_we = we; io_row = 14'(r); io_wmask = m; io_wdata = wd;
    @(negedge clk);
    io_en = 0;
    if (we) begin
      for (int b = 0; b < 64; b++)
        if (m[b]) for (int j = 0; j < 4; j++) ref_mem[r*256 + b*4 + j] = wd[b*32 + j*8 +: 8];
    end else begin
      logic ok;
      ok = io_rvalid;
      for (int a = 0; a < 256; a++) if (io_rdata[a*8 +: 8] != ref_mem[r*256 + a]) ok = 0;
      check(ok, "row read");
    end
  endtask

  initial begin
    int unsigned base;
    dlt_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // establish known contents in a few regions through the row port
    for (int r = 0; r < 65; r++) begin
      @(negedge clk);
      io_en = 1; io_we = 1; io_row = 14'(r); io_wmask = '1;
      for (int i = 0; i < 64; i++) io_wdata[i*32 +: 32] = $urandom;
      for (int a = 0; a < 256; a++) ref_mem[r*256 + a] = io_wdata[a*8 +: 8];
    end
    @(negedge clk); io_en = 0;
    for (int i = 0; i < 3000; i++) begin
      // most traffic in the first 16 KiB so reads hit written data; some anywhere
      base = ($urandom_range(9) == 0) ? $urandom_range(0, BYTES - 1) : $urandom_range(0, 16383);
      if (base >= 16384) begin
        int sz;
        sz = $urandom_range(1, 64);
        elem(1, base, sz, TAG_W'($urandom));
        elem(0, base, sz, TAG_W'($urandom));
      end else begin
        case ($urandom_range(3))
          0: elem(1, base, $urandom_range(1, 64), TAG_W'($urandom));
          1: elem(0, base, $urandom_range(1, 64), TAG_W'($urandom));
          2: row($urandom_range(1), $urandom_range(0, 63));
          default: elem(0, base, 64, TAG_W'($urandom));
        endcase
      end
    end
    // the row port takes priority over the element port
    @(negedge clk);
    io_en = 1; io_we = 0; io_row = 14'd3;
    dlt_req = '{valid: 1'b1, we: 1'b1, addr: 32'h8000_0300, size: 7'd4, wdata: '1, id: 2'd1};
    #1 check(!dlt_ready, "element port held off by the row port");
    @(negedge clk);
    io_en = 0; dlt_req.valid = 0;
    check(!dlt_rsp.valid, "no element access while held off");
    row(0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
