// tb_dlt_vrf: self-checking test of the vector register file (16 x 256 B).
// Loads every register through the register port, then mixes element
// writes and reads of 1..64 bytes at any offset (including elements that
// run from one register into the next and past the last one) with
// whole-register reads and masked writes, all against a 4 KiB reference.
module tb_dlt_vrf;
  import dlt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic vr_en = 0, vr_we = 0;
  logic [3:0] vr_idx = '0;
  logic [63:0] vr_wmask = '0;
  logic [2047:0] vr_wdata = '0, vr_rdata;
  logic vr_rvalid, dlt_ready;
  mem_req_t dlt_req;
  mem_rsp_t dlt_rsp;
  logic [7:0] ref_mem [4096];
  int checks = 0, failures = 0;

  dlt_vrf dut (.*);

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

  task automatic reg_write(input int r, input logic [63:0] m);
    @(negedge clk);
    vr_en = 1; vr_we = 1; vr_idx = 4'(r); vr_wmask = m;
    for (int i = 0; i < 64; i++) vr_wdata[i*32 +: 32] = $urandom;
    for (int w = 0; w < 64; w++)
      if (m[w]) for (int j = 0; j < 4; j++) ref_mem[r*256 + w*4 + j] = vr_wdata[w*32 + j*8 +: 8];
    @(negedge clk);
    vr_en = 0;
  endtask

  task automatic reg_read(input int r);
    logic ok;
    @(negedge clk);
    vr_en = 1; vr_we = 0; vr_idx = 4'(r);
    @(negedge clk);
    vr_en = 0;
    ok = vr_rvalid;
    for (int a = 0; a < 256; a++) if (vr_rdata[a*8 +: 8] != ref_mem[r*256 + a]) ok = 0;
    check(ok, "whole-register read");
  endtask

  task automatic elem(input logic we, input int addr, input int size);
    logic [DATA_W-1:0] wd, exp;
    for (int i = 0; i < 16; i++) wd[i*32 +: 32] = $urandom;
    @(negedge clk);
    dlt_req = '{valid: 1'b1, we: we, addr: 32'(addr), size: 7'(size), wdata: wd, id: 3'd5};
    @(negedge clk);
    dlt_req.valid = 0;
    check(dlt_rsp.valid && dlt_rsp.id == 3'd5, "element response after one cycle");
    exp = '0;
    for (int p = 0; p < size; p++) begin
      if (we) ref_mem[(addr + p) % 4096] = wd[p*8 +: 8];
      else    exp[p*8 +: 8] = ref_mem[(addr + p) % 4096];
    end
    if (!we) check(dlt_rsp.rdata == exp, "element read data");
  endtask

  initial begin
    dlt_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) reg_write(r, '1);
    for (int r = 0; r < 16; r++) reg_read(r);
    elem(1, 255 * 16 + 250, 20);    // runs past the last register, wraps
    elem(0, 4090, 20);
    elem(1, 1 * 256 + 240, 40);     // register 1 into register 2
    reg_read(1);
    reg_read(2);
    for (int i = 0; i < 3000; i++) begin
      case ($urandom_range(4))
        0, 1: elem(1, $urandom_range(0, 4095), $urandom_range(1, 64));
        2, 3: elem(0, $urandom_range(0, 4095), $urandom_range(1, 64));
        default: if ($urandom_range(1)) reg_read($urandom_range(0, 15));
                 else reg_write($urandom_range(0, 15), {$urandom, $urandom});
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
