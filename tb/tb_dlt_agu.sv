// tb_dlt_agu: self-checking test of the lane address generation unit.
// Drives random buffer entries of every opcode and compares nextSrc,
// nextDst, nelem-1, the last-element flag and the element size with values
// computed here from the descriptor encoding (stride in bytes; element size
// 0 means 64; nelem 0 means 4096).
module tb_dlt_agu;
  import dlt_pkg::*;

  entry_t             cur;
  logic [ADDR_W-1:0]  next_src, next_dst;
  logic [NELEM_W-1:0] next_nelem;
  logic               last;
  logic [SIZE_W-1:0]  elem_bytes;
  int checks = 0, failures = 0;

  dlt_agu dut (.cur, .next_src, .next_dst, .next_nelem, .last, .elem_bytes);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: opc=%0d src=%h dst=%h desc=%h", what, cur.opc, cur.src, cur.dst, cur.desc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opc_e ops[4] = '{OPC_GATHER, OPC_SCATTER, OPC_VGATHER, OPC_VSCATTER};
    int unsigned fs, st, n;
    logic [31:0] exp_src, exp_dst;
    // fixed corner cases first
    cur = '{opc: OPC_GATHER, src: 32'h1000, dst: 32'h8000_0000,
            desc: '{nelem: 12'd1, stride: 14'd256, fsize: 6'd0}};
    #1;
    check(next_src == 32'h1100 && next_dst == 32'h8000_0040, "gather step, 64-byte element");
    check(last == 1'b1 && elem_bytes == 7'd64, "last element flag / size 64");
    cur.desc.nelem = 12'd0; cur.opc = OPC_SCATTER; #1;
    check(next_nelem == 12'd4095 && !last, "4096 elements count down to 4095");
    check(next_src == 32'h1040 && next_dst == 32'h8000_0100, "scatter step");
    cur.src = 32'hFFFF_FFF8; cur.desc.fsize = 6'd16; #1;
    check(next_src == 32'h0000_0008, "address wraps at 2^32");
    for (int i = 0; i < 2000; i++) begin
      cur.opc  = ops[$urandom_range(3)];
      cur.src  = $urandom;
      cur.dst  = $urandom;
      cur.desc = desc_t'($urandom);
      #1;
      fs = (cur.desc.fsize == 0) ? 64 : cur.desc.fsize;
      st = cur.desc.stride;
      n  = (cur.desc.nelem == 0) ? 4096 : cur.desc.nelem;
      if (cur.opc == OPC_GATHER || cur.opc == OPC_VGATHER) begin
        exp_src = cur.src + st; exp_dst = cur.dst + fs;
      end else begin
        exp_src = cur.src + fs; exp_dst = cur.dst + st;
      end
      check(next_src == exp_src, "nextSrc");
      check(next_dst == exp_dst, "nextDst");
      check(32'(next_nelem) == ((n - 1) % 4096), "nelem-1");
      check(last == (n == 1), "last");
      check(32'(elem_bytes) == fs, "element size");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
