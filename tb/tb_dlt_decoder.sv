// tb_dlt_decoder: self-checking test of the lane decoder.
// For random addresses inside and outside the local memory window and every
// opcode, checks the read and write enables against the sequencer's wants
// and that each of the read and write addresses is routed to the local
// memory, the vector register file or DRAM.
module tb_dlt_decoder;
  import dlt_pkg::*;

  logic              active, rd_want, wr_want;
  opc_e              opc;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  logic              read_en, write_en;
  tgt_e              rd_tgt, wr_tgt;
  int checks = 0, failures = 0;

  dlt_decoder dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: opc=%0d rd_addr=%h wr_addr=%h", what, opc, rd_addr, wr_addr);
    end
  endtask

  function automatic logic [31:0] rand_addr();
    case ($urandom_range(2))
      0: return 32'h8000_0000 | ($urandom & 32'h003F_FFFF);   // local memory
      1: return $urandom & 32'h0FFF_FFFF;                     // DRAM
      default: return $urandom;
    endcase
  endfunction

  function automatic tgt_e ref_map(input logic [31:0] a);
    return (a >= 32'h8000_0000 && a < 32'h8040_0000) ? TGT_LM : TGT_DRAM;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opc_e ops[5] = '{OPC_NONE, OPC_GATHER, OPC_SCATTER, OPC_VGATHER, OPC_VSCATTER};
    tgt_e er, ew;
    for (int i = 0; i < 3000; i++) begin
      opc      = ops[$urandom_range(4)];
      active   = ($urandom_range(3) != 0);
      rd_want  = $urandom_range(1);
      wr_want  = $urandom_range(1);
      rd_addr  = rand_addr();
      wr_addr  = rand_addr();
      #1;
      er = (opc == OPC_VSCATTER) ? TGT_VRF : ref_map(rd_addr);
      ew = (opc == OPC_VGATHER)  ? TGT_VRF : ref_map(wr_addr);
      check(read_en  == (active && opc != OPC_NONE && rd_want), "read enable");
      check(write_en == (active && opc != OPC_NONE && wr_want), "write enable");
      check(rd_tgt == er, "read target");
      check(wr_tgt == ew, "write target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
