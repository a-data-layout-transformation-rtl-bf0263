// dlt_decoder: the lane decoder.
//
// For the active instruction it produces the read enable (ReadEnb) and the
// write enable (WriteEnb) of the lane and routes the read and the write
// address each to the memory it belongs to: the local memory banks, the
// vector register file or DRAM.  VGATHER always writes the vector register
// file and VSCATTER always reads it (their vector operand is a register,
// addressed in a 4 KiB space {register, byte}); every other address is
// routed by the physical address map, with the local memory window at
// LM_BASE.  The lane's sequencer says when it wants to read or write
// (rd_want, wr_want) and supplies the addresses it is about to use.
//
// The decoder's role (enables plus address multiplexers) follows the original
// lane organisation; the address map and the vector register address space
// are choices of this implementation.
//
// Purely combinational.  `active` is low when the lane has no instruction.
module dlt_decoder
  import dlt_pkg::*;
(
  input  logic              active,
  input  logic              rd_want,
  input  logic              wr_want,
  input  opc_e              opc,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [ADDR_W-1:0] wr_addr,
  output logic              read_en,
  output logic              write_en,
  output tgt_e              rd_tgt,
  output tgt_e              wr_tgt
);
  function automatic tgt_e map_addr(input logic [ADDR_W-1:0] a);
    return is_lm_addr(a) ? TGT_LM : TGT_DRAM;
  endfunction

  logic valid_op;

  always_comb begin
    valid_op = (opc == OPC_GATHER) || (opc == OPC_SCATTER) ||
               (opc == OPC_VGATHER) || (opc == OPC_VSCATTER);
    rd_tgt   = (opc == OPC_VSCATTER) ? TGT_VRF : map_addr(rd_addr);
    wr_tgt   = (opc == OPC_VGATHER)  ? TGT_VRF : map_addr(wr_addr);
    read_en  = active && valid_op && rd_want;
    write_en = active && valid_op && wr_want;
  end
endmodule
