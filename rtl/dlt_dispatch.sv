// dlt_dispatch: decode of the DLT instructions coming from the RISC pipeline.
//
// One instruction is offered per cycle on the cmd_* handshake (valid/ready)
// with its three register operands in the order of the instruction syntax:
//   FORMDESC  a=nelem b=stride c=fsize  -> cmd_result = packed descriptor
//   GATHER    a=dst   b=src    c=desc
//   SCATTER   a=dst   b=src    c=desc
//   VGATHER   a=vector register number, b=src, c=desc
//   VSCATTER  a=dst   b=vector register number, c=desc
//   FLUSH     a=addr1 b=addr2       (address range to write back)
//   GATHERFENCE, SCATTERFENCE, FENCE   (no operands)
// A data-movement instruction becomes a 99-bit buffer entry and is pushed
// into the lane with the fewest buffered instructions (lowest number on a
// tie).  It waits (cmd_ready low) while every lane buffer is full or while a
// FENCE is draining.  FLUSH raises flush_valid with the range and completes
// when the cache hierarchy answers flush_done; it too waits for a FENCE.
// Fences complete at once and arm the fence unit, which then stalls the
// core's memory instructions.  FORMDESC is combinational and always ready.
// A vector register operand becomes the address {register, 8'h00} in the
// 4 KiB vector register space.  Operand order, lane choice and the flush
// handshake are choices of this implementation.
module dlt_dispatch
  import dlt_pkg::*;
#(
  parameter int unsigned LANES = NUM_LANES,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                     cmd_valid,
  input  isa_e                     cmd_op,
  input  logic [31:0]              cmd_a,
  input  logic [31:0]              cmd_b,
  input  logic [31:0]              cmd_c,
  output logic                     cmd_ready,
  output logic [31:0]              cmd_result,
  // lanes
  input  logic [LANES-1:0]         lane_full,
  input  logic [$clog2(DEPTH):0]   lane_count [LANES],
  output logic [LANES-1:0]         lane_push,
  output entry_t                   push_entry,
  output logic [$clog2(LANES)-1:0] push_lane,
  // fence unit
  input  logic                     dlt_stall,
  output logic                     gather_fence,
  output logic                     scatter_fence,
  output logic                     full_fence,
  // cache hierarchy
  output logic                     flush_valid,
  output logic [ADDR_W-1:0]        flush_addr1,
  output logic [ADDR_W-1:0]        flush_addr2,
  input  logic                     flush_done
);
  logic is_move, have_lane;

  always_comb begin
    // Lane choice: the least occupied lane that still has room.
    have_lane = 1'b0;
    push_lane = '0;
    for (int l = 0; l < LANES; l++) begin
      if (!lane_full[l] && (!have_lane || lane_count[l] < lane_count[push_lane])) begin
        have_lane = 1'b1;
        push_lane = $clog2(LANES)'(l);
      end
    end

    is_move = (cmd_op == ISA_GATHER) || (cmd_op == ISA_SCATTER) ||
              (cmd_op == ISA_VGATHER) || (cmd_op == ISA_VSCATTER);

    push_entry.desc = cmd_c;
    push_entry.dst  = cmd_a;
    push_entry.src  = cmd_b;
    unique case (cmd_op)
      ISA_GATHER:   push_entry.opc = OPC_GATHER;
      ISA_SCATTER:  push_entry.opc = OPC_SCATTER;
      ISA_VGATHER:  begin
                      push_entry.opc = OPC_VGATHER;
                      push_entry.dst = {20'd0, cmd_a[3:0], 8'd0};
                    end
      ISA_VSCATTER: begin
                      push_entry.opc = OPC_VSCATTER;
                      push_entry.src = {20'd0, cmd_b[3:0], 8'd0};
                    end
      default:      push_entry.opc = OPC_NONE;
    endcase

    cmd_result = form_desc(cmd_a, cmd_b, cmd_c);

    flush_valid = cmd_valid && (cmd_op == ISA_FLUSH) && !dlt_stall;
    flush_addr1 = cmd_a;
    flush_addr2 = cmd_b;

    unique case (cmd_op)
      ISA_FORMDESC, ISA_GATHERFENCE, ISA_SCATTERFENCE, ISA_FENCE: cmd_ready = 1'b1;
      ISA_FLUSH: cmd_ready = flush_done && !dlt_stall;
      default:   cmd_ready = is_move && have_lane && !dlt_stall;
    endcase

    lane_push = '0;
    if (cmd_valid && cmd_ready && is_move) lane_push[push_lane] = 1'b1;

    gather_fence  = cmd_valid && (cmd_op == ISA_GATHERFENCE);
    scatter_fence = cmd_valid && (cmd_op == ISA_SCATTERFENCE);
    full_fence    = cmd_valid && (cmd_op == ISA_FENCE);
  end
endmodule
