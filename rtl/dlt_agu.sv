// dlt_agu: address generation unit of one DLT lane.
//
// From the lane's active buffer entry it computes the three values that are
// written back into that entry as the element transfer progresses: the next
// source address, the next destination address and the remaining element
// count.  As in the lane diagram, two adders each take either the stride or
// the element size through a multiplexer, and a decrementer counts down nelem.
// Gather-class instructions (GATHER, VGATHER) walk the source with the stride
// and pack the destination (step = element size); scatter-class instructions
// (SCATTER, VSCATTER) do the opposite.  The stride is an unsigned byte
// distance, a choice of this implementation.
//
// Purely combinational.  `last` is high when the active element is the final
// one (nelem == 1), so the lane can release the entry when it completes.
// nelem wraps: the encoding 0 (4096 elements) decrements to 4095.
module dlt_agu
  import dlt_pkg::*;
(
  input  entry_t                   cur,
  output logic [ADDR_W-1:0]        next_src,
  output logic [ADDR_W-1:0]        next_dst,
  output logic [NELEM_W-1:0]       next_nelem,
  output logic                     last,
  output logic [SIZE_W-1:0]        elem_bytes
);
  logic [ADDR_W-1:0] stride_b, fsize_b, src_step, dst_step;
  logic              gather;

  always_comb begin
    elem_bytes = fsize_bytes(cur.desc.fsize);
    stride_b   = ADDR_W'(cur.desc.stride);
    fsize_b    = ADDR_W'(elem_bytes);
    gather     = is_gather_class(cur.opc);
    src_step   = gather ? stride_b : fsize_b;
    dst_step   = gather ? fsize_b  : stride_b;
    next_src   = cur.src + src_step;
    next_dst   = cur.dst + dst_step;
    next_nelem = cur.desc.nelem - NELEM_W'(1);
    last       = (cur.desc.nelem == NELEM_W'(1));
  end
endmodule
