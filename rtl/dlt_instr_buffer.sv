// dlt_instr_buffer: the 16-entry DLT instruction buffer of one lane.
//
// Each entry is 99 bits: a 3-bit opcode, the 32-bit source address, the
// 32-bit destination address and the 32-bit descriptor (16 x 99 bits is
// about 200 bytes).  Entries are accepted in order at the tail and executed
// in order from the head.  The head entry is the lane's active instruction:
// its src field is rewritten with nextSrc when an element has been read
// (ReadDone), its dst and nelem fields with nextDst and nelem-1 when the
// element has been written (WriteDone).  When the last element is written the
// lane pops the entry and the next one becomes active.
//
// Depth, entry layout and the in-place update of src, dst and nelem follow
// the original architecture; in-order execution and the handshake are
// choices of this implementation.
//
// Interface: push/push_entry/full at the tail; head/head_valid at the head;
// upd_src, upd_dst (with the new values) and pop from the lane.  pop and an
// update of the same entry may not coincide (the lane pops instead of
// updating).  A push into a full buffer is ignored and flagged by an
// assertion.  Synchronous, active-low reset empties the buffer.
module dlt_instr_buffer
  import dlt_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  entry_t                   push_entry,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output entry_t                   head,
  output logic                     head_valid,
  input  logic                     upd_src,
  input  logic [ADDR_W-1:0]        new_src,
  input  logic                     upd_dst,
  input  logic [ADDR_W-1:0]        new_dst,
  input  logic [NELEM_W-1:0]       new_nelem,
  input  logic                     pop
);
  localparam int unsigned PW = $clog2(DEPTH);

  entry_t          mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic            do_push, do_pop;

  assign full       = (count == (PW+1)'(DEPTH));
  assign head_valid = (count != '0);
  assign head       = mem[rd_ptr];
  assign do_push    = push && !full;
  assign do_pop     = pop && head_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + PW'(1);
      if (do_pop)  rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + PW'(1);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  // Entry storage: written on push (tail) and updated in place at the head.
  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_entry;
    if (head_valid && !do_pop) begin
      if (upd_src) mem[rd_ptr].src <= new_src;
      if (upd_dst) begin
        mem[rd_ptr].dst        <= new_dst;
        mem[rd_ptr].desc.nelem <= new_nelem;
      end
    end
  end

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("push into a full DLT instruction buffer");
  a_no_update_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                      !((upd_src || upd_dst || pop) && !head_valid))
    else $error("update or pop of an empty DLT instruction buffer");
endmodule
