// dlt_lane: one DLT lane (the design has four).
//
// A lane is its 16-entry instruction buffer, the address generation unit and
// the decoder, plus a sequencer that moves the active instruction element by
// element.  It has a read channel and a write channel, so reads of later
// elements overlap the write of an earlier one:
//   * ReadDone (read data returned): the buffer's src field takes nextSrc and
//     the data go to the write side.
//   * WriteDone (write acknowledged): dst takes nextDst and nelem is
//     decremented, and the next write may be issued in the same cycle at
//     nextDst.  When nelem reaches zero the entry is released and the next
//     buffered instruction starts.
// Up to RD_MAX reads are outstanding, so a lane keeps a far memory busy
// instead of waiting a whole round trip per element.  Their data wait in an
// RD_MAX-entry queue (or go straight to the write channel when it is free);
// a read is issued only when its data will have a queue entry, and never
// beyond the instruction's last element.  A read issue pointer runs ahead of
// src: it is src while no read is outstanding, else the address after the
// last read issued.  Reads still outstanding all go to one memory: a read to
// another memory waits until they have returned, so completions of one lane
// arrive in order as long as each memory answers one requester in order.
// One write is outstanding at a time.  Because reads run ahead, an
// instruction whose source and destination overlap within RD_MAX + 1
// elements may read bytes it has already overwritten; such instructions are
// not supported.
//
// The ReadDone/WriteDone updates of the buffer fields follow the original
// lane; the two channels, the read-ahead queue and the same-cycle reissue are
// choices of this implementation.  With single-cycle memories that accept a
// read and a write in the same cycle, an instruction of n elements takes
// n + 2 cycles; with a read latency of L cycles one lane moves an element per
// cycle as long as L < RD_MAX.
//
// Each channel: `*_req` held with all fields stable until `*_gnt`; a read
// completes with rd_rsp_valid and data, in issue order, a write with wr_ack,
// any number of cycles later.  `done` pulses for one cycle when an
// instruction finishes, with its opcode on `done_opc`.  Active-low
// synchronous reset.
module dlt_lane
  import dlt_pkg::*;
#(
  parameter int unsigned DEPTH  = BUF_DEPTH,
  parameter int unsigned RD_MAX = 4            // reads outstanding, power of two
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // instruction side
  input  logic                    push,
  input  entry_t                  push_entry,
  output logic                    full,
  output logic [$clog2(DEPTH):0]  count,
  output logic                    busy,
  output logic                    done,
  output opc_e                    done_opc,
  // read channel
  output lane_req_t               rd_req,
  input  logic                    rd_gnt,
  input  logic                    rd_rsp_valid,
  input  logic [DATA_W-1:0]       rd_rsp_rdata,
  // write channel
  output lane_req_t               wr_req,
  input  logic                    wr_gnt,
  input  logic                    wr_ack
);
  entry_t             head;
  logic               head_valid;
  logic [ADDR_W-1:0]  next_src, next_dst, rd_addr, wr_addr;
  logic [NELEM_W-1:0] next_nelem;
  logic               last;
  logic [SIZE_W-1:0]  elem_bytes;
  logic               read_en, write_en, rd_want, wr_want;
  tgt_e               rd_tgt, wr_tgt;
  logic [NELEM_W:0]   remaining;

  localparam int unsigned QW = $clog2(RD_MAX);
  localparam int unsigned CW = QW + 2;       // counts up to 2 * RD_MAX + 1

  logic [CW-1:0]      rd_cnt, q_cnt;          // reads outstanding, data queued
  logic               wr_out;                 // write outstanding
  logic [DATA_W-1:0]  q_data [RD_MAX];        // read-ahead queue
  logic [QW-1:0]      q_rd, q_wr;
  logic [CW-1:0]      pending;                // read issued, write not acknowledged
  logic               q_push, q_pop, rd_fire, wr_fire;
  logic [ADDR_W-1:0]  rd_next_q, src_step;    // read issue pointer
  tgt_e               rd_tgt_q;               // memory of the outstanding reads

  dlt_instr_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .push, .push_entry, .full, .count,
    .head, .head_valid,
    .upd_src   (rd_rsp_valid),
    .new_src   (next_src),
    .upd_dst   (wr_ack && !last),
    .new_dst   (next_dst),
    .new_nelem (next_nelem),
    .pop       (wr_ack && last)
  );

  dlt_agu u_agu (
    .cur (head), .next_src, .next_dst, .next_nelem, .last, .elem_bytes
  );

  always_comb begin
    remaining = nelem_count(head.desc.nelem);
    pending   = q_cnt + rd_cnt + CW'(wr_out);
    src_step  = is_gather_class(head.opc) ? ADDR_W'(head.desc.stride) : ADDR_W'(elem_bytes);
    rd_addr   = (rd_cnt != '0) ? rd_next_q : head.src;
    rd_want   = head_valid && ((q_cnt + rd_cnt) < CW'(RD_MAX)) &&
                ((NELEM_W+1)'(pending) < remaining) &&
                (rd_cnt == CW'(rd_rsp_valid) || rd_tgt == rd_tgt_q);
    wr_want   = head_valid && ((q_cnt != '0) || rd_rsp_valid) && (!wr_out || wr_ack);
    wr_addr   = wr_ack ? next_dst : head.dst;
  end

  dlt_decoder u_dec (
    .active  (head_valid),
    .rd_want, .wr_want,
    .opc     (head.opc),
    .rd_addr, .wr_addr,
    .read_en, .write_en, .rd_tgt, .wr_tgt
  );

  always_comb begin
    rd_req.valid = read_en;
    rd_req.we    = 1'b0;
    rd_req.tgt   = rd_tgt;
    rd_req.addr  = rd_addr;
    rd_req.size  = elem_bytes;
    rd_req.wdata = '0;
    wr_req.valid = write_en;
    wr_req.we    = 1'b1;
    wr_req.tgt   = wr_tgt;
    wr_req.addr  = wr_addr;
    wr_req.size  = elem_bytes;
    wr_req.wdata = (q_cnt != '0) ? q_data[q_rd] : rd_rsp_rdata;
    rd_fire      = rd_req.valid && rd_gnt;
    wr_fire      = wr_req.valid && wr_gnt;
    q_pop        = wr_fire && (q_cnt != '0);
    q_push       = rd_rsp_valid && !(wr_fire && (q_cnt == '0));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_cnt <= '0;
      wr_out <= 1'b0;
      q_rd   <= '0;
      q_wr   <= '0;
      q_cnt  <= '0;
    end else begin
      rd_cnt <= rd_cnt + CW'(rd_fire) - CW'(rd_rsp_valid);
      wr_out <= (wr_out && !wr_ack) || wr_fire;
      if (q_push) q_wr <= q_wr + 1'b1;
      if (q_pop)  q_rd <= q_rd + 1'b1;
      q_cnt  <= q_cnt + CW'(q_push) - CW'(q_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rd_fire) begin
      rd_next_q <= rd_addr + src_step;
      rd_tgt_q  <= rd_tgt;
    end
  end

  always_ff @(posedge clk) begin
    if (q_push) q_data[q_wr] <= rd_rsp_rdata;
  end

  assign busy     = head_valid;
  assign done     = wr_ack && last;
  assign done_opc = head.opc;

  a_rd_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                rd_req.valid && !rd_gnt |=> rd_req.valid && $stable(rd_req.addr))
    else $error("lane read request changed before it was granted");
  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                wr_req.valid && !wr_gnt |=> wr_req.valid && $stable(wr_req.addr))
    else $error("lane write request changed before it was granted");
  a_no_stray_rd: assert property (@(posedge clk) disable iff (!rst_n) rd_rsp_valid |-> rd_cnt != '0)
    else $error("read data for a lane with no read outstanding");
  a_no_stray_wr: assert property (@(posedge clk) disable iff (!rst_n) wr_ack |-> wr_out)
    else $error("write acknowledge for a lane with no write outstanding");
  a_queue: assert property (@(posedge clk) disable iff (!rst_n) q_cnt + rd_cnt <= CW'(RD_MAX))
    else $error("read-ahead queue overflow");
endmodule
