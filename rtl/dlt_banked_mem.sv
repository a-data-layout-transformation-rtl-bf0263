// dlt_banked_mem: word-interleaved banked scratchpad with two ports.
//
// BANKS single-ported banks of 4-byte words, ROWS words deep.  Consecutive
// 4-byte words of the address space sit in consecutive banks, so one "row"
// (the same word index in every bank) is BANKS*4 bytes wide.  With the
// default sizes this is the shared local memory: 64 banks of 4 B x 16k
// entries, 4 MiB, with a 256-byte row port.
//
// Bank count, word width, depth and the 256-byte row follow the original
// local memory; the word interleaving, the element port and the one-cycle
// latency are choices of this implementation.
//
// Ports:
//   * row port (io_*): reads or writes one whole row, with a write enable per
//     4-byte word; this is the 256-byte IO used by the core and the compute
//     accelerators.  It has priority.
//   * element port (dlt_req / dlt_ready / dlt_rsp): reads or writes 1..64
//     bytes at any byte address, as one DLT element.  The element touches at
//     most 17 consecutive words, which always lie in different banks, so it
//     completes in a single access regardless of alignment.  Read data come
//     back right-aligned (first byte in bits [7:0], bytes past the element
//     size zero); a write is acknowledged
//     the same way, with dlt_rsp.valid.  dlt_ready is low while the row port
//     is in use.
// Timing: both ports have one cycle of latency (synchronous-read banks).
// Addresses beyond the memory size wrap.  Contents are not reset.
module dlt_banked_mem
  import dlt_pkg::*;
#(
  parameter int unsigned BANKS = 64,
  parameter int unsigned ROWS  = 16384
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // row port
  input  logic                      io_en,
  input  logic                      io_we,
  input  logic [$clog2(ROWS)-1:0]   io_row,
  input  logic [BANKS-1:0]          io_wmask,
  input  logic [BANKS*32-1:0]       io_wdata,
  output logic [BANKS*32-1:0]       io_rdata,
  output logic                      io_rvalid,
  // element port
  input  mem_req_t                  dlt_req,
  output logic                      dlt_ready,
  output mem_rsp_t                  dlt_rsp
);
  localparam int unsigned BW = $clog2(BANKS);
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned WW = BW + RW;            // word-address width

  logic              dlt_go;
  logic [WW-1:0]     w0;                           // first word touched
  logic [1:0]        b0;                           // byte offset in that word
  logic [RW-1:0]     bank_row   [BANKS];
  logic [3:0]        bank_bwe   [BANKS];
  logic [31:0]       bank_wdata [BANKS];
  logic [BANKS-1:0]  bank_en;
  logic [31:0]       bank_q     [BANKS];

  logic              rd_pend_q, wr_pend_q, io_rd_q;
  logic [BW-1:0]     w0lo_q;
  logic [1:0]        b0_q;
  logic [SIZE_W-1:0] size_q;
  logic [TAG_W-1:0] id_q;

  assign dlt_ready = !io_en;
  assign dlt_go    = dlt_req.valid && !io_en;
  assign w0        = dlt_req.addr[WW+1:2];
  assign b0        = dlt_req.addr[1:0];

  // Per-bank address, enables and write data.
  always_comb begin
    int unsigned k, pos;
    k = 0;
    pos = 0;
    for (int unsigned b = 0; b < BANKS; b++) begin
      k = (b - int'(w0[BW-1:0])) % BANKS;          // word index within the element
      bank_row[b]   = io_en ? io_row : RW'((w0 + WW'(k)) >> BW);
      bank_en[b]    = io_en ? 1'b1 : (dlt_go && ((k * 4) < (int'(b0) + int'(dlt_req.size))));
      bank_bwe[b]   = '0;
      bank_wdata[b] = '0;
      if (io_en) begin
        bank_bwe[b]   = {4{io_we && io_wmask[b]}};
        bank_wdata[b] = io_wdata[b*32 +: 32];
      end else if (dlt_go && dlt_req.we) begin
        for (int unsigned j = 0; j < 4; j++) begin
          pos = k * 4 + j - int'(b0);
          if ((k * 4 + j >= int'(b0)) && (pos < int'(dlt_req.size))) begin
            bank_bwe[b][j]          = 1'b1;
            bank_wdata[b][j*8 +: 8] = dlt_req.wdata[(pos % MAX_ELEM_B)*8 +: 8];
          end
        end
      end
    end
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [31:0] mem [ROWS];
    always_ff @(posedge clk) begin
      if (bank_en[b]) begin
        for (int j = 0; j < 4; j++)
          if (bank_bwe[b][j]) mem[bank_row[b]][j*8 +: 8] <= bank_wdata[b][j*8 +: 8];
        bank_q[b] <= mem[bank_row[b]];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_pend_q <= 1'b0;
      wr_pend_q <= 1'b0;
      io_rd_q   <= 1'b0;
      w0lo_q    <= '0;
      b0_q      <= '0;
      size_q    <= '0;
      id_q      <= '0;
    end else begin
      rd_pend_q <= dlt_go && !dlt_req.we;
      wr_pend_q <= dlt_go &&  dlt_req.we;
      io_rd_q   <= io_en && !io_we;
      if (dlt_go) begin
        w0lo_q <= w0[BW-1:0];
        b0_q   <= b0;
        size_q <= dlt_req.size;
        id_q   <= dlt_req.id;
      end
    end
  end

  // Read-data alignment: element byte p sits in word (b0 + p) / 4.
  always_comb begin
    int unsigned a;
    logic [BW-1:0] bank;
    a    = 0;
    bank = '0;
    dlt_rsp.valid = rd_pend_q || wr_pend_q;
    dlt_rsp.id    = id_q;
    dlt_rsp.rdata = '0;
    if (rd_pend_q) begin
      for (int unsigned p = 0; p < MAX_ELEM_B; p++) begin
        a    = p + int'(b0_q);
        bank = BW'((int'(w0lo_q) + a / 4) % BANKS);
        if (p < int'(size_q)) dlt_rsp.rdata[p*8 +: 8] = bank_q[bank][(a % 4)*8 +: 8];
      end
    end
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_io
    assign io_rdata[b*32 +: 32] = bank_q[b];
  end
  assign io_rvalid = io_rd_q;

  a_size: assert property (@(posedge clk) disable iff (!rst_n)
                           dlt_req.valid |-> (dlt_req.size >= 1 && dlt_req.size <= SIZE_W'(MAX_ELEM_B)))
    else $error("element size out of range");
endmodule
