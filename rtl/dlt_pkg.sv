// dlt_pkg: types and constants shared by the Data Layout Transformation (DLT)
// accelerator.
//
// The DLT accelerator sits beside a simple in-order RISC pipeline and moves
// data between off-chip memory (DRAM), a 64-bank shared local memory and a
// wide vector register file.  Software packs (number of elements, stride,
// element size) into one 32-bit descriptor with FORMDESC and then issues
// GATHER / SCATTER / VGATHER / VSCATTER with a source pointer, a destination
// pointer and that descriptor.  Each of the four lanes holds a 16-entry buffer
// of 99-bit entries (3-bit opcode, 32-bit source, 32-bit destination, 32-bit
// descriptor), as the design prescribes.
//
// Choices of this implementation (the descriptor bit split, the address map
// and the request bus) are collected here so that every module agrees:
//   descriptor = { nelem[31:20], stride[19:6], fsize[5:0] }
//     nelem  : number of elements, 12 bits, 0 encodes 4096
//     stride : byte distance between consecutive elements on the strided side
//     fsize  : element size in bytes, 6 bits, 0 encodes 64
//   A 64-byte maximum element matches four lanes issuing one 64-byte request
//   per cycle at 1 GHz, the 256 GB/s request bandwidth quoted for the design.
//   Local memory occupies LM_BASE .. LM_BASE+4 MiB of the physical map; every
//   other address goes to DRAM.  Vector register operands are addressed in a
//   separate 4 KiB space: {register[3:0], byte[7:0]}.
package dlt_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned NUM_LANES    = 4;     // concurrent gather/scatter instructions
  localparam int unsigned BUF_DEPTH    = 16;    // entries per lane buffer
  localparam int unsigned ADDR_W       = 32;
  localparam int unsigned DESC_W       = 32;
  localparam int unsigned OPC_W        = 3;
  localparam int unsigned ENTRY_W      = OPC_W + 2 * ADDR_W + DESC_W;  // 99 bits
  localparam int unsigned MAX_ELEM_B   = 64;    // largest element (bytes)
  localparam int unsigned DATA_W       = MAX_ELEM_B * 8;
  localparam int unsigned SIZE_W       = 7;     // element size 1..64 as a number
  localparam int unsigned NELEM_W      = 12;
  localparam int unsigned STRIDE_W     = 14;
  localparam int unsigned FSIZE_W      = 6;
  localparam int unsigned LANE_ID_W    = 2;
  localparam int unsigned TAG_W        = LANE_ID_W + 1;  // {lane, write channel}

  localparam logic [ADDR_W-1:0] LM_BASE = 32'h8000_0000;
  localparam int unsigned       LM_ADDR_W = 22;   // 4 MiB local memory window

  // ---- buffer opcodes (3 bits stored per entry) ---------------------------
  typedef enum logic [OPC_W-1:0] {
    OPC_NONE     = 3'd0,
    OPC_GATHER   = 3'd1,   // strided src (any memory) -> packed dst
    OPC_SCATTER  = 3'd2,   // packed src -> strided dst
    OPC_VGATHER  = 3'd3,   // strided src -> packed vector register
    OPC_VSCATTER = 3'd4    // packed vector register -> strided dst
  } opc_e;

  // ---- instructions arriving from the RISC pipeline -----------------------
  typedef enum logic [3:0] {
    ISA_FORMDESC     = 4'd0,
    ISA_GATHER       = 4'd1,
    ISA_SCATTER      = 4'd2,
    ISA_VGATHER      = 4'd3,
    ISA_VSCATTER     = 4'd4,
    ISA_GATHERFENCE  = 4'd5,
    ISA_SCATTERFENCE = 4'd6,
    ISA_FLUSH        = 4'd7,
    ISA_FENCE        = 4'd8
  } isa_e;

  typedef struct packed {
    logic [NELEM_W-1:0]  nelem;
    logic [STRIDE_W-1:0] stride;
    logic [FSIZE_W-1:0]  fsize;
  } desc_t;

  typedef struct packed {
    opc_e              opc;
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    desc_t             desc;
  } entry_t;

  // Memory targets reachable by a lane.
  typedef enum logic [1:0] {
    TGT_LM   = 2'd0,
    TGT_VRF  = 2'd1,
    TGT_DRAM = 2'd2
  } tgt_e;
  localparam int unsigned NUM_TGT = 3;

  // One element access from a lane (read when we == 0).  A lane has a read
  // channel and a write channel, each carrying one of these.
  typedef struct packed {
    logic              valid;
    logic              we;
    tgt_e              tgt;
    logic [ADDR_W-1:0] addr;
    logic [SIZE_W-1:0] size;    // bytes, 1..64
    logic [DATA_W-1:0] wdata;   // byte 0 of the element in bits [7:0]
  } lane_req_t;

  // Request as seen by a memory target, tagged with the issuing lane and
  // channel: id = {lane, we}.
  typedef struct packed {
    logic                 valid;
    logic                 we;
    logic [ADDR_W-1:0]    addr;
    logic [SIZE_W-1:0]    size;
    logic [DATA_W-1:0]    wdata;
    logic [TAG_W-1:0]     id;
  } mem_req_t;

  // Completion from a memory target: read data, or a write acknowledge,
  // returning the request's tag.
  typedef struct packed {
    logic                 valid;
    logic [DATA_W-1:0]    rdata;
    logic [TAG_W-1:0]     id;
  } mem_rsp_t;

  // ---- helpers -------------------------------------------------------------
  function automatic logic [SIZE_W-1:0] fsize_bytes(input logic [FSIZE_W-1:0] f);
    return (f == '0) ? SIZE_W'(MAX_ELEM_B) : SIZE_W'(f);
  endfunction

  function automatic logic [NELEM_W:0] nelem_count(input logic [NELEM_W-1:0] n);
    return (n == '0) ? (NELEM_W+1)'(1 << NELEM_W) : {1'b0, n};
  endfunction

  function automatic logic is_lm_addr(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:LM_ADDR_W] == LM_BASE[ADDR_W-1:LM_ADDR_W];
  endfunction

  function automatic logic is_gather_class(input opc_e o);
    return (o == OPC_GATHER) || (o == OPC_VGATHER);
  endfunction

  function automatic logic is_scatter_class(input opc_e o);
    return (o == OPC_SCATTER) || (o == OPC_VSCATTER);
  endfunction

  // FORMDESC: pack three register values; the counts wrap so that 4096
  // elements and 64-byte elements encode as 0.
  function automatic desc_t form_desc(input logic [31:0] nelem,
                                      input logic [31:0] stride,
                                      input logic [31:0] fsize);
    desc_t d;
    d.nelem  = nelem[NELEM_W-1:0];
    d.stride = stride[STRIDE_W-1:0];
    d.fsize  = fsize[FSIZE_W-1:0];
    return d;
  endfunction

endpackage
