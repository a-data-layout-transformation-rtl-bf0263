// dlt_vrf: the wide vector register file, 16 registers of 256 bytes.
//
// The register file is built like the local memory: 64 banks of 4-byte
// words, 16 words deep, so a register is one 256-byte row and the whole file
// is a 4 KiB space addressed {register[3:0], byte[7:0]}.  The vector units
// read and write whole registers on the register port (vr_*, one write
// enable per 4-byte word); the DLT lanes move elements of 1..64 bytes at any
// byte offset on the element port, which is how VGATHER fills a register
// and VSCATTER drains one.  An element that runs past the end of a register
// continues in the next one; addresses wrap at 4 KiB.
// The size (16 x 256 B) follows the original; the banked organisation and
// the element port are choices of this implementation.
// Timing: one cycle of latency on both ports; the register port has priority
// and holds the element port off (dlt_ready low) while it is used.
module dlt_vrf
  import dlt_pkg::*;
#(
  parameter int unsigned NUM_VR   = 16,
  parameter int unsigned VR_BYTES = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        vr_en,
  input  logic                        vr_we,
  input  logic [$clog2(NUM_VR)-1:0]   vr_idx,
  input  logic [VR_BYTES/4-1:0]       vr_wmask,
  input  logic [VR_BYTES*8-1:0]       vr_wdata,
  output logic [VR_BYTES*8-1:0]       vr_rdata,
  output logic                        vr_rvalid,
  input  mem_req_t                    dlt_req,
  output logic                        dlt_ready,
  output mem_rsp_t                    dlt_rsp
);
  dlt_banked_mem #(.BANKS(VR_BYTES / 4), .ROWS(NUM_VR)) u_regs (
    .clk, .rst_n,
    .io_en     (vr_en),
    .io_we     (vr_we),
    .io_row    (vr_idx),
    .io_wmask  (vr_wmask),
    .io_wdata  (vr_wdata),
    .io_rdata  (vr_rdata),
    .io_rvalid (vr_rvalid),
    .dlt_req, .dlt_ready, .dlt_rsp
  );
endmodule
