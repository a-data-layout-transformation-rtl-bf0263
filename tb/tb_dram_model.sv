// tb_dram_model: behavioural model of the off-chip memory seen by the DLT
// (a DDR3 or HMC controller), for simulation only.
//
// It holds BYTES bytes (addresses wrap) and serves the DLT's element
// requests: `ready` is high for a random READY_PCT percent of cycles, and
// every accepted request is answered exactly LAT cycles later with read data
// (right-aligned) or a write acknowledge, carrying the request's tag.
// Initial contents are the pattern init_byte(addr) so a testbench can work
// out what any address held before it was written.
module tb_dram_model
  import dlt_pkg::*;
#(
  parameter int unsigned BYTES     = 65536,
  parameter int unsigned LAT       = 6,
  parameter int unsigned READY_PCT = 70
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output logic     ready,
  output mem_rsp_t rsp
);
  logic [7:0] mem [BYTES];
  mem_rsp_t   pipe [LAT];
  int unsigned n_reads, n_writes, n_busy;

  function automatic logic [7:0] init_byte(input int unsigned a);
    return 8'((a * 37 + (a >> 8) * 11 + 5) & 8'hff);
  endfunction

  initial begin
    for (int unsigned a = 0; a < BYTES; a++) mem[a] = init_byte(a);
    ready = 1'b0;
  end

  always @(negedge clk) ready <= ($urandom_range(99) < READY_PCT);

  always_ff @(posedge clk) begin
    mem_rsp_t r;
    r = '0;
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
      n_reads  <= 0;
      n_writes <= 0;
      n_busy   <= 0;
    end else begin
      if (req.valid && ready) begin
        r.valid = 1'b1;
        r.id    = req.id;
        for (int unsigned p = 0; p < req.size; p++) begin
          if (req.we) mem[(req.addr + p) % BYTES] <= req.wdata[p*8 +: 8];
          else        r.rdata[p*8 +: 8] = mem[(req.addr + p) % BYTES];
        end
        if (req.we) n_writes <= n_writes + 1; else n_reads <= n_reads + 1;
      end
      if (req.valid && !ready) n_busy <= n_busy + 1;
      pipe[0] <= r;
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign rsp = pipe[LAT-1];

  function automatic logic [7:0] peek(input int unsigned a);
    return mem[a % BYTES];
  endfunction
endmodule
