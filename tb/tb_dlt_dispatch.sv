// tb_dlt_dispatch: self-checking test of the DLT instruction decode.
// Checks FORMDESC packing (including the 4096-element and 64-byte
// encodings), the buffer entry built for each data-movement instruction,
// the choice of the least occupied lane, back-pressure when every lane is
// full or a FENCE drains, the fence pulses and the FLUSH handshake.
module tb_dlt_dispatch;
  import dlt_pkg::*;

  logic cmd_valid;
  isa_e cmd_op;
  logic [31:0] cmd_a, cmd_b, cmd_c, cmd_result;
  logic cmd_ready;
  logic [3:0] lane_full, lane_push;
  logic [4:0] lane_count [4];
  entry_t push_entry;
  logic [1:0] push_lane;
  logic dlt_stall, gather_fence, scatter_fence, full_fence;
  logic flush_valid, flush_done;
  logic [31:0] flush_addr1, flush_addr2;
  int checks = 0, failures = 0;

  dlt_dispatch dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cmd(input isa_e op, input logic [31:0] a, b, c);
    cmd_valid = 1; cmd_op = op; cmd_a = a; cmd_b = b; cmd_c = c;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lane_full = '0; dlt_stall = 0; flush_done = 0;
    for (int l = 0; l < 4; l++) lane_count[l] = 5'(l + 2);
    // FORMDESC
    cmd(ISA_FORMDESC, 32'd4096, 32'd8192, 32'd64);
    check(cmd_ready && cmd_result == 32'h0008_0000, "FORMDESC 4096 x 64 B, stride 8192");
    check(lane_push == 0, "FORMDESC pushes nothing");
    for (int i = 0; i < 200; i++) begin
      logic [31:0] n, s, f;
      n = $urandom_range(1, 4096); s = $urandom_range(0, 16383); f = $urandom_range(1, 64);
      cmd(ISA_FORMDESC, n, s, f);
      check(cmd_result == {n[11:0], s[13:0], f[5:0]}, "FORMDESC packing");
    end
    // GATHER to least occupied lane (lane 0 has 2 entries)
    cmd(ISA_GATHER, 32'h8000_0100, 32'h0000_4000, 32'h0100_1004);
    check(cmd_ready && lane_push == 4'b0001, "GATHER goes to lane 0");
    check(push_entry.opc == OPC_GATHER && push_entry.dst == 32'h8000_0100 &&
          push_entry.src == 32'h0000_4000 && push_entry.desc == 32'h0100_1004, "GATHER entry");
    lane_count[0] = 5'd9; lane_count[2] = 5'd1;
    cmd(ISA_SCATTER, 32'h10, 32'h20, 32'h30);
    check(lane_push == 4'b0100 && push_entry.opc == OPC_SCATTER, "SCATTER goes to lane 2");
    lane_full = 4'b0100; lane_count[2] = 5'd16;
    cmd(ISA_VGATHER, 32'd7, 32'h0000_1234, 32'h30);
    check(lane_push == 4'b0010 && push_entry.opc == OPC_VGATHER &&
          push_entry.dst == 32'h0000_0700 && push_entry.src == 32'h0000_1234, "VGATHER entry, lane 1");
    lane_count[1] = 5'd3; lane_count[3] = 5'd3;
    cmd(ISA_VSCATTER, 32'h8000_0040, 32'd15, 32'h30);
    check(lane_push == 4'b0010 && push_entry.opc == OPC_VSCATTER &&
          push_entry.src == 32'h0000_0F00 && push_entry.dst == 32'h8000_0040, "VSCATTER entry, tie to lower lane");
    lane_full = 4'b1111;
    cmd(ISA_GATHER, 0, 0, 0);
    check(!cmd_ready && lane_push == 0, "stall when every lane is full");
    lane_full = 4'b0000;
    dlt_stall = 1;
    cmd(ISA_SCATTER, 0, 0, 0);
    check(!cmd_ready && lane_push == 0, "stall while a FENCE drains");
    cmd(ISA_GATHERFENCE, 0, 0, 0);
    check(cmd_ready && gather_fence && !scatter_fence && !full_fence, "GATHERFENCE pulse");
    dlt_stall = 0;
    cmd(ISA_SCATTERFENCE, 0, 0, 0);
    check(cmd_ready && scatter_fence && !gather_fence, "SCATTERFENCE pulse");
    cmd(ISA_FENCE, 0, 0, 0);
    check(cmd_ready && full_fence && lane_push == 0, "FENCE pulse");
    cmd(ISA_FLUSH, 32'h100, 32'h200, 0);
    check(flush_valid && !cmd_ready && flush_addr1 == 32'h100 && flush_addr2 == 32'h200,
          "FLUSH waits for the caches");
    flush_done = 1; #1;
    check(cmd_ready, "FLUSH completes on flush_done");
    cmd_valid = 0; #1;
    check(!flush_valid && lane_push == 0 && !gather_fence, "nothing without cmd_valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
