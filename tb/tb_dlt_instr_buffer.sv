// tb_dlt_instr_buffer: self-checking test of the 16-entry lane buffer.
// Fills the buffer to full (checking the count and the full flag at 16),
// checks first-in first-out order, the in-place update of the head entry's
// src, dst and nelem fields, that updates leave other fields and entries
// untouched, and a random push/pop run against a queue model.
module tb_dlt_instr_buffer;
  import dlt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic push = 0, upd_src = 0, upd_dst = 0, pop = 0;
  entry_t push_entry, head;
  logic full, head_valid;
  logic [4:0] count;
  logic [ADDR_W-1:0] new_src = '0, new_dst = '0;
  logic [NELEM_W-1:0] new_nelem = '0;
  int checks = 0, failures = 0, cycles = 0;
  entry_t model [$];

  dlt_instr_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  function automatic entry_t rand_entry();
    entry_t e;
    e.opc  = opc_e'($urandom_range(1, 4));
    e.src  = $urandom;
    e.dst  = $urandom;
    e.desc = desc_t'($urandom);
    return e;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    entry_t e;
    push_entry = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!head_valid && count == 0 && !full, "empty after reset");
    // fill to 16
    for (int i = 0; i < 16; i++) begin
      e = rand_entry();
      model.push_back(e);
      push <= 1; push_entry <= e;
      @(posedge clk);
    end
    push <= 0;
    @(negedge clk);
    check(full && count == 16, "full at 16 entries");
    check(head == model[0], "head is the oldest entry");
    // update head in place
    new_src <= 32'hA5A5_0000; upd_src <= 1;
    @(posedge clk); upd_src <= 0; @(negedge clk);
    check(head.src == 32'hA5A5_0000 && head.dst == model[0].dst && head.desc == model[0].desc,
          "ReadDone updates src only");
    new_dst <= 32'h5A5A_0000; new_nelem <= 12'd7; upd_dst <= 1;
    @(posedge clk); upd_dst <= 0; @(negedge clk);
    check(head.dst == 32'h5A5A_0000 && head.desc.nelem == 12'd7 &&
          head.desc.stride == model[0].desc.stride && head.desc.fsize == model[0].desc.fsize &&
          head.opc == model[0].opc, "WriteDone updates dst and nelem only");
    // drain in order
    void'(model.pop_front());
    pop <= 1; @(posedge clk); pop <= 0;
    for (int i = 0; i < 15; i++) begin
      @(negedge clk);
      check(head_valid && head == model[0], "FIFO order");
      void'(model.pop_front());
      pop <= 1; @(posedge clk); pop <= 0;
    end
    @(negedge clk);
    check(!head_valid && count == 0, "empty after draining");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic dp, dq;
      @(negedge clk);
      dp = ($urandom_range(1) == 1) && !full;
      dq = ($urandom_range(1) == 1) && head_valid;
      e  = rand_entry();
      push <= dp; push_entry <= e; pop <= dq;
      @(posedge clk);
      if (dq) void'(model.pop_front());
      if (dp) model.push_back(e);
      push <= 0; pop <= 0;
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(head == model[0], "head matches model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
