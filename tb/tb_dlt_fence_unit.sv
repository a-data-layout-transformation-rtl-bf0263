// tb_dlt_fence_unit: self-checking test of the fence unit.
// Issues gathers and scatters to lanes, applies GATHERFENCE, SCATTERFENCE
// and FENCE, and checks that the core's memory stall lasts exactly until the
// instructions that were in flight at the fence have completed, that later
// instructions do not extend a GATHERFENCE, and that FENCE also holds the
// DLT (dlt_stall).
module tb_dlt_fence_unit;
  import dlt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic issue = 0;
  logic [1:0] issue_lane = 0;
  opc_e issue_opc = OPC_NONE;
  logic [3:0] done = '0;
  opc_e done_opc [4];
  logic gather_fence = 0, scatter_fence = 0, full_fence = 0;
  logic gathers_pending, scatters_pending, risc_mem_stall, dlt_stall;
  int checks = 0, failures = 0;

  dlt_fence_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_issue(input int lane, input opc_e o);
    @(negedge clk); issue = 1; issue_lane = 2'(lane); issue_opc = o;
    @(negedge clk); issue = 0;
  endtask

  task automatic do_done(input int lane, input opc_e o);
    @(negedge clk); done[lane] = 1; done_opc[lane] = o;
    @(negedge clk); done = '0;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 4; l++) done_opc[l] = OPC_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!risc_mem_stall && !dlt_stall && !gathers_pending, "idle after reset");

    // a gather fence with nothing pending does not stall
    pulse(gather_fence);
    check(!risc_mem_stall, "empty gather fence releases at once");

    // two gathers in lane 0, a VGATHER in lane 2, a scatter in lane 1
    do_issue(0, OPC_GATHER);
    do_issue(0, OPC_GATHER);
    do_issue(2, OPC_VGATHER);
    do_issue(1, OPC_SCATTER);
    check(gathers_pending && scatters_pending, "pending flags");
    check(!risc_mem_stall, "no stall without a fence");
    pulse(gather_fence);
    check(risc_mem_stall && !dlt_stall, "gather fence stalls the core only");
    do_issue(3, OPC_GATHER);               // issued after the fence
    do_done(0, OPC_GATHER);
    check(risc_mem_stall, "still stalled: one gather of lane 0 and lane 2 left");
    do_done(1, OPC_SCATTER);
    check(risc_mem_stall, "a scatter does not release a gather fence");
    do_done(2, OPC_VGATHER);
    check(risc_mem_stall, "still stalled: lane 0");
    do_done(0, OPC_GATHER);
    check(!risc_mem_stall, "released when the fenced gathers completed");
    check(gathers_pending, "the later gather is still pending");

    // scatter fence
    do_issue(1, OPC_VSCATTER);
    pulse(scatter_fence);
    check(risc_mem_stall, "scatter fence stalls");
    do_done(3, OPC_GATHER);
    check(risc_mem_stall, "a gather does not release a scatter fence");
    do_done(1, OPC_VSCATTER);
    check(!risc_mem_stall && !gathers_pending && !scatters_pending, "scatter fence released");

    // full fence
    do_issue(0, OPC_SCATTER);
    do_issue(3, OPC_GATHER);
    pulse(full_fence);
    check(risc_mem_stall && dlt_stall, "FENCE stalls the core and the DLT");
    do_done(3, OPC_GATHER);
    check(risc_mem_stall && dlt_stall, "FENCE waits for the scatter too");
    do_done(0, OPC_SCATTER);
    check(!risc_mem_stall && !dlt_stall, "FENCE released");

    // completion in the same cycle as the fence is not waited for
    do_issue(2, OPC_GATHER);
    @(negedge clk); gather_fence = 1; done[2] = 1; done_opc[2] = OPC_GATHER;
    @(negedge clk); gather_fence = 0; done = '0;
    check(!risc_mem_stall, "completion coinciding with the fence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
