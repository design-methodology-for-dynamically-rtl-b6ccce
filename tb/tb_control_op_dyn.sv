// Self-checking testbench for control_op_dyn. Buffer X, buffer Y and the
// operator are modelled here: the operator model accepts samples with
// random stalls, returns 3*x+1 for each, and raises ready after FRAME
// results. Checks that the block waits for region_ready, pulses op_start
// once, feeds every X element in order, writes every result to Y in order,
// and pulses op_complete once after ready.
module tb_control_op_dyn;
  import drs_pkg::*;

  localparam int unsigned FRAME = 32;
  localparam int unsigned XAW = 8, YAW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start = 0, op_complete, busy, region_ready = 0, op_start, waiting;
  logic enable, in_valid, in_ready, out_valid, ready;
  logic signed [SAMPLE_W-1:0] in_data;
  logic signed [RESULT_W-1:0] out_data;
  logic x_re, y_we;
  logic [XAW-1:0] x_raddr;
  logic [YAW-1:0] y_waddr;
  logic [31:0] x_rdata, y_wdata;

  control_op_dyn #(.FRAME(FRAME), .XAW(XAW), .YAW(YAW)) dut (.*);

  // buffer X model: one-cycle read latency, holds when re is low
  logic [15:0] xmem [FRAME];
  always @(posedge clk) if (x_re) x_rdata <= {16'd0, xmem[x_raddr]};
  // buffer Y model
  logic [31:0] ymem [FRAME];
  int y_writes = 0;
  always @(posedge clk) if (y_we) begin ymem[y_waddr] <= y_wdata; y_writes <= y_writes + 1; end

  // operator model
  int taken = 0, given = 0;
  logic signed [RESULT_W-1:0] q [$];
  bit stall;
  always @(posedge clk) stall <= ($urandom % 4 == 0);
  assign in_ready = enable && !stall;
  assign ready    = enable && (given == FRAME);
  always @(posedge clk) begin
    out_valid <= 1'b0;
    if (!enable) begin taken <= 0; given <= 0; q.delete(); end
    else begin
      if (in_valid && in_ready) begin
        q.push_back(RESULT_W'(3 * int'(in_data) + 1));
        taken <= taken + 1;
      end
      if (q.size() > 0 && ($urandom % 2)) begin
        out_valid <= 1'b1;
        out_data  <= q.pop_front();
        given     <= given + 1;
      end
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int starts = 0, completes = 0;
  always @(posedge clk) begin
    if (op_start) starts <= starts + 1;
    if (op_complete) completes <= completes + 1;
  end

  task automatic operation(int wait_cycles);
    int s0, c0, w0, guard = 0;
    s0 = starts; c0 = completes; w0 = y_writes;
    foreach (xmem[i]) xmem[i] = 16'($urandom);
    start = 1; @(posedge clk); #1; start = 0;
    repeat (wait_cycles) begin
      check(waiting && !enable && !op_start, "waits for the region");
      @(posedge clk); #1;
    end
    region_ready = 1;
    while (completes == c0 && guard < 50 * FRAME) begin @(posedge clk); #1; guard++; end
    region_ready = 0;
    check(starts == s0 + 1, "one op_start");
    check(completes == c0 + 1, "one op_complete");
    check(y_writes - w0 == FRAME, $sformatf("%0d results written", y_writes - w0));
    for (int i = 0; i < FRAME; i++)
      check(ymem[i] == 32'(3 * int'($signed(xmem[i])) + 1), $sformatf("Y[%0d]", i));
    @(posedge clk); #1;
    check(!busy && !enable, "idle after the operation");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!busy && !enable && !x_re, "idle after reset");
    operation(10);
    operation(0);
    operation(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
