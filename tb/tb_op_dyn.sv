// Self-checking testbench for op_dyn, the reconfigurable region. Checks
// that the region offers nothing before its first configuration or while
// it is rewritten, and that after loading fht8 / fht4 it computes the
// Hadamard transform of that size (reference computed here).
module tb_op_dyn;
  import drs_pkg::*;

  localparam int unsigned FRAME = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic cfg_busy = 0, cfg_load = 0, enable = 0, in_valid = 0;
  op_id_t cfg_id = OP_FHT4, loaded;
  logic in_ready, out_valid, ready, configured;
  logic signed [SAMPLE_W-1:0] in_data = '0;
  logic signed [RESULT_W-1:0] out_data;

  op_dyn #(.FRAME(FRAME)) dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_chip(int n, logic signed [SAMPLE_W-1:0] x[], int g, int k);
    int acc = 0;
    for (int i = 0; i < n; i++)
      acc += ($countones(k & i) % 2) ? -int'(x[g*n+i]) : int'(x[g*n+i]);
    return acc;
  endfunction

  task automatic reconfigure(op_id_t id);
    cfg_busy = 1;
    repeat (5) begin
      @(posedge clk); #1;
      check(!configured && !in_ready && !out_valid && !ready, "nothing offered while rewritten");
    end
    cfg_busy = 0; cfg_load = 1; cfg_id = id;
    @(posedge clk); #1;
    cfg_load = 0;
    check(configured && loaded == id, $sformatf("region holds %s", id.name()));
  endtask

  task automatic run_frame(int n);
    logic signed [SAMPLE_W-1:0] x[];
    int sent = 0, got = 0, guard = 0;
    x = new[FRAME];
    foreach (x[i]) x[i] = SAMPLE_W'($urandom);
    enable = 1;
    while (!ready && guard < 10 * FRAME) begin
      in_valid = (sent < FRAME);
      in_data  = in_valid ? x[sent] : '0;
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      if (out_valid) begin
        check(out_data == RESULT_W'(ref_chip(n, x, got / n, got % n)),
              $sformatf("n=%0d chip %0d", n, got));
        got++;
      end
      #1;
      guard++;
    end
    check(got == FRAME, $sformatf("n=%0d: %0d chips", n, got));
    in_valid = 0;
    enable = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!configured && !in_ready && !ready, "unconfigured after reset");
    reconfigure(OP_FHT8);
    run_frame(8);
    reconfigure(OP_FHT4);
    run_frame(4);
    run_frame(4);
    reconfigure(OP_FHT8);
    run_frame(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
