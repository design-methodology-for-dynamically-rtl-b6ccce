// Self-checking testbench for fht: runs fht4 and fht8 over a frame of
// random samples and compares every chip with a Walsh-Hadamard reference
// computed here from its definition, y[k] = sum_n (-1)^popcount(k&n) x[n].
// Also checks the 2N-cycles-per-group timing, input stalls and that
// 'ready' clears when enable falls.
module tb_fht;
  import drs_pkg::*;

  localparam int unsigned FRAME = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic en4, en8, iv4, iv8, ir4, ir8, ov4, ov8, rd4, rd8;
  logic signed [SAMPLE_W-1:0] id4, id8;
  logic signed [RESULT_W-1:0] od4, od8;

  fht #(.N(4), .FRAME(FRAME)) dut4 (.clk, .rst_n, .enable(en4), .in_valid(iv4), .in_ready(ir4),
    .in_data(id4), .out_valid(ov4), .out_data(od4), .ready(rd4));
  fht #(.N(8), .FRAME(FRAME)) dut8 (.clk, .rst_n, .enable(en8), .in_valid(iv8), .in_ready(ir8),
    .in_data(id8), .out_valid(ov8), .out_data(od8), .ready(rd8));

  function automatic int ref_chip(int n, logic signed [SAMPLE_W-1:0] x[], int g, int k);
    int acc = 0;
    for (int i = 0; i < n; i++)
      acc += ($countones(k & i) % 2) ? -int'(x[g*n+i]) : int'(x[g*n+i]);
    return acc;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive one frame through the selected operator; gaps > 0 inserts idle
  // input cycles.
  task automatic run(int n, bit gaps);
    logic signed [SAMPLE_W-1:0] x[];
    int sent = 0, got = 0, cycles = 0;
    x = new[FRAME];
    foreach (x[i]) x[i] = SAMPLE_W'($urandom);
    if (n == 4) en4 = 1; else en8 = 1;
    while (1) begin
      bit v;
      v = (sent < FRAME) && (!gaps || ($urandom % 3 != 0));
      if (n == 4) begin iv4 = v; id4 = v ? x[sent] : '0; end
      else        begin iv8 = v; id8 = v ? x[sent] : '0; end
      @(posedge clk);
      cycles++;
      if ((n == 4 ? iv4 && ir4 : iv8 && ir8)) sent++;
      if (n == 4 ? ov4 : ov8) begin
        int exp;
        exp = ref_chip(n, x, got / n, got % n);
        check((n == 4 ? od4 : od8) == RESULT_W'(exp),
              $sformatf("fht%0d chip %0d: got %0d exp %0d", n, got, n == 4 ? od4 : od8, exp));
        got++;
      end
      #1;
      if (n == 4 ? rd4 : rd8) break;
      if (cycles > 10 * FRAME) break;
    end
    check(got == FRAME, $sformatf("fht%0d produced %0d chips, expected %0d", n, got, FRAME));
    if (!gaps) check(cycles == 2 * FRAME,
                     $sformatf("fht%0d took %0d cycles, expected %0d", n, cycles, 2 * FRAME));
    iv4 = 0; iv8 = 0;
    en4 = 0; en8 = 0;
    @(posedge clk); #1;
    check(!rd4 && !rd8, "ready cleared after enable falls");
  endtask

  initial begin
    en4 = 0; en8 = 0; iv4 = 0; iv8 = 0; id4 = '0; id8 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!ir4 && !ov4 && !rd4, "idle when disabled");
    run(4, 0);
    run(8, 0);
    run(4, 1);
    run(8, 1);
    run(8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
