// Self-checking testbench for recv_li: frames of random words arrive with
// random gaps; checks that word i is written to element i in the chosen
// width, that li_ready is low outside a frame, and the single done pulse.
module tb_recv_li;
  import drs_pkg::*;

  localparam int unsigned FRAME = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start = 0, done, busy, li_valid = 0, li_ready, we;
  logic [LINK_W-1:0] li_data = '0;
  logic [7:0] waddr;
  width_mode_t wmode;
  logic [31:0] wdata;

  recv_li #(.FRAME(FRAME), .AW(8), .MODE(W16)) dut (.*);

  logic [31:0] got [FRAME];
  int writes = 0, dones = 0;
  always @(posedge clk) begin
    if (we) begin
      got[waddr] <= wdata;
      writes <= writes + 1;
      if (wmode != W16) begin failures++; $display("FAIL: width"); end
    end
    if (done) dones <= dones + 1;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame;
    logic [31:0] w [FRAME];
    int sent = 0, w0, d0;
    w0 = writes; d0 = dones;
    foreach (w[i]) w[i] = $urandom;
    li_valid = 1; li_data = w[0];
    #1;
    check(!li_ready, "no ready before start");
    start = 1; @(posedge clk); #1; start = 0;
    while (sent < FRAME) begin
      li_valid = ($urandom % 3 != 0);
      li_data  = w[sent];
      @(posedge clk);
      if (li_valid && li_ready) sent++;
      #1;
    end
    li_valid = 0;
    @(posedge clk); #1;
    check(writes - w0 == FRAME, "one write per word");
    check(dones == d0 + 1, "one done pulse");
    check(!busy && !li_ready, "idle after the frame");
    foreach (w[i]) check(got[i] == w[i], $sformatf("element %0d", i));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    frame();
    repeat (4) @(posedge clk);
    #1;
    frame();
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
