// Self-checking testbench for send_li: a buffer model with one-cycle read
// latency holds random words; the link sink applies random back-pressure.
// Checks the words arrive in order, that li_valid drops outside a frame,
// the done pulse, and that with no back-pressure a frame of FRAME words
// leaves in FRAME + 1 cycles after start.
module tb_send_li;
  import drs_pkg::*;

  localparam int unsigned FRAME = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start = 0, done, busy, li_valid, li_ready = 0, re;
  logic [LINK_W-1:0] li_data;
  logic [7:0] raddr;
  width_mode_t rmode;
  logic [31:0] rdata;

  send_li #(.FRAME(FRAME), .AW(8), .MODE(W32)) dut (.*);

  logic [31:0] mem [FRAME];
  always @(posedge clk) if (re) rdata <= mem[raddr];

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame(bit pressure);
    int got = 0, cycles = 0;
    bit saw_done = 0;
    foreach (mem[i]) mem[i] = $urandom;
    start = 1; @(posedge clk); #1; start = 0;
    while (!saw_done && cycles < 20 * FRAME) begin
      li_ready = pressure ? ($urandom % 2) : 1'b1;
      @(posedge clk);
      cycles++;
      if (li_valid && li_ready) begin
        check(li_data == mem[got], $sformatf("word %0d", got));
        got++;
      end
      #1;
      if (done) saw_done = 1;
    end
    check(got == FRAME, $sformatf("%0d words sent", got));
    check(!busy && !li_valid, "idle after the frame");
    if (!pressure) check(cycles == FRAME + 1, $sformatf("frame took %0d cycles", cycles));
    li_ready = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!li_valid, "nothing sent before start");
    frame(0);
    frame(1);
    frame(0);
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
