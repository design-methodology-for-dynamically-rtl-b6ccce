// Self-checking testbench for computation_control. The receive, operate
// and send steps are stand-ins here that finish after random delays. A
// scoreboard checks the semaphore rules for several iterations: a frame is
// received only into a free X, the operation starts only with X full and Y
// empty, sending starts only with Y full, and steps alternate correctly.
// It also checks that receiving the next frame overlaps with sending the
// previous results.
module tb_computation_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic recv_start, recv_done = 0, op_start, op_complete = 0, send_start, send_done = 0;
  logic x_full, y_full;

  computation_control dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // step stand-ins
  int rcv_left = -1, op_left = -1, snd_left = -1;
  int recvs = 0, ops = 0, sends = 0, overlaps = 0;
  bit x_has = 0, y_has = 0;  // scoreboard view of buffer contents
  always @(posedge clk) begin
    recv_done <= 0; op_complete <= 0; send_done <= 0;
    if (rst_n) begin
      if (recv_start) begin
        check(rcv_left < 0 && !x_has && op_left < 0, "receive only into a free X");
        rcv_left <= 1 + $urandom % 12;
      end else if (rcv_left > 0) rcv_left <= rcv_left - 1;
      else if (rcv_left == 0) begin recv_done <= 1; rcv_left <= -1; x_has = 1; recvs++; end

      if (op_start) begin
        check(x_has && !y_has && op_left < 0, "operate only with X full and Y empty");
        op_left <= 1 + $urandom % 12;
      end else if (op_left > 0) op_left <= op_left - 1;
      else if (op_left == 0) begin op_complete <= 1; op_left <= -1; x_has = 0; y_has = 1; ops++; end

      if (send_start) begin
        check(y_has && snd_left < 0, "send only with Y full");
        snd_left <= 1 + $urandom % 12;
      end else if (snd_left > 0) snd_left <= snd_left - 1;
      else if (snd_left == 0) begin send_done <= 1; snd_left <= -1; y_has = 0; sends++; end

      if (rcv_left >= 0 && snd_left >= 0) overlaps++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sends < 20) @(posedge clk);
    #1;
    check(recvs >= 20 && ops >= 20, "all steps repeated");
    check(recvs <= ops + 1 && ops <= sends + 1, "steps stay in order");
    check(overlaps > 0, "receive overlaps with send");
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
