// Computation and communication sequencing of the dynamic part.
//
// It executes, forever, the macro-code loop of the spreading stage:
// receive a frame from the internal link into buffer X, run the dynamic
// operation from X into Y, send Y over the link. The three steps are
// synchronised by two semaphores, as the generated executive does:
//   x_full  - buffer X holds a received frame not yet consumed,
//   y_full  - buffer Y holds results not yet sent.
// Reception of the next frame starts as soon as X is free (after the
// operation that read it has completed), so it overlaps with sending the
// previous results and with any reconfiguration of the region. The
// operation starts when X is full and Y is empty.
//
// recv_start, op_start and send_start are one-cycle pulses; the matching
// *_done / op_complete pulses come back from recv_li, control_op_dyn and
// send_li. The semaphore scheme is the methodology's; the exact pulse
// protocol is this design's choice.
module computation_control (
  input  logic clk,
  input  logic rst_n,
  output logic recv_start,
  input  logic recv_done,
  output logic op_start,
  input  logic op_complete,
  output logic send_start,
  input  logic send_done,
  output logic x_full,
  output logic y_full
);

  logic recv_busy, op_busy, send_busy;

  assign recv_start = !recv_busy && !x_full && !op_busy;
  assign op_start   = x_full && !y_full && !op_busy;
  assign send_start = y_full && !send_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      recv_busy <= 1'b0;
      op_busy   <= 1'b0;
      send_busy <= 1'b0;
      x_full    <= 1'b0;
      y_full    <= 1'b0;
    end else begin
      if (recv_start) recv_busy <= 1'b1;
      if (recv_done) begin
        recv_busy <= 1'b0;
        x_full    <= 1'b1;
      end
      if (op_start) op_busy <= 1'b1;
      if (op_complete) begin
        op_busy <= 1'b0;
        x_full  <= 1'b0;
        y_full  <= 1'b1;
      end
      if (send_start) send_busy <= 1'b1;
      if (send_done) begin
        send_busy <= 1'b0;
        y_full    <= 1'b0;
      end
    end
  end

  a_recv_done: assert property (@(posedge clk) disable iff (!rst_n) recv_done |-> recv_busy)
    else $error("computation_control: recv_done without a started receive");
  a_op_done: assert property (@(posedge clk) disable iff (!rst_n) op_complete |-> op_busy)
    else $error("computation_control: op_complete without a started operation");
  a_send_done: assert property (@(posedge clk) disable iff (!rst_n) send_done |-> send_busy)
    else $error("computation_control: send_done without a started send");

endmodule
