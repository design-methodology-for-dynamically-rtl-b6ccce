// Recv/LI: receives one frame from the internal link LI into a buffer.
//
// The internal link connects the fixed part of the FPGA (interleaving,
// IFFT and the DSP link) to the dynamic part. On a start pulse this block
// accepts FRAME words from the link (valid/ready handshake, one word per
// cycle at most) and writes word i, truncated to the buffer element width
// MODE, to element i of the buffer. A one-cycle 'done' pulse follows the
// last write. Between frames li_ready is low, so the link stalls until the
// buffer is free again.
//
// The block and the link are named in the design; the handshake, the word
// width (32 bits) and the one-element-per-word format are this design's
// own choices.
module recv_li
  import drs_pkg::*;
#(
  parameter int unsigned FRAME = 64,
  parameter int unsigned AW    = 8,
  parameter width_mode_t MODE  = W16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              done,
  output logic              busy,
  // internal link in
  input  logic              li_valid,
  output logic              li_ready,
  input  logic [LINK_W-1:0] li_data,
  // buffer write port
  output logic              we,
  output logic [AW-1:0]     waddr,
  output width_mode_t       wmode,
  output logic [31:0]       wdata
);

  localparam int unsigned FW = addr_bits(FRAME + 1);

  logic [FW-1:0] cnt;

  assign li_ready = busy;
  assign we       = busy && li_valid;
  assign waddr    = AW'(cnt);
  assign wmode    = MODE;
  assign wdata    = li_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= '0;
        end
      end else if (li_valid) begin
        if (cnt == FW'(FRAME - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
