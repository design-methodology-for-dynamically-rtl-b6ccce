// Send/LI: sends one frame from a buffer over the internal link LI.
//
// On a start pulse this block reads elements 0 .. FRAME-1 of the buffer in
// width MODE and offers each, zero-extended to a link word, on the link
// (valid/ready handshake). The buffer read has one cycle of latency; a
// word is held on li_data until the link takes it, and the next read is
// issued in the same cycle, so the link can carry one word per cycle. A
// one-cycle 'done' pulse follows the transfer of the last word.
//
// The block and the link are named in the design; the handshake and the
// word format are this design's own choices.
module send_li
  import drs_pkg::*;
#(
  parameter int unsigned FRAME = 64,
  parameter int unsigned AW    = 8,
  parameter width_mode_t MODE  = W32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              done,
  output logic              busy,
  // internal link out
  output logic              li_valid,
  input  logic              li_ready,
  output logic [LINK_W-1:0] li_data,
  // buffer read port
  output logic              re,
  output logic [AW-1:0]     raddr,
  output width_mode_t       rmode,
  input  logic [31:0]       rdata
);

  localparam int unsigned FW = addr_bits(FRAME + 1);

  logic [FW-1:0] rd_cnt, tx_cnt;
  logic          hold;
  logic          fire;

  assign li_valid = hold;
  assign li_data  = LINK_W'(rdata);
  assign fire     = hold && li_ready;
  assign re       = busy && (rd_cnt < FW'(FRAME)) && (!hold || fire);
  assign raddr    = AW'(rd_cnt);
  assign rmode    = MODE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      rd_cnt <= '0;
      tx_cnt <= '0;
      hold   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          rd_cnt <= '0;
          tx_cnt <= '0;
          hold   <= 1'b0;
        end
      end else begin
        if (re)        begin rd_cnt <= rd_cnt + 1'b1; hold <= 1'b1; end
        else if (fire) hold <= 1'b0;
        if (fire) begin
          tx_cnt <= tx_cnt + 1'b1;
          if (tx_cnt == FW'(FRAME - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
