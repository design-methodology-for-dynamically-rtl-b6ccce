// Control operator dyn: the one control process for every operation that
// runs on the reconfigurable part.
//
// The operations mapped on the region (fht4, fht8) are seen by the
// computation control as one generic operation. On a start pulse this
// block waits until the configuration manager reports that the region
// holds the operator the operation needs (region_ready), then raises
// 'enable', pulses op_start, and moves the data: it reads the FRAME
// samples of buffer X in order and hands them to the operator, and writes
// every result the operator produces into buffer Y in order. When the
// operator raises 'ready' it drops 'enable' and pulses op_complete.
//
// Buffer X reads have one cycle of latency; a sample is held on the
// operator input until the operator takes it. Results are written on the
// cycle they appear. The X elements are 16-bit and the Y elements 32-bit.
// 'waiting' is high while a started operation waits for the region, the
// cost of a reconfiguration that prefetching could not hide.
module control_op_dyn
  import drs_pkg::*;
#(
  parameter int unsigned FRAME = 64,
  parameter int unsigned XAW   = 8,     // buffer X element address width
  parameter int unsigned YAW   = 8      // buffer Y element address width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // computation control
  input  logic                       start,
  output logic                       op_complete,
  output logic                       busy,
  // configuration manager
  input  logic                       region_ready,
  output logic                       op_start,
  output logic                       waiting,
  // operator interface
  output logic                       enable,
  output logic                       in_valid,
  input  logic                       in_ready,
  output logic signed [SAMPLE_W-1:0] in_data,
  input  logic                       out_valid,
  input  logic signed [RESULT_W-1:0] out_data,
  input  logic                       ready,
  // buffer X read port
  output logic                       x_re,
  output logic [XAW-1:0]             x_raddr,
  input  logic [31:0]                x_rdata,
  // buffer Y write port
  output logic                       y_we,
  output logic [YAW-1:0]             y_waddr,
  output logic [31:0]                y_wdata
);

  localparam int unsigned FW = addr_bits(FRAME + 1);

  typedef enum logic [1:0] {IDLE, WAIT_REGION, RUN, FINISH} state_t;

  state_t         state;
  logic [FW-1:0]  rd_cnt, wr_cnt;
  logic           hold;     // a sample from X is on in_data
  logic           fire;

  assign busy     = (state != IDLE);
  assign waiting  = (state == WAIT_REGION);
  assign enable   = (state == RUN);
  assign in_valid = hold;
  assign in_data  = SAMPLE_W'(x_rdata);
  assign fire     = hold && in_ready;
  assign x_re     = (state == RUN) && (rd_cnt < FW'(FRAME)) && (!hold || fire);
  assign x_raddr  = XAW'(rd_cnt);
  assign y_we     = (state == RUN) && out_valid;
  assign y_waddr  = YAW'(wr_cnt);
  assign y_wdata  = out_data;
  assign op_start = (state == WAIT_REGION) && region_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      rd_cnt      <= '0;
      wr_cnt      <= '0;
      hold        <= 1'b0;
      op_complete <= 1'b0;
    end else begin
      op_complete <= 1'b0;
      case (state)
        IDLE: if (start) state <= WAIT_REGION;
        WAIT_REGION: if (region_ready) begin
          state  <= RUN;
          rd_cnt <= '0;
          wr_cnt <= '0;
          hold   <= 1'b0;
        end
        RUN: begin
          if (x_re)      begin rd_cnt <= rd_cnt + 1'b1; hold <= 1'b1; end
          else if (fire) hold <= 1'b0;
          if (y_we)      wr_cnt <= wr_cnt + 1'b1;
          if (ready) begin
            state       <= FINISH;
            op_complete <= 1'b1;
          end
        end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  a_frame_written: assert property (@(posedge clk) disable iff (!rst_n)
    (state == RUN && ready) |-> (wr_cnt + FW'(y_we)) == FW'(FRAME))
    else $error("control_op_dyn: operator ready before a full frame of results");

endmodule
