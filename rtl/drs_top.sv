// Dynamic part of a partially reconfigurable FPGA running the spreading
// stage of an MC-CDMA transmitter, with self reconfiguration.
//
// Frames of modulated samples arrive over the internal link LI from the
// fixed part of the FPGA, are spread by the operator that the
// reconfigurable region currently holds (fast Hadamard transform of size
// 4 or 8, chosen per frame by the entry condition 'cond'), and leave over
// the link again. The static part around the region holds:
//   recv_li / send_li       link transfers into buffer X / out of buffer Y
//   buffer X, buffer Y      global buffers; Y merges the fht4 results, the
//                           fht8 results and the selected output into one
//                           memory of max(D*W) bits
//   computation_control     macro-code sequencing with semaphores
//   control_op_dyn          the single control process for the region
//   config_manager          decides when to reconfigure (prefetching)
//   protocol_config_builder streams a partial bitstream from the external
//                           bitstream memory into ICAP
// and op_dyn is the region itself.
//
// External parts are reached through ports: the bitstream memory (mem_*,
// one-cycle read latency) and the ICAP primitive (icap_*). The region is
// told by the configuration builder when its contents change. The status
// outputs show the reconfiguration state, the region contents, the two
// buffer semaphores and whether a started operation waits for the region.
//
// Timing: a frame of FRAME samples takes about 2*FRAME cycles in the
// operator; a reconfiguration takes PART_BS_BYTES + 2 cycles (220 KB at one
// byte per 50 MHz clock: about 4.5 ms) and starts as soon as the operation
// before it completes, overlapping the link transfers.
module drs_top
  import drs_pkg::*;
#(
  parameter int unsigned FRAME         = 64,
  parameter int unsigned PART_BS_BYTES = PARTIAL_BS_BYTES,
  parameter int unsigned MEM_ADDR_W    = BS_ADDR_W,
  parameter int unsigned FHT4_BASE     = FHT4_BS_BASE,
  parameter int unsigned FHT8_BASE     = FHT8_BS_BASE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // internal link from the fixed part
  input  logic                  li_in_valid,
  output logic                  li_in_ready,
  input  logic [LINK_W-1:0]     li_in_data,
  // internal link to the fixed part
  output logic                  li_out_valid,
  input  logic                  li_out_ready,
  output logic [LINK_W-1:0]     li_out_data,
  // entry condition of the spreading block, one per frame
  input  logic                  cond_valid,
  output logic                  cond_ready,
  input  op_id_t                cond,
  // external bitstream memory
  output logic                  mem_rd,
  output logic [MEM_ADDR_W-1:0] mem_addr,
  input  logic [7:0]            mem_data,
  // ICAP
  output logic                  icap_ce_n,
  output logic                  icap_write_n,
  output logic [7:0]            icap_i,
  // status
  output logic                  reconfiguring,
  output logic                  buf_x_full,
  output logic                  buf_y_full,
  output logic                  region_configured,
  output op_id_t                region_loaded,
  output logic                  op_waiting
);

  // Buffer sizes: A (samples, 16 bit) alone in X; B, C, D (chips, 32 bit)
  // merged into Y.
  localparam int unsigned X_BITS = buffer_bits(FRAME, SAMPLE_W);
  localparam int unsigned Y_BITS = merged_bits(buffer_bits(FRAME, RESULT_W),
                                               buffer_bits(FRAME, RESULT_W),
                                               buffer_bits(FRAME, RESULT_W));
  localparam int unsigned XAW = addr_bits(X_BITS / 8);
  localparam int unsigned YAW = addr_bits(Y_BITS / 8);

  // buffer X
  logic              xw_we, x_re;
  logic [XAW-1:0]    xw_addr, x_raddr;
  width_mode_t       xw_mode;
  logic [31:0]       xw_data, x_rdata;
  // buffer Y
  logic              y_we, y_re;
  logic [YAW-1:0]    y_waddr, y_raddr;
  width_mode_t       y_rmode;
  logic [31:0]       y_wdata, y_rdata;

  logic recv_start, recv_done, send_start, send_done;
  logic op_go, op_complete;

  logic   region_ready, mgr_op_start;
  logic   cfg_req_valid, cfg_req_ready, cfg_ack;
  op_id_t cfg_req_id;
  logic   loaded_valid;
  op_id_t mgr_loaded;

  logic   region_busy, region_load;
  op_id_t region_id;

  logic                       dyn_enable, dyn_in_valid, dyn_in_ready, dyn_out_valid, dyn_ready;
  logic signed [SAMPLE_W-1:0] dyn_in_data;
  logic signed [RESULT_W-1:0] dyn_out_data;

  computation_control u_comp_ctl (
    .clk, .rst_n,
    .recv_start, .recv_done,
    .op_start(op_go), .op_complete,
    .send_start, .send_done,
    .x_full(buf_x_full), .y_full(buf_y_full)
  );

  recv_li #(.FRAME(FRAME), .AW(XAW), .MODE(W16)) u_recv (
    .clk, .rst_n, .start(recv_start), .done(recv_done), .busy(),
    .li_valid(li_in_valid), .li_ready(li_in_ready), .li_data(li_in_data),
    .we(xw_we), .waddr(xw_addr), .wmode(xw_mode), .wdata(xw_data)
  );

  global_buffer #(.BITS(X_BITS)) u_buf_x (
    .clk, .we(xw_we), .waddr(xw_addr), .wmode(xw_mode), .wdata(xw_data),
    .re(x_re), .raddr(x_raddr), .rmode(W16), .rdata(x_rdata)
  );

  control_op_dyn #(.FRAME(FRAME), .XAW(XAW), .YAW(YAW)) u_ctl_dyn (
    .clk, .rst_n,
    .start(op_go), .op_complete, .busy(),
    .region_ready, .op_start(mgr_op_start), .waiting(op_waiting),
    .enable(dyn_enable), .in_valid(dyn_in_valid), .in_ready(dyn_in_ready),
    .in_data(dyn_in_data), .out_valid(dyn_out_valid), .out_data(dyn_out_data),
    .ready(dyn_ready),
    .x_re, .x_raddr, .x_rdata,
    .y_we, .y_waddr, .y_wdata
  );

  global_buffer #(.BITS(Y_BITS)) u_buf_y (
    .clk, .we(y_we), .waddr(y_waddr), .wmode(W32), .wdata(y_wdata),
    .re(y_re), .raddr(y_raddr), .rmode(y_rmode), .rdata(y_rdata)
  );

  send_li #(.FRAME(FRAME), .AW(YAW), .MODE(W32)) u_send (
    .clk, .rst_n, .start(send_start), .done(send_done), .busy(),
    .li_valid(li_out_valid), .li_ready(li_out_ready), .li_data(li_out_data),
    .re(y_re), .raddr(y_raddr), .rmode(y_rmode), .rdata(y_rdata)
  );

  config_manager u_cfg_mgr (
    .clk, .rst_n,
    .cond_valid, .cond_ready, .cond,
    .op_start(mgr_op_start), .op_complete, .region_ready,
    .cfg_req_valid, .cfg_req_ready, .cfg_req_id, .cfg_ack,
    .reconfiguring, .loaded_valid, .loaded(mgr_loaded)
  );

  protocol_config_builder #(
    .BS_BYTES(PART_BS_BYTES), .ADDR_W(MEM_ADDR_W),
    .FHT4_BASE(FHT4_BASE), .FHT8_BASE(FHT8_BASE)
  ) u_pcb (
    .clk, .rst_n,
    .req_valid(cfg_req_valid), .req_ready(cfg_req_ready), .req_id(cfg_req_id),
    .cfg_ack,
    .mem_rd, .mem_addr, .mem_data,
    .icap_ce_n, .icap_write_n, .icap_i,
    .region_busy, .region_load, .region_id
  );

  op_dyn #(.FRAME(FRAME)) u_op_dyn (
    .clk, .rst_n,
    .cfg_busy(region_busy), .cfg_load(region_load), .cfg_id(region_id),
    .enable(dyn_enable), .in_valid(dyn_in_valid), .in_ready(dyn_in_ready),
    .in_data(dyn_in_data), .out_valid(dyn_out_valid), .out_data(dyn_out_data),
    .ready(dyn_ready),
    .configured(region_configured), .loaded(region_loaded)
  );

  // The manager's view of the region must agree with the region itself.
  a_views_agree: assert property (@(posedge clk) disable iff (!rst_n)
    (loaded_valid && !reconfiguring) |-> (region_configured && region_loaded == mgr_loaded))
    else $error("drs_top: configuration manager and region disagree");

endmodule
