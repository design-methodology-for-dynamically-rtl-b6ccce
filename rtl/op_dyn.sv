// Reconfigurable part of the FPGA: the dynamic operator Op_Dyn.
//
// The dynamic region holds one operator at a time, fht4 or fht8, behind the
// uniform operator interface (enable, ready, data in, data out) that the
// static part sees through the bus macro. Which operator it holds changes
// only by partial reconfiguration: while cfg_busy is high the region is
// being rewritten and holds no usable operator; a cfg_load pulse at the end
// of the bitstream makes the operator cfg_id the region's contents.
//
// In the FPGA only the loaded operator exists in the region. In this RTL
// both operators are present and the one not loaded is held disabled with
// its outputs masked, so the static part observes exactly what it would
// observe on the device: the loaded operator, or nothing while the region
// is unconfigured or being reconfigured. The region starts unconfigured.
//
// Timing is that of the loaded fht (see fht.sv). Using the region while it
// holds no operator is a protocol error and is flagged by an assertion.
module op_dyn
  import drs_pkg::*;
#(
  parameter int unsigned FRAME = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // from the protocol configuration builder
  input  logic                       cfg_busy,
  input  logic                       cfg_load,
  input  op_id_t                     cfg_id,
  // uniform operator interface
  input  logic                       enable,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic signed [RESULT_W-1:0] out_data,
  output logic                       ready,
  // region contents, for observation
  output logic                       configured,
  output op_id_t                     loaded
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      configured <= 1'b0;
      loaded     <= OP_FHT4;
    end else if (cfg_load) begin
      configured <= 1'b1;
      loaded     <= cfg_id;
    end else if (cfg_busy) begin
      configured <= 1'b0;
    end
  end

  logic usable;
  assign usable = configured && !cfg_busy;

  logic                       en4, en8;
  logic                       in_ready4, in_ready8, out_valid4, out_valid8, ready4, ready8;
  logic signed [RESULT_W-1:0] out_data4, out_data8;

  assign en4 = enable && usable && (loaded == OP_FHT4);
  assign en8 = enable && usable && (loaded == OP_FHT8);

  fht #(.N(4), .FRAME(FRAME)) u_fht4 (
    .clk, .rst_n, .enable(en4), .in_valid, .in_ready(in_ready4), .in_data,
    .out_valid(out_valid4), .out_data(out_data4), .ready(ready4)
  );

  fht #(.N(8), .FRAME(FRAME)) u_fht8 (
    .clk, .rst_n, .enable(en8), .in_valid, .in_ready(in_ready8), .in_data,
    .out_valid(out_valid8), .out_data(out_data8), .ready(ready8)
  );

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = '0;
    ready     = 1'b0;
    if (usable) begin
      if (loaded == OP_FHT4) begin
        in_ready = in_ready4; out_valid = out_valid4; out_data = out_data4; ready = ready4;
      end else begin
        in_ready = in_ready8; out_valid = out_valid8; out_data = out_data8; ready = ready8;
      end
    end
  end

  a_enable_when_configured: assert property (@(posedge clk) disable iff (!rst_n) enable |-> usable)
    else $error("op_dyn: enabled while not configured");

endmodule
