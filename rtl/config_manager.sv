// Configuration manager (label M) of the reconfigurable part.
//
// It knows which operator the reconfigurable part holds and which one the
// next operation needs, and asks the protocol configuration builder for a
// partial reconfiguration only when they differ. A request is sent only
// while no operation runs on the region: as soon as the running operation
// completes and a different operator is needed next, the request goes out,
// so the reconfiguration overlaps with the link transfers of the static
// part (configuration prefetching). When the same operator follows, no
// reconfiguration happens.
//
// The operator needed next comes from the entry condition of the
// spreading block (cond: 0 selects fht4, 1 selects fht8), one value per
// operation, through a valid/ready handshake: a new value is accepted once
// the operation that uses the previous one has started. region_ready tells
// the control operator that the region holds the operator of the pending
// operation and is not being reconfigured. op_start and op_complete come
// from the control operator.
//
// Interfaces: cond valid/ready; cfg_req valid/ready with cfg_req_id to the
// protocol configuration builder, cfg_ack back when the bitstream is
// loaded. After reset the region is assumed to hold no known operator, so
// the first operation always causes a reconfiguration. A request leaves on
// the cycle after the condition that calls for it.
module config_manager
  import drs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // entry condition: operator of the next operation
  input  logic   cond_valid,
  output logic   cond_ready,
  input  op_id_t cond,
  // control operator dyn
  input  logic   op_start,
  input  logic   op_complete,
  output logic   region_ready,
  // protocol configuration builder
  output logic   cfg_req_valid,
  input  logic   cfg_req_ready,
  output op_id_t cfg_req_id,
  input  logic   cfg_ack,
  // state of the reconfigurable part
  output logic   reconfiguring,
  output logic   loaded_valid,
  output op_id_t loaded
);

  typedef enum logic [1:0] {STABLE, REQUEST, WAIT_ACK} state_t;

  state_t state;
  op_id_t target;
  logic   target_valid;   // an operation is waiting for 'target'
  logic   op_running;

  assign cond_ready    = !target_valid;
  assign cfg_req_valid = (state == REQUEST);
  assign cfg_req_id    = target;
  assign reconfiguring = (state != STABLE);
  assign region_ready  = (state == STABLE) && target_valid && loaded_valid && (loaded == target);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= STABLE;
      target       <= OP_FHT4;
      target_valid <= 1'b0;
      op_running   <= 1'b0;
      loaded_valid <= 1'b0;
      loaded       <= OP_FHT4;
    end else begin
      if (cond_valid && cond_ready) begin
        target       <= cond;
        target_valid <= 1'b1;
      end
      if (op_start) begin
        target_valid <= 1'b0;
        op_running   <= 1'b1;
      end
      if (op_complete) op_running <= 1'b0;

      case (state)
        STABLE:
          if (target_valid && (!op_running || op_complete) && !op_start
              && (!loaded_valid || loaded != target)) begin
            state        <= REQUEST;
            loaded_valid <= 1'b0;
          end
        REQUEST:
          if (cfg_req_ready) state <= WAIT_ACK;
        WAIT_ACK:
          if (cfg_ack) begin
            state        <= STABLE;
            loaded       <= target;
            loaded_valid <= 1'b1;
          end
        default: state <= STABLE;
      endcase
    end
  end

  // An operation may only start on a region that holds its operator, and
  // the target must not change during a reconfiguration.
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) op_start |-> region_ready)
    else $error("config_manager: operation started on an unready region");
  a_no_req_while_running: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_req_valid |-> !op_running)
    else $error("config_manager: reconfiguration requested during an operation");

endmodule
