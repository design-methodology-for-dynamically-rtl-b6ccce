// Spreading operator: fast Hadamard transform of size N (fht4 for N = 4,
// fht8 for N = 8) behind the uniform operator interface.
//
// While 'enable' is high the operator takes FRAME samples, N at a time,
// from the in_* stream. Each group of N samples x[0..N-1] is transformed
// into N chips y[k] = sum_n (-1)^popcount(k & n) * x[n] (Walsh-Hadamard
// transform in natural order), computed by log2(N) stages of add/subtract
// butterflies, and the N chips leave on the out_* stream, one per cycle.
// When all FRAME chips have left, 'ready' rises and stays high until
// 'enable' falls, which also clears the operator for the next frame.
//
// Timing: N cycles to load a group (in_ready high), then N cycles to emit
// it (out_valid high), so a group of N takes 2N cycles at full input rate.
// The out_* stream has no back-pressure.
//
// The operator names, sizes and their role as MC-CDMA spreading follow the
// design; the transform arithmetic, the serial interface, the widths (16-bit
// signed samples, 32-bit signed chips) and the frame length are this
// design's own choices.
module fht
  import drs_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned FRAME = 64,       // samples per operation
  parameter int unsigned IN_W  = SAMPLE_W,
  parameter int unsigned OUT_W = RESULT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    ready
);

  localparam int unsigned STAGES = $clog2(N);
  localparam int unsigned CW     = addr_bits(N) + 1;
  localparam int unsigned FW     = addr_bits(FRAME + 1);

  typedef enum logic [1:0] {LOAD, EMIT, DONE} state_t;

  state_t                   state;
  logic signed [OUT_W-1:0]  x   [N];
  logic signed [OUT_W-1:0]  y   [N];
  logic signed [OUT_W-1:0]  res [N];
  logic [CW-1:0]            cnt;
  logic [FW-1:0]            emitted;

  // Butterfly network on the group being completed: x[0..N-2] already
  // stored plus the arriving sample as x[N-1]. Stage s combines elements
  // 2^s apart.
  always_comb begin
    logic signed [OUT_W-1:0] t [N];
    for (int i = 0; i < N - 1; i++) t[i] = x[i];
    t[N-1] = OUT_W'(in_data);
    for (int s = 0; s < STAGES; s++) begin
      for (int i = 0; i < N; i++) begin
        if ((i & (1 << s)) == 0) begin
          logic signed [OUT_W-1:0] a, b;
          a = t[i];
          b = t[i + (1 << s)];
          t[i]            = a + b;
          t[i + (1 << s)] = a - b;
        end
      end
    end
    for (int i = 0; i < N; i++) y[i] = t[i];
  end

  assign in_ready  = enable && (state == LOAD);
  assign out_valid = enable && (state == EMIT);
  assign out_data  = res[cnt[CW-2:0]];
  assign ready     = enable && (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LOAD;
      cnt     <= '0;
      emitted <= '0;
      for (int i = 0; i < N; i++) begin
        x[i]   <= '0;
        res[i] <= '0;
      end
    end else if (!enable) begin
      state   <= LOAD;
      cnt     <= '0;
      emitted <= '0;
    end else begin
      case (state)
        LOAD: if (in_valid) begin
          x[cnt[CW-2:0]] <= OUT_W'(in_data);
          if (cnt == CW'(N - 1)) begin
            for (int k = 0; k < N; k++) res[k] <= y[k];
            cnt   <= '0;
            state <= EMIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        EMIT: begin
          emitted <= emitted + 1'b1;
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= (emitted == FW'(FRAME - 1)) ? DONE : LOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  initial begin
    assert (N >= 2 && (1 << STAGES) == N) else $fatal(1, "fht: N must be a power of two");
    assert (FRAME % N == 0) else $fatal(1, "fht: FRAME must be a multiple of N");
  end

endmodule
