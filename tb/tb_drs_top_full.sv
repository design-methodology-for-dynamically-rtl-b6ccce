// Full-size testbench for drs_top with every parameter at its default:
// 64-sample frames and 220 KB partial bitstreams at the real memory
// addresses. Two frames run, the first spread by fht8 and the second by
// fht4, so the region is loaded twice from the bitstream memory model.
// Checks every chip against a Hadamard reference, each load's length,
// source and order, and the load time: 225,280 bytes at one byte per
// 50 MHz clock, 225,282 cycles from request to acknowledge (about 4.5 ms).
// For the second frame the load starts when the first operation
// completes, so its cost to the operation is the prefetch cost
// P = R - D: load time R minus the time D the static part needs anyway to
// receive the next frame. The measured wait of the second operation is
// checked against R - D.
module tb_drs_top_full;
  import drs_pkg::*;
  import bs_pattern_pkg::*;

  localparam int unsigned FRAME = 64;
  localparam int NFRAMES = 2;
  localparam real CLK_MHZ = 50.0;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;

  logic li_in_valid = 0, li_in_ready, li_out_valid, li_out_ready = 1;
  logic [LINK_W-1:0] li_in_data = '0, li_out_data;
  logic cond_valid = 0, cond_ready;
  op_id_t cond = OP_FHT4, region_loaded;
  logic mem_rd, icap_ce_n, icap_write_n, reconfiguring, buf_x_full, buf_y_full;
  logic region_configured, op_waiting;
  logic [BS_ADDR_W-1:0] mem_addr;
  logic [7:0] mem_data, icap_i;
  int unsigned reads, ibytes, loads, last_bytes;
  logic [31:0] isum, last_sum;

  drs_top dut (.*);
  bitstream_memory_model #(.ADDR_W(BS_ADDR_W)) u_mem (.clk, .mem_rd, .mem_addr, .mem_data, .reads);
  icap_model u_icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .bytes(ibytes),
                     .sum(isum), .loads, .last_bytes, .last_sum);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  op_id_t conds [NFRAMES] = '{OP_FHT8, OP_FHT4};
  logic signed [SAMPLE_W-1:0] samples [NFRAMES * FRAME];

  function automatic int ref_chip(int f, int idx);
    int n, g, k, acc;
    n = (conds[f] == OP_FHT8) ? 8 : 4;
    g = idx / n; k = idx % n;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      int x;
      x = int'(samples[f * FRAME + g * n + i]);
      acc += ($countones(k & i) % 2) ? -x : x;
    end
    return acc;
  endfunction

  int cond_idx = 0, in_idx = 0, out_idx = 0;
  always @(posedge clk) if (rst_n && cond_valid && cond_ready) cond_idx <= cond_idx + 1;
  always_comb begin
    cond_valid = rst_n && (cond_idx < NFRAMES);
    cond = (cond_idx < NFRAMES) ? conds[cond_idx] : OP_FHT4;
    li_in_valid = rst_n && (in_idx < NFRAMES * FRAME);
    li_in_data  = (in_idx < NFRAMES * FRAME) ? {16'h0, samples[in_idx]} : '0;
  end
  always @(posedge clk) if (rst_n && li_in_valid && li_in_ready) in_idx <= in_idx + 1;

  always @(posedge clk) begin
    if (rst_n && li_out_valid && li_out_ready) begin
      int e;
      e = ref_chip(out_idx / FRAME, out_idx % FRAME);
      check(li_out_data == 32'(e), $sformatf("chip %0d: got %0d exp %0d", out_idx, $signed(li_out_data), e));
      out_idx <= out_idx + 1;
    end
  end

  // load timing: request accepted -> acknowledge
  longint t_req = 0;
  int loads_seen = 0;
  op_id_t last_req;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.cfg_req_valid && dut.cfg_req_ready) begin
        t_req    <= $time;
        last_req <= dut.cfg_req_id;
      end
      if (dut.cfg_ack) begin
        longint cyc;
        // cfg_ack is seen here on the edge after the one that raised it
        cyc = ($time - t_req) / 20 - 1;
        check(cyc == PARTIAL_BS_BYTES + 2, $sformatf("load took %0d cycles", cyc));
        $display("INFO load of %s: %0d cycles = %0.3f ms at %0.0f MHz", last_req.name(), cyc,
                 real'(cyc) / (CLK_MHZ * 1000.0), CLK_MHZ);
      end
      if (loads != loads_seen) begin
        loads_seen <= loads;
        check(last_bytes == PARTIAL_BS_BYTES, $sformatf("load of %0d bytes", last_bytes));
        check(last_sum == bs_expect(last_req == OP_FHT8 ? FHT8_BS_BASE : FHT4_BS_BASE, PARTIAL_BS_BYTES),
              $sformatf("bitstream of %s", last_req.name()));
      end
    end
  end

  // prefetch cost measurement for the second operation
  longint t_first_complete = -1, t_x_full = -1;
  int wait_second = 0, completes = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.op_complete) begin
        completes <= completes + 1;
        if (completes == 0) t_first_complete <= $time;
      end
      if (completes == 1 && t_first_complete >= 0 && t_x_full < 0 && buf_x_full) t_x_full <= $time;
      if (completes == 1 && op_waiting) wait_second <= wait_second + 1;
    end
  end

  initial begin
    foreach (samples[i]) samples[i] = SAMPLE_W'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (out_idx < NFRAMES * FRAME) @(posedge clk);
    repeat (5) @(posedge clk);
    #1;
    check(loads == NFRAMES, $sformatf("%0d partial loads", loads));
    check(out_idx == NFRAMES * FRAME, "all chips out");
    begin
      longint r, d, p;
      r = PARTIAL_BS_BYTES + 2;
      d = (t_x_full - t_first_complete) / 20;
      p = r - d;
      $display("INFO prefetch: R=%0d D=%0d R-D=%0d measured wait=%0d cycles", r, d, p, wait_second);
      check(wait_second >= p - 4 && wait_second <= p + 4, "second operation waits R - D cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * (PARTIAL_BS_BYTES + 2000)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
