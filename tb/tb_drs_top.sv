// End-to-end testbench for drs_top at reduced sizes (16-sample frames,
// 300-byte partial bitstreams). Frames of random samples go in over the
// link with a spreading-factor condition each; every chip that comes out
// is compared with a Hadamard transform of the right size computed here.
// The bitstream memory and ICAP are behavioural models; every partial load
// is checked for length, source address and order.
//
// Mechanisms counted, each of which must happen at least once:
//   reconfiguration (fht4 -> fht8 and fht8 -> fht4), skipped
//   reconfiguration (same operator twice), prefetch (a load overlapping a
//   link transfer), operation waiting for the region, fht4 and fht8 frames,
//   link back-pressure on both sides.
module tb_drs_top;
  import drs_pkg::*;
  import bs_pattern_pkg::*;

  localparam int unsigned FRAME = 16;
  localparam int unsigned BS    = 300;
  localparam int unsigned AW    = 12;
  localparam int unsigned B4 = 1000, B8 = 2000;
  localparam int NFRAMES = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic li_in_valid = 0, li_in_ready, li_out_valid, li_out_ready = 0;
  logic [LINK_W-1:0] li_in_data = '0, li_out_data;
  logic cond_valid = 0, cond_ready;
  op_id_t cond = OP_FHT4, region_loaded;
  logic mem_rd, icap_ce_n, icap_write_n, reconfiguring, buf_x_full, buf_y_full;
  logic region_configured, op_waiting;
  logic [AW-1:0] mem_addr;
  logic [7:0] mem_data, icap_i;
  int unsigned reads, ibytes, loads, last_bytes;
  logic [31:0] isum, last_sum;

  drs_top #(.FRAME(FRAME), .PART_BS_BYTES(BS), .MEM_ADDR_W(AW), .FHT4_BASE(B4), .FHT8_BASE(B8)) dut (.*);
  bitstream_memory_model #(.ADDR_W(AW)) u_mem (.clk, .mem_rd, .mem_addr, .mem_data, .reads);
  icap_model u_icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .bytes(ibytes),
                     .sum(isum), .loads, .last_bytes, .last_sum);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stimulus: frame conditions and samples
  op_id_t conds [NFRAMES] = '{OP_FHT4, OP_FHT4, OP_FHT8, OP_FHT8, OP_FHT4, OP_FHT8,
                              OP_FHT4, OP_FHT4, OP_FHT4, OP_FHT8, OP_FHT8, OP_FHT4};
  logic signed [SAMPLE_W-1:0] samples [NFRAMES * FRAME];
  int expected_loads = 0;

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

  // mechanism counters
  int n_reconf = 0, n_skip = 0, n_prefetch = 0, n_wait = 0, n_fht4 = 0, n_fht8 = 0;
  int n_in_bp = 0, n_out_bp = 0;

  // condition feeder
  int cond_idx = 0;
  always @(posedge clk) if (rst_n && cond_valid && cond_ready) cond_idx <= cond_idx + 1;
  always_comb begin
    cond_valid = rst_n && (cond_idx < NFRAMES);
    cond = (cond_idx < NFRAMES) ? conds[cond_idx] : OP_FHT4;
  end

  // sample source with random gaps
  int in_idx = 0;
  bit in_gap;
  always @(posedge clk) begin
    in_gap <= ($urandom % 4 == 0);
    if (rst_n && li_in_valid && li_in_ready) in_idx <= in_idx + 1;
    if (rst_n && li_in_valid && !li_in_ready) n_in_bp++;
  end
  always_comb begin
    li_in_valid = rst_n && (in_idx < NFRAMES * FRAME) && !in_gap;
    li_in_data  = (in_idx < NFRAMES * FRAME) ? {16'hA5A5, samples[in_idx]} : '0;
  end

  // result sink with random back-pressure
  int out_idx = 0;
  always @(posedge clk) begin
    li_out_ready <= ($urandom % 3 != 0);
    if (rst_n && li_out_valid && !li_out_ready) n_out_bp++;
    if (rst_n && li_out_valid && li_out_ready) begin
      int f, e;
      f = out_idx / FRAME;
      e = ref_chip(f, out_idx % FRAME);
      check(li_out_data == 32'(e),
            $sformatf("frame %0d (%s) chip %0d: got %0d exp %0d", f, conds[f].name(),
                      out_idx % FRAME, $signed(li_out_data), e));
      if (out_idx % FRAME == FRAME - 1) begin
        if (conds[f] == OP_FHT8) n_fht8++; else n_fht4++;
      end
      out_idx <= out_idx + 1;
    end
  end

  // reconfiguration monitor
  int loads_seen = 0;
  op_id_t last_req;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.cfg_req_valid && dut.cfg_req_ready) begin
        n_reconf++;
        last_req <= dut.cfg_req_id;
      end
      if (reconfiguring && (li_in_valid && li_in_ready || li_out_valid && li_out_ready)) n_prefetch++;
      if (op_waiting) n_wait++;
      if (dut.op_go && dut.u_cfg_mgr.loaded_valid && dut.u_cfg_mgr.target_valid
          && dut.u_cfg_mgr.loaded == dut.u_cfg_mgr.target && !reconfiguring) n_skip++;
      if (loads != loads_seen) begin
        loads_seen <= loads;
        check(last_bytes == BS, $sformatf("load of %0d bytes", last_bytes));
        check(last_sum == bs_expect(last_req == OP_FHT8 ? B8 : B4, BS),
              $sformatf("bitstream of %s", last_req.name()));
      end
    end
  end

  initial begin
    foreach (samples[i]) samples[i] = SAMPLE_W'($urandom);
    for (int f = 0; f < NFRAMES; f++)
      if (f == 0 || conds[f] != conds[f-1]) expected_loads++;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (out_idx < NFRAMES * FRAME) @(posedge clk);
    repeat (20) @(posedge clk);
    #1;
    check(n_reconf == expected_loads, $sformatf("%0d reconfigurations, expected %0d", n_reconf, expected_loads));
    check(loads == expected_loads, $sformatf("ICAP saw %0d loads", loads));
    check(n_fht4 > 0, "fht4 frames");
    check(n_fht8 > 0, "fht8 frames");
    check(n_skip > 0, "reconfiguration skipped for a repeated operator");
    check(n_prefetch > 0, "reconfiguration overlapped link transfers (prefetch)");
    check(n_wait > 0, "operation waited for the region");
    check(n_in_bp > 0, "input link back-pressure");
    check(n_out_bp > 0, "output link back-pressure");
    check(li_in_ready == 1'b0 || in_idx == NFRAMES * FRAME, "all input consumed");
    $display("INFO frames fht4=%0d fht8=%0d reconf=%0d skip=%0d prefetch_cycles=%0d wait_cycles=%0d bp_in=%0d bp_out=%0d",
             n_fht4, n_fht8, n_reconf, n_skip, n_prefetch, n_wait, n_in_bp, n_out_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
