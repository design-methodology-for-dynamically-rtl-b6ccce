// Self-checking testbench for config_manager. A small responder here
// stands for the protocol configuration builder (acknowledges a request
// after LAT cycles). Checks: first operation after reset always
// reconfigures; no request while an operation runs; a request for a
// different operator leaves right after op_complete (prefetch); the same
// operator twice needs no reconfiguration; region_ready, cond_ready and the
// loaded operator follow.
module tb_config_manager;
  import drs_pkg::*;

  localparam int LAT = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic cond_valid = 0, cond_ready, op_start = 0, op_complete = 0, region_ready;
  logic cfg_req_valid, cfg_req_ready, cfg_ack, reconfiguring, loaded_valid;
  op_id_t cond = OP_FHT4, cfg_req_id, loaded;

  config_manager dut (.*);

  // configuration builder stand-in
  int  busy_cnt = 0;
  int  requests = 0;
  op_id_t req_seen;
  assign cfg_req_ready = (busy_cnt == 0);
  always @(posedge clk) begin
    cfg_ack <= 1'b0;
    if (!rst_n) busy_cnt <= 0;
    else if (cfg_req_valid && cfg_req_ready) begin
      busy_cnt <= LAT;
      requests <= requests + 1;
      req_seen <= cfg_req_id;
    end else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) cfg_ack <= 1'b1;
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic give_cond(op_id_t id);
    cond_valid = 1; cond = id;
    while (!cond_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cond_valid = 0;
  endtask

  task automatic wait_ready(output int cycles);
    cycles = 0;
    while (!region_ready && cycles < 10 * LAT) begin @(posedge clk); #1; cycles++; end
  endtask

  task automatic pulse_start;
    check(region_ready, "region ready at op_start");
    op_start = 1; @(posedge clk); #1; op_start = 0;
  endtask

  task automatic pulse_complete;
    op_complete = 1; @(posedge clk); #1; op_complete = 0;
  endtask

  initial begin
    int c, r0;
    cfg_ack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!region_ready && cond_ready && !loaded_valid, "idle after reset");

    // 1: first operation (fht4) must configure the region
    give_cond(OP_FHT4);
    check(!cond_ready, "cond not accepted while one is pending");
    wait_ready(c);
    check(requests == 1 && req_seen == OP_FHT4, "first operation requests fht4");
    check(c >= LAT, $sformatf("ready only after the load (%0d cycles)", c));
    check(loaded_valid && loaded == OP_FHT4, "fht4 loaded");
    pulse_start;
    check(!region_ready && cond_ready, "pending cond consumed at start");

    // 2: next is fht8, given while fht4 runs: no request until complete
    give_cond(OP_FHT8);
    repeat (10) begin
      check(!cfg_req_valid, "no request while an operation runs");
      @(posedge clk); #1;
    end
    r0 = requests;
    pulse_complete;
    check(cfg_req_valid, "request leaves right after op_complete (prefetch)");
    check(reconfiguring, "reconfiguring reported");
    wait_ready(c);
    check(requests == r0 + 1 && req_seen == OP_FHT8, "fht8 requested");
    check(loaded == OP_FHT8 && !reconfiguring, "fht8 loaded");
    pulse_start;

    // 3: fht8 again: no reconfiguration
    give_cond(OP_FHT8);
    pulse_complete;
    wait_ready(c);
    check(c == 0, "same operator: region ready at once");
    check(requests == r0 + 1, "same operator: no request");
    pulse_start;

    // 4: back to fht4, cond given only after the operation completed
    pulse_complete;
    repeat (3) @(posedge clk);
    #1;
    check(!cfg_req_valid && !reconfiguring, "nothing to do without a cond");
    give_cond(OP_FHT4);
    wait_ready(c);
    check(requests == r0 + 2 && req_seen == OP_FHT4, "fht4 requested again");
    pulse_start;
    pulse_complete;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
