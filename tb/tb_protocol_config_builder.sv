// Self-checking testbench for protocol_config_builder: requests partial
// bitstreams for fht8 and fht4 and checks, with a memory model and an
// ICAP model, that exactly BS_BYTES bytes from the right base address
// reach ICAP in order (checksum computed here from the pattern), that the
// load takes BS_BYTES + 2 cycles from request to acknowledge (one byte per
// clock), and the region_busy / region_load / req_ready behaviour.
module tb_protocol_config_builder;
  import drs_pkg::*;
  import bs_pattern_pkg::*;

  localparam int unsigned BS_BYTES = 200;
  localparam int unsigned ADDR_W   = 12;
  localparam int unsigned B4 = 1000, B8 = 2500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, cfg_ack, mem_rd, icap_ce_n, icap_write_n;
  logic region_busy, region_load;
  op_id_t req_id = OP_FHT4, region_id;
  logic [ADDR_W-1:0] mem_addr;
  logic [7:0] mem_data, icap_i;
  int unsigned reads0;
  int unsigned reads, bytes, loads, last_bytes;
  logic [31:0] sum, last_sum;

  protocol_config_builder #(.BS_BYTES(BS_BYTES), .ADDR_W(ADDR_W), .FHT4_BASE(B4), .FHT8_BASE(B8)) dut (.*);
  bitstream_memory_model #(.ADDR_W(ADDR_W)) u_mem (.clk, .mem_rd, .mem_addr, .mem_data, .reads);
  icap_model u_icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .bytes, .sum,
                     .loads, .last_bytes, .last_sum);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(op_id_t id);
    int cycles = 0, busy_cycles = 0, loads0;
    bit saw_load = 0;
    loads0 = loads;
    check(req_ready, "ready when idle");
    req_valid = 1; req_id = id;
    @(posedge clk); #1;
    req_valid = 0;
    cycles = 0;
    while (!cfg_ack && cycles < 10 * BS_BYTES) begin
      check(!req_ready, "not ready while loading");
      if (region_busy) busy_cycles++;
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == BS_BYTES + 2, $sformatf("%s load took %0d cycles, expected %0d", id.name(), cycles, BS_BYTES + 2));
    check(region_load && region_id == id, "region_load pulse with the operator id");
    check(!region_busy, "region free after the load");
    check(busy_cycles >= BS_BYTES, "region busy during the load");
    @(posedge clk); #1;
    check(!region_load && !cfg_ack, "pulses last one cycle");
    @(posedge clk); #1;
    check(loads == loads0 + 1, "ICAP saw one load");
    check(last_bytes == BS_BYTES, $sformatf("ICAP got %0d bytes", last_bytes));
    check(last_sum == bs_expect(id == OP_FHT8 ? B8 : B4, BS_BYTES),
          $sformatf("%s bitstream contents/order", id.name()));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(icap_write_n && icap_ce_n && !mem_rd, "ICAP idle after reset");
    reads0 = reads;
    load(OP_FHT8);
    load(OP_FHT4);
    repeat (5) @(posedge clk);
    #1;
    load(OP_FHT8);
    check(reads - reads0 == 3 * BS_BYTES, $sformatf("memory reads %0d", reads - reads0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * BS_BYTES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
