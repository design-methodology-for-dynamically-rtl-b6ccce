// Self-checking testbench for global_buffer: random writes and reads in
// 8-, 16- and 32-bit element widths over the whole merged storage,
// compared with a byte-array reference model kept here. Checks the packing
// (narrow elements share words), the one-cycle read latency and that
// rdata holds while re is low.
module tb_global_buffer;
  import drs_pkg::*;

  localparam int unsigned BITS  = 512;
  localparam int unsigned BYTES = BITS / 8;
  localparam int unsigned AW    = addr_bits(BYTES);

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic           we = 0, re = 0;
  logic [AW-1:0]  waddr = '0, raddr = '0;
  width_mode_t    wmode = W8, rmode = W8;
  logic [31:0]    wdata = '0, rdata;

  global_buffer #(.BITS(BITS)) dut (.*);

  logic [7:0] model [BYTES];

  function automatic int nbytes(width_mode_t m);
    return (m == W8) ? 1 : (m == W16) ? 2 : 4;
  endfunction

  function automatic logic [31:0] model_read(int idx, width_mode_t m);
    logic [31:0] v = '0;
    for (int b = 0; b < nbytes(m); b++) v[8*b +: 8] = model[idx * nbytes(m) + b];
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(int idx, width_mode_t m, logic [31:0] d);
    we = 1; waddr = AW'(idx); wmode = m; wdata = d;
    @(posedge clk); #1;
    we = 0;
    for (int b = 0; b < nbytes(m); b++) model[idx * nbytes(m) + b] = d[8*b +: 8];
  endtask

  task automatic read_check(int idx, width_mode_t m);
    logic [31:0] exp;
    exp = model_read(idx, m);
    re = 1; raddr = AW'(idx); rmode = m;
    @(posedge clk); #1;
    re = 0;
    check(rdata == exp, $sformatf("read idx %0d mode %s: got %h exp %h", idx, m.name(), rdata, exp));
    @(posedge clk); #1;
    check(rdata == exp, "rdata holds while re is low");
  endtask

  initial begin
    // fill with 32-bit words
    for (int i = 0; i < BYTES / 4; i++) write(i, W32, $urandom);
    for (int i = 0; i < BYTES / 4; i++) read_check(i, W32);
    // packed 16-bit and 8-bit accesses
    for (int n = 0; n < 300; n++) begin
      width_mode_t m;
      int idx;
      m = width_mode_t'($urandom % 3);
      idx = $urandom % (BYTES / nbytes(m));
      if ($urandom % 2) write(idx, m, $urandom);
      else              read_check(idx, m);
    end
    // two 16-bit elements written then read as one 32-bit word
    write(6, W16, 32'h0000_beef);
    write(7, W16, 32'h0000_dead);
    read_check(3, W32);
    check(rdata == 32'hdead_beef, "two 16-bit elements pack into one word");
    // four bytes
    for (int b = 0; b < 4; b++) write(40 + b, W8, 32'(8'h11 * (b + 1)));
    read_check(10, W32);
    check(rdata == 32'h4433_2211, "four bytes pack into one word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
