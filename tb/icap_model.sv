// Behavioural model of the Virtex-II internal configuration access port,
// write side only, for testbenches. On each clock edge with CE and WRITE
// low it takes the byte on I. It keeps the number of bytes of the current
// load, an order-sensitive checksum of them, and counts completed loads
// (a load ends when WRITE returns high). It does not configure anything.
module icap_model
  import bs_pattern_pkg::*;
(
  input  logic        clk,
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [7:0]  i,
  output int unsigned bytes,
  output logic [31:0] sum,
  output int unsigned loads,
  output int unsigned last_bytes,
  output logic [31:0] last_sum
);
  logic write_q;
  initial begin
    bytes = 0; sum = '0; loads = 0; last_bytes = 0; last_sum = '0; write_q = 1'b0;
  end
  always @(posedge clk) begin
    write_q <= !write_n;
    if (!ce_n && !write_n) begin
      bytes <= bytes + 1;
      sum   <= bs_sum(sum, i);
    end
    if (write_q && write_n) begin
      loads      <= loads + 1;
      last_bytes <= bytes;
      last_sum   <= sum;
      bytes      <= 0;
      sum        <= '0;
    end
  end
endmodule
