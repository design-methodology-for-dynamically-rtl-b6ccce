// Behavioural model of the external bitstream memory, for testbenches
// only. A synchronous read memory: data for mem_addr appears on mem_data
// on the cycle after mem_rd. Contents are the pattern of bs_pattern_pkg,
// not real bitstreams. 'reads' counts the read cycles.
module bitstream_memory_model
  import bs_pattern_pkg::*;
#(
  parameter int unsigned ADDR_W = 21
) (
  input  logic              clk,
  input  logic              mem_rd,
  input  logic [ADDR_W-1:0] mem_addr,
  output logic [7:0]        mem_data,
  output int unsigned       reads
);
  initial begin
    mem_data = '0;
    reads    = 0;
  end
  always @(posedge clk) begin
    if (mem_rd) begin
      mem_data <= bs_byte(32'(mem_addr));
      reads    <= reads + 1;
    end
  end
endmodule
