// Protocol configuration builder for self reconfiguration through ICAP.
//
// On a configuration request for operator req_id it reads that operator's
// partial bitstream from the external bitstream memory, byte by byte from
// its base address, and writes each byte into the internal configuration
// access port with the SelectMAP write protocol: icap_write_n low for the
// whole load, icap_ce_n low on each cycle that carries a byte on icap_i.
// When the last byte is written it pulses region_load with the operator
// id (the region now holds that operator) and acknowledges with cfg_ack.
// region_busy is high from the first byte to the last.
//
// Handshake: req_valid/req_ready (ready only when idle); cfg_ack is a
// one-cycle pulse. Memory: mem_rd with mem_addr, data in mem_data on the
// next cycle.
//
// Timing: one byte per clock, so a load takes BS_BYTES + 2 cycles from the
// accepted request to cfg_ack. With the defaults (220 KB, 50 MHz) that is
// about 4.5 ms. The byte rate, clock, bitstream sizes and the memory
// layout order are the design's; the one-cycle memory latency, the
// handshake and the base addresses are this design's own choices. ICAP
// BUSY is not used: it only matters for readback, and this block only
// writes.
module protocol_config_builder
  import drs_pkg::*;
#(
  parameter int unsigned BS_BYTES  = PARTIAL_BS_BYTES,
  parameter int unsigned ADDR_W    = BS_ADDR_W,
  parameter int unsigned FHT4_BASE = FHT4_BS_BASE,
  parameter int unsigned FHT8_BASE = FHT8_BS_BASE
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration requests from the configuration manager
  input  logic              req_valid,
  output logic              req_ready,
  input  op_id_t            req_id,
  output logic              cfg_ack,
  // bitstream memory
  output logic              mem_rd,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic [7:0]        mem_data,
  // ICAP (SelectMAP subset)
  output logic              icap_ce_n,
  output logic              icap_write_n,
  output logic [7:0]        icap_i,
  // reconfigurable region
  output logic              region_busy,
  output logic              region_load,
  output op_id_t            region_id
);

  localparam int unsigned CW = addr_bits(BS_BYTES + 1);

  typedef enum logic [1:0] {IDLE, LOAD, FINISH} state_t;

  state_t          state;
  logic [CW-1:0]   rd_cnt;
  logic [ADDR_W-1:0] base;
  op_id_t          id_q;
  logic            data_valid;   // a byte read last cycle is on mem_data

  assign req_ready = (state == IDLE);
  assign mem_rd    = (state == LOAD) && (rd_cnt < CW'(BS_BYTES));
  assign mem_addr  = base + ADDR_W'(rd_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      rd_cnt      <= '0;
      base        <= '0;
      id_q        <= OP_FHT4;
      data_valid  <= 1'b0;
      icap_ce_n   <= 1'b1;
      icap_write_n<= 1'b1;
      icap_i      <= '0;
      region_busy <= 1'b0;
      region_load <= 1'b0;
      cfg_ack     <= 1'b0;
    end else begin
      region_load <= 1'b0;
      cfg_ack     <= 1'b0;
      data_valid  <= mem_rd;
      // byte read in the previous cycle goes to ICAP
      icap_ce_n   <= !data_valid;
      icap_i      <= data_valid ? mem_data : 8'h00;
      case (state)
        IDLE: if (req_valid) begin
          state        <= LOAD;
          rd_cnt       <= '0;
          id_q         <= req_id;
          base         <= (req_id == OP_FHT8) ? ADDR_W'(FHT8_BASE) : ADDR_W'(FHT4_BASE);
          icap_write_n <= 1'b0;
          region_busy  <= 1'b1;
        end
        LOAD: begin
          if (mem_rd) rd_cnt <= rd_cnt + 1'b1;
          else        state  <= FINISH;   // last byte is on mem_data
        end
        FINISH: begin
          // last byte was registered onto icap_i this cycle edge
          state        <= IDLE;
          icap_write_n <= 1'b1;
          region_busy  <= 1'b0;
          region_load  <= 1'b1;
          cfg_ack      <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign region_id = id_q;

  initial begin
    assert (FHT4_BASE + BS_BYTES <= (1 << ADDR_W) && FHT8_BASE + BS_BYTES <= (1 << ADDR_W))
      else $fatal(1, "protocol_config_builder: bitstream beyond the address space");
  end

endmodule
