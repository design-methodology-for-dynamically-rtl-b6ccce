// Global buffer with merged storage for elements of 8, 16 or 32 bits.
//
// Several logical buffers whose contents are never alive at the same time
// share one global buffer. Each logical buffer k has D_k elements of W_k
// bits; the global buffer provides BITS = max(D_k * W_k) bits. The storage
// is a memory of 32-bit words with byte enables, so an element of width W
// at index i occupies bytes i*W/8 .. i*W/8 + W/8 - 1: narrow elements are
// packed and no bit is wasted, whatever mix of widths the merged buffers
// use.
//
// Ports: one write port (we, waddr, wmode, wdata) and one read port (re,
// raddr, rmode, rdata). Addresses are element indices in the width given
// by the access mode. A write takes effect at the clock edge. A read
// returns its element, zero-extended, in rdata on the cycle after re; rdata
// keeps its value while re is low. Reading and writing the same word in
// one cycle returns the old contents.
//
// The byte packing is this design's own way of reaching the max(D*W)
// memory size; the buffer-merging rule itself and the 8/16/32-bit widths
// follow the methodology.
module global_buffer
  import drs_pkg::*;
#(
  parameter int unsigned BITS = 2048,                  // max(D_k * W_k)
  localparam int unsigned BYTES = BITS / 8,
  localparam int unsigned WORDS = (BYTES + 3) / 4,
  localparam int unsigned AW    = addr_bits(BYTES)    // index of an 8-bit element
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  width_mode_t       wmode,
  input  logic [31:0]       wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  input  width_mode_t       rmode,
  output logic [31:0]       rdata
);

  localparam int unsigned WAW = addr_bits(WORDS);

  logic [3:0][7:0] mem [WORDS];

  // Byte address of an element index in a given width.
  function automatic logic [AW+1:0] byte_addr(logic [AW-1:0] idx, width_mode_t m);
    logic [AW+1:0] a;
    a = {2'b00, idx};
    case (m)
      W16:     a = a << 1;
      W32:     a = a << 2;
      default: a = a;
    endcase
    return a;
  endfunction

  logic [AW+1:0] wbyte, rbyte;
  logic [1:0]    wlane;
  logic [3:0]    wbe;
  logic [31:0]   wshift;
  logic [WAW-1:0] wword, rword;

  always_comb begin
    wbyte  = byte_addr(waddr, wmode);
    rbyte  = byte_addr(raddr, rmode);
    wlane  = wbyte[1:0];
    wword  = WAW'(wbyte >> 2);
    rword  = WAW'(rbyte >> 2);
    case (wmode)
      W8:      wbe = 4'b0001 << wlane;
      W16:     wbe = 4'b0011 << wlane;
      default: wbe = 4'b1111;
    endcase
    wshift = wdata << (8 * wlane);
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++) begin
        if (wbe[b]) mem[wword][b] <= wshift[8*b +: 8];
      end
    end
  end

  logic [31:0]  rword_q;
  logic [1:0]   rlane_q;
  width_mode_t  rmode_q;

  always_ff @(posedge clk) begin
    if (re) begin
      rword_q <= mem[rword];
      rlane_q <= rbyte[1:0];
      rmode_q <= rmode;
    end
  end

  always_comb begin
    logic [31:0] s;
    s = rword_q >> (8 * rlane_q);
    case (rmode_q)
      W8:      rdata = {24'd0, s[7:0]};
      W16:     rdata = {16'd0, s[15:0]};
      default: rdata = s;
    endcase
  end

  // Every access must stay inside the merged storage and be aligned to
  // its own width.
  always_ff @(posedge clk) begin
    if (we) assert (32'(wbyte) < BYTES) else $error("global_buffer: write beyond %0d bytes", BYTES);
    if (re) assert (32'(rbyte) < BYTES) else $error("global_buffer: read beyond %0d bytes", BYTES);
  end

endmodule
