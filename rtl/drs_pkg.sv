// Shared types and constants of the dynamically reconfigurable MC-CDMA
// spreading stage.
//
// The reconfigurable region holds one spreading operator at a time: a fast
// Hadamard transform of size 4 (fht4) or of size 8 (fht8). The entry
// condition of the spreading block selects which one (x = 0: fht4,
// x = 1: fht8, as in the SynDEx algorithm graph).
//
// Bitstream sizes follow the implementation on the Xc2v2000: a full
// bitstream of 915 KB and two partial bitstreams of 220 KB each, stored one
// after the other in the external bitstream memory (full, fht8, fht4). The
// byte addresses derived from that order are this design's own choice.
//
// Global buffers store elements of 8, 16 or 32 bits. With buffer merging a
// list of buffers whose data lifetimes do not overlap shares one memory of
// max(D_k * W_k) bits instead of sum(D_k * W_k) bits.
package drs_pkg;

  // Operator held by the reconfigurable region.
  typedef enum logic [0:0] {
    OP_FHT4 = 1'b0,
    OP_FHT8 = 1'b1
  } op_id_t;

  // Element width of a global-buffer access.
  typedef enum logic [1:0] {
    W8  = 2'd0,
    W16 = 2'd1,
    W32 = 2'd2
  } width_mode_t;

  localparam int unsigned LINK_W   = 32;  // internal link word
  localparam int unsigned SAMPLE_W = 16;  // modulated sample fed to spreading
  localparam int unsigned RESULT_W = 32;  // spread chip stored in buffer Y

  localparam int unsigned KB                 = 1024;
  localparam int unsigned FULL_BS_BYTES      = 915 * KB;
  localparam int unsigned PARTIAL_BS_BYTES   = 220 * KB;
  localparam int unsigned FHT8_BS_BASE       = FULL_BS_BYTES;
  localparam int unsigned FHT4_BS_BASE       = FULL_BS_BYTES + PARTIAL_BS_BYTES;
  localparam int unsigned BS_ADDR_W          = 21;  // 2 MB covers all three

  // Bits of one buffer of 'depth' elements of 'width' bits.
  function automatic int unsigned buffer_bits(int unsigned depth, int unsigned width);
    return depth * width;
  endfunction

  // Bits of the global buffer that merges buffers of the given sizes.
  function automatic int unsigned merged_bits(int unsigned bits_a, int unsigned bits_b,
                                              int unsigned bits_c);
    int unsigned m;
    m = bits_a;
    if (bits_b > m) m = bits_b;
    if (bits_c > m) m = bits_c;
    return m;
  endfunction

  // Number of bits needed to address 'n' items (at least 1).
  function automatic int unsigned addr_bits(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
