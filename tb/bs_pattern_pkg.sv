// Testbench-only: the byte pattern that stands for bitstream contents.
// Byte at address a is a mix of the address bits, so a byte fetched from
// a wrong address or in a wrong order changes the checksum.
package bs_pattern_pkg;
  function automatic logic [7:0] bs_byte(int unsigned a);
    logic [31:0] v;
    v = a * 32'h9E37_79B1;
    return v[31:24] ^ v[7:0];
  endfunction

  // Order-sensitive checksum of a byte stream.
  function automatic logic [31:0] bs_sum(logic [31:0] s, logic [7:0] b);
    return (s * 32'd31) + 32'(b) + 32'd1;
  endfunction

  // Checksum of 'n' bytes from address 'base'.
  function automatic logic [31:0] bs_expect(int unsigned base, int unsigned n);
    logic [31:0] s = '0;
    for (int unsigned i = 0; i < n; i++) s = bs_sum(s, bs_byte(base + i));
    return s;
  endfunction
endpackage
