// Shared constants and helper functions for the skewed-clock pipeline memory.
//
// DATA_W and ADDR_W are the word and address widths of every pipeline memory
// (16-bit data, 8-bit address, as in the reference implementation that was
// characterised). init_word() gives the pseudo-random power-up contents of a
// memory: a small xorshift hash of the address and a seed, so that two copies
// of the design (the fast DUT and the slow reference) start identical. A seed
// of zero gives an all-zero memory.
package skew_mem_pkg;

  parameter int unsigned DATA_W = 16;
  parameter int unsigned ADDR_W = 8;

  // Maximal-length Fibonacci taps (bit i set = state bit i feeds the XOR).
  parameter logic [7:0]  TAPS8  = 8'hB8;    // x^8 + x^6 + x^5 + x^4 + 1
  parameter logic [15:0] TAPS16 = 16'hB400; // x^16 + x^14 + x^13 + x^11 + 1

  function automatic logic [DATA_W-1:0] init_word(input logic [31:0] seed,
                                                  input logic [31:0] addr);
    logic [31:0] h;
    if (seed == 32'd0) return '0;
    h = seed ^ (addr * 32'h9E37_79B9);
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return h[DATA_W-1:0];
  endfunction

endpackage
