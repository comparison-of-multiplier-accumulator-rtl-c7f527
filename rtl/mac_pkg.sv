// Shared sizes and helpers of the 8-bit multiplier-accumulator family.
// Every MAC takes two 8-bit operands, forms a 16-bit product and keeps a
// 16-bit running sum that wraps modulo 2^16. The 3:2 carry-save row
// compressor used by several reduction trees lives here as a function.
package mac_pkg;
  localparam int unsigned PROD_W = 16;  // product width

  typedef logic [PROD_W-1:0] product_t;

  // Result of one row of full adders: sum row and carry row.
  typedef struct packed {
    product_t s;
    product_t c;
  } csa_out_t;

  // One row of full adders over three 16-bit rows. The carry row is already
  // shifted one place left; the carry out of bit 15 is dropped (mod 2^16).
  function automatic csa_out_t csa3(product_t a, product_t b, product_t d);
    csa_out_t r;
    r.s = a ^ b ^ d;
    r.c = {(a[PROD_W-2:0] & b[PROD_W-2:0]) | (a[PROD_W-2:0] & d[PROD_W-2:0]) |
           (b[PROD_W-2:0] & d[PROD_W-2:0]), 1'b0};
    return r;
  endfunction

endpackage
