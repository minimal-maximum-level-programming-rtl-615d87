// mmlp_encoder: MMLP write encoder for 4-level cells.
//
// Takes the data page D, the present levels P of the cells of the wordline and
// the page address, and returns the target levels E of all cells of the
// wordline. Cells outside the page's cell set keep their levels, and no cell
// is ever lowered, so the data already in the wordline is kept. Purely
// combinational.
//
// Per slice of two data bits and four cells (cell 4s is the first):
//   address 0: the two bits are written as is into cells 0,1 (levels 0/1).
//   address 1: the two bits are written as is into cells 2,3.
//   address 2: the high bit is added to pair (0,1), the low bit to pair (2,3)
//              with the page-3 pair table (levels 0..2).
//   address 3: the same with the page-4 pair table (levels 0..3).
// Slice s takes data bits d[2s+1] (high) and d[2s] (low).
// The coding follows the published 4-level tables; the bit-to-pair order is
// read from the worked example (first data digit to the first cell or pair).
module mmlp_encoder
  import mmlp_pkg::*;
#(
  parameter int unsigned SLICES = 1,
  localparam int unsigned CELLS     = 4 * SLICES,
  localparam int unsigned PAGE_BITS = 2 * SLICES
) (
  input  logic [1:0]           addr,
  input  logic [PAGE_BITS-1:0] d,
  input  level_t               p [CELLS],
  output level_t               e [CELLS]
);

  always_comb begin
    for (int s = 0; s < int'(SLICES); s++) begin
      automatic int b = 4 * s;
      automatic logic hi = d[2*s+1];
      automatic logic lo = d[2*s];
      automatic pair_t pa = '{a: p[b],   b: p[b+1]};
      automatic pair_t pb = '{a: p[b+2], b: p[b+3]};
      automatic pair_t ea = pa;
      automatic pair_t eb = pb;
      unique case (addr)
        2'd0: ea = '{a: {1'b0, hi}, b: {1'b0, lo}};
        2'd1: eb = '{a: {1'b0, hi}, b: {1'b0, lo}};
        2'd2: begin ea = enc_page3(pa, hi); eb = enc_page3(pb, lo); end
        default: begin ea = enc_page4(pa, hi); eb = enc_page4(pb, lo); end
      endcase
      e[b]   = ea.a;
      e[b+1] = ea.b;
      e[b+2] = eb.a;
      e[b+3] = eb.b;
    end
  end

endmodule
