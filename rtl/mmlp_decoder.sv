// mmlp_decoder: MMLP read decoder for 4-level cells.
//
// Takes the sensed levels E of the cells of a wordline and a page address and
// returns the data page stored at that address. Purely combinational.
//
// Decoding runs the pair tables backwards from the last page: the page-4
// inverse table gives page 4's bit of each pair and the pair levels before
// page 4 was written; the page-3 inverse gives page 3's bit and the levels
// before page 3; what is left are the raw bits of pages 1 and 2. A pair state
// that no write produces decodes as a '0' and is passed down unchanged, so a
// page not yet written reads as zeros. Slice layout and bit order are those
// of mmlp_encoder.
module mmlp_decoder
  import mmlp_pkg::*;
#(
  parameter int unsigned SLICES = 1,
  localparam int unsigned CELLS     = 4 * SLICES,
  localparam int unsigned PAGE_BITS = 2 * SLICES
) (
  input  logic [1:0]           addr,
  input  level_t               e [CELLS],
  output logic [PAGE_BITS-1:0] d
);

  always_comb begin
    d = '0;
    for (int s = 0; s < int'(SLICES); s++) begin
      automatic int b = 4 * s;
      automatic pair_dec_t a4 = dec_page4('{a: e[b],   b: e[b+1]});
      automatic pair_dec_t b4 = dec_page4('{a: e[b+2], b: e[b+3]});
      automatic pair_dec_t a3 = dec_page3(a4.prev);
      automatic pair_dec_t b3 = dec_page3(b4.prev);
      unique case (addr)
        2'd0: begin d[2*s+1] = a3.prev.a[0]; d[2*s] = a3.prev.b[0]; end
        2'd1: begin d[2*s+1] = b3.prev.a[0]; d[2*s] = b3.prev.b[0]; end
        2'd2: begin d[2*s+1] = a3.bit_v;     d[2*s] = b3.bit_v;     end
        default: begin d[2*s+1] = a4.bit_v;  d[2*s] = b4.bit_v;     end
      endcase
    end
  end

endmodule
