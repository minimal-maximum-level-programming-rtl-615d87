// mmlp_pkg: types, constants and pair-coding tables shared by the MMLP
// (minimal maximum-level programming) 4-level-cell memory front end.
//
// A cell level is a 2-bit number 0..3. Pages 3 and 4 of a wordline are each
// coded one data bit per pair of cells; the pair tables below raise the
// pair's levels (never lower them) so that the new bit is added on top of the
// information already stored. Page 3 uses levels 0..2 and page 4 uses 0..3.
// The table entries are those of the published 4-level example; the function
// form, the struct types and the handling of pair states that cannot occur
// (left unchanged) are this design's choices.
package mmlp_pkg;

  typedef logic [1:0] level_t;

  // A pair of cells coded together for pages 3 and 4; a is the lower-numbered cell.
  typedef struct packed {
    level_t a;
    level_t b;
  } pair_t;

  typedef struct packed {
    logic  bit_v;  // recovered data bit of the page
    pair_t prev;   // pair levels as they were before the page was written
  } pair_dec_t;

  // Host requests.
  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_ERASE = 2'd2
  } op_e;

  // Commands to the cell array: one program pulse on the masked cells, one
  // page-wide reference comparison, or erase of a wordline.
  typedef enum logic [1:0] {
    ACMD_PULSE = 2'd0,
    ACMD_SENSE = 2'd1,
    ACMD_ERASE = 2'd2
  } acmd_e;

  // Response status.
  typedef enum logic [1:0] {
    ST_OK       = 2'd0,
    ST_ORDER    = 2'd1,  // write not to the next free address of its wordline
    ST_PGM_FAIL = 2'd2   // program-verify did not converge within the pulse limit
  } status_e;

  function automatic pair_t mk_pair(input level_t a, input level_t b);
    pair_t p;
    p.a = a;
    p.b = b;
    return p;
  endfunction

  // Page 3: a '1' moves a pair out of {0,1}x{0,1} into a pair holding one level-2 cell.
  function automatic pair_t enc_page3(input pair_t cur, input logic d);
    pair_t r;
    r = cur;
    if (d) begin
      unique case ({cur.a, cur.b})
        4'b00_00: r = mk_pair(1, 2);
        4'b00_01: r = mk_pair(0, 2);
        4'b01_00: r = mk_pair(2, 0);
        4'b01_01: r = mk_pair(2, 1);
        default:  r = cur;
      endcase
    end
    return r;
  endfunction

  function automatic pair_dec_t dec_page3(input pair_t st);
    pair_dec_t r;
    r.bit_v = 1'b1;
    unique case ({st.a, st.b})
      4'b01_10: r.prev = mk_pair(0, 0);
      4'b00_10: r.prev = mk_pair(0, 1);
      4'b10_00: r.prev = mk_pair(1, 0);
      4'b10_01: r.prev = mk_pair(1, 1);
      default: begin
        r.bit_v = 1'b0;
        r.prev  = st;
      end
    endcase
    return r;
  endfunction

  // Page 4: a '1' moves one of the eight page-3 pair states to a state
  // holding at least one level-3 cell, or to (2,2).
  function automatic pair_t enc_page4(input pair_t cur, input logic d);
    pair_t r;
    r = cur;
    if (d) begin
      unique case ({cur.a, cur.b})
        4'b00_00: r = mk_pair(2, 2);
        4'b00_01: r = mk_pair(2, 3);
        4'b01_00: r = mk_pair(3, 2);
        4'b01_01: r = mk_pair(3, 3);
        4'b01_10: r = mk_pair(1, 3);
        4'b00_10: r = mk_pair(0, 3);
        4'b10_00: r = mk_pair(3, 0);
        4'b10_01: r = mk_pair(3, 1);
        default:  r = cur;
      endcase
    end
    return r;
  endfunction

  function automatic pair_dec_t dec_page4(input pair_t st);
    pair_dec_t r;
    r.bit_v = 1'b1;
    unique case ({st.a, st.b})
      4'b10_10: r.prev = mk_pair(0, 0);
      4'b10_11: r.prev = mk_pair(0, 1);
      4'b11_10: r.prev = mk_pair(1, 0);
      4'b11_11: r.prev = mk_pair(1, 1);
      4'b01_11: r.prev = mk_pair(1, 2);
      4'b00_11: r.prev = mk_pair(0, 2);
      4'b11_00: r.prev = mk_pair(2, 0);
      4'b11_01: r.prev = mk_pair(2, 1);
      default: begin
        r.bit_v = 1'b0;
        r.prev  = st;
      end
    endcase
    return r;
  endfunction

endpackage
