// tb_mmlp_ref_pkg: reference model of 4-level MMLP used by the system
// testbenches, kept apart from the RTL's own tables.
//
// A wordline slice is four integer levels. ref_write applies one page write
// with the pair tables (pair index = 4*first + second). ref_write_cost gives
// what the write must cost under the published timing model: the pulses
// needed are the largest pulse-count difference NP(target) - NP(present)
// over the raised cells (NP = 0, 10, 20, 40 for levels 0..3); each pulse is
// followed by one comparison per distinct target level; pages 3 and 4 are
// preceded by a read with MaxLevel comparisons.
package tb_mmlp_ref_pkg;

  function automatic int ref3(input int idx);
    case (idx)
      0: return 6;  1: return 2;  4: return 8;  5: return 9;
      default: return -1;
    endcase
  endfunction

  function automatic int ref4(input int idx);
    case (idx)
      0: return 10; 1: return 11; 4: return 14; 5: return 15;
      6: return 7;  2: return 3;  8: return 12; 9: return 13;
      default: return -1;
    endcase
  endfunction

  function automatic int np_cum(input int level);
    case (level)
      0: return 0;
      1: return 10;
      2: return 20;
      default: return 40;
    endcase
  endfunction

  function automatic void ref_write(inout int lv[4], input int addr, input int d);
    int hi = (d >> 1) & 1, lo = d & 1;
    int ia, ib;
    case (addr)
      0: begin lv[0] = hi; lv[1] = lo; end
      1: begin lv[2] = hi; lv[3] = lo; end
      default: begin
        ia = 4*lv[0] + lv[1];
        ib = 4*lv[2] + lv[3];
        if (hi) ia = (addr == 2) ? ref3(ia) : ref4(ia);
        if (lo) ib = (addr == 2) ? ref3(ib) : ref4(ib);
        lv[0] = ia / 4; lv[1] = ia % 4; lv[2] = ib / 4; lv[3] = ib % 4;
      end
    endcase
  endfunction

  function automatic int max_level(input int lv[4]);
    int m = 0;
    for (int c = 0; c < 4; c++) if (lv[c] > m) m = lv[c];
    return m;
  endfunction

  // pulses, comparisons per pulse and pre-read comparisons of one write
  function automatic void ref_write_cost(input int lv_pre[4], input int lv_post[4], input int addr,
                                         output int pulses, output int nvfy, output int npre);
    bit tl [4] = '{0, 0, 0, 0};
    pulses = 0;
    nvfy   = 0;
    for (int c = 0; c < 4; c++)
      if (lv_post[c] > lv_pre[c]) begin
        if (np_cum(lv_post[c]) - np_cum(lv_pre[c]) > pulses) pulses = np_cum(lv_post[c]) - np_cum(lv_pre[c]);
        tl[lv_post[c]] = 1'b1;
      end
    for (int l = 1; l < 4; l++) if (tl[l]) nvfy++;
    npre = (addr < 2) ? 0 : max_level(lv_pre);
  endfunction

  // bit l set: some raised cell has target level l
  function automatic int ref_targets(input int lv_pre[4], input int lv_post[4]);
    int m = 0;
    for (int c = 0; c < 4; c++)
      if (lv_post[c] > lv_pre[c]) m |= (1 << lv_post[c]);
    return m;
  endfunction

endpackage
