// tb_mmlp_decoder: checks the MMLP decoder against an independent reference.
//
// For every one of the 256 sequences of four 2-bit pages, the wordline
// levels after each page are built with the 4-level pair tables (written out
// here as index maps, pair index = 4*first + second), and the decoder must
// return every page written so far, and zeros for pages not yet written.
// The worked example's final levels 2321 must give 01, 11, 01, 10. A
// two-slice decoder is checked with random sequences. Every state with one
// cell one level low is decoded as the reference decode does; of the 6272
// page reads this gives, 128 (pages 1 and 2 after page 3 or 4 is written)
// come back with both bits wrong.
module tb_mmlp_decoder;
  import mmlp_pkg::*;

  int checks = 0, failures = 0;

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

  logic [1:0] addr1;
  level_t     e1 [4];
  logic [1:0] d1;
  mmlp_decoder #(.SLICES(1)) dut1 (.addr(addr1), .e(e1), .d(d1));

  logic [1:0] addr2;
  level_t     e2 [8];
  logic [3:0] d2;
  mmlp_decoder #(.SLICES(2)) dut2 (.addr(addr2), .e(e2), .d(d2));

  // reference decode: walk the inverse maps back from page 4
  function automatic int ref_inv(input int idx, input int page, output int bit_v);
    for (int k = 0; k < 16; k++) begin
      if (((page == 3) ? ref3(k) : ref4(k)) == idx) begin
        bit_v = 1;
        return k;
      end
    end
    bit_v = 0;
    return idx;
  endfunction

  function automatic int ref_decode(input int lv[4], input int addr);
    int pa = 4*lv[0] + lv[1], pb = 4*lv[2] + lv[3];
    int a4, b4, a3, b3;
    pa = ref_inv(pa, 4, a4); pb = ref_inv(pb, 4, b4);
    pa = ref_inv(pa, 3, a3); pb = ref_inv(pb, 3, b3);
    case (addr)
      0: return 2 * (pa / 4 % 2) + (pa % 4 % 2);
      1: return 2 * (pb / 4 % 2) + (pb % 4 % 2);
      2: return 2 * a3 + b3;
      default: return 2 * a4 + b4;
    endcase
  endfunction

  int n_drop = 0, n_drop_multi = 0;

  task automatic check1(input int want, input string what);
    checks++;
    if (int'(d1) != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, d1, want);
    end
  endtask

  initial begin
    static int ex_lv [4] = '{2, 3, 2, 1};
    static int ex_d  [4] = '{1, 3, 1, 2};
    for (int c = 0; c < 4; c++) e1[c] = level_t'(ex_lv[c]);
    for (int a = 0; a < 4; a++) begin
      addr1 = 2'(a);
      #1;
      check1(ex_d[a], $sformatf("example page %0d", a+1));
    end

    for (int seq = 0; seq < 256; seq++) begin
      automatic int lv[4] = '{0, 0, 0, 0};
      for (int w = 0; w < 4; w++) begin
        ref_write(lv, w, (seq >> (2*w)) & 3);
        for (int c = 0; c < 4; c++) e1[c] = level_t'(lv[c]);
        for (int a = 0; a < 4; a++) begin
          addr1 = 2'(a);
          #1;
          check1((a <= w) ? ((seq >> (2*a)) & 3) : 0, $sformatf("seq %0d after page %0d, page %0d", seq, w, a));
        end
      end
    end

    // one cell one level low: the decoder must match the reference decode, and
    // the pages that then lose both bits are counted
    for (int seq = 0; seq < 256; seq++) begin
      automatic int lv[4] = '{0, 0, 0, 0};
      for (int w = 0; w < 4; w++) begin
        ref_write(lv, w, (seq >> (2*w)) & 3);
        for (int c = 0; c < 4; c++) begin
          if (lv[c] > 0) begin
            automatic int bad[4] = lv;
            bad[c]--;
            for (int k = 0; k < 4; k++) e1[k] = level_t'(bad[k]);
            for (int a = 0; a <= w; a++) begin
              automatic int want = ref_decode(bad, a);
              automatic int diff;
              addr1 = 2'(a);
              #1;
              check1(want, $sformatf("seq %0d pages %0d, cell %0d low, page %0d", seq, w+1, c, a));
              diff = want ^ ((seq >> (2*a)) & 3);
              n_drop++;
              if (diff == 3) n_drop_multi++;
            end
          end
        end
      end
    end
    $display("one-level drops: %0d page reads, %0d with both bits wrong", n_drop, n_drop_multi);
    checks++;
    if (n_drop != 6272 || n_drop_multi != 128) begin
      failures++;
      $display("FAIL drop census %0d/%0d, want 6272/128", n_drop, n_drop_multi);
    end

    repeat (200) begin
      automatic int lvb[2][4];
      automatic int dat[4];
      for (int s = 0; s < 2; s++) for (int c = 0; c < 4; c++) lvb[s][c] = 0;
      for (int w = 0; w < 4; w++) begin
        dat[w] = int'($urandom_range(15));
        for (int s = 0; s < 2; s++) begin
          automatic int t[4] = lvb[s];
          ref_write(t, w, (dat[w] >> (2*s)) & 3);
          lvb[s] = t;
        end
      end
      for (int c = 0; c < 8; c++) e2[c] = level_t'(lvb[c/4][c%4]);
      for (int a = 0; a < 4; a++) begin
        addr2 = 2'(a);
        #1;
        checks++;
        if (int'(d2) != dat[a]) begin
          failures++;
          if (failures < 10) $display("FAIL 2-slice page %0d: got %0d want %0d", a, d2, dat[a]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
