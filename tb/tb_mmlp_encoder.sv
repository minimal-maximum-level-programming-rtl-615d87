// tb_mmlp_encoder: checks the MMLP encoder against an independent reference.
//
// The reference keeps the cell levels of a 4-cell wordline as integers and
// applies the 4-level pair tables written out here as index maps (pair index
// = 4*first + second). Every one of the 256 sequences of four 2-bit pages is
// written page by page through the encoder and compared with the reference
// after each page, including the worked example 01,11,01,10 -> 0100, 0111,
// 0121, 2321. A two-slice encoder is driven with random sequences.
module tb_mmlp_encoder;
  import mmlp_pkg::*;

  int checks = 0, failures = 0;

  // page 3 / page 4 table for a data '1'; -1 where the pair state cannot occur
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

  // reference write of one 2-bit page slice into 4 levels
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
  logic [1:0] d1;
  level_t     p1 [4], e1 [4];
  mmlp_encoder #(.SLICES(1)) dut1 (.addr(addr1), .d(d1), .p(p1), .e(e1));

  logic [1:0] addr2;
  logic [3:0] d2;
  level_t     p2 [8], e2 [8];
  mmlp_encoder #(.SLICES(2)) dut2 (.addr(addr2), .d(d2), .p(p2), .e(e2));

  initial begin
    int lv[4];
    int lvb[2][4];
    int seq;
    // worked example
    static int exp_ex [4][4] = '{'{0,1,0,0}, '{0,1,1,1}, '{0,1,2,1}, '{2,3,2,1}};
    static int dat_ex [4] = '{1, 3, 1, 2};
    for (int c = 0; c < 4; c++) p1[c] = '0;
    for (int a = 0; a < 4; a++) begin
      addr1 = 2'(a); d1 = 2'(dat_ex[a]);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(e1[c]) != exp_ex[a][c]) begin
          failures++;
          $display("FAIL example page %0d cell %0d: got %0d want %0d", a+1, c+1, e1[c], exp_ex[a][c]);
        end
      end
      for (int c = 0; c < 4; c++) p1[c] = e1[c];
    end

    // all 256 sequences
    for (seq = 0; seq < 256; seq++) begin
      for (int c = 0; c < 4; c++) begin lv[c] = 0; p1[c] = '0; end
      for (int a = 0; a < 4; a++) begin
        automatic int d = (seq >> (2*a)) & 3;
        addr1 = 2'(a); d1 = 2'(d);
        #1;
        ref_write(lv, a, d);
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(e1[c]) != lv[c]) begin
            failures++;
            if (failures < 10) $display("FAIL seq %0d page %0d cell %0d: got %0d want %0d", seq, a, c, e1[c], lv[c]);
          end
          p1[c] = e1[c];
        end
      end
    end

    // two slices, random
    repeat (200) begin
      for (int s = 0; s < 2; s++) for (int c = 0; c < 4; c++) lvb[s][c] = 0;
      for (int c = 0; c < 8; c++) p2[c] = '0;
      for (int a = 0; a < 4; a++) begin
        automatic int d = int'($urandom_range(15));
        addr2 = 2'(a); d2 = 4'(d);
        #1;
        for (int s = 0; s < 2; s++) begin
          int t[4];
          t = lvb[s];
          ref_write(t, a, (d >> (2*s)) & 3);
          lvb[s] = t;
        end
        for (int c = 0; c < 8; c++) begin
          checks++;
          if (int'(e2[c]) != lvb[c/4][c%4]) begin
            failures++;
            if (failures < 10) $display("FAIL 2-slice page %0d cell %0d", a, c);
          end
          p2[c] = e2[c];
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
