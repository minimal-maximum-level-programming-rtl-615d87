// tb_mmlp_atc: checks the address-to-cells mapping for 4-level cells (one and
// two slices) and for 8-level cells against cell sets and level limits
// listed here by hand.
module tb_mmlp_atc;
  int checks = 0, failures = 0;

  logic [1:0] a4;
  logic       ok4, ok4b;
  logic [3:0] m4;
  logic [1:0] c4;
  logic [7:0] m4b;
  logic [1:0] c4b;
  mmlp_atc #(.LEVELS(4), .SLICES(1)) dut4  (.addr(a4), .addr_ok(ok4),  .cell_mask(m4),  .level_cap(c4));
  mmlp_atc #(.LEVELS(4), .SLICES(2)) dut4b (.addr(a4), .addr_ok(ok4b), .cell_mask(m4b), .level_cap(c4b));

  logic [3:0] a8;
  logic       ok8;
  logic [7:0] m8;
  logic [2:0] c8;
  mmlp_atc #(.LEVELS(8), .SLICES(1)) dut8 (.addr(a8), .addr_ok(ok8), .cell_mask(m8), .level_cap(c8));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // cell c1 is bit 0
    static logic [3:0] exp_m4 [4] = '{4'b0011, 4'b1100, 4'b1111, 4'b1111};
    static int         exp_c4 [4] = '{1, 1, 2, 3};
    static logic [7:0] exp_m8 [12] = '{8'h03, 8'h0C, 8'h30, 8'hC0, 8'h0F, 8'hF0,
                                       8'h0F, 8'hF0, 8'hFF, 8'hFF, 8'hFF, 8'hFF};
    static int         exp_c8 [12] = '{1, 1, 1, 1, 2, 2, 3, 3, 4, 5, 6, 7};
    for (int a = 0; a < 4; a++) begin
      a4 = 2'(a);
      #1;
      chk(ok4 && m4 == exp_m4[a], $sformatf("4-level mask addr %0d: %b", a, m4));
      chk(int'(c4) == exp_c4[a], $sformatf("4-level cap addr %0d: %0d", a, c4));
      chk(ok4b && m4b == {exp_m4[a], exp_m4[a]} && c4b == c4, $sformatf("2-slice addr %0d", a));
    end
    for (int a = 0; a < 16; a++) begin
      a8 = 4'(a);
      #1;
      if (a < 12) begin
        chk(ok8 && m8 == exp_m8[a], $sformatf("8-level mask addr %0d: %h", a, m8));
        chk(int'(c8) == exp_c8[a], $sformatf("8-level cap addr %0d: %0d", a, c8));
      end else begin
        chk(!ok8, $sformatf("8-level addr %0d should not exist", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
