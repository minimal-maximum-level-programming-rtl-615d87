// tb_mmlp_maxlevel_table: checks the per-wordline metadata table. After
// reset every entry reads MaxLevel 0 and next address 0; random writes are
// compared with a reference array, a write goes to its own wordline only,
// and a second reset clears everything again.
module tb_mmlp_maxlevel_table;
  import mmlp_pkg::*;
  int checks = 0, failures = 0;

  localparam int NW = 8;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] rd_wl, wr_wl;
  level_t     rd_max, wr_max;
  logic [2:0] rd_next, wr_next;
  logic       we;
  always #1 clk = ~clk;

  mmlp_maxlevel_table #(.NUM_WL(NW)) dut (
    .clk, .rst_n, .rd_wl, .rd_max_level(rd_max), .rd_next_addr(rd_next),
    .we, .wr_wl, .wr_max_level(wr_max), .wr_next_addr(wr_next)
  );

  int ref_max [NW], ref_next [NW];

  task automatic check_all(input string what);
    for (int w = 0; w < NW; w++) begin
      rd_wl = 3'(w);
      #0.1;
      checks++;
      if (int'(rd_max) != ref_max[w] || int'(rd_next) != ref_next[w]) begin
        failures++;
        $display("FAIL %s wl %0d: got %0d/%0d want %0d/%0d", what, w, rd_max, rd_next, ref_max[w], ref_next[w]);
      end
    end
  endtask

  initial begin
    we = 0; wr_wl = 0; wr_max = 0; wr_next = 0; rd_wl = 0;
    for (int w = 0; w < NW; w++) begin ref_max[w] = 0; ref_next[w] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_all("after reset");
    repeat (100) begin
      @(negedge clk);
      we      = 1'($urandom_range(1));
      wr_wl   = 3'($urandom_range(NW-1));
      wr_max  = level_t'($urandom_range(3));
      wr_next = 3'($urandom_range(4));
      @(posedge clk);
      if (we) begin ref_max[wr_wl] = int'(wr_max); ref_next[wr_wl] = int'(wr_next); end
      @(negedge clk);
      we = 0;
      check_all("after write");
    end
    rst_n = 1'b0;
    #0.5;
    for (int w = 0; w < NW; w++) begin ref_max[w] = 0; ref_next[w] = 0; end
    check_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
