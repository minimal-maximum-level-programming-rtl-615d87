// tb_mmlp_full: the MMLP front end at its default size (8 wordlines of four
// 4-level cells, 2-bit pages) filled in page order across all wordlines, as
// memory occupancy grows from 25% to 100%.
//
// Every page of every wordline is written in four rounds (first pages of all
// wordlines, then second pages, and so on); after each round every page is
// read back. Write and read times are checked against the timing model of the
// reference package. Wordlines 0..3 carry data that uses all allowed levels,
// so their reads must take 10 us at up to 50% occupancy, 20 us up to 75% and
// 30 us at 100%; wordline 1 also has third- and fourth-page writes of 610 and
// 920 us. Times are reported in us: one cycle is 1 us, less one hand-off cycle
// per array operation and the fixed set-up cycles.
module tb_mmlp_full;
  import mmlp_pkg::*;
  import tb_mmlp_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic       req_valid, req_ready, resp_valid;
  op_e        req_op;
  logic [2:0] req_wl;
  logic [1:0] req_addr, req_data, resp_data, resp_ncmp;
  status_e    resp_status;
  logic [7:0] resp_npulses;

  mmlp_top dut (.*);

  int ref_lv [NW][4];
  int ref_d  [NW][4];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic req(input op_e op, input int wl, input int addr, input int data,
                     output status_e st, output int d, output int ncmp, output int np, output int cyc);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_wl = 3'(wl); req_addr = 2'(addr); req_data = 2'(data);
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #0.1;
    req_valid = 1'b0;
    cyc = 0;
    while (!resp_valid) begin @(posedge clk); #0.1; cyc++; end
    st = resp_status; d = int'(resp_data); ncmp = int'(resp_ncmp); np = int'(resp_npulses);
  endtask

  initial begin
    static int pat [4][4] = '{'{1, 3, 1, 2}, '{2, 0, 1, 2}, '{3, 3, 3, 3}, '{3, 3, 2, 1}};
    static int fig6_us [4] = '{10, 10, 20, 30};
    real wr_sum [4];
    real rd_sum;
    status_e st;
    int d, ncmp, np, cyc;
    req_valid = 0; req_op = OP_READ; req_wl = 0; req_addr = 0; req_data = 0;
    for (int w = 0; w < NW; w++)
      for (int c = 0; c < 4; c++) begin
        ref_lv[w][c] = 0;
        ref_d[w][c]  = (w < 4) ? pat[w][c] : int'($urandom_range(3));
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int a = 0; a < 4; a++) begin
      wr_sum[a] = 0.0;
      for (int w = 0; w < NW; w++) begin
        automatic int lv_post [4];
        automatic int pulses, nvfy, npre, us;
        lv_post = ref_lv[w];
        ref_write(lv_post, a, ref_d[w][a]);
        ref_write_cost(ref_lv[w], lv_post, a, pulses, nvfy, npre);
        req(OP_WRITE, w, a, ref_d[w][a], st, d, ncmp, np, cyc);
        us = (pulses + pulses * nvfy) * 10 + npre * 10;
        chk(st == ST_OK && np == pulses && ncmp == npre, $sformatf("write wl%0d a%0d", w, a));
        chk(cyc == us + pulses + pulses * nvfy + npre + 3, $sformatf("write wl%0d a%0d took %0d cycles", w, a, cyc));
        if (w == 1 && a == 2) chk(us == 610, $sformatf("third page of wl1 takes %0d us, want 610", us));
        if (w == 1 && a == 3) chk(us == 920, $sformatf("fourth page of wl1 takes %0d us, want 920", us));
        wr_sum[a] += real'(cyc - pulses - pulses * nvfy - npre - 3);
        ref_lv[w] = lv_post;
      end
      // read everything back at this occupancy
      rd_sum = 0.0;
      for (int w = 0; w < NW; w++) begin
        automatic int m = max_level(ref_lv[w]);
        for (int b = 0; b < 4; b++) begin
          automatic int us;
          req(OP_READ, w, b, 0, st, d, ncmp, np, cyc);
          chk(st == ST_OK && d == ((b <= a) ? ref_d[w][b] : 0), $sformatf("read wl%0d a%0d got %0d", w, b, d));
          chk(ncmp == m, $sformatf("read wl%0d a%0d %0d comparisons, want %0d", w, b, ncmp, m));
          us = (ncmp == 0) ? 0 : cyc - ncmp - 2;
          chk(us == 10 * m, $sformatf("read wl%0d a%0d %0d us", w, b, us));
          if (w < 4) chk(us == fig6_us[a], $sformatf("wl%0d read at %0d%% occupancy %0d us, want %0d", w, 25*(a+1), us, fig6_us[a]));
          rd_sum += real'(us);
        end
      end
      $display("occupancy %0d%%: mean page-%0d write %0.1f us, mean read %0.2f us",
               25 * (a + 1), a + 1, wr_sum[a] / NW, rd_sum / (4 * NW));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
