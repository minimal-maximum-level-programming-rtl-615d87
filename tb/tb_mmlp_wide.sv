// tb_mmlp_wide: end-to-end test of the MMLP front end with 8-bit pages (four
// 2-bit slices, 16 cells per wordline). Random four-page traffic is written
// in order into every wordline, every written page is read back after every
// write, and write times, pulse counts and comparison counts are checked
// against the reference model applied slice by slice: a write needs the
// largest pulse count of any slice, verifies every target level present in
// any slice after each pulse, and pre-reads with the wordline's MaxLevel.
module tb_mmlp_wide;
  import mmlp_pkg::*;
  import tb_mmlp_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NW = 4, SL = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic         req_valid, req_ready, resp_valid;
  op_e          req_op;
  logic [1:0]   req_wl, req_addr, resp_ncmp;
  logic [2*SL-1:0] req_data, resp_data;
  status_e      resp_status;
  logic [7:0]   resp_npulses;

  mmlp_top #(.SLICES(SL), .NUM_WL(NW)) dut (.*);

  int ref_lv [NW][SL][4];
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
    req_valid = 1'b1; req_op = op; req_wl = 2'(wl); req_addr = 2'(addr); req_data = (2*SL)'(data);
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #0.1;
    req_valid = 1'b0;
    cyc = 0;
    while (!resp_valid) begin @(posedge clk); #0.1; cyc++; end
    st = resp_status; d = int'(resp_data); ncmp = int'(resp_ncmp); np = int'(resp_npulses);
  endtask

  function automatic int wl_max(input int w);
    int m = 0;
    for (int s = 0; s < SL; s++) if (max_level(ref_lv[w][s]) > m) m = max_level(ref_lv[w][s]);
    return m;
  endfunction

  initial begin
    status_e st;
    int d, ncmp, np, cyc;
    req_valid = 0; req_op = OP_READ; req_wl = 0; req_addr = 0; req_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    repeat (4) begin
      for (int w = 0; w < NW; w++) begin
        for (int s = 0; s < SL; s++) for (int c = 0; c < 4; c++) ref_lv[w][s][c] = 0;
        for (int a = 0; a < 4; a++) begin
          automatic int data = int'($urandom_range(2**(2*SL) - 1));
          automatic int pulses = 0, tmask = 0, nvfy = 0, npre;
          npre = (a < 2) ? 0 : wl_max(w);
          for (int s = 0; s < SL; s++) begin
            automatic int pre [4] = ref_lv[w][s];
            automatic int post [4] = pre;
            automatic int p, v, r;
            ref_write(post, a, (data >> (2*s)) & 3);
            ref_write_cost(pre, post, a, p, v, r);
            if (p > pulses) pulses = p;
            tmask |= ref_targets(pre, post);
            ref_lv[w][s] = post;
          end
          for (int l = 1; l < 4; l++) if (tmask & (1 << l)) nvfy++;
          req(OP_WRITE, w, a, data, st, d, ncmp, np, cyc);
          chk(st == ST_OK && np == pulses && ncmp == npre,
              $sformatf("write wl%0d a%0d: status %0d pulses %0d/%0d pre-read %0d/%0d", w, a, st, np, pulses, ncmp, npre));
          chk(cyc == (pulses + pulses * nvfy + npre) * 11 + 3, $sformatf("write wl%0d a%0d took %0d cycles", w, a, cyc));
          ref_d[w][a] = data;
          for (int b = 0; b < 4; b++) begin
            req(OP_READ, w, b, 0, st, d, ncmp, np, cyc);
            chk(st == ST_OK && d == ((b <= a) ? ref_d[w][b] : 0), $sformatf("read wl%0d a%0d got %0h", w, b, d));
            chk(ncmp == wl_max(w), $sformatf("read wl%0d a%0d %0d comparisons", w, b, ncmp));
          end
        end
        req(OP_ERASE, w, 0, 0, st, d, ncmp, np, cyc);
        chk(st == ST_OK, "erase");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
