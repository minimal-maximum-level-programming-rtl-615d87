// tb_mmlp_controller: checks the MMLP write/read/erase sequencer with the
// address-to-cells mapping, encoder, decoder, metadata table and cell array
// model around it.
//
// Checked: the worked example (pages 01, 11, 01, 10) reads back page by page;
// page write latencies of 200, 200, 610 and 920 us for data that makes every
// page take its worst-case transitions (one cycle = 1 us, plus one hand-off
// cycle per array operation and three cycles of set-up for a write, two
// for a read); the pulse counts
// 10, 20 and 30 behind them, and their mean of 482.5 us; read latency of MaxLevel x 10 us; the number of
// reference comparisons of reads and of the read before a write; refusal of
// out-of-order writes; erase.
module tb_mmlp_controller;
  import mmlp_pkg::*;
  int checks = 0, failures = 0;

  localparam int SL = 1, NW = 4, CELLS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic        req_valid, req_ready;
  op_e         req_op;
  logic [1:0]  req_wl, req_addr, req_data;
  logic        resp_valid;
  status_e     resp_status;
  logic [1:0]  resp_data, resp_ncmp;
  logic [7:0]  resp_npulses;
  logic [1:0]  cur_addr, cur_data, dec_d;
  level_t      cur_lv [CELLS], enc_e [CELLS];
  logic [CELLS-1:0] atc_mask, a_mask, a_sense;
  level_t      atc_cap, meta_rd_max, meta_wr_max, a_ref;
  logic        atc_ok, meta_we, a_valid, a_ready, a_done;
  logic [1:0]  meta_rd_wl, meta_wr_wl, a_wl;
  logic [2:0]  meta_rd_next, meta_wr_next;
  acmd_e       a_cmd;

  mmlp_controller #(.SLICES(SL), .NUM_WL(NW)) dut (.*);
  mmlp_atc #(.LEVELS(4), .SLICES(SL)) u_atc (.addr(cur_addr), .addr_ok(atc_ok), .cell_mask(atc_mask), .level_cap(atc_cap));
  mmlp_encoder #(.SLICES(SL)) u_enc (.addr(cur_addr), .d(cur_data), .p(cur_lv), .e(enc_e));
  mmlp_decoder #(.SLICES(SL)) u_dec (.addr(cur_addr), .e(cur_lv), .d(dec_d));
  mmlp_maxlevel_table #(.NUM_WL(NW)) u_meta (.clk, .rst_n, .rd_wl(meta_rd_wl), .rd_max_level(meta_rd_max),
    .rd_next_addr(meta_rd_next), .we(meta_we), .wr_wl(meta_wr_wl), .wr_max_level(meta_wr_max), .wr_next_addr(meta_wr_next));
  mlc_array_model #(.CELLS(CELLS), .NUM_WL(NW)) u_arr (.clk, .rst_n, .cmd_valid(a_valid), .cmd_ready(a_ready),
    .cmd(a_cmd), .cmd_wl(a_wl), .cmd_mask(a_mask), .cmd_ref(a_ref), .done(a_done), .sense(a_sense));

  int last_us;   // array time of the last write, measured

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  typedef struct {
    status_e    st;
    logic [1:0] data;
    int         ncmp;
    int         npulses;
    int         cycles;
  } resp_t;

  task automatic req(input op_e op, input int wl, input int addr, input int data, output resp_t r);
    int cyc;
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_wl = 2'(wl); req_addr = 2'(addr); req_data = 2'(data);
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #0.1;
    req_valid = 1'b0;
    cyc = 0;
    while (!resp_valid) begin @(posedge clk); #0.1; cyc++; end
    r.st = resp_status; r.data = resp_data; r.ncmp = int'(resp_ncmp);
    r.npulses = int'(resp_npulses); r.cycles = cyc;
  endtask

  // write with latency check: us is the array time, ops the number of array operations
  task automatic wr(input int wl, input int addr, input int data, input int us, input int ops,
                    input int pulses, input int ncmp);
    resp_t r;
    req(OP_WRITE, wl, addr, data, r);
    chk(r.st == ST_OK, $sformatf("write wl%0d a%0d status %0d", wl, addr, r.st));
    last_us = r.cycles - ops - 3;
    if (us >= 0) begin
      chk(r.cycles == us + ops + 3, $sformatf("write wl%0d a%0d took %0d cycles, want %0d us + %0d + 3",
                                              wl, addr, r.cycles, us, ops));
      chk(r.npulses == pulses, $sformatf("write wl%0d a%0d %0d pulses, want %0d", wl, addr, r.npulses, pulses));
      chk(r.ncmp == ncmp, $sformatf("write wl%0d a%0d pre-read %0d comparisons, want %0d", wl, addr, r.ncmp, ncmp));
    end
  endtask

  task automatic rd(input int wl, input int addr, input int want, input int ncmp);
    resp_t r;
    req(OP_READ, wl, addr, 0, r);
    chk(r.st == ST_OK && int'(r.data) == want, $sformatf("read wl%0d a%0d got %0d want %0d", wl, addr, r.data, want));
    chk(r.ncmp == ncmp, $sformatf("read wl%0d a%0d %0d comparisons, want %0d", wl, addr, r.ncmp, ncmp));
    if (ncmp > 0)
      chk(r.cycles == 10 * ncmp + ncmp + 2, $sformatf("read wl%0d a%0d took %0d cycles, want %0d", wl, addr, r.cycles, 11*ncmp+2));
  endtask

  initial begin
    resp_t r;
    int sum_us;
    static int ex [4] = '{1, 3, 1, 2};
    req_valid = 0; req_op = OP_READ; req_wl = 0; req_addr = 0; req_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // worked example on wordline 0
    for (int a = 0; a < 4; a++) begin
      wr(0, a, ex[a], -1, 0, 0, 0);
      for (int b = 0; b <= a; b++) rd(0, b, ex[b], (a < 2) ? 1 : a);
    end

    // Table 3: first and second page, 10 pulses of 10 us each with one verify
    wr(1, 0, 3, 200, 20, 10, 0);
    sum_us = last_us;
    wr(1, 1, 3, 200, 20, 10, 0);
    sum_us += last_us;
    rd(1, 0, 3, 1);
    rd(1, 1, 3, 1);

    // Table 3: third and fourth page at their worst-case transitions
    wr(2, 0, 2, 200, 20, 10, 0);             // c1 -> 1
    wr(2, 1, 0, 0, 0, 0, 0);                 // nothing to program
    wr(2, 2, 1, 610, 1 + 20 + 40, 20, 1);    // pair (c3,c4) 00 -> 12: 0->2 in 20 pulses, 2 verifies each
    sum_us += last_us;
    wr(2, 3, 2, 920, 2 + 30 + 60, 30, 2);    // pair (c1,c2) 10 -> 32: 1->3 in 30 pulses
    sum_us += last_us;
    chk(real'(sum_us) / 4.0 == 482.5, $sformatf("mean worst-case page write %0.2f us, want 482.5", real'(sum_us) / 4.0));
    rd(2, 0, 2, 3);
    rd(2, 1, 0, 3);
    rd(2, 2, 1, 3);
    rd(2, 3, 2, 3);

    // out-of-order writes are refused
    req(OP_WRITE, 3, 2, 1, r);
    chk(r.st == ST_ORDER, "write to address 3 of an empty wordline refused");
    req(OP_WRITE, 2, 0, 1, r);
    chk(r.st == ST_ORDER, "write to a full wordline refused");
    rd(2, 0, 2, 3);

    // erase
    req(OP_ERASE, 2, 0, 0, r);
    chk(r.st == ST_OK, "erase status");
    rd(2, 0, 0, 0);
    rd(2, 3, 0, 0);
    wr(2, 0, 1, 200, 20, 10, 0);
    rd(2, 0, 1, 1);
    rd(1, 1, 3, 1);   // other wordlines keep their data

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
