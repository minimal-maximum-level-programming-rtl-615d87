// tb_mmlp_top: end-to-end test of the MMLP front end and array model.
//
// A default-size instance runs: the worked example on wordline 0; random
// four-page data on the other wordlines, with every written page read back
// after every write, write and read times checked against the timing model
// of the reference package and MaxLevel-based comparison counts; refused
// out-of-order writes; erase and rewrite. A second instance with a limit of
// 5 program pulses must report a program failure, and a third, whose cells
// need up to 5 extra pulses per level, must still store and return data.
// Each mechanism is counted and must occur at least once: writes that skip
// the pre-read, pre-reads with 1 and 2 comparisons, reads with 0..3
// comparisons, writes verifying two target levels per pulse, writes with
// nothing to program, refused writes, erases, program failures and writes
// stretched by cell variation.
module tb_mmlp_top;
  import mmlp_pkg::*;
  import tb_mmlp_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  typedef struct {
    logic       valid;
    op_e        op;
    logic [2:0] wl;
    logic [1:0] addr;
    logic [1:0] data;
  } req_s;

  typedef struct {
    status_e    st;
    logic [1:0] data;
    int         ncmp;
    int         npulses;
    int         cycles;
  } resp_t;

  req_s        rq [3];
  logic        req_ready [3], resp_valid [3];
  status_e     resp_status [3];
  logic [1:0]  resp_data [3], resp_ncmp [3];
  logic [7:0]  resp_npulses [3];

  mmlp_top dut (
    .clk, .rst_n, .req_valid(rq[0].valid), .req_ready(req_ready[0]), .req_op(rq[0].op),
    .req_wl(rq[0].wl), .req_addr(rq[0].addr), .req_data(rq[0].data), .resp_valid(resp_valid[0]),
    .resp_status(resp_status[0]), .resp_data(resp_data[0]), .resp_ncmp(resp_ncmp[0]),
    .resp_npulses(resp_npulses[0])
  );

  mmlp_top #(.MAX_PULSES(5)) dut_lim (
    .clk, .rst_n, .req_valid(rq[1].valid), .req_ready(req_ready[1]), .req_op(rq[1].op),
    .req_wl(rq[1].wl), .req_addr(rq[1].addr), .req_data(rq[1].data), .resp_valid(resp_valid[1]),
    .resp_status(resp_status[1]), .resp_data(resp_data[1]), .resp_ncmp(resp_ncmp[1]),
    .resp_npulses(resp_npulses[1])
  );

  mmlp_top #(.VAR_PULSES(5)) dut_var (
    .clk, .rst_n, .req_valid(rq[2].valid), .req_ready(req_ready[2]), .req_op(rq[2].op),
    .req_wl(rq[2].wl), .req_addr(rq[2].addr), .req_data(rq[2].data), .resp_valid(resp_valid[2]),
    .resp_status(resp_status[2]), .resp_data(resp_data[2]), .resp_ncmp(resp_ncmp[2]),
    .resp_npulses(resp_npulses[2])
  );

  // mechanism counters
  int n_skip_pre = 0, n_pre1 = 0, n_pre2 = 0, n_two_vfy = 0, n_nothing = 0;
  int n_order = 0, n_erase = 0, n_pgm_fail = 0, n_var = 0;
  int n_rd [4] = '{0, 0, 0, 0};

  // reference state of the default instance
  int ref_lv [NW][4];
  int ref_d  [NW][4];
  int ref_n  [NW];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic req(input int i, input op_e op, input int wl, input int addr, input int data, output resp_t r);
    int cyc;
    @(negedge clk);
    rq[i].valid = 1'b1; rq[i].op = op; rq[i].wl = 3'(wl); rq[i].addr = 2'(addr); rq[i].data = 2'(data);
    while (!req_ready[i]) @(negedge clk);
    @(posedge clk);
    #0.1;
    rq[i].valid = 1'b0;
    cyc = 0;
    while (!resp_valid[i]) begin @(posedge clk); #0.1; cyc++; end
    r.st = resp_status[i]; r.data = resp_data[i]; r.ncmp = int'(resp_ncmp[i]);
    r.npulses = int'(resp_npulses[i]); r.cycles = cyc;
  endtask

  task automatic wr(input int wl, input int d);
    resp_t r;
    int lv_pre [4], lv_post [4];
    int a = ref_n[wl];
    int pulses, nvfy, npre, want_cyc;
    lv_pre = ref_lv[wl];
    lv_post  = lv_pre;
    ref_write(lv_post, a, d);
    ref_write_cost(lv_pre, lv_post, a, pulses, nvfy, npre);
    req(0, OP_WRITE, wl, a, d, r);
    want_cyc = (pulses + pulses * nvfy + npre) * 11 + 3;
    chk(r.st == ST_OK, $sformatf("write wl%0d a%0d status %0d", wl, a, r.st));
    chk(r.npulses == pulses, $sformatf("write wl%0d a%0d: %0d pulses, want %0d", wl, a, r.npulses, pulses));
    chk(r.ncmp == npre, $sformatf("write wl%0d a%0d: pre-read %0d, want %0d", wl, a, r.ncmp, npre));
    chk(r.cycles == want_cyc, $sformatf("write wl%0d a%0d: %0d cycles, want %0d", wl, a, r.cycles, want_cyc));
    if (a < 2) n_skip_pre++;
    if (npre == 1) n_pre1++;
    if (npre == 2) n_pre2++;
    if (nvfy == 2) n_two_vfy++;
    if (pulses == 0) n_nothing++;
    ref_lv[wl] = lv_post;
    ref_d[wl][a] = d;
    ref_n[wl]++;
  endtask

  task automatic rd_all(input int wl);
    resp_t r;
    int m = 0;
    for (int c = 0; c < 4; c++) if (ref_lv[wl][c] > m) m = ref_lv[wl][c];
    for (int a = 0; a < 4; a++) begin
      automatic int want = (a < ref_n[wl]) ? ref_d[wl][a] : 0;
      req(0, OP_READ, wl, a, 0, r);
      chk(r.st == ST_OK && int'(r.data) == want, $sformatf("read wl%0d a%0d got %0d want %0d", wl, a, r.data, want));
      chk(r.ncmp == m, $sformatf("read wl%0d a%0d %0d comparisons, want %0d", wl, a, r.ncmp, m));
      chk(r.cycles == ((m == 0) ? 2 : 11 * m + 2), $sformatf("read wl%0d a%0d %0d cycles", wl, a, r.cycles));
      n_rd[m]++;
    end
  endtask

  initial begin
    resp_t r;
    static int ex [4] = '{1, 3, 1, 2};
    for (int i = 0; i < 3; i++) begin
      rq[i].valid = 0; rq[i].op = OP_READ; rq[i].wl = 0; rq[i].addr = 0; rq[i].data = 0;
    end
    for (int w = 0; w < NW; w++) begin
      ref_n[w] = 0;
      for (int c = 0; c < 4; c++) begin ref_lv[w][c] = 0; ref_d[w][c] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // worked example: 01, 11, 01, 10 (cells 0100, 0111, 0121, 2321)
    rd_all(0);
    for (int a = 0; a < 4; a++) begin
      wr(0, ex[a]);
      rd_all(0);
    end

    // random data on the other wordlines
    repeat (3) begin
      for (int w = 1; w < NW; w++) begin
        for (int a = 0; a < 4; a++) begin
          wr(w, int'($urandom_range(3)));
          rd_all(w);
        end
        // refused: rewrite of a full wordline, then erase
        req(0, OP_WRITE, w, 0, 1, r);
        chk(r.st == ST_ORDER, "write to a full wordline refused");
        if (r.st == ST_ORDER) n_order++;
        req(0, OP_ERASE, w, 0, 0, r);
        chk(r.st == ST_OK, "erase");
        n_erase++;
        ref_n[w] = 0;
        for (int c = 0; c < 4; c++) begin ref_lv[w][c] = 0; ref_d[w][c] = 0; end
        rd_all(w);
      end
    end
    // refused: skipping an address
    req(0, OP_WRITE, 1, 2, 1, r);
    chk(r.st == ST_ORDER, "write to address 3 of an erased wordline refused");
    if (r.st == ST_ORDER) n_order++;
    rd_all(0);   // wordline 0 untouched by everything else

    // program failure with a 5-pulse limit
    req(1, OP_WRITE, 0, 0, 2, r);
    chk(r.st == ST_PGM_FAIL && r.npulses == 5, $sformatf("pulse limit: status %0d pulses %0d", r.st, r.npulses));
    if (r.st == ST_PGM_FAIL) n_pgm_fail++;
    req(1, OP_WRITE, 0, 1, 0, r);
    chk(r.st == ST_OK, "write with nothing to program needs no pulse");

    // cells that need different pulse counts: program-verify still lands every
    // cell on its target and the data reads back
    for (int w = 0; w < NW; w++) begin
      automatic int lv [4] = '{0, 0, 0, 0};
      automatic int dv [4];
      for (int a = 0; a < 4; a++) begin
        automatic int pre [4] = lv;
        automatic int pulses, nvfy, npre;
        dv[a] = int'($urandom_range(3));
        ref_write(lv, a, dv[a]);
        ref_write_cost(pre, lv, a, pulses, nvfy, npre);
        req(2, OP_WRITE, w, a, dv[a], r);
        chk(r.st == ST_OK, "varied array write");
        if (r.npulses != pulses) n_var++;
        for (int b = 0; b <= a; b++) begin
          req(2, OP_READ, w, b, 0, r);
          chk(int'(r.data) == dv[b], $sformatf("varied array read wl%0d a%0d got %0d want %0d", w, b, r.data, dv[b]));
        end
      end
    end

    $display("mechanisms: skip-pre-read %0d, pre-read-1 %0d, pre-read-2 %0d, two-level verify %0d, nothing-to-program %0d",
             n_skip_pre, n_pre1, n_pre2, n_two_vfy, n_nothing);
    $display("            reads with 0/1/2/3 comparisons %0d/%0d/%0d/%0d, refused %0d, erase %0d, program-fail %0d, varied cells %0d",
             n_rd[0], n_rd[1], n_rd[2], n_rd[3], n_order, n_erase, n_pgm_fail, n_var);
    chk(n_skip_pre > 0, "no write skipped the pre-read");
    chk(n_pre1 > 0, "no pre-read with 1 comparison");
    chk(n_pre2 > 0, "no pre-read with 2 comparisons");
    chk(n_two_vfy > 0, "no write verified two levels");
    chk(n_nothing > 0, "no write with nothing to program");
    for (int m = 0; m < 4; m++) chk(n_rd[m] > 0, $sformatf("no read with %0d comparisons", m));
    chk(n_order > 0, "no refused write");
    chk(n_erase > 0, "no erase");
    chk(n_pgm_fail > 0, "no program failure");
    chk(n_var > 0, "no write needed extra pulses on the varied array");

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
