// tb_mlc_array_model: checks the cell array model. Cells pulsed 9, 10, 19,
// 20, 39 and 40 times must sense at levels 0, 1, 1, 2, 2 and 3 (thresholds
// 10, 20 and 40 pulses); unmasked cells and other wordlines are untouched;
// a pulse takes T_PULSE cycles and a comparison T_VFY cycles from the cycle
// the command is taken to the done cycle; erase returns a wordline to 0. A
// second array with VAR_PULSES=3 must need the documented extra pulses.
module tb_mlc_array_model;
  import mmlp_pkg::*;
  int checks = 0, failures = 0;

  localparam int CELLS = 6, NW = 4, TP = 10, TV = 10, TE = 30;
  logic             clk = 1'b0, rst_n = 1'b0;
  logic             cmd_valid, cmd_ready, done;
  acmd_e            cmd;
  logic [1:0]       cmd_wl;
  logic [CELLS-1:0] cmd_mask, sense;
  level_t           cmd_ref;
  always #1 clk = ~clk;

  mlc_array_model #(.CELLS(CELLS), .NUM_WL(NW), .T_PULSE(TP), .T_VFY(TV), .T_ERASE(TE)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cmd_wl, .cmd_mask, .cmd_ref, .done, .sense
  );

  // same commands into an array whose cells need 0..3 extra pulses per level
  logic             ready_v, done_v;
  logic [CELLS-1:0] sense_v;
  mlc_array_model #(.CELLS(CELLS), .NUM_WL(NW), .T_PULSE(TP), .T_VFY(TV), .T_ERASE(TE), .VAR_PULSES(3)) dut_v (
    .clk, .rst_n, .cmd_valid, .cmd_ready(ready_v), .cmd, .cmd_wl, .cmd_mask, .cmd_ref, .done(done_v), .sense(sense_v)
  );

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // issue one command; returns its duration in cycles (taken edge to done cycle inclusive)
  task automatic run(input acmd_e c, input int wl, input logic [CELLS-1:0] m, input int r, output int cyc);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = c; cmd_wl = 2'(wl); cmd_mask = m; cmd_ref = level_t'(r);
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #0.1;
    cmd_valid = 1'b0;
    cyc = 1;
    while (!done) begin @(posedge clk); #0.1; cyc++; end
    @(posedge clk); #0.1;
  endtask

  function automatic int level_of_pulses(input int n);
    return (n >= 40) ? 3 : (n >= 20) ? 2 : (n >= 10) ? 1 : 0;
  endfunction

  int npulse [CELLS] = '{9, 10, 19, 20, 39, 40};

  task automatic sense_levels(input int wl, output int lv [CELLS]);
    int cyc;
    for (int c = 0; c < CELLS; c++) lv[c] = 0;
    for (int r = 1; r <= 3; r++) begin
      run(ACMD_SENSE, wl, '0, r, cyc);
      chk(cyc == TV, $sformatf("sense takes %0d cycles, want %0d", cyc, TV));
      for (int c = 0; c < CELLS; c++) if (sense[c]) lv[c]++;
    end
  endtask

  initial begin
    int cyc;
    int lv [CELLS];
    cmd_valid = 0; cmd = ACMD_SENSE; cmd_wl = 0; cmd_mask = 0; cmd_ref = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sense_levels(1, lv);
    for (int c = 0; c < CELLS; c++) chk(lv[c] == 0, "erased after reset");
    for (int p = 0; p < 45; p++) begin
      logic [CELLS-1:0] m;
      for (int c = 0; c < CELLS; c++) m[c] = (p < npulse[c]);
      run(ACMD_PULSE, 1, m, 0, cyc);
      chk(cyc == TP, $sformatf("pulse takes %0d cycles, want %0d", cyc, TP));
    end
    sense_levels(1, lv);
    for (int c = 0; c < CELLS; c++)
      chk(lv[c] == level_of_pulses(npulse[c]), $sformatf("cell %0d after %0d pulses at level %0d", c, npulse[c], lv[c]));
    sense_levels(2, lv);
    for (int c = 0; c < CELLS; c++) chk(lv[c] == 0, "other wordline untouched");
    // variation: on wordline 3 cells 0..5 need 1, 0, 3, 2, 1, 0 extra pulses
    for (int p = 0; p < 11; p++) run(ACMD_PULSE, 3, '1, 0, cyc);
    run(ACMD_SENSE, 3, '0, 1, cyc);
    chk(sense == 6'b111111, $sformatf("uniform array: all cells at level 1 after 11 pulses (%b)", sense));
    chk(ready_v && sense_v == 6'b110011, $sformatf("varied array: cells 2,3 still at level 0 after 11 pulses (%b)", sense_v));
    run(ACMD_PULSE, 3, '1, 0, cyc);
    run(ACMD_SENSE, 3, '0, 1, cyc);
    chk(sense_v == 6'b111011, $sformatf("varied array after 12 pulses (%b)", sense_v));
    run(ACMD_ERASE, 1, '0, 0, cyc);
    chk(cyc == TE, $sformatf("erase takes %0d cycles", cyc));
    sense_levels(1, lv);
    for (int c = 0; c < CELLS; c++) chk(lv[c] == 0, "erased");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
