// mlc_array_model: behavioural model of a 4-level-cell NAND Flash array.
//
// This stands in for the analog cell array; it is not logic that would be
// built. Each cell is modelled by the number of program pulses it has taken
// since erase; its level is 0 below NP01 pulses, 1 below NP02, 2 below NP03
// and 3 from NP03 on. With VAR_PULSES above 0, cells differ: cell c of
// wordline w needs (7w + 3c) mod (VAR_PULSES + 1) extra pulses for every
// level, standing in for manufacturing variation. The array takes three commands, one at a time:
//   ACMD_PULSE  one program pulse on the cells of cmd_mask in wordline cmd_wl
//               (T_PULSE cycles); unmasked cells are inhibited.
//   ACMD_SENSE  one page-wide reference comparison of wordline cmd_wl against
//               the reference between levels cmd_ref-1 and cmd_ref (T_VFY
//               cycles); sense[i] is 1 when cell i is at cmd_ref or above.
//   ACMD_ERASE  returns every cell of wordline cmd_wl to level 0 (T_ERASE cycles).
// A command is taken when cmd_valid and cmd_ready are both high; cmd_ready
// is low while a command runs; done is high for the last cycle of the
// command, together with the sense result. Reset models an erased device.
// Pulse counts to each level and the pulse and verify times follow the
// published measurements, with one clock cycle taken as 1 us; the erase time,
// the command handshake and the absence of cell-to-cell variation are this
// model's choices, as is the form of the variation (off by default).
module mlc_array_model
  import mmlp_pkg::*;
#(
  parameter int unsigned CELLS   = 4,
  parameter int unsigned NUM_WL  = 8,
  parameter int unsigned NP01    = 10,
  parameter int unsigned NP02    = 20,
  parameter int unsigned NP03    = 40,
  parameter int unsigned T_PULSE = 10,
  parameter int unsigned T_VFY   = 10,
  parameter int unsigned T_ERASE = 100,
  parameter int unsigned VAR_PULSES = 0,
  localparam int unsigned WL_W = (NUM_WL > 1) ? $clog2(NUM_WL) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  acmd_e            cmd,
  input  logic [WL_W-1:0]  cmd_wl,
  input  logic [CELLS-1:0] cmd_mask,
  input  level_t           cmd_ref,
  output logic             done,
  output logic [CELLS-1:0] sense
);

  localparam int unsigned CNT_W = $clog2(NP03 + VAR_PULSES + 1);

  logic [CNT_W-1:0] pulses [NUM_WL][CELLS];
  logic [15:0]      busy_cnt;
  acmd_e            cur_cmd;
  logic [WL_W-1:0]  cur_wl;
  logic [CELLS-1:0] cur_mask;
  logic [CELLS-1:0] sense_q;

  // Extra pulses cell c of wordline w needs to reach each level: a fixed
  // spread of 0..VAR_PULSES over the array.
  function automatic int unsigned slow(input int unsigned w, input int unsigned c);
    return (w * 7 + c * 3) % (VAR_PULSES + 1);
  endfunction

  function automatic level_t level_of(input logic [CNT_W-1:0] n, input int unsigned extra);
    if (32'(n) >= NP03 + extra)      return level_t'(3);
    else if (32'(n) >= NP02 + extra) return level_t'(2);
    else if (32'(n) >= NP01 + extra) return level_t'(1);
    else                             return level_t'(0);
  endfunction

  assign cmd_ready = (busy_cnt == 0);
  assign done      = (busy_cnt == 1);
  assign sense     = sense_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt <= '0;
      cur_cmd  <= ACMD_SENSE;
      cur_wl   <= '0;
      cur_mask <= '0;
      sense_q  <= '0;
      for (int w = 0; w < int'(NUM_WL); w++)
        for (int c = 0; c < int'(CELLS); c++)
          pulses[w][c] <= '0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        cur_cmd  <= cmd;
        cur_wl   <= cmd_wl;
        cur_mask <= cmd_mask;
        unique case (cmd)
          ACMD_PULSE: busy_cnt <= 16'(T_PULSE);
          ACMD_ERASE: busy_cnt <= 16'(T_ERASE);
          default:    busy_cnt <= 16'(T_VFY);
        endcase
        if (cmd == ACMD_SENSE)
          for (int c = 0; c < int'(CELLS); c++)
            sense_q[c] <= (level_of(pulses[cmd_wl][c], slow(32'(cmd_wl), 32'(c))) >= cmd_ref);
      end else if (busy_cnt != 0) begin
        busy_cnt <= busy_cnt - 16'd1;
        // The effect of a pulse or an erase appears when the command ends.
        if (busy_cnt == 1) begin
          for (int c = 0; c < int'(CELLS); c++) begin
            if (cur_cmd == ACMD_ERASE)
              pulses[cur_wl][c] <= '0;
            else if (cur_cmd == ACMD_PULSE && cur_mask[c] &&
                     32'(pulses[cur_wl][c]) < NP03 + VAR_PULSES)
              pulses[cur_wl][c] <= pulses[cur_wl][c] + 1'b1;
          end
        end
      end
    end
  end

endmodule
