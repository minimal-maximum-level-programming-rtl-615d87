// mmlp_top: MMLP memory front end wired to a 4-level-cell Flash array model.
//
// Minimal maximum-level programming stores four 2-bit-per-slice data pages in
// each wordline of 4-level cells so that the k-th page written uses only the
// lowest k+1 levels. The first pages are written and read with few program
// pulses and few reference comparisons; the full capacity of the cells is
// still used, without redundancy.
//
// The controller runs the write, read and erase flows. It uses the
// address-to-cells mapping (which cells hold a page, and the page's level
// limit), the encoder (new target levels from the data and the present
// levels), the decoder (data from sensed levels), the per-wordline MaxLevel
// table, and the cell array model, which applies pulses and reference
// comparisons with the published pulse counts and times (1 cycle = 1 us).
//
// Host interface: a request (req_op, req_wl, req_addr 0..3, req_data) is
// taken when req_valid and req_ready are high; resp_valid marks the single
// cycle that ends it, with resp_status, resp_data for reads, resp_ncmp (the
// reference comparisons of the read, or of the read before a write) and
// resp_npulses. A write or read takes the sum of its array operations plus one
// cycle per operation and a few cycles of set-up.
module mmlp_top
  import mmlp_pkg::*;
#(
  parameter int unsigned SLICES     = 1,    // 2-bit slices per data page
  parameter int unsigned NUM_WL     = 8,    // wordlines (physical pages)
  parameter int unsigned MAX_PULSES = 64,
  parameter int unsigned NP01       = 10,
  parameter int unsigned NP02       = 20,
  parameter int unsigned NP03       = 40,
  parameter int unsigned T_PULSE    = 10,
  parameter int unsigned T_VFY      = 10,
  parameter int unsigned T_ERASE    = 100,
  parameter int unsigned VAR_PULSES = 0,    // per-cell spread of pulses needed (array model)
  localparam int unsigned CELLS     = 4 * SLICES,
  localparam int unsigned PAGE_BITS = 2 * SLICES,
  localparam int unsigned WL_W      = (NUM_WL > 1) ? $clog2(NUM_WL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  op_e                  req_op,
  input  logic [WL_W-1:0]      req_wl,
  input  logic [1:0]           req_addr,
  input  logic [PAGE_BITS-1:0] req_data,
  output logic                 resp_valid,
  output status_e              resp_status,
  output logic [PAGE_BITS-1:0] resp_data,
  output logic [1:0]           resp_ncmp,
  output logic [7:0]           resp_npulses
);

  logic [1:0]           cur_addr;
  logic [PAGE_BITS-1:0] cur_data;
  level_t               cur_lv [CELLS];
  logic [CELLS-1:0]     atc_mask;
  level_t               atc_cap;
  logic                 atc_ok;
  level_t               enc_e [CELLS];
  logic [PAGE_BITS-1:0] dec_d;
  logic [WL_W-1:0]      meta_rd_wl, meta_wr_wl;
  level_t               meta_rd_max, meta_wr_max;
  logic [2:0]           meta_rd_next, meta_wr_next;
  logic                 meta_we;
  logic                 a_valid, a_ready, a_done;
  acmd_e                a_cmd;
  logic [WL_W-1:0]      a_wl;
  logic [CELLS-1:0]     a_mask, a_sense;
  level_t               a_ref;

  mmlp_controller #(.SLICES(SLICES), .NUM_WL(NUM_WL), .MAX_PULSES(MAX_PULSES)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_op, .req_wl, .req_addr, .req_data,
    .resp_valid, .resp_status, .resp_data, .resp_ncmp, .resp_npulses,
    .cur_addr, .cur_data, .cur_lv, .atc_mask, .atc_cap, .enc_e, .dec_d,
    .meta_rd_wl, .meta_rd_max, .meta_rd_next,
    .meta_we, .meta_wr_wl, .meta_wr_max, .meta_wr_next,
    .a_valid, .a_ready, .a_cmd, .a_wl, .a_mask, .a_ref, .a_done, .a_sense
  );

  mmlp_atc #(.LEVELS(4), .SLICES(SLICES)) u_atc (
    .addr(cur_addr), .addr_ok(atc_ok), .cell_mask(atc_mask), .level_cap(atc_cap)
  );

  mmlp_encoder #(.SLICES(SLICES)) u_enc (
    .addr(cur_addr), .d(cur_data), .p(cur_lv), .e(enc_e)
  );

  mmlp_decoder #(.SLICES(SLICES)) u_dec (
    .addr(cur_addr), .e(cur_lv), .d(dec_d)
  );

  mmlp_maxlevel_table #(.NUM_WL(NUM_WL)) u_meta (
    .clk, .rst_n,
    .rd_wl(meta_rd_wl), .rd_max_level(meta_rd_max), .rd_next_addr(meta_rd_next),
    .we(meta_we), .wr_wl(meta_wr_wl), .wr_max_level(meta_wr_max), .wr_next_addr(meta_wr_next)
  );

  mlc_array_model #(
    .CELLS(CELLS), .NUM_WL(NUM_WL), .NP01(NP01), .NP02(NP02), .NP03(NP03),
    .T_PULSE(T_PULSE), .T_VFY(T_VFY), .T_ERASE(T_ERASE), .VAR_PULSES(VAR_PULSES)
  ) u_array (
    .clk, .rst_n,
    .cmd_valid(a_valid), .cmd_ready(a_ready), .cmd(a_cmd), .cmd_wl(a_wl),
    .cmd_mask(a_mask), .cmd_ref(a_ref), .done(a_done), .sense(a_sense)
  );

  // Every address the host can give exists in a 4-level wordline.
  always_comb assert (atc_ok) else $error("ATC reports an unmapped address");

endmodule
