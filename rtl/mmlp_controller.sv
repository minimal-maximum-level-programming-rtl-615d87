// mmlp_controller: MMLP write, read and erase sequencer for one MLC array.
//
// Write (address a, data D to wordline w):
//   1. Look up the wordline's metadata. A write to any address other than the
//      next free one of the wordline is refused with ST_ORDER.
//   2. Read the present levels P of the wordline with MaxLevel reference
//      comparisons. Pages 0 and 1 go to erased cells and skip this read, and
//      a wordline whose MaxLevel is 0 is known to be all zero.
//   3. Feed D, P and a to the encoder to get the target levels E; the cells
//      of the ATC set whose target is above their present level are to be
//      raised.
//   4. Program-verify: one pulse on the cells still to be raised, then one
//      reference comparison for each distinct target level of this write, in
//      ascending order; a cell that verifies at its target is inhibited.
//      Repeat until no cell is left, or give up with ST_PGM_FAIL after
//      MAX_PULSES pulses.
//   5. Store the new MaxLevel and the next free address of the wordline.
// Read (address a of wordline w): MaxLevel comparisons give each cell's level
// (the count of references it reaches), which the decoder turns into D.
// Erase (wordline w): erases the cells and clears the metadata entry.
//
// Host side: a request is taken when req_valid and req_ready are high; one
// cycle with resp_valid high ends it, giving the status, read data, the
// number of reference comparisons of the read or the pre-write read, and the
// number of program pulses. Array side: see mlc_array_model. Each array
// command costs its own duration plus one cycle of hand-off.
// The flow follows the published write and read flows; skipping the read for
// the first two pages and verifying every target level after each pulse match
// the published latency analysis. The order check, the pulse limit, the
// handshakes and the use of the actual highest programmed level (rather than
// the highest allowed one) as MaxLevel are this design's choices.
// Lint notes that rst_n is used both as the flops' asynchronous reset and,
// sampled, in the handshake assertion's disable condition; that is intended.
module mmlp_controller
  import mmlp_pkg::*;
#(
  parameter int unsigned SLICES     = 1,
  parameter int unsigned NUM_WL     = 8,
  parameter int unsigned MAX_PULSES = 64,
  localparam int unsigned CELLS     = 4 * SLICES,
  localparam int unsigned PAGE_BITS = 2 * SLICES,
  localparam int unsigned WL_W      = (NUM_WL > 1) ? $clog2(NUM_WL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host requests
  input  logic                 req_valid,
  output logic                 req_ready,
  input  op_e                  req_op,
  input  logic [WL_W-1:0]      req_wl,
  input  logic [1:0]           req_addr,
  input  logic [PAGE_BITS-1:0] req_data,
  // host responses
  output logic                 resp_valid,
  output status_e              resp_status,
  output logic [PAGE_BITS-1:0] resp_data,
  output logic [1:0]           resp_ncmp,
  output logic [7:0]           resp_npulses,
  // address-to-cells mapping, encoder and decoder
  output logic [1:0]           cur_addr,
  output logic [PAGE_BITS-1:0] cur_data,
  output level_t               cur_lv [CELLS],
  input  logic [CELLS-1:0]     atc_mask,
  input  level_t               atc_cap,
  input  level_t               enc_e [CELLS],
  input  logic [PAGE_BITS-1:0] dec_d,
  // MaxLevel table
  output logic [WL_W-1:0]      meta_rd_wl,
  input  level_t               meta_rd_max,
  input  logic [2:0]           meta_rd_next,
  output logic                 meta_we,
  output logic [WL_W-1:0]      meta_wr_wl,
  output level_t               meta_wr_max,
  output logic [2:0]           meta_wr_next,
  // cell array
  output logic                 a_valid,
  input  logic                 a_ready,
  output acmd_e                a_cmd,
  output logic [WL_W-1:0]      a_wl,
  output logic [CELLS-1:0]     a_mask,
  output level_t               a_ref,
  input  logic                 a_done,
  input  logic [CELLS-1:0]     a_sense
);

  typedef enum logic [3:0] {
    S_IDLE, S_META, S_RD_ISSUE, S_RD_WAIT, S_ENC, S_PGM_ISSUE, S_PGM_WAIT,
    S_VFY_ISSUE, S_VFY_WAIT, S_META_UPD, S_DEC, S_ERS_ISSUE, S_ERS_WAIT
  } state_e;

  state_e               state;
  op_e                  op_q;
  logic [WL_W-1:0]      wl_q;
  logic [1:0]           addr_q;
  logic [PAGE_BITS-1:0] data_q;
  level_t               maxlvl_q;
  level_t               ref_q;        // reference now being compared
  level_t               lv_q  [CELLS]; // present levels P, then sensed levels E
  level_t               tgt_q [CELLS]; // target levels of the write
  logic [CELLS-1:0]     pend_q;       // cells still to be raised
  logic [3:1]           vset_q;       // target levels verified after each pulse
  logic [7:0]           npulses_q;

  // Next verify reference above ref_q, if any.
  logic                 vfy_more;
  level_t               vfy_next;
  logic [CELLS-1:0]     pend_after_vfy;
  level_t               wr_max;

  always_comb begin
    vfy_more = 1'b0;
    vfy_next = ref_q;
    for (int l = 3; l >= 1; l--)
      if (vset_q[l] && level_t'(l) > ref_q) begin
        vfy_more = 1'b1;
        vfy_next = level_t'(l);
      end
    for (int c = 0; c < int'(CELLS); c++)
      pend_after_vfy[c] = pend_q[c] && !(a_sense[c] && tgt_q[c] == ref_q);
    wr_max = maxlvl_q;
    for (int c = 0; c < int'(CELLS); c++)
      if (atc_mask[c] && tgt_q[c] > wr_max) wr_max = tgt_q[c];
  end

  assign req_ready    = (state == S_IDLE);
  assign cur_addr     = addr_q;
  assign cur_data     = data_q;
  assign cur_lv       = lv_q;
  assign meta_rd_wl   = wl_q;
  assign meta_wr_wl   = wl_q;
  assign meta_we      = (state == S_META_UPD) || (state == S_ERS_WAIT && a_done);
  assign meta_wr_max  = (state == S_META_UPD) ? wr_max : level_t'(0);
  assign meta_wr_next = (state == S_META_UPD) ? 3'(addr_q) + 3'd1 : 3'd0;

  assign a_wl    = wl_q;
  assign a_valid = (state == S_RD_ISSUE) || (state == S_PGM_ISSUE && npulses_q < 8'(MAX_PULSES)) ||
                   (state == S_VFY_ISSUE) || (state == S_ERS_ISSUE);
  assign a_cmd   = (state == S_PGM_ISSUE) ? ACMD_PULSE :
                   (state == S_ERS_ISSUE) ? ACMD_ERASE : ACMD_SENSE;
  assign a_mask  = pend_q;
  assign a_ref   = ref_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      op_q         <= OP_READ;
      wl_q         <= '0;
      addr_q       <= '0;
      data_q       <= '0;
      maxlvl_q     <= '0;
      ref_q        <= '0;
      pend_q       <= '0;
      vset_q       <= '0;
      npulses_q    <= '0;
      resp_valid   <= 1'b0;
      resp_status  <= ST_OK;
      resp_data    <= '0;
      resp_ncmp    <= '0;
      resp_npulses <= '0;
      for (int c = 0; c < int'(CELLS); c++) begin
        lv_q[c]  <= '0;
        tgt_q[c] <= '0;
      end
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          op_q      <= req_op;
          wl_q      <= req_wl;
          addr_q    <= req_addr;
          data_q    <= req_data;
          npulses_q <= '0;
          pend_q    <= '0;
          vset_q    <= '0;
          ref_q     <= level_t'(1);
          for (int c = 0; c < int'(CELLS); c++) lv_q[c] <= '0;
          state     <= S_META;
        end

        S_META: begin
          maxlvl_q  <= meta_rd_max;
          resp_ncmp <= '0;
          if (op_q == OP_ERASE) begin
            state <= S_ERS_ISSUE;
          end else if (op_q == OP_WRITE) begin
            if (meta_rd_next != 3'(addr_q)) begin
              resp_valid   <= 1'b1;
              resp_status  <= ST_ORDER;
              resp_data    <= '0;
              resp_npulses <= '0;
              state        <= S_IDLE;
            end else if (addr_q < 2 || meta_rd_max == 0) begin
              state <= S_ENC;
            end else begin
              resp_ncmp <= meta_rd_max;
              state     <= S_RD_ISSUE;
            end
          end else begin
            resp_ncmp <= meta_rd_max;
            state     <= (meta_rd_max == 0) ? S_DEC : S_RD_ISSUE;
          end
        end

        S_RD_ISSUE: if (a_ready) state <= S_RD_WAIT;

        S_RD_WAIT: if (a_done) begin
          for (int c = 0; c < int'(CELLS); c++)
            if (a_sense[c]) lv_q[c] <= lv_q[c] + level_t'(1);
          if (ref_q == maxlvl_q) begin
            state <= (op_q == OP_WRITE) ? S_ENC : S_DEC;
          end else begin
            ref_q <= ref_q + level_t'(1);
            state <= S_RD_ISSUE;
          end
        end

        S_ENC: begin
          logic [CELLS-1:0] pend;
          logic [3:1]       vset;
          vset = '0;
          for (int c = 0; c < int'(CELLS); c++) begin
            tgt_q[c] <= enc_e[c];
            pend[c]  = atc_mask[c] && (enc_e[c] > lv_q[c]);
            if (pend[c]) vset[enc_e[c]] = 1'b1;
          end
          pend_q <= pend;
          vset_q <= vset;
          state  <= (pend != 0) ? S_PGM_ISSUE : S_META_UPD;
        end

        S_PGM_ISSUE: begin
          if (npulses_q >= 8'(MAX_PULSES)) begin
            state <= S_META_UPD;
          end else if (a_ready) begin
            npulses_q <= npulses_q + 8'd1;
            state     <= S_PGM_WAIT;
          end
        end

        S_PGM_WAIT: if (a_done) begin
          ref_q <= level_t'(0);
          for (int l = 3; l >= 1; l--)
            if (vset_q[l]) ref_q <= level_t'(l);
          state <= S_VFY_ISSUE;
        end

        S_VFY_ISSUE: if (a_ready) state <= S_VFY_WAIT;

        S_VFY_WAIT: if (a_done) begin
          pend_q <= pend_after_vfy;
          if (vfy_more) begin
            ref_q <= vfy_next;
            state <= S_VFY_ISSUE;
          end else if (pend_after_vfy == 0) begin
            state <= S_META_UPD;
          end else begin
            state <= S_PGM_ISSUE;
          end
        end

        S_META_UPD: begin
          resp_valid   <= 1'b1;
          resp_status  <= (pend_q != 0) ? ST_PGM_FAIL : ST_OK;
          resp_data    <= '0;
          resp_npulses <= npulses_q;
          state        <= S_IDLE;
        end

        S_DEC: begin
          resp_valid   <= 1'b1;
          resp_status  <= ST_OK;
          resp_data    <= dec_d;
          resp_npulses <= '0;
          state        <= S_IDLE;
        end

        S_ERS_ISSUE: if (a_ready) state <= S_ERS_WAIT;

        S_ERS_WAIT: if (a_done) begin
          resp_valid   <= 1'b1;
          resp_status  <= ST_OK;
          resp_data    <= '0;
          resp_npulses <= '0;
          state        <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The encoder never lowers a cell, never touches a cell outside the ATC
  // set, and never goes above the page's level limit.
  always_ff @(posedge clk) begin
    if (state == S_ENC) begin
      for (int c = 0; c < int'(CELLS); c++) begin
        assert (enc_e[c] >= lv_q[c]) else $error("encoder lowered cell %0d", c);
        assert (atc_mask[c] || enc_e[c] == lv_q[c]) else $error("encoder changed cell %0d outside C", c);
        assert (!atc_mask[c] || enc_e[c] <= atc_cap) else $error("cell %0d above level limit", c);
      end
    end
  end

  // Host handshake: a waiting request is held steady.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req_op) && $stable(req_wl) &&
                                  $stable(req_addr) && $stable(req_data);
  endproperty
  a_req_stable: assert property (p_req_stable) else $error("host request changed while waiting");

endmodule
