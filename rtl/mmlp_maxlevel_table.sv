// mmlp_maxlevel_table: per-wordline MMLP metadata.
//
// One entry per wordline holds MaxLevel, the highest level any cell of the
// wordline has been programmed to, and the address of the next page that may
// be written there (pages are programmed in order). MaxLevel sets how many
// reference comparisons a read needs. The table is a flip-flop array with a
// combinational read port and one synchronous write port; reset, and erase of
// a wordline, set entries to MaxLevel 0 and next address 0.
// Storing MaxLevel per wordline follows the published scheme; keeping the
// next-address field here, and the read/write port timing, are this
// design's choices.
module mmlp_maxlevel_table
  import mmlp_pkg::*;
#(
  parameter int unsigned NUM_WL = 8,
  localparam int unsigned WL_W = (NUM_WL > 1) ? $clog2(NUM_WL) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [WL_W-1:0] rd_wl,
  output level_t          rd_max_level,
  output logic [2:0]      rd_next_addr,  // 0..3, or 4 when the wordline is full
  input  logic            we,
  input  logic [WL_W-1:0] wr_wl,
  input  level_t          wr_max_level,
  input  logic [2:0]      wr_next_addr
);

  level_t     max_level [NUM_WL];
  logic [2:0] next_addr [NUM_WL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_WL); i++) begin
        max_level[i] <= '0;
        next_addr[i] <= '0;
      end
    end else if (we) begin
      max_level[wr_wl] <= wr_max_level;
      next_addr[wr_wl] <= wr_next_addr;
    end
  end

  assign rd_max_level = max_level[rd_wl];
  assign rd_next_addr = next_addr[rd_wl];

endmodule
