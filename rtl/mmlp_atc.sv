// mmlp_atc: address-to-cells (ATC) mapping of MMLP.
//
// Given the address of a data page inside its wordline (physical page), it
// returns the set of cells C that hold the page, as a mask over the wordline,
// and the highest level the write of that page may use. Purely combinational.
//
// The wordline is built from SLICES identical slices, one per two data bits;
// each slice is mapped the same way, which is how the mapping grows to larger
// pages. Addresses are numbered from 0 here (address 0 is the first page).
//
// LEVELS = 4 (default): 4 cells per slice and 4 pages per wordline.
//   page 0 -> cells 0,1   page 1 -> cells 2,3   pages 2,3 -> cells 0..3
//   level limit 1, 1, 2, 3.
// LEVELS = 8: 8 cells per slice and 12 pages per wordline.
//   pages 0..3 -> cells {2a, 2a+1}; pages 4,6 -> cells 0..3; pages 5,7 -> cells 4..7;
//   pages 8..11 -> cells 0..7; level limit 1,1,1,1, 2,2, 3,3, 4, 5, 6, 7.
// The cell sets and level limits follow the published mappings; the 0-based
// numbering and the slice replication are this design's choices.
// With LEVELS = 4 every 2-bit address is a page, so addr_ok is then constant 1;
// it only flags addresses 12..15 when LEVELS = 8.
module mmlp_atc #(
  parameter int unsigned LEVELS = 4,
  parameter int unsigned SLICES = 1,
  localparam int unsigned CPS    = (LEVELS == 8) ? 8 : 4,        // cells per slice
  localparam int unsigned PAGES  = (LEVELS == 8) ? 12 : 4,       // pages per wordline
  localparam int unsigned CELLS  = CPS * SLICES,
  localparam int unsigned ADDR_W = $clog2(PAGES),
  localparam int unsigned LVL_W  = $clog2(LEVELS)
) (
  input  logic [ADDR_W-1:0] addr,
  output logic              addr_ok,   // address exists in a wordline
  output logic [CELLS-1:0]  cell_mask, // bit i set: cell i belongs to C
  output logic [LVL_W-1:0]  level_cap  // highest level this page's write may use
);

  logic [CPS-1:0] slice_mask;

  initial begin
    assert (LEVELS == 4 || LEVELS == 8)
      else $fatal(1, "mmlp_atc: only 4- and 8-level cells have a defined mapping");
  end

  always_comb begin
    slice_mask = '0;
    level_cap  = '0;
    addr_ok    = (32'(addr) < PAGES);
    if (LEVELS == 8) begin
      if (32'(addr) < 4) begin
        slice_mask[2*addr]   = 1'b1;
        slice_mask[2*addr+1] = 1'b1;
        level_cap = LVL_W'(1);
      end else if (32'(addr) < 8) begin
        slice_mask = addr[0] ? CPS'(8'hF0) : CPS'(8'h0F);
        level_cap  = (32'(addr) < 6) ? LVL_W'(2) : LVL_W'(3);
      end else if (32'(addr) < 12) begin
        slice_mask = '1;
        level_cap  = LVL_W'(32'(addr) - 4);
      end
    end else begin
      unique case (addr[1:0])
        2'd0: begin slice_mask = CPS'(4'b0011); level_cap = LVL_W'(1); end
        2'd1: begin slice_mask = CPS'(4'b1100); level_cap = LVL_W'(1); end
        2'd2: begin slice_mask = CPS'(4'b1111); level_cap = LVL_W'(2); end
        default: begin slice_mask = CPS'(4'b1111); level_cap = LVL_W'(3); end
      endcase
    end
  end

  assign cell_mask = {SLICES{slice_mask}};

endmodule
