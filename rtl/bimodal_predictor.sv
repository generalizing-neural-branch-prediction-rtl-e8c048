// bimodal_predictor -- the single-cycle first level of a two-level
// overriding predictor: a table of 2-bit saturating counters indexed by the
// branch address.
//
// The slow piecewise linear predictor is paired with this fast table. The
// fast prediction steers fetch at once; when the piecewise linear
// prediction arrives and disagrees, the fetched instructions are dropped and
// fetch follows the other path. Each counter predicts taken in its upper
// two states, counts up on a taken outcome and down on a not-taken one,
// saturating at 0 and 3.
//
// Interface and timing: lookup is combinational (lookup_addr to
// lookup_taken in the same cycle). With upd_en the counter for upd_addr
// moves at the next edge. Reset puts every counter in the weakly-not-taken
// state.
// The 2K-entry size follows the source description; the counter encoding,
// the index (address modulo ENTRIES) and the reset state are this design's
// choices.
module bimodal_predictor #(
  parameter int unsigned ENTRIES = plbp_pkg::BIM_ENTRIES_DEFAULT,
  parameter int unsigned ADDR_W  = plbp_pkg::ADDR_W_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] lookup_addr,
  output logic              lookup_taken,
  input  logic              upd_en,
  input  logic [ADDR_W-1:0] upd_addr,
  input  logic              upd_taken
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [1:0]    ctr [ENTRIES];
  logic [IW-1:0] lookup_idx, upd_idx;

  assign lookup_idx   = IW'(lookup_addr % ADDR_W'(ENTRIES));
  assign upd_idx      = IW'(upd_addr % ADDR_W'(ENTRIES));
  assign lookup_taken = ctr[lookup_idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ctr[e] <= 2'b01;
    end else if (upd_en) begin
      if (upd_taken && ctr[upd_idx] != 2'b11)       ctr[upd_idx] <= ctr[upd_idx] + 2'b01;
      else if (!upd_taken && ctr[upd_idx] != 2'b00) ctr[upd_idx] <= ctr[upd_idx] - 2'b01;
    end
  end

endmodule
