// train_unit -- decides whether a resolved branch trains the predictor and,
// if so, issues one saturating increment or decrement to each of the h+1
// weight banks.
//
// Training happens when the branch was mispredicted or when the magnitude
// of the predictor output that produced its prediction is below the
// threshold THETA = floor(2.14 * (h + 1) + 20.58). Then, for a branch with
// address modulo n = lane and modulo m = row:
//   * bank 0 (bias weight W[lane][row][0]) counts up if the branch was
//     taken and down otherwise;
//   * bank k = 1..h (weight W[lane][ga[k-1]][k]) counts up if history bit
//     ghr[k-1] agrees with the outcome and down otherwise.
// All h+1 commands use the same lane, so the banks update in parallel.
//
// Interface and timing: purely combinational. The inputs are the resolved
// branch (from the head of the in-flight queue) and the nonspeculative path
// history before that branch is shifted into it; the outputs drive the
// training ports of the weight banks in the same cycle. The block and lane
// outputs are the history addresses and the branch lane passed through
// unchanged: bank k's block is simply GA at position k.
// The rule follows the source description; the rounding of THETA is this
// design's choice.
module train_unit #(
  parameter int unsigned H     = plbp_pkg::H_DEFAULT,
  parameter int unsigned N     = plbp_pkg::N_DEFAULT,
  parameter int unsigned M     = plbp_pkg::M_DEFAULT,
  parameter int unsigned SBITS = plbp_pkg::SBITS_DEFAULT,
  parameter int unsigned THETA = plbp_pkg::theta_of(H),
  localparam int unsigned RW   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned LW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                   valid,      // a branch resolves this cycle
  input  logic                   taken,      // its outcome
  input  logic                   predicted,  // the prediction made for it
  input  logic signed [SBITS:0]  sum,        // the output behind that prediction
  input  logic [LW-1:0]          lane,       // branch address mod n
  input  logic [RW-1:0]          row,        // branch address mod m
  input  logic [H-1:0]           ghr,
  input  logic [H-1:0][RW-1:0]   ga,
  output logic                   train,
  output logic                   mispredict,
  output logic [H:0]             upd_en,
  output logic [H:0][RW-1:0]     upd_row,
  output logic [LW-1:0]          upd_lane,
  output logic [H:0]             upd_inc
);

  logic [SBITS:0] magnitude;

  assign magnitude  = sum[SBITS] ? -sum : sum;
  assign mispredict = valid && (taken != predicted);
  assign train      = valid && ((taken != predicted) || (32'(magnitude) < THETA));
  assign upd_lane   = lane;

  always_comb begin
    upd_en     = {(H+1){train}};
    upd_row[0] = row;
    upd_inc[0] = taken;
    for (int k = 1; k <= H; k++) begin
      upd_row[k] = ga[k-1];
      upd_inc[k] = (ghr[k-1] == taken);
    end
  end

endmodule
