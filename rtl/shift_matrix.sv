// shift_matrix -- an n x h matrix of partial sums and the n x h adders
// that advance it, used twice in the predictor: as the speculative matrix
// SR and as its nonspeculative copy R.
//
// Row i of the matrix is the shift vector for a future branch whose address
// modulo n is i; column c (1..h, stored at index c-1) holds the partial sum
// of the prediction that will be made c steps after it entered at column 1.
// Column 0 of the algorithm is always zero and is not stored. One step, for
// a branch with direction d whose weight block row was read from every
// weight bank, computes for every row i and column c in parallel
//     S'[i][c] = S[i][c-1] + W[i][j][h-c+1]   if d is taken
//     S'[i][c] = S[i][c-1] - W[i][j][h-c+1]   otherwise
// with S[i][0] = 0, so that column h, after h steps, holds the sum over the
// last h branches of their signed weights. The sums saturate at the limits
// of an SBITS-bit signed value.
//
// Interface and timing: step_w[k-1][i] carries W[i][j][k] for k = 1..h.
// With step_en the matrix takes the stepped value at the next clock edge;
// load_en (higher priority) instead copies load_val into the matrix, which is
// how SR is restored from R after a misprediction. next_sums is the value
// the matrix will take from stepping (or its present value when step_en is
// low), available in the same cycle for restoring another matrix. Reset
// clears every sum.
// The recurrence and the 10-bit width follow the source description;
// saturation of the partial sums is this design's choice.
module shift_matrix #(
  parameter int unsigned N     = plbp_pkg::N_DEFAULT,
  parameter int unsigned H     = plbp_pkg::H_DEFAULT,
  parameter int unsigned WBITS = plbp_pkg::WBITS_DEFAULT,
  parameter int unsigned SBITS = plbp_pkg::SBITS_DEFAULT
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                step_en,
  input  logic                                step_taken,
  input  logic [H-1:0][N-1:0][WBITS-1:0]      step_w,
  input  logic                                load_en,
  input  logic [N-1:0][H-1:0][SBITS-1:0]      load_val,
  output logic [N-1:0][H-1:0][SBITS-1:0]      sums,
  output logic [N-1:0][H-1:0][SBITS-1:0]      next_sums
);

  logic [N-1:0][H-1:0][SBITS-1:0] stepped;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int c = 1; c <= H; c++) begin
        int prev, w;
        prev = (c == 1) ? 0 : int'($signed(sums[i][c-2]));
        w    = int'($signed(step_w[H-c][i]));
        stepped[i][c-1] = SBITS'(plbp_pkg::clamp(step_taken ? prev + w : prev - w, SBITS));
      end
    end
  end

  assign next_sums = step_en ? stepped : sums;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sums <= '0;
    else if (load_en) sums <= load_val;
    else              sums <= next_sums;
  end

endmodule
