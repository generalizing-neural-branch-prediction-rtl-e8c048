// predict_output -- the critical path of the ahead-pipelined predictor: a
// multiplexer that picks one of the n finished partial sums and an adder that
// adds the bias weight of the branch being predicted.
//
// The n candidate sums are column h of the speculative shift matrix, one per
// possible value of the branch address modulo n. Once the address is known,
// lane = address mod n selects both the candidate sum and the bias weight
// W[lane][address mod m][0] out of the bias block read from weight bank 0.
// The branch is predicted taken when the sum is at least zero. The output
// is SBITS+1 bits wide so the addition cannot overflow. Purely
// combinational; the surrounding pipeline registers its inputs.
// The function follows the source description; the output width is this
// design's choice.
module predict_output #(
  parameter int unsigned N     = plbp_pkg::N_DEFAULT,
  parameter int unsigned WBITS = plbp_pkg::WBITS_DEFAULT,
  parameter int unsigned SBITS = plbp_pkg::SBITS_DEFAULT,
  localparam int unsigned LW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][SBITS-1:0]  last_sums,   // column h of SR, one per row
  input  logic [N-1:0][WBITS-1:0]  bias_block,  // block read from bank 0
  input  logic [LW-1:0]            lane,        // branch address mod n
  output logic signed [SBITS:0]    sum,         // perceptron output
  output logic                     taken
);

  logic signed [SBITS-1:0] partial;
  logic signed [WBITS-1:0] bias;

  assign partial = $signed(last_sums[lane]);
  assign bias    = $signed(bias_block[lane]);
  assign sum     = (SBITS+1)'(partial) + (SBITS+1)'(bias);
  assign taken   = !sum[SBITS];

endmodule
