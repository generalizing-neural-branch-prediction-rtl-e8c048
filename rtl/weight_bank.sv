// weight_bank -- one of the h+1 independently addressable weight memories
// of the piecewise linear predictor.
//
// The weight array W[n][m][h+1] is split by its third index (the history
// position) into h+1 tagless memories. Bank k holds m blocks; block j holds
// the n weights W[0..n-1][j][k] side by side, so one read of block j
// delivers the weight for every one of the n speculative shift vectors at
// once. Bank 0 holds the bias weights, addressed with the branch address
// modulo m (block) and modulo n (lane).
//
// Interface and timing:
//   * Prediction read port: rd_en/rd_row in cycle t, the whole block on
//     rd_data in cycle t+1 (synchronous read, as in an SRAM).
//   * Training port: upd_en/upd_row/upd_lane/upd_inc in cycle t reads the
//     block; in cycle t+1 the selected weight is incremented (upd_inc = 1)
//     or decremented with saturation at the limits of a WBITS-bit signed
//     value and the entire block is written back, the other weights of the
//     block unchanged. One training command can be accepted every cycle.
//   * A read of the block being written in the same cycle returns the new
//     block (write-first bypass), so back-to-back training of one weight and
//     a prediction read right after a training both see up-to-date values.
//   * After reset the bank clears itself one block per cycle; init_done
//     rises after M cycles. Commands given before that are ignored.
// Splitting W by history position and writing back whole blocks follow the
// source description; the two-cycle read-modify-write, the bypass and the
// clearing sweep are this design's choices.
module weight_bank #(
  parameter int unsigned N     = plbp_pkg::N_DEFAULT,
  parameter int unsigned M     = plbp_pkg::M_DEFAULT,
  parameter int unsigned WBITS = plbp_pkg::WBITS_DEFAULT,
  localparam int unsigned RW   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned LW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  output logic                            init_done,
  // prediction read port
  input  logic                            rd_en,
  input  logic [RW-1:0]                   rd_row,
  output logic [N-1:0][WBITS-1:0]         rd_data,
  // training read-modify-write port
  input  logic                            upd_en,
  input  logic [RW-1:0]                   upd_row,
  input  logic [LW-1:0]                   upd_lane,
  input  logic                            upd_inc
);

  typedef logic [N-1:0][WBITS-1:0] block_t;

  block_t mem [M];

  logic [RW-1:0] init_row;

  // second stage of the training read-modify-write
  logic          s1_valid;
  logic [RW-1:0] s1_row;
  logic [LW-1:0] s1_lane;
  logic          s1_inc;
  block_t        s1_data;

  logic          wr_en;
  logic [RW-1:0] wr_row;
  block_t        wr_data;

  // Saturating +1 / -1 on one signed weight.
  function automatic logic [WBITS-1:0] step_weight(logic [WBITS-1:0] w, logic inc);
    logic signed [WBITS-1:0] ws;
    ws = $signed(w);
    if (inc) return (ws == $signed({1'b0, {(WBITS-1){1'b1}}})) ? w : w + 1'b1;
    else     return (ws == $signed({1'b1, {(WBITS-1){1'b0}}})) ? w : w - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_row  <= '0;
    end else if (!init_done) begin
      if (init_row == RW'(M - 1)) init_done <= 1'b1;
      else                        init_row  <= init_row + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_row   <= '0;
      s1_lane  <= '0;
      s1_inc   <= 1'b0;
    end else begin
      s1_valid <= upd_en && init_done;
      s1_row   <= upd_row;
      s1_lane  <= upd_lane;
      s1_inc   <= upd_inc;
    end
  end

  always_comb begin
    wr_en   = 1'b0;
    wr_row  = s1_row;
    wr_data = s1_data;
    if (!init_done) begin
      wr_en   = 1'b1;
      wr_row  = init_row;
      wr_data = '0;
    end else if (s1_valid) begin
      wr_en   = 1'b1;
      wr_data[s1_lane] = step_weight(s1_data[s1_lane], s1_inc);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
    if (rd_en)  rd_data <= (wr_en && wr_row == rd_row)  ? wr_data : mem[rd_row];
    if (upd_en) s1_data <= (wr_en && wr_row == upd_row) ? wr_data : mem[upd_row];
  end

  // Rows are branch addresses modulo M, lanes modulo N.
  assert property (@(posedge clk) disable iff (!rst_n) rd_en  |-> 32'(rd_row)  < M);
  assert property (@(posedge clk) disable iff (!rst_n) upd_en |-> 32'(upd_row) < M);
  assert property (@(posedge clk) disable iff (!rst_n) upd_en |-> 32'(upd_lane) < N);

endmodule
