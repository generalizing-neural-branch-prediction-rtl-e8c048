// plbp_predictor -- ahead-pipelined piecewise linear branch predictor with a
// first-level bimodal predictor for overriding.
//
// The predictor learns, for every branch B (address modulo n) and every
// branch that may appear at history position k on the path to it (address
// modulo m), a weight W[B mod n][A mod m][k] that tracks how the outcome of
// A at that position correlates with the outcome of B. A prediction is the
// sign of the bias weight W[B mod n][B mod m][0] plus the sum, over the last
// h branches, of their weights, each added if that branch went taken and
// subtracted otherwise.
//
// Because B is not known ahead of time, the sums are built ahead: the
// speculative shift matrix SR keeps n rows of h partial sums, one row per
// possible B mod n. Each prediction reads block (address mod m) from each of
// the h+1 weight banks, finishes its own sum from column h of row (address
// mod n) plus the bias weight, and with its predicted direction advances
// every partial sum of every row by one column. The nonspeculative copy R
// advances the same way when the branch resolves, using its actual
// direction and the weights stored with it; on a misprediction SR is
// overwritten with R. Training follows the perceptron rule with threshold
// theta on the nonspeculative path history (GHR, GA).
//
// Interface and timing (one clock, active-low asynchronous reset):
//   * ready rises once the weight banks have cleared themselves (M cycles).
//   * Predict: pred_valid/pred_addr in cycle t, accepted when pred_ready.
//     l1_taken is the bimodal prediction in cycle t. In cycle t+1,
//     out_valid/out_taken/out_sum give the piecewise linear prediction and
//     out_override says it disagrees with the bimodal one. One prediction
//     per cycle is sustained.
//   * Resolve: res_valid/res_taken resolve the oldest predicted branch
//     (branches resolve in program order; the branch must have produced its
//     output in an earlier cycle). res_mispredict and res_trained are valid
//     in the same cycle. A misprediction restores SR, empties the in-flight
//     queue and discards the prediction finishing in that cycle and any
//     request presented in it: all of them are on the wrong path.
//   * inflight counts the branches predicted and not yet resolved.
// The algorithm, the bank organisation, the sizes and the overriding
// organisation follow the source description. The pipeline timing, the
// in-flight queue, the use of stored weights to advance R, the reset
// sequence and the branch address convention (pred_addr is taken as given;
// callers pass the instruction-word address) are this design's choices.
module plbp_predictor #(
  parameter int unsigned H           = plbp_pkg::H_DEFAULT,
  parameter int unsigned N           = plbp_pkg::N_DEFAULT,
  parameter int unsigned M           = plbp_pkg::M_DEFAULT,
  parameter int unsigned WBITS       = plbp_pkg::WBITS_DEFAULT,
  parameter int unsigned SBITS       = plbp_pkg::SBITS_DEFAULT,
  parameter int unsigned ADDR_W      = plbp_pkg::ADDR_W_DEFAULT,
  parameter int unsigned QDEPTH      = plbp_pkg::QDEPTH_DEFAULT,
  parameter int unsigned BIM_ENTRIES = plbp_pkg::BIM_ENTRIES_DEFAULT,
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned LW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(QDEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    ready,
  // prediction request
  input  logic                    pred_valid,
  input  logic [ADDR_W-1:0]       pred_addr,
  output logic                    pred_ready,
  output logic                    l1_taken,
  // prediction result, one cycle later
  output logic                    out_valid,
  output logic                    out_taken,
  output logic signed [SBITS:0]   out_sum,
  output logic                    out_override,
  // resolution of the oldest in-flight branch
  input  logic                    res_valid,
  input  logic                    res_taken,
  output logic                    res_mispredict,
  output logic                    res_trained,
  output logic [CW-1:0]           inflight
);

  typedef logic [N-1:0][WBITS-1:0]      block_t;
  typedef logic [H-1:0][N-1:0][WBITS-1:0] path_w_t;
  typedef logic [N-1:0][H-1:0][SBITS-1:0] matrix_t;

  typedef struct packed {
    logic [ADDR_W-1:0]     addr;
    logic                  pred;
    logic signed [SBITS:0] sum;
    path_w_t               w;
  } entry_t;

  function automatic logic [LW-1:0] mod_n(logic [ADDR_W-1:0] a);
    return LW'(a % ADDR_W'(N));
  endfunction

  function automatic logic [RW-1:0] mod_m(logic [ADDR_W-1:0] a);
    return RW'(a % ADDR_W'(M));
  endfunction

  // ---------------------------------------------------------------- state
  logic [H:0]  bank_ready;
  block_t      bank_rd [H+1];

  logic              s1_valid;
  logic [ADDR_W-1:0] s1_addr;
  logic              s1_l1;

  matrix_t sr_sums, sr_next, r_sums, r_next;  // sr_next: SR's stepped value, not needed
  path_w_t pred_w;

  entry_t              q_head;
  logic                q_empty, q_full;
  logic [CW-1:0]       q_count;

  logic [H-1:0]          ghr;
  logic [H-1:0][RW-1:0]  ga;

  logic                  kill;
  logic                  accept;
  logic                  s1_fire;
  logic [N-1:0][SBITS-1:0] last_sums;

  logic [H:0]            upd_en;
  logic [H:0][RW-1:0]    upd_row;
  logic [LW-1:0]         upd_lane;
  logic [H:0]            upd_inc;

  // ------------------------------------------------------------- control
  assign ready      = &bank_ready;
  assign kill       = res_mispredict;
  assign pred_ready = ready && (32'(q_count) + 32'(s1_valid) < QDEPTH);
  assign accept     = pred_valid && pred_ready && !kill;
  assign s1_fire    = s1_valid && !kill;
  assign inflight   = q_count + CW'(s1_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_addr  <= '0;
      s1_l1    <= 1'b0;
    end else begin
      s1_valid <= accept;
      if (accept) begin
        s1_addr <= pred_addr;
        s1_l1   <= l1_taken;
      end
    end
  end

  // --------------------------------------------------------- weight banks
  for (genvar k = 0; k <= H; k++) begin : g_bank
    weight_bank #(.N(N), .M(M), .WBITS(WBITS)) u_bank (
      .clk      (clk),
      .rst_n    (rst_n),
      .init_done(bank_ready[k]),
      .rd_en    (accept),
      .rd_row   (mod_m(pred_addr)),
      .rd_data  (bank_rd[k]),
      .upd_en   (upd_en[k]),
      .upd_row  (upd_row[k]),
      .upd_lane (upd_lane),
      .upd_inc  (upd_inc[k])
    );
    if (k > 0) begin : g_w
      assign pred_w[k-1] = bank_rd[k];
    end
  end

  // ------------------------------------------------- prediction, stage 1
  always_comb begin
    for (int i = 0; i < N; i++) last_sums[i] = sr_sums[i][H-1];
  end

  predict_output #(.N(N), .WBITS(WBITS), .SBITS(SBITS)) u_out (
    .last_sums (last_sums),
    .bias_block(bank_rd[0]),
    .lane      (mod_n(s1_addr)),
    .sum       (out_sum),
    .taken     (out_taken)
  );

  assign out_valid    = s1_fire;
  assign out_override = s1_fire && (out_taken != s1_l1);

  // Speculative matrix SR: advanced by each prediction, restored from R.
  shift_matrix #(.N(N), .H(H), .WBITS(WBITS), .SBITS(SBITS)) u_sr (
    .clk       (clk),
    .rst_n     (rst_n),
    .step_en   (s1_fire),
    .step_taken(out_taken),
    .step_w    (pred_w),
    .load_en   (kill),
    .load_val  (r_next),
    .sums      (sr_sums),
    .next_sums (sr_next)
  );

  // Nonspeculative matrix R: advanced by each resolved branch.
  shift_matrix #(.N(N), .H(H), .WBITS(WBITS), .SBITS(SBITS)) u_r (
    .clk       (clk),
    .rst_n     (rst_n),
    .step_en   (res_valid),
    .step_taken(res_taken),
    .step_w    (q_head.w),
    .load_en   (1'b0),
    .load_val  (r_sums),
    .sums      (r_sums),
    .next_sums (r_next)
  );

  // ---------------------------------------------------- in-flight branches
  branch_queue #(.T(entry_t), .DEPTH(QDEPTH)) u_queue (
    .clk      (clk),
    .rst_n    (rst_n),
    .push     (s1_fire),
    .push_data('{addr: s1_addr, pred: out_taken, sum: out_sum, w: pred_w}),
    .pop      (res_valid),
    .flush    (kill),
    .head     (q_head),
    .count    (q_count),
    .empty    (q_empty),
    .full     (q_full)
  );

  // ------------------------------------------------------------- training
  path_history #(.H(H), .M(M)) u_hist (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (res_valid),
    .taken     (res_taken),
    .addr_mod_m(mod_m(q_head.addr)),
    .ghr       (ghr),
    .ga        (ga)
  );

  train_unit #(.H(H), .N(N), .M(M), .SBITS(SBITS)) u_train (
    .valid     (res_valid),
    .taken     (res_taken),
    .predicted (q_head.pred),
    .sum       (q_head.sum),
    .lane      (mod_n(q_head.addr)),
    .row       (mod_m(q_head.addr)),
    .ghr       (ghr),
    .ga        (ga),
    .train     (res_trained),
    .mispredict(res_mispredict),
    .upd_en    (upd_en),
    .upd_row   (upd_row),
    .upd_lane  (upd_lane),
    .upd_inc   (upd_inc)
  );

  // ------------------------------------------------ first-level predictor
  bimodal_predictor #(.ENTRIES(BIM_ENTRIES), .ADDR_W(ADDR_W)) u_l1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .lookup_addr (pred_addr),
    .lookup_taken(l1_taken),
    .upd_en      (res_valid),
    .upd_addr    (q_head.addr),
    .upd_taken   (res_taken)
  );

  // A branch can only resolve after it has been predicted, and pred_ready
  // keeps the queue from overflowing.
  assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> !q_empty);
  assert property (@(posedge clk) disable iff (!rst_n) s1_fire && !res_valid |-> !q_full);

endmodule
