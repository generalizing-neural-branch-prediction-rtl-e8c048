// plbp_tb_driver -- stimulus, reference model and checker for the piecewise
// linear predictor, shared by the reduced-size and the full-size testbench.
//
// The driver owns the clock and reset. It builds a synthetic branch trace
// of eight static branches with different behaviours (always taken, never
// taken, alternating, a 3-of-4 loop, branches equal to or the exclusive-or
// of earlier outcomes in the same iteration, a random one and a copy of
// it), fetches it in order, and resolves the oldest in-flight branch with its
// trace outcome. On a misprediction fetch restarts right after the
// mispredicted branch, as a processor would refetch the squashed path.
//
// The reference model is an independent transaction-level implementation of
// the ahead-pipelined algorithm: a full W array, the SR and R matrices, GHR
// and GA, the in-flight list and the bimodal counters. Each cycle the
// driver compares every output of the predictor with the model: the bimodal
// prediction, the piecewise linear prediction and its sum, the override
// flag, pred_ready, the misprediction and training flags. It also counts
// how often each mechanism occurs (overrides, recoveries, both training
// causes, full-queue stalls, same-cycle predict and resolve, weight and
// partial-sum saturation) and fails any that never occurs, checks that the
// predictor learns (misprediction rate on the last quarter of the trace),
// the initialisation time and the one-cycle prediction latency.
module plbp_tb_driver #(
  parameter int unsigned H           = plbp_pkg::H_DEFAULT,
  parameter int unsigned N           = plbp_pkg::N_DEFAULT,
  parameter int unsigned M           = plbp_pkg::M_DEFAULT,
  parameter int unsigned WBITS       = plbp_pkg::WBITS_DEFAULT,
  parameter int unsigned SBITS       = plbp_pkg::SBITS_DEFAULT,
  parameter int unsigned ADDR_W      = plbp_pkg::ADDR_W_DEFAULT,
  parameter int unsigned QDEPTH      = plbp_pkg::QDEPTH_DEFAULT,
  parameter int unsigned BIM_ENTRIES = plbp_pkg::BIM_ENTRIES_DEFAULT,
  parameter int unsigned TRACE_LEN   = 4000,
  parameter int unsigned MAX_CYCLES  = 100000,
  parameter int          MAX_LATE_MISS_PCT = 25,
  parameter bit          REQUIRE_SATURATION = 1'b1,
  // STANDALONE = 0: do not print the result or finish; set finished and let
  // the enclosing testbench collect checks and failures
  parameter bit          STANDALONE = 1'b1,
  localparam int unsigned CW = $clog2(QDEPTH + 1)
) (
  output logic                    clk,
  output logic                    rst_n,
  input  logic                    ready,
  output logic                    pred_valid,
  output logic [ADDR_W-1:0]       pred_addr,
  input  logic                    pred_ready,
  input  logic                    l1_taken,
  input  logic                    out_valid,
  input  logic                    out_taken,
  input  logic signed [SBITS:0]   out_sum,
  input  logic                    out_override,
  output logic                    res_valid,
  output logic                    res_taken,
  input  logic                    res_mispredict,
  input  logic                    res_trained,
  input  logic [CW-1:0]           inflight
);

  localparam int THETA = int'(plbp_pkg::theta_of(H));
  localparam int NSTATIC = 8;

  bit finished = 1'b0;
  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // ------------------------------------------------------------- trace
  typedef struct {
    int unsigned addr;
    bit          taken;
  } br_t;
  br_t trace [TRACE_LEN];

  function automatic int unsigned static_addr(int s);
    return 32'h0000_1040 + 32'(s) * 32'd37;
  endfunction

  task automatic build_trace();
    bit o [NSTATIC];
    int iter = 0;
    int p = 0;
    while (p < int'(TRACE_LEN)) begin
      o[0] = 1'b1;
      o[1] = iter[0];
      o[2] = o[1];
      o[3] = (iter % 4) != 3;
      o[4] = o[1] ^ o[3];
      o[5] = 1'($urandom_range(0, 1));
      o[6] = 1'b0;
      o[7] = o[5];
      for (int s = 0; s < NSTATIC && p < int'(TRACE_LEN); s++) begin
        trace[p].addr  = static_addr(s);
        trace[p].taken = o[s];
        p++;
      end
      iter++;
    end
  endtask

  // ----------------------------------------------------- reference model
  int W [N][M][H+1];
  int SR [N][H+1];
  int R  [N][H+1];
  bit GHR [H+1];   // positions 1..H
  int GA  [H+1];
  int BIM [BIM_ENTRIES];

  typedef struct {
    int idx;       // trace position
    int addr;
    bit pred;
    int sum;
    bit l1;
    int ws [N][H+1];
  } ent_t;
  ent_t q [$];

  int n_psum_sat = 0, n_w_sat = 0;

  function automatic int clampm(int v, int bits);
    int hi = (1 <<< (bits - 1)) - 1;
    int lo = -(1 <<< (bits - 1));
    if (v > hi) begin n_psum_sat++; return hi; end
    if (v < lo) begin n_psum_sat++; return lo; end
    return v;
  endfunction

  function automatic int wstep(int w, bit inc);
    int hi = (1 <<< (WBITS - 1)) - 1;
    int lo = -(1 <<< (WBITS - 1));
    if (inc) begin if (w == hi) begin n_w_sat++; return w; end return w + 1; end
    if (w == lo) begin n_w_sat++; return w; end
    return w - 1;
  endfunction

  task automatic model_reset();
    foreach (W[i, j, k]) W[i][j][k] = 0;
    foreach (SR[i, c]) begin SR[i][c] = 0; R[i][c] = 0; end
    foreach (GHR[p]) begin GHR[p] = 0; GA[p] = 0; end
    foreach (BIM[e]) BIM[e] = 1;
    q.delete();
  endtask

  task automatic model_predict(int idx, int addr, bit l1, output ent_t e);
    int i = addr % N;
    int j = addr % M;
    e.idx  = idx;
    e.addr = addr;
    e.l1   = l1;
    e.sum  = SR[i][H] + W[i][j][0];
    e.pred = (e.sum >= 0);
    for (int ii = 0; ii < N; ii++) begin
      for (int k = 1; k <= H; k++) e.ws[ii][k] = W[ii][j][k];
      for (int c = H; c >= 1; c--)
        SR[ii][c] = clampm(e.pred ? SR[ii][c-1] + W[ii][j][H-c+1]
                                  : SR[ii][c-1] - W[ii][j][H-c+1], SBITS);
      SR[ii][0] = 0;
    end
    q.push_back(e);
  endtask

  // Returns 1 on a misprediction.
  task automatic model_resolve(bit taken, output bit mis, output bit trained, output int idx);
    ent_t e = q.pop_front();
    int i = e.addr % N;
    int j = e.addr % M;
    int mag = (e.sum < 0) ? -e.sum : e.sum;
    idx = e.idx;
    mis = (taken != e.pred);
    trained = mis || (mag < THETA);
    if (trained) begin
      W[i][j][0] = wstep(W[i][j][0], taken);
      for (int k = 1; k <= H; k++)
        W[i][GA[k]][k] = wstep(W[i][GA[k]][k], GHR[k] == taken);
    end
    for (int ii = 0; ii < N; ii++) begin
      for (int c = H; c >= 1; c--)
        R[ii][c] = clampm(taken ? R[ii][c-1] + e.ws[ii][H-c+1]
                                : R[ii][c-1] - e.ws[ii][H-c+1], SBITS);
      R[ii][0] = 0;
    end
    for (int p = H; p >= 2; p--) begin GHR[p] = GHR[p-1]; GA[p] = GA[p-1]; end
    GHR[1] = taken;
    GA[1]  = j;
    begin
      int b = e.addr % BIM_ENTRIES;
      if (taken && BIM[b] < 3) BIM[b]++;
      else if (!taken && BIM[b] > 0) BIM[b]--;
    end
    if (mis) begin
      SR = R;
      q.delete();
    end
  endtask

  // ------------------------------------------------------------- checking
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // mechanism counters
  int n_pred = 0, n_override = 0, n_recover = 0, n_train_theta = 0, n_train_miss = 0;
  int n_full = 0, n_both = 0, n_resolved = 0, late_miss = 0, late_total = 0;

  // watchdog
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (MAX_CYCLES + 2000) @(posedge clk);
    failures++;
    finished = 1'b1;
    if (!STANDALONE) wait (0);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  fetch_ptr;
    bit  prev_acc;
    bit  dut_prev_acc;
    ent_t prev_e;
    int  init_cycles;
    bit  drain;

    build_trace();
    model_reset();
    rst_n = 1'b0;
    pred_valid = 1'b0;
    pred_addr = '0;
    res_valid = 1'b0;
    res_taken = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // initialisation: the banks clear one block per cycle
    init_cycles = 0;
    while (!ready) begin
      @(posedge clk);
      #1 init_cycles++;
      if (init_cycles > int'(M) + 10) break;
    end
    check(init_cycles == int'(M), $sformatf("ready after %0d cycles, expected %0d", init_cycles, M));

    fetch_ptr = 0;
    prev_acc = 1'b0;
    dut_prev_acc = 1'b0;
    drain = 1'b0;
    while (cycle < int'(MAX_CYCLES)) begin
      int  resolvable;
      int  rate;
      bit  mis_now;
      // ---- drive this cycle's inputs
      // never resolve more than the predictor itself holds, so that a
      // broken predictor shows up as failed checks rather than a protocol error
      resolvable = q.size() - (prev_acc ? 1 : 0);
      if (int'(inflight) - (dut_prev_acc ? 1 : 0) < resolvable)
        resolvable = int'(inflight) - (dut_prev_acc ? 1 : 0);
      rate = ((cycle / 150) % 2 == 0) ? 25 : 75;   // slow and fast resolve phases
      if (fetch_ptr >= int'(TRACE_LEN)) drain = 1'b1;
      pred_valid = !drain && ($urandom_range(0, 99) < 85);
      pred_addr  = ADDR_W'(trace[drain ? 0 : fetch_ptr].addr);
      res_valid  = (resolvable > 0) && (drain || $urandom_range(0, 99) < rate);
      res_taken  = res_valid ? trace[q[0].idx].taken : 1'b0;
      if (drain && !res_valid && resolvable <= 0 && q.size() > int'(prev_acc)) begin
        // the predictor lost branches: give up on this run
        check(1'b0, "predictor holds fewer branches than were predicted");
        break;
      end
      #1;
      // ---- outputs of this cycle
      mis_now = res_valid && (res_taken != q[0].pred);
      check(int'(inflight) == q.size(), "inflight count");
      check(res_mispredict == mis_now, "res_mispredict");
      // prediction issued last cycle
      check(out_valid == (prev_acc && !mis_now), "out_valid");
      if (prev_acc && !mis_now) begin
        check(out_taken == prev_e.pred, $sformatf("out_taken for addr %0d", prev_e.addr));
        check(int'(out_sum) == prev_e.sum,
              $sformatf("out_sum %0d expected %0d", out_sum, prev_e.sum));
        check(out_override == (prev_e.pred != prev_e.l1), "out_override");
        if (out_override) n_override++;
      end
      // new request
      check(pred_ready == (q.size() < int'(QDEPTH)), "pred_ready");
      if (pred_valid && !pred_ready) n_full++;
      check(l1_taken == (BIM[int'(pred_addr) % BIM_ENTRIES] >= 2), "l1_taken");
      prev_acc = pred_valid && pred_ready && !mis_now;
      dut_prev_acc = pred_valid && pred_ready && !res_mispredict;
      if (prev_acc) begin
        model_predict(fetch_ptr, int'(pred_addr), l1_taken, prev_e);
        fetch_ptr++;
        n_pred++;
        if (res_valid) n_both++;
      end
      if (res_valid) begin
        bit mis, trained;
        int idx;
        model_resolve(res_taken, mis, trained, idx);
        check(res_trained == trained, "res_trained");
        n_resolved++;
        if (trained && !mis) n_train_theta++;
        if (mis) begin
          n_train_miss++;
          n_recover++;
          fetch_ptr = idx + 1;
          drain = 1'b0;
        end
        if (idx >= int'(TRACE_LEN) * 3 / 4) begin
          late_total++;
          if (mis) late_miss++;
        end
        if (idx == int'(TRACE_LEN) - 1 && !mis) begin
          cycle++;
          break;
        end
      end
      @(posedge clk);
      #1 cycle++;
    end
    pred_valid = 1'b0;
    res_valid  = 1'b0;

    check(fetch_ptr == int'(TRACE_LEN), "whole trace resolved");
    $display("predictions %0d resolved %0d overrides %0d recoveries %0d",
             n_pred, n_resolved, n_override, n_recover);
    $display("train(theta) %0d train(miss) %0d full-queue stalls %0d predict+resolve %0d",
             n_train_theta, n_train_miss, n_full, n_both);
    $display("weight saturations %0d partial-sum saturations %0d", n_w_sat, n_psum_sat);
    $display("late-trace mispredictions %0d of %0d", late_miss, late_total);
    check(n_override > 0, "override never happened");
    check(n_recover > 0, "misprediction recovery never happened");
    check(n_train_theta > 0, "threshold training never happened");
    check(n_full > 0, "full in-flight queue never happened");
    check(n_both > 0, "predict and resolve never shared a cycle");
    if (REQUIRE_SATURATION) begin
      check(n_w_sat > 0, "weight saturation never happened");
      check(n_psum_sat > 0, "partial-sum saturation never happened");
    end
    check(late_total > 0 && late_miss * 100 < MAX_LATE_MISS_PCT * late_total,
          $sformatf("late misprediction rate %0d/%0d", late_miss, late_total));
    finished = 1'b1;
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
