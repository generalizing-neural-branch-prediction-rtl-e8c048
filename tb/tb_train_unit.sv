// tb_train_unit -- self-checking test of the training decision (h = 51,
// n = 8, m = 603, 10-bit sums: theta = 131). Random resolved branches,
// with outputs concentrated around +/-theta so that both sides of the
// threshold are hit, are compared with the rule: train when mispredicted or
// |output| < 131; bias counts toward the outcome; weight k counts up when
// history bit k agrees with the outcome, on block ga[k-1], in the branch's
// lane.
module tb_train_unit;
  localparam int unsigned H = 51, N = 8, M = 603, SBITS = 10, RW = 10, LW = 3;

  logic valid, taken, predicted, train, mispredict;
  logic signed [SBITS:0] sum;
  logic [LW-1:0] lane, upd_lane;
  logic [RW-1:0] row;
  logic [H-1:0] ghr;
  logic [H-1:0][RW-1:0] ga;
  logic [H:0] upd_en, upd_inc;
  logic [H:0][RW-1:0] upd_row;

  train_unit #(.H(H), .N(N), .M(M), .SBITS(SBITS)) dut (.*);

  int checks = 0, failures = 0, n_theta = 0, n_none = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int s, mag;
      bit exp_train;
      valid = $urandom_range(0, 9) != 0;
      taken = 1'($urandom);
      predicted = 1'($urandom);
      s = $urandom_range(0, 2) == 0 ? int'($urandom_range(0, 2047)) - 1024
                                    : (t[0] ? 1 : -1) * int'($urandom_range(128, 134));
      sum = (SBITS+1)'(s);
      lane = LW'($urandom);
      row = RW'($urandom_range(0, M - 1));
      ghr = {$urandom, $urandom};
      foreach (ga[k]) ga[k] = RW'($urandom_range(0, M - 1));
      #1;
      mag = s < 0 ? -s : s;
      exp_train = valid && (taken != predicted || mag < 131);
      if (exp_train && taken == predicted) n_theta++;
      if (valid && !exp_train) n_none++;
      check(train == exp_train, $sformatf("train for output %0d", s));
      check(mispredict == (valid && taken != predicted), "mispredict");
      check(upd_en == {(H+1){exp_train}}, "upd_en");
      check(upd_lane == lane, "lane");
      check(upd_row[0] == row && upd_inc[0] == taken, "bias command");
      for (int k = 1; k <= H; k++)
        check(upd_row[k] == ga[k-1] && upd_inc[k] == (ghr[k-1] == taken),
              $sformatf("weight %0d command", k));
      #1;
    end
    check(n_theta > 0 && n_none > 0, "both sides of the threshold seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
