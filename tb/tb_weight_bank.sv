// tb_weight_bank -- self-checking test of one weight memory (n = 4 lanes,
// m = 5 blocks, 4-bit weights so saturation is reached quickly).
// Checks the clearing sweep (init_done after exactly M cycles, all weights
// zero), then runs random training commands, including back-to-back ones on
// the same weight and saturating runs, against an array model, and compares
// every prediction read one cycle after it was issued, including reads of a
// block being written in the same cycle.
module tb_weight_bank;
  localparam int unsigned N = 4, M = 5, WBITS = 4;
  localparam int unsigned RW = $clog2(M), LW = $clog2(N);

  logic clk = 1'b0, rst_n;
  logic init_done, rd_en, upd_en, upd_inc;
  logic [RW-1:0] rd_row, upd_row;
  logic [LW-1:0] upd_lane;
  logic [N-1:0][WBITS-1:0] rd_data;

  weight_bank #(.N(N), .M(M), .WBITS(WBITS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nsat = 0;
  int model [M][N];
  // training issued in cycle t is applied by the model at the start of t+1
  bit p_en; int p_row, p_lane; bit p_inc;
  bit r_en; int r_row;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 0; rd_en = 0; upd_en = 0; rd_row = 0; upd_row = 0; upd_lane = 0; upd_inc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0;
    while (!init_done && n < 20) begin @(posedge clk); #1 n++; end
    check(n == M, $sformatf("init took %0d cycles", n));
    foreach (model[r, l]) model[r][l] = 0;
    p_en = 0; r_en = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // read issued last cycle: sees the writes of trainings issued before it
      if (r_en)
        for (int l = 0; l < N; l++) begin
          logic signed [WBITS-1:0] v;
          v = rd_data[l];
          check(int'(v) == model[r_row][l],
                $sformatf("row %0d lane %0d got %0d exp %0d", r_row, l, v, model[r_row][l]));
        end
      // apply the write of the training issued last cycle
      if (p_en) begin
        automatic int hi = (1 << (WBITS - 1)) - 1;
        automatic int lo = -(1 << (WBITS - 1));
        if (p_inc) begin if (model[p_row][p_lane] == hi) nsat++; else model[p_row][p_lane]++; end
        else       begin if (model[p_row][p_lane] == lo) nsat++; else model[p_row][p_lane]--; end
      end
      // new commands: phases of one hot weight to force saturation
      upd_en   = $urandom_range(0, 3) != 0;
      upd_row  = RW'((cyc / 200) % 2 == 0 ? $urandom_range(0, M - 1) : 2);
      upd_lane = LW'((cyc / 200) % 2 == 0 ? $urandom_range(0, N - 1) : 1);
      upd_inc  = ((cyc / 400) % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      rd_en    = $urandom_range(0, 1);
      rd_row   = RW'($urandom_range(0, M - 1));
      p_en = upd_en; p_row = upd_row; p_lane = upd_lane; p_inc = upd_inc;
      r_en = rd_en; r_row = rd_row;
      @(posedge clk); #1;
    end
    check(nsat > 0, "saturation never happened");
    $display("saturating updates %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
