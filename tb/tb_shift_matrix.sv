// tb_shift_matrix -- self-checking test of the partial-sum matrix (n = 3
// rows, h = 5 columns, 6-bit weights, 7-bit sums so that saturation occurs).
// Random steps with random weight blocks and directions, and occasional
// loads, are applied to the block and to an integer model that evaluates
// S'[i][c] = S[i][c-1] +/- W[i][h-c+1] with S[i][0] = 0 and saturation.
// The stored sums and next_sums are compared every cycle.
module tb_shift_matrix;
  localparam int unsigned N = 3, H = 5, WBITS = 6, SBITS = 7;

  logic clk = 1'b0, rst_n;
  logic step_en, step_taken, load_en;
  logic [H-1:0][N-1:0][WBITS-1:0] step_w;
  logic [N-1:0][H-1:0][SBITS-1:0] load_val, sums, next_sums;

  shift_matrix #(.N(N), .H(H), .WBITS(WBITS), .SBITS(SBITS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nsat = 0;
  int S [N][H+1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int sx(logic [SBITS-1:0] v);
    logic signed [SBITS-1:0] t;
    t = v;
    return int'(t);
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nxt [N][H+1];
    rst_n = 0; step_en = 0; step_taken = 0; load_en = 0; step_w = '0; load_val = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (S[i, c]) S[i][c] = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      step_en    = $urandom_range(0, 4) != 0;
      step_taken = ((cyc / 100) % 3 == 0) ? 1'b1 : ((cyc / 100) % 3 == 1) ? 1'b0 : 1'($urandom_range(0, 1));
      load_en    = $urandom_range(0, 30) == 0;
      foreach (step_w[k, i]) step_w[k][i] = WBITS'($urandom);
      foreach (load_val[i, c]) load_val[i][c] = SBITS'($urandom);
      #1;
      // model of one step
      nxt = S;
      if (step_en)
        for (int i = 0; i < N; i++)
          for (int c = 1; c <= H; c++) begin
            logic signed [WBITS-1:0] w;
            int v;
            w = step_w[H-c][i];
            v = step_taken ? S[i][c-1] + int'(w) : S[i][c-1] - int'(w);
            if (v > 63) begin v = 63; nsat++; end
            if (v < -64) begin v = -64; nsat++; end
            nxt[i][c] = v;
          end
      for (int i = 0; i < N; i++)
        for (int c = 1; c <= H; c++) begin
          check(sx(sums[i][c-1]) == S[i][c], $sformatf("sums[%0d][%0d]", i, c));
          check(sx(next_sums[i][c-1]) == nxt[i][c], $sformatf("next_sums[%0d][%0d]", i, c));
        end
      if (load_en) begin
        for (int i = 0; i < N; i++)
          for (int c = 1; c <= H; c++) nxt[i][c] = sx(load_val[i][c-1]);
      end
      S = nxt;
      @(posedge clk); #1;
    end
    check(nsat > 0, "saturation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
