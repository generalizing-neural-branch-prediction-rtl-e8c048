// tb_path_history -- self-checking test of the nonspeculative path history
// (h = 7, m = 11). Random shifts of outcomes and block addresses are
// mirrored in two model arrays; after every cycle position p of GHR and GA
// must hold the p-th most recent shifted entry, and nothing may move when
// shift_en is low.
module tb_path_history;
  localparam int unsigned H = 7, M = 11, RW = $clog2(M);

  logic clk = 1'b0, rst_n, shift_en, taken;
  logic [RW-1:0] addr_mod_m;
  logic [H-1:0] ghr;
  logic [H-1:0][RW-1:0] ga;

  path_history #(.H(H), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit mg [H];
  int ma [H];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; shift_en = 0; taken = 0; addr_mod_m = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (mg[p]) begin mg[p] = 0; ma[p] = 0; end
    for (int cyc = 0; cyc < 1000; cyc++) begin
      for (int p = 0; p < H; p++) begin
        checks++;
        if (ghr[p] != mg[p] || int'(ga[p]) != ma[p]) begin
          failures++;
          if (failures < 10) $display("FAIL position %0d", p + 1);
        end
      end
      shift_en = $urandom_range(0, 2) != 0;
      taken = 1'($urandom);
      addr_mod_m = RW'($urandom_range(0, M - 1));
      if (shift_en) begin
        for (int p = H - 1; p > 0; p--) begin mg[p] = mg[p-1]; ma[p] = ma[p-1]; end
        mg[0] = taken;
        ma[0] = int'(addr_mod_m);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
