// tb_bimodal_predictor -- self-checking test of the first-level bimodal
// predictor at its default 2K entries. Branch addresses are drawn from a
// small set that includes aliases (addresses 2048 apart); each cycle the
// combinational lookup is compared with a model of 2-bit saturating
// counters, and random updates are applied to both.
module tb_bimodal_predictor;
  localparam int unsigned ENTRIES = 2048, ADDR_W = 32;

  logic clk = 1'b0, rst_n, lookup_taken, upd_en, upd_taken;
  logic [ADDR_W-1:0] lookup_addr, upd_addr;

  bimodal_predictor #(.ENTRIES(ENTRIES), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_t = 0, n_n = 0;
  int ctr [ENTRIES];

  function automatic logic [ADDR_W-1:0] pick();
    return 32'h400 + 32'($urandom_range(0, 7)) * 32'd2048 + 32'($urandom_range(0, 5));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; upd_en = 0; upd_taken = 0; upd_addr = 0; lookup_addr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (ctr[e]) ctr[e] = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      lookup_addr = pick();
      upd_en = $urandom_range(0, 3) != 0;
      upd_addr = pick();
      upd_taken = ($urandom_range(0, 9) < (((cyc / 250) % 2) ? 8 : 2));
      #1;
      checks++;
      if (lookup_taken != (ctr[lookup_addr % ENTRIES] >= 2)) begin
        failures++;
        if (failures < 10) $display("FAIL lookup %0h", lookup_addr);
      end
      if (lookup_taken) n_t++; else n_n++;
      if (upd_en) begin
        int e;
        e = upd_addr % ENTRIES;
        if (upd_taken && ctr[e] < 3) ctr[e]++;
        else if (!upd_taken && ctr[e] > 0) ctr[e]--;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_t == 0 || n_n == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
