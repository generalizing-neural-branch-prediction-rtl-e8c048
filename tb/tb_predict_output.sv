// tb_predict_output -- self-checking test of the select-and-add stage
// (n = 8, 8-bit weights, 10-bit sums, the default widths). Random partial
// sums, bias blocks and lanes, plus the extreme values, are compared with an
// integer evaluation of sum = SR[lane] + bias[lane] and taken = (sum >= 0).
module tb_predict_output;
  localparam int unsigned N = 8, WBITS = 8, SBITS = 10;

  logic [N-1:0][SBITS-1:0] last_sums;
  logic [N-1:0][WBITS-1:0] bias_block;
  logic [2:0] lane;
  logic signed [SBITS:0] sum;
  logic taken;

  predict_output #(.N(N), .WBITS(WBITS), .SBITS(SBITS)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic signed [SBITS-1:0] p;
      logic signed [WBITS-1:0] b;
      int exp;
      foreach (last_sums[i]) last_sums[i] = SBITS'($urandom);
      foreach (bias_block[i]) bias_block[i] = WBITS'($urandom);
      lane = 3'($urandom);
      if (t < 4) begin
        last_sums[lane]  = (t[0]) ? SBITS'(511) : SBITS'(-512);
        bias_block[lane] = (t[1]) ? WBITS'(127) : WBITS'(-128);
      end
      if (t == 4) begin last_sums[lane] = SBITS'(5); bias_block[lane] = WBITS'(-5); end
      #1;
      p = last_sums[lane];
      b = bias_block[lane];
      exp = int'(p) + int'(b);
      checks++;
      if (int'(sum) != exp || taken != (exp >= 0)) begin
        failures++;
        if (failures < 10) $display("FAIL lane %0d: %0d + %0d gave %0d/%0d", lane, p, b, sum, taken);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
