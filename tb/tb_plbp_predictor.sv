// tb_plbp_predictor -- end-to-end test of the piecewise linear predictor at
// a reduced size (h = 6, n = 2, m = 5, 5-bit weights, 7-bit partial sums,
// 4 in-flight branches, 16 bimodal counters). The narrow weights and sums
// make saturation happen within a short trace. The shared driver runs a
// synthetic trace against a reference model and checks every output and
// that each mechanism of the design occurs.
module tb_plbp_predictor;
  localparam int unsigned H = 6, N = 2, M = 5, WBITS = 5, SBITS = 7;
  localparam int unsigned ADDR_W = 16, QDEPTH = 4, BIM_ENTRIES = 16;
  localparam int unsigned CW = $clog2(QDEPTH + 1);

  logic clk, rst_n, ready, pred_valid, pred_ready, l1_taken;
  logic [ADDR_W-1:0] pred_addr;
  logic out_valid, out_taken, out_override, res_valid, res_taken;
  logic res_mispredict, res_trained;
  logic signed [SBITS:0] out_sum;
  logic [CW-1:0] inflight;

  plbp_predictor #(.H(H), .N(N), .M(M), .WBITS(WBITS), .SBITS(SBITS), .ADDR_W(ADDR_W),
                   .QDEPTH(QDEPTH), .BIM_ENTRIES(BIM_ENTRIES)) dut (.*);

  plbp_tb_driver #(.H(H), .N(N), .M(M), .WBITS(WBITS), .SBITS(SBITS), .ADDR_W(ADDR_W),
                   .QDEPTH(QDEPTH), .BIM_ENTRIES(BIM_ENTRIES),
                   .TRACE_LEN(3000), .MAX_CYCLES(40000)) drv (.*);
endmodule
