// tb_plbp_full -- the piecewise linear predictor at its default, full size
// (h = 51, n = 8, m = 603, 8-bit weights, 10-bit partial sums, 2K-entry
// bimodal first level), run through a 20000-branch synthetic trace against
// the reference model of the shared driver. The predictor's parameters are
// left at their defaults. Saturation is not required here: with 8-bit
// weights and a threshold of 131 it needs far longer traces.
module tb_plbp_full;
  localparam int unsigned SBITS = plbp_pkg::SBITS_DEFAULT;
  localparam int unsigned ADDR_W = plbp_pkg::ADDR_W_DEFAULT;
  localparam int unsigned CW = $clog2(plbp_pkg::QDEPTH_DEFAULT + 1);

  logic clk, rst_n, ready, pred_valid, pred_ready, l1_taken;
  logic [ADDR_W-1:0] pred_addr;
  logic out_valid, out_taken, out_override, res_valid, res_taken;
  logic res_mispredict, res_trained;
  logic signed [SBITS:0] out_sum;
  logic [CW-1:0] inflight;

  plbp_predictor dut (.*);

  plbp_tb_driver #(.TRACE_LEN(20000), .MAX_CYCLES(200000), .REQUIRE_SATURATION(1'b0)) drv (.*);
endmodule
