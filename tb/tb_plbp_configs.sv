// tb_plbp_configs -- the predictor in other configurations of the same
// design space, each against the shared reference model:
//   * the 4 KB tuned configuration (h = 19, n = 1, m = 215): n = 1 makes it
//     a path-based neural predictor;
//   * the 32 KB tuned configuration (h = 26, n = 8, m = 118);
//   * m = 1 (h = 12, n = 4): the path addresses drop out and the design is
//     a perceptron predictor with n weight vectors.
// Each runs a 3000-branch synthetic trace. Saturation is not required at
// these sizes.
module tb_plbp_configs;
  localparam int unsigned ADDR_W = 32;

  `define PLBP_CFG(NAME, H_, N_, M_)                                              \
    logic NAME``_clk, NAME``_rst_n, NAME``_ready, NAME``_pred_valid, NAME``_pred_ready; \
    logic NAME``_l1, NAME``_out_valid, NAME``_out_taken, NAME``_out_override;     \
    logic NAME``_res_valid, NAME``_res_taken, NAME``_res_mis, NAME``_res_trained; \
    logic [ADDR_W-1:0] NAME``_pred_addr;                                          \
    logic signed [10:0] NAME``_out_sum;                                           \
    logic [4:0] NAME``_inflight;                                                  \
    plbp_predictor #(.H(H_), .N(N_), .M(M_)) NAME``_dut (                         \
      .clk(NAME``_clk), .rst_n(NAME``_rst_n), .ready(NAME``_ready),               \
      .pred_valid(NAME``_pred_valid), .pred_addr(NAME``_pred_addr),               \
      .pred_ready(NAME``_pred_ready), .l1_taken(NAME``_l1),                       \
      .out_valid(NAME``_out_valid), .out_taken(NAME``_out_taken),                 \
      .out_sum(NAME``_out_sum), .out_override(NAME``_out_override),               \
      .res_valid(NAME``_res_valid), .res_taken(NAME``_res_taken),                 \
      .res_mispredict(NAME``_res_mis), .res_trained(NAME``_res_trained),          \
      .inflight(NAME``_inflight));                                                \
    plbp_tb_driver #(.H(H_), .N(N_), .M(M_), .TRACE_LEN(3000), .MAX_CYCLES(40000), \
                     .REQUIRE_SATURATION(1'b0), .STANDALONE(1'b0)) NAME``_drv (   \
      .clk(NAME``_clk), .rst_n(NAME``_rst_n), .ready(NAME``_ready),               \
      .pred_valid(NAME``_pred_valid), .pred_addr(NAME``_pred_addr),               \
      .pred_ready(NAME``_pred_ready), .l1_taken(NAME``_l1),                       \
      .out_valid(NAME``_out_valid), .out_taken(NAME``_out_taken),                 \
      .out_sum(NAME``_out_sum), .out_override(NAME``_out_override),               \
      .res_valid(NAME``_res_valid), .res_taken(NAME``_res_taken),                 \
      .res_mispredict(NAME``_res_mis), .res_trained(NAME``_res_trained),          \
      .inflight(NAME``_inflight));

  `PLBP_CFG(kb4, 19, 1, 215)
  `PLBP_CFG(kb32, 26, 8, 118)
  `PLBP_CFG(perc, 12, 4, 1)

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d",
             kb4_drv.checks + kb32_drv.checks + perc_drv.checks,
             kb4_drv.failures + kb32_drv.failures + perc_drv.failures + 1);
    $finish;
  end

  initial begin
    wait (kb4_drv.finished && kb32_drv.finished && perc_drv.finished);
    $display("4 KB: %0d checks %0d failures; 32 KB: %0d/%0d; m=1: %0d/%0d",
             kb4_drv.checks, kb4_drv.failures, kb32_drv.checks, kb32_drv.failures,
             perc_drv.checks, perc_drv.failures);
    $display("TB_RESULT checks=%0d failures=%0d",
             kb4_drv.checks + kb32_drv.checks + perc_drv.checks,
             kb4_drv.failures + kb32_drv.failures + perc_drv.failures);
    $finish;
  end
endmodule
