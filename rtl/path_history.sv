// path_history -- the nonspeculative path history: the global history
// register GHR (branch outcomes) and the global address array GA (branch
// addresses modulo m), both h entries long.
//
// Each resolved branch shifts its outcome into GHR and its address modulo m
// into GA at the first position, the oldest entry dropping out. Entry
// index p-1 holds history position p (p = 1 is the most recent branch).
// Together the two give, for training, the path that led to the branch at
// the head of the in-flight queue: training weight k of that branch uses
// ga[k-1] as its block and ghr[k-1] as its direction.
//
// Interface and timing: with shift_en the new entry appears after the next
// clock edge. Reset clears both arrays (all not taken, address 0).
// Shifting follows the source description; the reset values are this
// design's choice.
module path_history #(
  parameter int unsigned H  = plbp_pkg::H_DEFAULT,
  parameter int unsigned M  = plbp_pkg::M_DEFAULT,
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   shift_en,
  input  logic                   taken,
  input  logic [RW-1:0]          addr_mod_m,
  output logic [H-1:0]           ghr,
  output logic [H-1:0][RW-1:0]   ga
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr <= '0;
      ga  <= '0;
    end else if (shift_en) begin
      ghr <= {ghr[H-2:0], taken};
      ga  <= {ga[H-2:0], addr_mod_m};
    end
  end

endmodule
