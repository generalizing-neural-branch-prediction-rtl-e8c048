// branch_queue -- first-in first-out queue of predicted branches that have
// not yet been resolved.
//
// Training a branch needs the state its prediction was made from: its
// address, the prediction and the output value, and, for the
// nonspeculative shift matrix, the weight block that the prediction added
// into the speculative matrix. Each prediction pushes one entry; each
// resolution pops the oldest, since branches resolve in program order. A
// misprediction flushes the queue: every younger entry lies on the wrong
// path.
//
// Interface and timing: push and pop may happen in the same cycle; flush
// (which wins over push) empties the queue at the next edge. head shows the
// oldest entry whenever count is non-zero. Pushing into a full queue or
// popping an empty one is an error, caught by assertions.
// The queue itself is this design's choice; the source only requires that
// training sees the state of the prediction.
module branch_queue #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = plbp_pkg::QDEPTH_DEFAULT,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              push_data,
  input  logic          pop,
  input  logic          flush,
  output T              head,
  output logic [CW-1:0] count,
  output logic          empty,
  output logic          full
);

  T              slots [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] bump(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (32'(count) == DEPTH);
  assign head  = slots[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= bump(wr_ptr);
      if (pop)  rd_ptr <= bump(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !flush) slots[wr_ptr] <= push_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) push && !pop |-> !full);
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
