// tb_branch_queue -- self-checking test of the in-flight branch queue with
// a 4-deep queue of 12-bit entries. Random pushes, pops and flushes that
// respect the full and empty flags are mirrored in a SystemVerilog queue;
// head, count, empty and full are compared every cycle, and the test checks
// that the queue did fill, empty and flush.
module tb_branch_queue;
  localparam int unsigned DEPTH = 4;
  typedef logic [11:0] T;

  logic clk = 1'b0, rst_n, push, pop, flush, empty, full;
  T push_data, head;
  logic [2:0] count;

  branch_queue #(.T(T), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_flush = 0;
  T mq [$];

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
    rst_n = 0; push = 0; pop = 0; flush = 0; push_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      check(int'(count) == mq.size(), "count");
      check(empty == (mq.size() == 0), "empty");
      check(full == (mq.size() == DEPTH), "full");
      if (mq.size() > 0) check(head == mq[0], "head");
      if (full) n_full++;
      pop   = (mq.size() > 0) && ($urandom_range(0, 9) < ((cyc / 300) % 2 ? 7 : 3));
      push  = (mq.size() < DEPTH || pop) && ($urandom_range(0, 9) < 6);
      flush = $urandom_range(0, 40) == 0;
      push_data = T'($urandom);
      if (flush) begin mq.delete(); n_flush++; end
      else begin
        if (pop) void'(mq.pop_front());
        if (push) mq.push_back(push_data);
      end
      @(posedge clk); #1;
    end
    check(n_full > 0 && n_flush > 0, "full and flush seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
