// tb_bank_fifo: random push/pop traffic against a queue model, first on a
// FIFO of the default size (32 entries), then on a 24-entry FIFO (a depth
// that is not a power of two). Checks head data, head enqueue time,
// occupancy, empty and full every cycle; each FIFO must be filled to full
// and drained to empty at least once, and pointers wrap many times.
module tb_bank_fifo;
  localparam int W = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]    enq = '0, deq = '0;
  logic [W-1:0]  enq_data = '0;
  logic [15:0]   enq_time = '0;
  logic [1:0][W-1:0] head_data;
  logic [1:0][15:0]  head_time;
  logic [1:0]    empty, full;
  logic [1:0][5:0] occ;

  bank_fifo #(.WIDTH(W)) dut32 (.clk, .rst_n, .enq(enq[0]), .enq_data, .enq_time, .deq(deq[0]),
                                .head_data(head_data[0]), .head_time(head_time[0]),
                                .empty(empty[0]), .full(full[0]), .occupancy(occ[0]));
  bank_fifo #(.WIDTH(W), .DEPTH(24)) dut24 (.clk, .rst_n, .enq(enq[1]), .enq_data, .enq_time, .deq(deq[1]),
                                .head_data(head_data[1]), .head_time(head_time[1]),
                                .empty(empty[1]), .full(full[1]), .occupancy(occ[1]));

  logic [W-1:0] qd [$];
  logic [15:0]  qt [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int d, int depth);
    checks++;
    if (occ[d] != 6'(qd.size()) || empty[d] != (qd.size() == 0) || full[d] != (qd.size() == depth)) begin
      failures++;
      $display("status mismatch depth %0d occ=%0d model=%0d", depth, occ[d], qd.size());
    end else if (qd.size() != 0 && (head_data[d] != qd[0] || head_time[d] != qt[0])) begin
      failures++;
      $display("head mismatch depth %0d", depth);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 2; d++) begin
      int depth, saw_full, saw_empty;
      depth = (d == 0) ? 32 : 24;
      saw_full = 0; saw_empty = 0;
      qd.delete(); qt.delete();
      for (int n = 0; n < 6000; n++) begin
        int bias;
        bias = ((n / 300) % 2 == 0) ? 65 : 35;   // alternate filling and draining
        @(negedge clk);
        compare(d, depth);
        enq      = '0;
        deq      = '0;
        enq[d]   = !full[d] && ($urandom % 100 < bias);
        deq[d]   = !empty[d] && ($urandom % 100 < 100 - bias);
        enq_data = {$urandom, 8'($urandom)};
        enq_time = 16'($urandom);
        @(posedge clk);
        #1;
        if (deq[d]) begin void'(qd.pop_front()); void'(qt.pop_front()); end
        if (enq[d]) begin qd.push_back(enq_data); qt.push_back(enq_time); end
        if (qd.size() == depth) saw_full++;
        if (qd.size() == 0) saw_empty++;
      end
      // drain the FIFO before the next one is tested
      @(negedge clk);
      enq = '0;
      deq = '0;
      checks++;
      if (saw_full == 0 || saw_empty == 0) begin failures++; $display("depth %0d never full or empty", depth); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
