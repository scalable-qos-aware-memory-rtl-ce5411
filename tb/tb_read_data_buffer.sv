// tb_read_data_buffer: random writes (never beyond capacity, as the DRAM
// interface guarantees through the free count) and random output
// back-pressure against a queue model; checks order, data, valid and the
// free-entry count, and fills the buffer completely once.
module tb_read_data_buffer;
  localparam int W = 48, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          in_valid = 0, out_ready = 0, out_valid;
  logic [W-1:0]  in_data = '0, out_data;
  logic [15:0]   free;

  read_data_buffer #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_data,
                                                .out_valid, .out_ready, .out_data, .free);

  logic [W-1:0] q [$];
  int saw_full = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      bit pop;
      int bias;
      bias = ((n / 400) % 2 == 0) ? 70 : 30;
      @(negedge clk);
      checks++;
      if (free != 16'(D - q.size()) || out_valid != (q.size() != 0) ||
          (q.size() != 0 && out_data != q[0])) begin
        failures++;
        $display("mismatch n=%0d free=%0d model=%0d", n, free, D - q.size());
      end
      in_valid  = (q.size() < D) && ($urandom % 100 < bias);
      in_data   = {16'($urandom), $urandom};
      out_ready = ($urandom % 100 < 100 - bias);
      pop       = out_ready && q.size() != 0;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (in_valid) q.push_back(in_data);
      if (q.size() == D) saw_full++;
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
