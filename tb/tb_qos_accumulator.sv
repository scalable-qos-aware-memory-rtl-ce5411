// tb_qos_accumulator: counts X and Y over intervals with known dequeue and
// violation counts, and checks the sub-range r, ref[r] and E = Y - ref[r].
// Target latency 60, N = 0.1 %, 10 sub-ranges of 1024 cells (defaults): the
// reference values are round(0.001 * (1024*r + 512)) = 1..10.
module tb_qos_accumulator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        deq = 0, update = 0;
  logic [15:0] latency = '0;
  logic [15:0] x, y, refv;
  logic [3:0]  r;
  logic signed [16:0] err;

  qos_accumulator #(.TARGET_LAT(60), .VIOL_PPM(1000)) dut (
    .clk, .rst_n, .deq, .latency, .update, .x_cnt(x), .y_cnt(y), .r, .ref_val(refv), .err);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [6];
    xs = '{5, 700, 1100, 3000, 9800, 20000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (xs[t]) begin
      int nx, ny, er, exp_r, exp_ref;
      nx = xs[t];
      ny = 0;
      for (int k = 0; k < nx + 20; k++) begin
        @(negedge clk);
        deq = (k < nx);
        latency = 16'($urandom % 70);       // 61..69 are violations, 60 is not
        if (deq && latency > 60) ny++;
      end
      @(negedge clk);
      deq = 0;
      update = 1;
      #1;
      exp_r   = (nx / 1024 > 9) ? 9 : nx / 1024;
      exp_ref = (1000 * (1024 * exp_r + 512) + 500000) / 1000000;
      er      = ny - exp_ref;
      checks++;
      if (x != 16'(nx) || y != 16'(ny) || r != 4'(exp_r) || refv != 16'(exp_ref) || err != 17'(er)) begin
        failures++;
        $display("interval %0d: x=%0d/%0d y=%0d/%0d r=%0d/%0d ref=%0d/%0d err=%0d/%0d",
                 t, x, nx, y, ny, r, exp_r, refv, exp_ref, err, er);
      end
      @(posedge clk);
      #1 update = 0;
      checks++;
      if (x != 0 || y != 0) begin failures++; $display("no restart"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
