// tb_class_scheduler: closes the loop of the QoS class scheduler with a
// synthetic load. Both classes always have a cell; every granted cell is
// dequeued. Class 0 cells exceed their 60-cycle target with a probability
// that drops as class 0's weight share grows, class 1 cells never exceed
// 400 cycles. The testbench keeps its own X/Y counts per interval, computes
// the sub-range, reference value, error and new weight independently, and
// compares the weights after every update. It also checks that within an
// interval the grant shares follow the weights (WRR), that the class 0 weight
// rises and the class 1 weight falls to its minimum of 1.
// Reduced sizes: update interval 2000 cycles, sub-ranges of 64 cells.
module tb_class_scheduler;
  localparam int U = 2000, SHIFT = 6, NSUB = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]      req = '0;
  logic            grant = 0, valid, update;
  logic [0:0]      sel;
  logic [15:0]     deq_latency = '0;
  logic [1:0][7:0] weights;

  class_scheduler #(.NC(2), .UPDATE_INTERVAL(U), .NSUB(NSUB), .SUB_SHIFT(SHIFT), .INIT_WEIGHT(8),
                    .TARGET_LAT({16'd400, 16'd60}), .VIOL_PPM({32'd10000, 32'd1000}))
    dut (.clk, .rst_n, .req, .grant, .deq_latency, .valid, .sel, .weights, .update);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_of(int ppm, int x);
    int r;
    r = x >> SHIFT;
    if (r > NSUB - 1) r = NSUB - 1;
    return (ppm * ((r << SHIFT) + (1 << (SHIFT - 1))) + 500000) / 1000000;
  endfunction

  function automatic int next_w(int w, int e, int rf);
    int msb;
    msb = 0;
    for (int b = 0; b < 16; b++) if (((rf >> b) & 1) != 0) msb = b;
    if (e > 0) return (w + (e >> msb) > 255) ? 255 : w + (e >> msb);
    if (e < 0 && w > 1) return w - 1;
    return w;
  endfunction

  int X [2], Y [2], G [2];
  int exp_w [2];
  int updates = 0, rises = 0, share_ok = 0;

  initial begin
    int ppm [2];
    ppm = '{1000, 10000};
    exp_w = '{8, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    req = 2'b11;
    for (int n = 0; n < 12 * U; n++) begin
      bit viol;
      int xin [2], yin [2];
      #1;
      grant = valid;
      // class 0 misses its target more often when its share is small
      viol = ($urandom % 1000) < ((weights[0] > weights[1] * 3) ? 0 : 40);
      deq_latency = (sel == 0) ? (viol ? 16'd90 : 16'd20) : 16'd100;
      xin = '{0, 0}; yin = '{0, 0};
      xin[sel] = 1;
      yin[sel] = (sel == 0) ? int'(viol) : 0;
      if (update) begin
        int w_old [2];
        w_old = exp_w;
        for (int c = 0; c < 2; c++) begin
          int rf;
          rf = ref_of(ppm[c], X[c]);
          exp_w[c] = next_w(exp_w[c], Y[c] - rf, rf);
        end
        if (exp_w[0] > w_old[0]) rises++;
        // grant shares of the finished interval against the weights in force
        checks++;
        if (G[0] + G[1] > 0) begin
          real share, want;
          share = real'(G[0]) / real'(G[0] + G[1]);
          want  = real'(w_old[0]) / real'(w_old[0] + w_old[1]);
          if (share - want > 0.05 || want - share > 0.05) begin
            failures++;
            $display("share %f want %f", share, want);
          end
        end
        X = xin; Y = yin; G = '{0, 0};
        G[sel]++;
        updates++;
      end else begin
        X[sel] += xin[sel];
        Y[sel] += yin[sel];
        G[sel]++;
      end
      @(negedge clk);
      if (updates > 0) begin
        checks++;
        if (weights[0] != 8'(exp_w[0]) || weights[1] != 8'(exp_w[1])) begin
          failures++;
          $display("weights %0d %0d expected %0d %0d", weights[0], weights[1], exp_w[0], exp_w[1]);
        end
      end
    end
    checks++;
    if (updates != 12 || rises == 0 || weights[1] != 8'd1) begin
      failures++;
      $display("updates=%0d rises=%0d w1=%0d", updates, rises, weights[1]);
    end
    $display("final weights %0d %0d", weights[0], weights[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
