// tb_weight_generator: checks the weight update rule on the worked example
// (E = 55, ref = 20 gives alpha = 3) and on random errors, reference values
// and old weights against W + floor(E / 2^msb(ref)) (saturating at 255),
// W - 1 (never below 1) or W.
module tb_weight_generator;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [16:0] err;
  logic [15:0] refv, alpha;
  logic [7:0]  wp, wn;

  weight_generator dut (.err, .ref_val(refv), .w_prev(wp), .w_next(wn), .alpha);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err = 17'sd55; refv = 16'd20; wp = 8'd10;
    @(posedge clk);
    checks++;
    if (alpha != 16'd3 || wn != 8'd13) begin failures++; $display("example: alpha=%0d w=%0d", alpha, wn); end
    for (int n = 0; n < 5000; n++) begin
      int e, rf, w, msb, exp_w;
      e  = int'($urandom % 400) - 200;
      rf = $urandom % 120;
      w  = (n % 7 == 0) ? 1 : (n % 11 == 0 ? 250 : int'($urandom % 256));
      if (w == 0) w = 1;
      err = 17'(e); refv = 16'(rf); wp = 8'(w);
      @(posedge clk);
      msb = 0;
      for (int b = 0; b < 16; b++) if (((rf >> b) & 1) != 0) msb = b;
      if (e > 0)      exp_w = (w + (e >> msb) > 255) ? 255 : w + (e >> msb);
      else if (e < 0) exp_w = (w > 1) ? w - 1 : w;
      else            exp_w = w;
      checks++;
      if (wn != 8'(exp_w)) begin
        failures++;
        $display("e=%0d ref=%0d w=%0d got %0d exp %0d", e, rf, w, wn, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
