// tb_wrr_scheduler: weighted round robin with three classes.
// Part 1: all classes always request with weights 5, 2, 1; over whole rounds
// the grants must split exactly 5:2:1 and the first grants of a round must
// alternate between classes. Part 2: random requests and weights against a
// reference model of the counters (work-conserving, reload when no
// requesting class has credit).
module tb_wrr_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]      req = '0;
  logic [2:0][7:0] weight;
  logic            advance = 0, valid, new_round;
  logic [1:0]      sel;

  wrr_scheduler #(.NC(3), .W_W(8)) dut (.clk, .rst_n, .req, .weight, .advance, .valid, .sel, .new_round);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_cnt [3];
  int m_eff [3];
  int m_last;
  int grants [3];

  function automatic int model_pick(output bit nr);
    int eff [3];
    bit any;
    any = 0;
    for (int c = 0; c < 3; c++) if (req[c] && m_cnt[c] != 0) any = 1;
    nr = !any && (req != 0);
    for (int c = 0; c < 3; c++) eff[c] = nr ? int'(weight[c]) : m_cnt[c];
    m_eff = eff;
    for (int k = 1; k <= 3; k++) begin
      int i;
      i = (m_last + k) % 3;
      if (req[i] && eff[i] != 0) begin
        return i;
      end
    end
    return -1;
  endfunction

  initial begin
    int seq [8];
    weight = {8'd1, 8'd2, 8'd5};
    m_last = 2;
    foreach (m_cnt[c]) m_cnt[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // part 1: saturated, 10 rounds of 8 grants
    req = 3'b111;
    advance = 1;
    #1;
    for (int n = 0; n < 80; n++) begin
      if (n < 8) seq[n] = int'(sel);
      if (valid) grants[sel]++;
      @(negedge clk);
      #1;
    end
    checks++;
    if (grants[0] != 50 || grants[1] != 20 || grants[2] != 10) begin
      failures++;
      $display("ratio wrong %0d %0d %0d", grants[0], grants[1], grants[2]);
    end
    checks++;
    // first round: 0,1,2,0,1,0,0,0
    if (seq[0] != 0 || seq[1] != 1 || seq[2] != 2 || seq[3] != 0 || seq[4] != 1 ||
        seq[5] != 0 || seq[6] != 0 || seq[7] != 0) begin
      failures++;
      $display("round order wrong");
    end
    // part 2: random, against the model (restart from reset)
    advance = 0;
    req = '0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    foreach (m_cnt[c]) m_cnt[c] = 0;
    m_last = 2;
    for (int n = 0; n < 5000; n++) begin
      int exp_sel;
      bit nr;
      req     = 3'($urandom);
      if (n % 50 == 0) weight = {8'($urandom % 6 + 1), 8'($urandom % 6 + 1), 8'($urandom % 6 + 1)};
      advance = ($urandom % 4 != 0);
      #1;
      exp_sel = model_pick(nr);
      checks++;
      if (valid != (exp_sel >= 0) || (exp_sel >= 0 && sel != 2'(exp_sel)) || new_round != nr) begin
        failures++;
        $display("n=%0d req=%b got v=%0d s=%0d exp %0d", n, req, valid, sel, exp_sel);
      end
      advance = advance && valid;
      @(posedge clk);
      if (advance && exp_sel >= 0) begin
        m_cnt = m_eff;
        m_cnt[exp_sel]--;
        m_last = exp_sel;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
