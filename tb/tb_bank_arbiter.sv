// tb_bank_arbiter: random eligibility, occupancy and head latency for both
// arbitration schemes; the expected bank (largest occupancy for LQF, largest
// head latency for LLF, lowest index on ties) is computed by a linear scan.
module tb_bank_arbiter;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]        elig;
  logic [7:0][5:0]   occ;
  logic [7:0][15:0]  lat;
  logic              v_q, v_l;
  logic [2:0]        b_q, b_l;

  bank_arbiter #(.MODE(sqmc_pkg::ARB_LQF)) u_lqf (.eligible(elig), .occupancy(occ), .head_latency(lat), .valid(v_q), .bank(b_q));
  bank_arbiter #(.MODE(sqmc_pkg::ARB_LLF)) u_llf (.eligible(elig), .occupancy(occ), .head_latency(lat), .valid(v_l), .bank(b_l));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int eq, el, bq, bl;
      elig = 8'($urandom);
      if (n % 10 == 0) elig = '0;
      for (int b = 0; b < 8; b++) begin
        occ[b] = 6'($urandom % 33);
        lat[b] = 16'($urandom % 300);
      end
      @(posedge clk);
      bq = -1; bl = -1; eq = -1; el = -1;
      for (int b = 0; b < 8; b++) if (elig[b]) begin
        if (int'(occ[b]) > eq) begin eq = int'(occ[b]); bq = b; end
        if (int'(lat[b]) > el) begin el = int'(lat[b]); bl = b; end
      end
      checks++;
      if (v_q != (bq >= 0) || (bq >= 0 && b_q != 3'(bq))) begin failures++; $display("LQF mismatch"); end
      checks++;
      if (v_l != (bl >= 0) || (bl >= 0 && b_l != 3'(bl))) begin failures++; $display("LLF mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
