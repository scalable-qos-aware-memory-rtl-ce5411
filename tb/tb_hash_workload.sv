// tb_hash_workload: how evenly the cell address hash spreads requests over
// 32 banks arranged as 8 groups of 4 banks. A queue-manager model assigns
// each cell to a random output queue, repeating the same queue for an
// output queue burst of 1 or 8 consecutive cells. Each queue fills randomly
// allocated 8-cell blocks in order. The hash (with 3 group bits and 2 bank
// bits) maps every cell to a group and bank. For each burst size, 100,000
// cells are counted in windows of 32 consecutive requests. The testbench
// prints the average and the variance of the number of requests a bank gets
// per window, and each bank's share of all requests.
// Checked: the hash outputs against the integer form of the equations; every
// bank receives between 90 % and 110 % of the mean number of requests for
// both burst sizes; the per-window variance is smaller for burst size 8 than
// for burst size 1, since a burst of 8 cells of one queue is spread over 8
// groups while independent cells can collide on one bank.
module tb_hash_workload;
  localparam int I = 21, J = 3, M = 3, N = 2;
  localparam int NG = 1 << M, NB = 1 << N, NBANK = NG * NB;
  localparam int NQ = 256, NCELL = 100000, WIN = 32;
  int checks = 0, failures = 0;

  logic [I-1:0]       block_addr = '0;
  logic [J-1:0]       block_offset = '0;
  logic [M-1:0]       group;
  logic [N-1:0]       bank;
  logic [I+J-M-N-1:0] bank_addr;

  sqmc_hash #(.I(I), .J(J), .M(M), .N(N)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q_block [NQ], q_off [NQ];
  int used_block [int];

  function automatic int new_block();
    int b;
    do b = int'($urandom % (1 << I)); while (used_block.exists(b));
    used_block[b] = 1;
    return b;
  endfunction

  initial begin
    real var_of [2];
    int bad;
    bad = 0;
    for (int s = 0; s < 2; s++) begin
      int burst, q, left, total [NBANK], win [NBANK];
      real sum, sum2, mean, v;
      int nwin;
      burst = (s == 0) ? 1 : 8;
      for (int k = 0; k < NQ; k++) q_off[k] = 8;
      total = '{default: 0}; win = '{default: 0};
      sum = 0.0; sum2 = 0.0; nwin = 0; left = 0; q = 0;
      for (int c = 0; c < NCELL; c++) begin
        int mem_addr, idx;
        if (left == 0) begin q = int'($urandom % NQ); left = burst; end
        left--;
        if (q_off[q] == 8) begin q_block[q] = new_block(); q_off[q] = 0; end
        block_addr = I'(q_block[q]);
        block_offset = J'(q_off[q]);
        q_off[q]++;
        #1;
        mem_addr = q_block[q] * 8 + ((int'(block_offset) + q_block[q]) % 8);
        if (int'(group) != mem_addr % NG || int'(bank) != (mem_addr / NG) % NB ||
            int'(bank_addr) != mem_addr / NBANK) bad++;
        idx = int'(group) * NB + int'(bank);
        total[idx]++;
        win[idx]++;
        if ((c + 1) % WIN == 0) begin
          for (int b = 0; b < NBANK; b++) begin
            sum  += real'(win[b]);
            sum2 += real'(win[b]) * real'(win[b]);
          end
          nwin++;
          win = '{default: 0};
        end
      end
      mean = sum / real'(nwin * NBANK);
      v = sum2 / real'(nwin * NBANK) - mean * mean;
      var_of[s] = v;
      $display("burst size %0d: requests per bank per %0d-cell window: average %0.3f variance %0.3f",
               burst, WIN, mean, v);
      for (int b = 0; b < NBANK; b++) begin
        checks++;
        if (total[b] < NCELL / NBANK * 9 / 10 || total[b] > NCELL / NBANK * 11 / 10) begin
          failures++;
          $display("  group %0d bank %0d got %0d of %0d requests", b / NB, b % NB, total[b], NCELL);
        end
      end
    end
    checks++; if (bad != 0) begin failures++; $display("hash mismatches %0d", bad); end
    checks++; if (var_of[1] >= var_of[0]) begin failures++; $display("burst 8 variance not below burst 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
