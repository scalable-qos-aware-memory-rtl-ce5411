// tb_arb_workload: compares the two bank arbitration schemes, longest queue
// first (LQF) and longest latency first (LLF), in the single-class controller
// with 4 groups of 8 banks and 32-entry bank FIFOs. Two controllers, one per
// scheme, receive the same cell requests: output queue burst size 1 (every
// cell goes to a randomly chosen queue, the worst case for bank conflicts),
// writes and reads each offered with probability equal to the load per clock.
// The load is 0.1, 0.5 and then 0.9 of the memory bandwidth (four groups
// issue two cells per clock), 200,000 clocks each. For each scheme and load the
// testbench tracks the occupancy of every bank FIFO from accepted requests
// and issued DRAM commands, and the FIFO latency of every cell, and prints
// the maxima and averages. Cell width is reduced to 64 bits, which does not
// affect scheduling; every other size is the default. Behavioural DRAMs
// return reads 10 clocks after the command.
// Checked: no write is dropped and no read stalls at any load with
// 32 entries; DRAM command spacing (2 clocks per group, 8 clocks per bank);
// every accepted request is issued; LQF's largest FIFO occupancy at load 0.9
// is no larger than LLF's, and LLF's largest latency is no larger than LQF's,
// the trade-off between the two schemes.
module tb_arb_workload;
  import sqmc_pkg::*;
  localparam int G = NUM_GROUPS, NBK = BANKS_PER_GROUP, DW = 64, RW = 19;
  localparam int NCYC = 200000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          wr_valid = 0, rd_valid = 0;
  logic [0:0]    wr_class = '0, rd_class = '0;
  logic [20:0]   wr_block_addr = '0, rd_block_addr = '0;
  logic [2:0]    wr_block_offset = '0, rd_block_offset = '0;
  logic [DW-1:0] wr_data = '0;
  logic [G-1:0]  out_ready = '1;

  // per scheme: d = 0 LQF, d = 1 LLF
  logic [1:0]                 wr_drop, rd_ready, weight_update;
  logic [1:0][G-1:0]          cmd_valid, cmd_write, dram_rvalid, out_valid;
  logic [1:0][G-1:0][2:0]     cmd_bank, out_bank;
  logic [1:0][G-1:0][RW-1:0]  cmd_row, out_row;
  logic [1:0][G-1:0][DW-1:0]  cmd_wdata, out_data;
  logic [1:0][G-1:0][0:0]     out_class;
  logic [1:0][G-1:0][0:0][7:0] wr_weights, rd_weights;
  logic [G-1:0][DW-1:0]       dram_rdata = '0;

  sqmc_top #(.NUM_CLASSES(1), .DATA_W(DW), .TARGET_LAT(16'd60), .VIOL_PPM(32'd1000),
             .ARB(ARB_LQF)) u_lqf (
    .clk, .rst_n, .wr_valid, .wr_class, .wr_block_addr, .wr_block_offset, .wr_data,
    .wr_drop(wr_drop[0]), .rd_valid, .rd_class, .rd_block_addr, .rd_block_offset,
    .rd_ready(rd_ready[0]), .cmd_valid(cmd_valid[0]), .cmd_write(cmd_write[0]),
    .cmd_bank(cmd_bank[0]), .cmd_row(cmd_row[0]), .cmd_wdata(cmd_wdata[0]),
    .dram_rvalid(dram_rvalid[0]), .dram_rdata, .out_valid(out_valid[0]), .out_ready,
    .out_class(out_class[0]), .out_bank(out_bank[0]), .out_row(out_row[0]),
    .out_data(out_data[0]), .wr_weights(wr_weights[0]), .rd_weights(rd_weights[0]),
    .weight_update(weight_update[0]));

  sqmc_top #(.NUM_CLASSES(1), .DATA_W(DW), .TARGET_LAT(16'd60), .VIOL_PPM(32'd1000),
             .ARB(ARB_LLF)) u_llf (
    .clk, .rst_n, .wr_valid, .wr_class, .wr_block_addr, .wr_block_offset, .wr_data,
    .wr_drop(wr_drop[1]), .rd_valid, .rd_class, .rd_block_addr, .rd_block_offset,
    .rd_ready(rd_ready[1]), .cmd_valid(cmd_valid[1]), .cmd_write(cmd_write[1]),
    .cmd_bank(cmd_bank[1]), .cmd_row(cmd_row[1]), .cmd_wdata(cmd_wdata[1]),
    .dram_rvalid(dram_rvalid[1]), .dram_rdata, .out_valid(out_valid[1]), .out_ready,
    .out_class(out_class[1]), .out_bank(out_bank[1]), .out_row(out_row[1]),
    .out_data(out_data[1]), .wr_weights(wr_weights[1]), .rd_weights(rd_weights[1]),
    .weight_update(weight_update[1]));

  initial begin
    repeat (3 * NCYC + 20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ statistics per scheme
  int cyc = 0;
  int occ [2][G][2][NBK];              // [scheme][group][0 write, 1 read][bank]
  int occ_max [2], lat_max [2];
  longint lat_sum [2], lat_n [2];
  int lat_t [2][int][$];               // enqueue clocks per {dir, group, bank, row}
  int issued [2], accepted [2], drops [2], stalls [2], gap_viol [2];
  int last_cmd [2][G], last_bank_cmd [2][G][NBK];
  int rd_due [2][G][$];

  function automatic int cell_id(int dir, int g, int b, int row);
    return (dir << 28) | (g << 24) | (b << 19) | row;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int d = 0; d < 2; d++) for (int g = 0; g < G; g++) begin
      if (cmd_valid[d][g]) begin
        int dir, b, id, l;
        dir = cmd_write[d][g] ? 0 : 1;
        b   = int'(cmd_bank[d][g]);
        id  = cell_id(dir, g, b, int'(cmd_row[d][g]));
        issued[d]++;
        occ[d][g][dir][b]--;
        if (lat_t[d].exists(id) && lat_t[d][id].size() != 0) begin
          l = cyc - 1 - lat_t[d][id].pop_front();
          lat_sum[d] += longint'(l);
          lat_n[d]++;
          if (l > lat_max[d]) lat_max[d] = l;
        end
        if (cyc - last_cmd[d][g] < 2) gap_viol[d]++;
        if (cyc - last_bank_cmd[d][g][b] < 8) gap_viol[d]++;
        last_cmd[d][g] = cyc;
        last_bank_cmd[d][g][b] = cyc;
        if (!cmd_write[d][g]) rd_due[d][g].push_back(cyc + 10);
      end
      if (dram_rvalid[d][g]) void'(rd_due[d][g].pop_front());
    end
  end
  always @(negedge clk) for (int d = 0; d < 2; d++) for (int g = 0; g < G; g++)
    dram_rvalid[d][g] = (rd_due[d][g].size() != 0 && rd_due[d][g][0] <= cyc);

  // ------------------------------------------------ traffic
  localparam int NQ = 64, NKEEP = 4096;
  int q_block [NQ], q_off [NQ];
  int used_block [int];
  int written_b [NKEEP], written_o [NKEEP], n_written = 0;

  function automatic int new_block();
    int b;
    do b = int'($urandom % (1 << 21)); while (used_block.exists(b));
    used_block[b] = 1;
    return b;
  endfunction

  // hash reference: group, bank and bank address of a cell
  function automatic void ref_hash(int blk, int o, output int g, output int b, output int row);
    int mem_addr;
    mem_addr = blk * 8 + ((o + blk) % 8);
    g   = mem_addr % G;
    b   = (mem_addr / G) % NBK;
    row = mem_addr / (G * NBK);
  endfunction

  // after the requests settle, account them in each scheme
  task automatic account(int dir, int blk, int o);
    int g, b, row;
    ref_hash(blk, o, g, b, row);
    for (int d = 0; d < 2; d++) begin
      if (dir == 0 ? wr_drop[d] : !rd_ready[d]) begin
        if (dir == 0) drops[d]++; else stalls[d]++;
      end else begin
        accepted[d]++;
        occ[d][g][dir][b]++;
        if (occ[d][g][dir][b] > occ_max[d]) occ_max[d] = occ[d][g][dir][b];
        lat_t[d][cell_id(dir, g, b, row)].push_back(cyc);
      end
    end
  endtask

  initial begin
    int wq, wb, wo, rk;
    bit do_w, do_r;
    int lqf_occ9, llf_occ9, lqf_lat9, llf_lat9;
    for (int q = 0; q < NQ; q++) q_off[q] = 8;
    for (int d = 0; d < 2; d++) for (int g = 0; g < G; g++) begin
      last_cmd[d][g] = -100;
      for (int b = 0; b < NBK; b++) last_bank_cmd[d][g][b] = -100;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      int pct;
      pct = (ph == 0) ? 10 : (ph == 1) ? 50 : 90;
      occ_max = '{0, 0}; lat_max = '{0, 0}; lat_sum = '{0, 0}; lat_n = '{0, 0};
      for (int n = 0; n < NCYC; n++) begin
        @(negedge clk);
        do_w = ($urandom % 100) < pct;
        do_r = n_written > 0 && ($urandom % 100) < pct;
        wr_valid = do_w;
        rd_valid = do_r;
        if (do_w) begin
          wq = int'($urandom % NQ);
          if (q_off[wq] == 8) begin q_block[wq] = new_block(); q_off[wq] = 0; end
          wb = q_block[wq];
          wo = q_off[wq];
          q_off[wq]++;
          wr_block_addr = 21'(wb);
          wr_block_offset = 3'(wo);
          wr_data = DW'({$urandom, $urandom});
        end
        if (do_r) begin
          rk = int'($urandom % ((n_written < NKEEP) ? n_written : NKEEP));
          rd_block_addr = 21'(written_b[rk]);
          rd_block_offset = 3'(written_o[rk]);
        end
        #1;
        if (do_w) begin
          account(0, wb, wo);
          written_b[n_written % NKEEP] = wb;
          written_o[n_written % NKEEP] = wo;
          n_written++;
        end
        if (do_r) account(1, int'(rd_block_addr), int'(rd_block_offset));
      end
      for (int d = 0; d < 2; d++)
        $display("load 0.%0d %s: max FIFO occupancy=%0d  FIFO latency avg=%0.2f max=%0d clocks",
                 pct / 10, d == 0 ? "LQF" : "LLF", occ_max[d],
                 real'(lat_sum[d]) / real'(lat_n[d]), lat_max[d]);
      if (ph == 2) begin
        lqf_occ9 = occ_max[0]; llf_occ9 = occ_max[1];
        lqf_lat9 = lat_max[0]; llf_lat9 = lat_max[1];
      end
    end
    @(negedge clk);
    wr_valid = 0; rd_valid = 0;
    repeat (3000) @(negedge clk);

    for (int d = 0; d < 2; d++) begin
      checks++; if (drops[d] != 0 || stalls[d] != 0) begin
        failures++; $display("scheme %0d: drops=%0d stalls=%0d", d, drops[d], stalls[d]); end
      checks++; if (gap_viol[d] != 0) begin failures++; $display("scheme %0d: DRAM timing violations %0d", d, gap_viol[d]); end
      checks++; if (issued[d] != accepted[d]) begin
        failures++; $display("scheme %0d: accepted %0d issued %0d", d, accepted[d], issued[d]); end
    end
    checks++; if (lqf_occ9 > llf_occ9) begin failures++; $display("LQF occupancy above LLF"); end
    checks++; if (llf_lat9 > lqf_lat9) begin failures++; $display("LLF latency above LQF"); end
    $display("accepted %0d / %0d, issued %0d / %0d", accepted[0], accepted[1], issued[0], issued[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
