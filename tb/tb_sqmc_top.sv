// tb_sqmc_top: end-to-end test of the packet memory controller at reduced sizes
// (64-bit cells, 2000-cycle weight update interval, 64-cell sub-ranges).
// A small queue-manager model hands out cells of randomly chosen output
// queues (output queue burst size 1, the worst case): each queue fills a
// randomly allocated block of 8 cells, then gets a new block. Behavioural
// DRAMs, one per group, store written cells and return reads in order after
// 10 clocks. Phases: mixed write and read traffic with two classes, writes
// and reads together about 0.45 of the memory bandwidth (each group issues
// one cell every 2 clocks), a write burst that hashes
// every cell to group 0 bank 0 (bank FIFO overflow), a read burst to that
// bank (read stall), then drain.
// Checked: every accepted write reaches the DRAM of the group and bank the
// hash equations give, with its data, exactly once; dropped writes never do;
// every accepted read returns the right data and tag; commands of a group are
// at least 2 clocks apart and a bank is reused after no less than 8 clocks.
// Counted, each must happen: all groups used, write drop, read stall,
// reordering, a same-bank wait of exactly tRC, read/write alternation, a
// weight update that changes a weight.
module tb_sqmc_top;
  import sqmc_pkg::*;
  localparam int G = NUM_GROUPS, NBK = BANKS_PER_GROUP, DW = 64, RW = 19;
  localparam int U = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          wr_valid = 0, rd_valid = 0, wr_drop, rd_ready;
  logic [0:0]    wr_class = '0, rd_class = '0;
  logic [20:0]   wr_block_addr = '0, rd_block_addr = '0;
  logic [2:0]    wr_block_offset = '0, rd_block_offset = '0;
  logic [DW-1:0] wr_data = '0;
  logic [G-1:0]  cmd_valid, cmd_write, dram_rvalid = '0, out_valid, out_ready = '1;
  logic [G-1:0][2:0]    cmd_bank, out_bank;
  logic [G-1:0][RW-1:0] cmd_row, out_row;
  logic [G-1:0][DW-1:0] cmd_wdata, out_data, dram_rdata = '0;
  logic [G-1:0][0:0]    out_class;
  logic [G-1:0][1:0][7:0] wr_weights, rd_weights;
  logic          weight_update;

  sqmc_top #(.DATA_W(64), .UPDATE_INTERVAL(2000), .SUB_SHIFT(6)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cell data derived from the address so that any mix-up is visible
  function automatic logic [DW-1:0] cell_data(int g, int key, int salt);
    logic [DW-1:0] d;
    for (int k = 0; k < DW / 32; k++) d[k*32 +: 32] = 32'(key * 32'h9e3779b1 + k * 977 + g * 13 + salt);
    return d;
  endfunction

  // ------------------------------------------------ behavioural DRAMs
  logic [DW-1:0] mem [G][int];
  int   rd_due [G][$];
  logic [DW-1:0] rd_q [G][$];
  int   cyc = 0;
  int   last_cmd [G], last_bank_cmd [G][NBK], last_was_read [G];
  int   gap_viol = 0, trc_exact = 0, alternations = 0, group_cmds [G];
  int   pend_w [G][int], pend_seq [G][int];
  int   max_seq [G];
  int   reordered = 0, bad_w = 0, dram_writes = 0;
  int   committed [$];                 // {g, key}

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int g = 0; g < G; g++) if (cmd_valid[g]) begin
      int key;
      key = int'({cmd_bank[g], cmd_row[g]});
      group_cmds[g]++;
      if (cyc - last_cmd[g] < 2) gap_viol++;
      if (cyc - last_bank_cmd[g][cmd_bank[g]] < 8) gap_viol++;
      if (cyc - last_bank_cmd[g][cmd_bank[g]] == 8) trc_exact++;
      if (int'(!cmd_write[g]) != last_was_read[g]) alternations++;
      last_was_read[g] = int'(!cmd_write[g]);
      last_cmd[g] = cyc;
      last_bank_cmd[g][cmd_bank[g]] = cyc;
      if (cmd_write[g]) begin
        dram_writes++;
        if (!pend_w[g].exists(key) || cell_data(g, key, pend_w[g][key]) != cmd_wdata[g]) bad_w++;
        else begin
          if (pend_seq[g][key] < max_seq[g]) reordered++;
          if (pend_seq[g][key] > max_seq[g]) max_seq[g] = pend_seq[g][key];
          pend_w[g].delete(key);
          pend_seq[g].delete(key);
          committed.push_back(g * (1 << 24) + key);
        end
        mem[g][key] = cmd_wdata[g];
      end else begin
        rd_due[g].push_back(cyc + 10);
        rd_q[g].push_back(mem[g].exists(key) ? mem[g][key] : '0);
      end
    end
    for (int g = 0; g < G; g++) if (dram_rvalid[g]) begin
      void'(rd_due[g].pop_front());
      void'(rd_q[g].pop_front());
    end
  end
  always @(negedge clk) for (int g = 0; g < G; g++) begin
    dram_rvalid[g] = (rd_due[g].size() != 0 && rd_due[g][0] <= cyc);
    dram_rdata[g]  = dram_rvalid[g] ? rd_q[g][0] : '0;
  end

  // ------------------------------------------------ read results
  int exp_rd [int];
  int rd_good = 0, rd_bad = 0, rd_acc = 0;
  always @(posedge clk) if (rst_n) for (int g = 0; g < G; g++) if (out_valid[g] && out_ready[g]) begin
    int id;
    id = g * (1 << 24) + int'({out_bank[g], out_row[g]});
    if (!exp_rd.exists(id) || !mem[g].exists(int'({out_bank[g], out_row[g]})) ||
        mem[g][int'({out_bank[g], out_row[g]})] != out_data[g]) rd_bad++;
    else begin
      rd_good++;
      exp_rd[id]--;
      if (exp_rd[id] == 0) exp_rd.delete(id);
    end
  end

  // ------------------------------------------------ weight updates
  int updates = 0, weight_moves = 0;
  logic [G-1:0][1:0][7:0] w_last;
  always @(posedge clk) if (rst_n) begin
    if (weight_update) updates++;
    if (wr_weights != w_last || rd_weights != w_last) weight_moves++;
  end
  initial w_last = {G*2{8'(INIT_WEIGHT)}};

  // ------------------------------------------------ queue manager model
  localparam int NQ = 64;
  int q_block [NQ], q_off [NQ];
  int used_block [int];
  int drops = 0, stalls = 0, accepted = 0, salt = 0;

  function automatic int new_block();
    int b;
    do b = int'($urandom % (1 << 21)); while (used_block.exists(b));
    used_block[b] = 1;
    return b;
  endfunction

  // hash reference: group, bank and bank address of a cell
  function automatic void ref_hash(int b, int o, output int g, output int key);
    int mem_addr;
    mem_addr = b * 8 + ((o + b) % 8);
    g   = mem_addr % G;
    key = int'({3'((mem_addr / G) % NBK), RW'(mem_addr / (G * NBK))});
  endfunction

  task automatic write_cell(int b, int o, int cls);
    int g, key;
    ref_hash(b, o, g, key);
    salt++;
    wr_valid = 1;
    wr_class = 1'(cls);
    wr_block_addr = 21'(b);
    wr_block_offset = 3'(o);
    wr_data = cell_data(g, key, salt);
    #1;
    if (wr_drop) drops++;
    else begin
      accepted++;
      pend_w[g][key] = salt;
      pend_seq[g][key] = salt;
    end
  endtask

  task automatic write_queue(int q, int cls);
    if (q_off[q] == 8) begin q_block[q] = new_block(); q_off[q] = 0; end
    write_cell(q_block[q], q_off[q], cls);
    if (wr_drop) return;
    q_off[q]++;
  endtask

  // read back a committed cell: recover block/offset is not needed, the
  // testbench drives an address that hashes to the same place
  int blk_of [int], off_of [int];
  task automatic read_cell(int id, int cls);
    rd_valid = 1;
    rd_class = 1'(cls);
    rd_block_addr = 21'(blk_of[id]);
    rd_block_offset = 3'(off_of[id]);
    #1;
    if (!rd_ready) begin stalls++; rd_valid = 0; end
    else begin
      rd_acc++;
      if (exp_rd.exists(id)) exp_rd[id]++; else exp_rd[id] = 1;
    end
  endtask

  // remember the block/offset that produced each {group,key}
  always @(posedge clk) if (wr_valid && !wr_drop && rst_n) begin
    int g, key;
    ref_hash(int'(wr_block_addr), int'(wr_block_offset), g, key);
    blk_of[g * (1 << 24) + key] = int'(wr_block_addr);
    off_of[g * (1 << 24) + key] = int'(wr_block_offset);
  end

  initial begin
    int flood_ids [$];
    for (int q = 0; q < NQ; q++) q_off[q] = 8;
    for (int g = 0; g < G; g++) begin
      last_cmd[g] = -100; max_seq[g] = -1; last_was_read[g] = 0;
      for (int b = 0; b < NBK; b++) last_bank_cmd[g][b] = -100;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: writes and reads together at about 0.45 of the bandwidth, classes 5:5
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      wr_valid = 0; rd_valid = 0;
      if ($urandom % 100 < 45) write_queue($urandom % NQ, $urandom % 2);
      if (committed.size() > 0 && $urandom % 100 < 45) read_cell(committed[$urandom % committed.size()], $urandom % 2);
    end
    // phase 2: every cell hashes to group 0, bank 0
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      rd_valid = 0;
      write_cell(new_block() & ~32'h1f, 0, 0);
    end
    @(negedge clk);
    wr_valid = 0;
    repeat (400) @(negedge clk);
    // phase 3: read burst on group 0 bank 0
    foreach (committed[k]) if ((committed[k] >> 24) == 0 && committed[k][RW+2:RW] == 3'd0) flood_ids.push_back(committed[k]);
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      read_cell(flood_ids[n % flood_ids.size()], 1);
    end
    @(negedge clk);
    rd_valid = 0;
    repeat (2000) @(negedge clk);

    checks++; if (bad_w != 0) begin failures++; $display("bad DRAM writes %0d", bad_w); end
    checks++; if (dram_writes != accepted) begin failures++; $display("DRAM writes %0d accepted %0d", dram_writes, accepted); end
    checks++; if (rd_bad != 0 || rd_good != rd_acc || exp_rd.size() != 0) begin
      failures++; $display("reads bad=%0d good=%0d accepted=%0d", rd_bad, rd_good, rd_acc); end
    checks++; if (gap_viol != 0) begin failures++; $display("DRAM timing violations %0d", gap_viol); end
    // mechanisms
    for (int g = 0; g < G; g++) begin
      checks++; if (group_cmds[g] == 0) begin failures++; $display("group %0d unused", g); end
    end
    checks++; if (drops == 0)        begin failures++; $display("no write drop"); end
    checks++; if (stalls == 0)       begin failures++; $display("no read stall"); end
    checks++; if (reordered == 0)    begin failures++; $display("no reordering"); end
    checks++; if (trc_exact == 0)    begin failures++; $display("no tRC wait"); end
    checks++; if (alternations == 0) begin failures++; $display("no read/write alternation"); end
    checks++; if (updates == 0 || weight_moves == 0) begin failures++; $display("no weight update"); end
    $display("writes=%0d drops=%0d reads=%0d stalls=%0d reordered=%0d trc_waits=%0d alternations=%0d updates=%0d",
             accepted, drops, rd_acc, stalls, reordered, trc_exact, alternations, updates);
    for (int g = 0; g < G; g++)
      $display("group %0d: commands=%0d write weights %0d/%0d read weights %0d/%0d", g, group_cmds[g],
               wr_weights[g][0], wr_weights[g][1], rd_weights[g][0], rd_weights[g][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
