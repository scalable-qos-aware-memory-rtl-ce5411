// tb_reorder_buffer: one group with a behavioural DRAM, at reduced sizes
// (32-bit cells, 8-entry bank FIFOs, 2000-cycle weight update interval).
// Phases: random writes at close to the group's bandwidth, a write burst to a
// single bank (bank FIFO overflow, dropped writes), random reads of written
// cells, a read burst to a single bank (read stall), then drain.
// Checked: every accepted write reaches DRAM exactly once with its bank, row
// and data, and no dropped write does; every accepted read returns the data
// last written there with the right tag; commands are at least 2 clocks apart
// and a bank is not reused within 8 clocks (and both bounds are reached);
// requests leave out of arrival order; the weights are updated.
module tb_reorder_buffer;
  localparam int DW = 32, RW = 19, DEP = 8, U = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0]   now = '0;
  logic          wr_valid = 0, rd_valid = 0, wr_drop, rd_ready;
  logic [0:0]    wr_class = '0, rd_class = '0;
  logic [2:0]    wr_bank = '0, rd_bank = '0;
  logic [RW-1:0] wr_row = '0, rd_row = '0;
  logic [DW-1:0] wr_data = '0;
  logic          cmd_valid, cmd_write;
  logic [2:0]    cmd_bank;
  logic [RW-1:0] cmd_row;
  logic [DW-1:0] cmd_wdata;
  logic          dram_rvalid = 0;
  logic [DW-1:0] dram_rdata = '0;
  logic          out_valid, out_ready = 1;
  logic [0:0]    out_class;
  logic [2:0]    out_bank;
  logic [RW-1:0] out_row;
  logic [DW-1:0] out_data;
  logic [1:0][7:0] wr_weights, rd_weights;
  logic          weight_update;

  reorder_buffer #(.DEPTH(DEP), .ROW_W(RW), .DATA_W(DW), .UPDATE_INTERVAL(U), .SUB_SHIFT(6))
    dut (.*);

  always @(posedge clk) now <= now + 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural DRAM with a scoreboard
  logic [DW-1:0] mem [int];           // key {bank,row}
  int   rd_due [$];
  logic [DW-1:0] rd_q [$];
  int   cyc = 0, last_cmd = -100, min_gap = 1000, min_bank_gap = 1000;
  int   last_bank_cmd [8];
  int   pend_w [int];                 // accepted, not yet written: key -> data
  int   pend_w_seq [int];             // key -> arrival sequence number
  int   seq = 0, max_issued_seq = -1, out_of_order = 0, dram_writes = 0;
  int   bad_cmd = 0;
  int   committed [$];                // keys written to DRAM

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cmd_valid && rst_n) begin
      int key;
      key = int'({cmd_bank, cmd_row});
      if (cyc - last_cmd < min_gap) min_gap = cyc - last_cmd;
      if (cyc - last_bank_cmd[cmd_bank] < min_bank_gap) min_bank_gap = cyc - last_bank_cmd[cmd_bank];
      last_cmd = cyc;
      last_bank_cmd[cmd_bank] = cyc;
      if (cmd_write) begin
        dram_writes++;
        if (!pend_w.exists(key) || pend_w[key] != int'(cmd_wdata)) bad_cmd++;
        else begin
          if (pend_w_seq[key] < max_issued_seq) out_of_order++;
          if (pend_w_seq[key] > max_issued_seq) max_issued_seq = pend_w_seq[key];
          pend_w.delete(key);
          pend_w_seq.delete(key);
        end
        mem[key] = cmd_wdata;
        committed.push_back(key);
      end else begin
        rd_due.push_back(cyc + 10);
        rd_q.push_back(mem.exists(key) ? mem[key] : '0);
      end
    end
  end
  always @(negedge clk) begin
    dram_rvalid = (rd_due.size() != 0 && rd_due[0] <= cyc);
    dram_rdata  = dram_rvalid ? rd_q[0] : '0;
  end
  always @(posedge clk) if (dram_rvalid) begin
    void'(rd_due.pop_front());
    void'(rd_q.pop_front());
  end

  // expected read results: multiset of {key, data}
  int exp_rd [int];                   // key -> outstanding read count
  int rd_ok_cnt = 0, rd_bad = 0, rd_accepted = 0;
  always @(posedge clk) if (out_valid && out_ready && rst_n) begin
    int key;
    key = int'({out_bank, out_row});
    if (!exp_rd.exists(key) || !mem.exists(key) || mem[key] != out_data) rd_bad++;
    else begin
      rd_ok_cnt++;
      exp_rd[key]--;
      if (exp_rd[key] == 0) exp_rd.delete(key);
    end
  end

  int drops = 0, stalls = 0, accepted = 0, weight_changes = 0;
  logic [1:0][7:0] w_prev;
  int written_keys [$];
  int bank5_keys [$];

  always @(posedge clk) if (weight_update && rst_n) weight_changes++;

  task automatic do_write(int bank, int cls);
    int key;
    wr_valid = 1;
    wr_class = 1'(cls);
    wr_bank  = 3'(bank);
    wr_row   = RW'(seq);
    wr_data  = $urandom;
    key = int'({wr_bank, wr_row});
    #1;
    if (wr_drop) drops++;
    else begin
      accepted++;
      pend_w[key]     = int'(wr_data);
      pend_w_seq[key] = seq;
      written_keys.push_back(key);
    end
    seq++;
  endtask

  task automatic do_read(int key, int cls);
    rd_valid = 1;
    rd_class = 1'(cls);
    {rd_bank, rd_row} = (RW+3)'(key);
    #1;
    if (!rd_ready) begin
      stalls++;
      rd_valid = 0;
    end else begin
      rd_accepted++;
      if (exp_rd.exists(key)) exp_rd[key]++; else exp_rd[key] = 1;
    end
  endtask

  initial begin
    foreach (last_bank_cmd[b]) last_bank_cmd[b] = -100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: random writes at 0.45 cells per clock
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_valid = 0;
      if ($urandom % 100 < 45) do_write($urandom % 8, $urandom % 2);
    end
    // phase 2: burst to bank 3, class 0
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      do_write(3, 0);
    end
    @(negedge clk);
    wr_valid = 0;
    repeat (300) @(negedge clk);
    // phase 3: random reads of written cells, mixed with writes
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_valid = 0;
      rd_valid = 0;
      if ($urandom % 100 < 20) do_write($urandom % 8, $urandom % 2);
      if ($urandom % 100 < 25) do_read(committed[$urandom % committed.size()], $urandom % 2);
    end
    // phase 4: read burst on bank 5
    foreach (committed[k]) if (committed[k][RW+2:RW] == 3'd5) bank5_keys.push_back(committed[k]);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      wr_valid = 0;
      do_read(bank5_keys[n % bank5_keys.size()], 1);
    end
    @(negedge clk);
    rd_valid = 0;
    wr_valid = 0;
    repeat (3000) @(negedge clk);

    checks++; if (bad_cmd != 0)       begin failures++; $display("bad DRAM writes %0d", bad_cmd); end
    checks++; if (pend_w.size() != 0) begin failures++; $display("writes never issued %0d", pend_w.size()); end
    checks++; if (dram_writes != accepted) begin failures++; $display("dram writes %0d accepted %0d", dram_writes, accepted); end
    checks++; if (rd_bad != 0 || exp_rd.size() != 0 || rd_ok_cnt != rd_accepted) begin
      failures++; $display("reads bad=%0d outstanding=%0d ok=%0d accepted=%0d", rd_bad, exp_rd.size(), rd_ok_cnt, rd_accepted); end
    checks++; if (min_gap != 2)       begin failures++; $display("min issue gap %0d", min_gap); end
    checks++; if (min_bank_gap != 8)  begin failures++; $display("min same-bank gap %0d", min_bank_gap); end
    checks++; if (drops == 0)         begin failures++; $display("no overflow drop"); end
    checks++; if (stalls == 0)        begin failures++; $display("no read stall"); end
    checks++; if (out_of_order == 0)  begin failures++; $display("no reordering"); end
    checks++; if (weight_changes < 3) begin failures++; $display("no weight update"); end
    $display("accepted=%0d drops=%0d reads=%0d stalls=%0d reordered=%0d updates=%0d weights w=%0d/%0d r=%0d/%0d",
             accepted, drops, rd_accepted, stalls, out_of_order, weight_changes,
             wr_weights[0], wr_weights[1], rd_weights[0], rd_weights[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
