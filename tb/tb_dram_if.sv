// tb_dram_if: drives random cell accesses whenever the interface allows
// them and checks, against cycle timestamps kept by the testbench, that
// issue slots are 2 clocks apart, a bank stays busy for exactly 8 clocks
// (tRC), commands appear one clock after issue, reads are refused once the
// read credit (in-flight reads versus free read buffer entries) is used up,
// and returned data carries the tag of the read that was issued in that
// position. A behavioural DRAM returns reads in order after 12 clocks.
module tb_dram_if;
  localparam int DW = 32, RW = 19;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          issue = 0, issue_write = 0;
  logic [2:0]    issue_bank = '0;
  logic [0:0]    issue_class = '0;
  logic [RW-1:0] issue_row = '0;
  logic [DW-1:0] issue_wdata = '0;
  logic          slot_free, rd_ok;
  logic [7:0]    bank_busy;
  logic [15:0]   rdb_free = 16'd6;
  logic          cmd_valid, cmd_write;
  logic [2:0]    cmd_bank;
  logic [RW-1:0] cmd_row;
  logic [DW-1:0] cmd_wdata;
  logic          dram_rvalid = 0;
  logic [DW-1:0] dram_rdata = '0;
  logic          ret_valid;
  logic [0:0]    ret_class;
  logic [2:0]    ret_bank;
  logic [RW-1:0] ret_row;
  logic [DW-1:0] ret_data;

  dram_if #(.NB(8), .NC(2), .ROW_W(RW), .DATA_W(DW), .TRC(8), .ISSUE_INTERVAL(2),
            .RD_INFLIGHT(16), .FREE_W(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural DRAM: read data = f(bank,row), returned 12 clocks after the command
  int   ret_due [$];
  logic [DW-1:0] ret_q [$];
  logic [RW+3:0] tag_q [$];
  int   cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cmd_valid && !cmd_write) begin
      ret_due.push_back(cyc + 12);
      ret_q.push_back({cmd_bank, cmd_row} * 32'h9e37);
    end
  end
  always @(negedge clk) begin
    dram_rvalid = (ret_due.size() != 0 && ret_due[0] <= cyc);
    dram_rdata  = dram_rvalid ? ret_q[0] : '0;
  end
  always @(posedge clk) if (dram_rvalid) begin
    void'(ret_due.pop_front());
    void'(ret_q.pop_front());
  end

  int last_issue = -100;
  int last_bank [8];
  int inflight = 0, reads = 0, writes = 0, credit_stalls = 0, busy_seen = 0, rets = 0;
  logic [RW+3:0] exp_tag;

  initial begin
    foreach (last_bank[b]) last_bank[b] = -100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      #1;
      // timing model
      checks++;
      if (slot_free != (cyc - last_issue >= 2)) begin failures++; $display("slot mismatch at %0d", cyc); end
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (bank_busy[b] != (cyc - last_bank[b] < 8)) begin failures++; $display("busy mismatch bank %0d", b); end
        if (bank_busy[b]) busy_seen++;
      end
      checks++;
      if (rd_ok != (inflight < 16 && inflight < int'(rdb_free))) begin failures++; $display("rd_ok mismatch"); end
      if (!rd_ok) credit_stalls++;
      // returned data with its tag
      if (dram_rvalid) begin
        exp_tag = tag_q.pop_front();
        checks++;
        rets++;
        if ({ret_bank, ret_row} != exp_tag[RW+2:0] || ret_class != exp_tag[RW+3] ||
            ret_data != {exp_tag[RW+2:0]} * 32'h9e37 || !ret_valid) begin
          failures++; $display("return tag mismatch");
        end
      end
      // pick a request
      issue_bank  = 3'($urandom);
      issue_write = 1'($urandom);
      issue_class = 1'($urandom);
      issue_row   = RW'($urandom);
      issue_wdata = $urandom;
      rdb_free    = (n % 500 < 250) ? 16'd6 : 16'd64;
      issue = slot_free && !bank_busy[issue_bank] && (issue_write || rd_ok) && ($urandom % 4 != 0);
      if (issue) begin
        last_issue = cyc;
        last_bank[issue_bank] = cyc;
        if (!issue_write) begin
          tag_q.push_back({issue_class, issue_bank, issue_row});
          reads++;
        end else writes++;
      end
      @(posedge clk);
      #1;
      if (issue && !issue_write) inflight++;
      if (rets_pop) inflight--;
      checks++;
      if (cmd_valid != issue || (issue && (cmd_bank != issue_bank || cmd_row != issue_row ||
          cmd_write != issue_write || (issue_write && cmd_wdata != issue_wdata)))) begin
        failures++; $display("command mismatch");
      end
      issue = 0;
    end
    checks++;
    if (reads < 100 || writes < 100 || credit_stalls == 0 || busy_seen == 0 || rets < 100) begin
      failures++;
      $display("coverage: reads=%0d writes=%0d stalls=%0d rets=%0d", reads, writes, credit_stalls, rets);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rets_pop;
  always @(posedge clk) rets_pop <= dram_rvalid;
endmodule
