// dram_if: DRAM interface of one group.
//
// It turns a scheduled cell request into one DRAM cell access and enforces
// the DRAM timing seen by the schedulers:
//   * issue slots: after an access the next one may start ISSUE_INTERVAL
//     clocks later (a 4-beat DDR burst takes 2 memory clocks);
//   * bank busy: a bank that was accessed cannot be accessed again for TRC
//     clocks (row cycle time); bank_busy masks it out of bank arbitration;
//   * read tags: DRAM returns read data in issue order without any tag, so
//     the class, bank and bank address of every outstanding read are queued
//     here (RD_INFLIGHT deep) and attached to the data as it comes back.
// A read may be issued only when a tag slot and a free entry in the read data
// buffer (rdb_free, counting reads still in flight) are available (rd_ok).
//
// Timing: the command registers drive cmd_* one clock after issue. Returned
// data (dram_rvalid/dram_rdata) is passed on combinationally with its tag.
// The document names this interface and gives the DRAM timing (burst 4, tRC 8
// memory clocks, a cell every 2 clocks); the command format, the tag queue and
// the credit check are this design's choices.
module dram_if #(
  parameter int unsigned NB             = sqmc_pkg::BANKS_PER_GROUP,
  parameter int unsigned NC             = sqmc_pkg::NUM_CLASSES,
  parameter int unsigned ROW_W          = sqmc_pkg::BLOCK_ADDR_W + sqmc_pkg::BLOCK_OFF_W
                                          - $clog2(sqmc_pkg::NUM_GROUPS) - $clog2(sqmc_pkg::BANKS_PER_GROUP),
  parameter int unsigned DATA_W         = sqmc_pkg::DATA_W,
  parameter int unsigned TRC            = sqmc_pkg::TRC,
  parameter int unsigned ISSUE_INTERVAL = sqmc_pkg::ISSUE_INTERVAL,
  parameter int unsigned RD_INFLIGHT    = 16,
  parameter int unsigned FREE_W         = 16,
  localparam int unsigned BW            = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned CW            = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned TAG_W         = CW + BW + ROW_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the schedulers
  input  logic              issue,
  input  logic              issue_write,
  input  logic [BW-1:0]     issue_bank,
  input  logic [CW-1:0]     issue_class,
  input  logic [ROW_W-1:0]  issue_row,
  input  logic [DATA_W-1:0] issue_wdata,
  output logic              slot_free,
  output logic [NB-1:0]     bank_busy,
  output logic              rd_ok,
  input  logic [FREE_W-1:0] rdb_free,
  // to / from the DRAM parts of this group
  output logic              cmd_valid,
  output logic              cmd_write,
  output logic [BW-1:0]     cmd_bank,
  output logic [ROW_W-1:0]  cmd_row,
  output logic [DATA_W-1:0] cmd_wdata,
  input  logic              dram_rvalid,
  input  logic [DATA_W-1:0] dram_rdata,
  // returned read cells, to the read data buffer
  output logic              ret_valid,
  output logic [CW-1:0]     ret_class,
  output logic [BW-1:0]     ret_bank,
  output logic [ROW_W-1:0]  ret_row,
  output logic [DATA_W-1:0] ret_data
);

  localparam int unsigned SW = $clog2(ISSUE_INTERVAL) + 1;
  localparam int unsigned TW = $clog2(TRC) + 1;
  localparam int unsigned QW = $clog2(RD_INFLIGHT);

  logic [SW-1:0]          slot_cnt;
  logic [NB-1:0][TW-1:0]  busy_cnt;
  logic [TAG_W-1:0]       tag_mem [RD_INFLIGHT];
  logic [QW:0]            tq_wr, tq_rd, inflight;
  logic [TAG_W-1:0]       tag_head;

  assign slot_free = (slot_cnt == '0);
  for (genvar b = 0; b < NB; b++) begin : g_busy
    assign bank_busy[b] = (busy_cnt[b] != '0);
  end

  assign inflight = tq_wr - tq_rd;
  assign rd_ok    = (inflight < (QW+1)'(RD_INFLIGHT)) &&
                    (FREE_W'(inflight) < rdb_free);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_cnt  <= '0;
      busy_cnt  <= '0;
      cmd_valid <= 1'b0;
      tq_wr     <= '0;
      tq_rd     <= '0;
    end else begin
      for (int unsigned b = 0; b < NB; b++)
        if (busy_cnt[b] != '0) busy_cnt[b] <= busy_cnt[b] - 1'b1;
      if (slot_cnt != '0) slot_cnt <= slot_cnt - 1'b1;
      cmd_valid <= issue;
      if (issue) begin
        slot_cnt             <= SW'(ISSUE_INTERVAL - 1);
        busy_cnt[issue_bank] <= TW'(TRC - 1);
        if (!issue_write) tq_wr <= tq_wr + 1'b1;
      end
      if (dram_rvalid) tq_rd <= tq_rd + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      cmd_write <= issue_write;
      cmd_bank  <= issue_bank;
      cmd_row   <= issue_row;
      cmd_wdata <= issue_wdata;
      if (!issue_write) tag_mem[tq_wr[QW-1:0]] <= {issue_class, issue_bank, issue_row};
    end
  end

  assign tag_head = tag_mem[tq_rd[QW-1:0]];
  always_comb begin
    ret_valid                      = dram_rvalid;
    ret_data                       = dram_rdata;
    {ret_class, ret_bank, ret_row} = tag_head;
  end

  a_slot:    assert property (@(posedge clk) disable iff (!rst_n) issue |-> slot_free);
  a_bank:    assert property (@(posedge clk) disable iff (!rst_n) issue |-> !bank_busy[issue_bank]);
  a_rd_ok:   assert property (@(posedge clk) disable iff (!rst_n) issue && !issue_write |-> rd_ok);
  a_ret_tag: assert property (@(posedge clk) disable iff (!rst_n) dram_rvalid |-> inflight != '0);

endmodule
