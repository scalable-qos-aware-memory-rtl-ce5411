// sqmc_top: scalable QoS-aware packet memory controller.
//
// The controller sits between the router's queue manager and a packet memory
// built from DRAM parts organised as NUM_GROUPS groups of BANKS_PER_GROUP
// logical banks. Each cycle it accepts at most one cell write and one cell
// read request, each addressed by block address and block offset as kept in
// the per-output-queue linked lists. The hash logic maps the address to a
// group, a bank and a bank address, so consecutive cells spread over groups
// first and then banks. The request then enters its group's reorder buffer,
// which queues it in a per-class, per-bank FIFO and issues it to DRAM out of
// order as banks become free, under LQF bank arbitration, a feedback-tuned
// weighted round robin between classes and read/write alternation. The
// buffering needed is set by bank conflicts, not by the number of output
// queues. A free-running 16-bit cycle counter stamps every request for the
// latency measurement.
//
// Ports: wr_* is a write request with its 512-bit cell; wr_drop flags, in
// the same cycle, a write lost because its bank FIFO is full. rd_* is a read
// request with a ready: rd_ready = 0 means the targeted bank FIFO is full and
// the request must be held. Per group g: a DRAM command port (cmd_*[g]), the
// DRAM read data return (dram_rvalid/dram_rdata[g], in issue order) and a
// valid/ready stream of read cells (out_*[g]) tagged with class, bank and
// bank address. wr_weights/rd_weights show the class weights of each group.
// The hash, the buffer organisation and the arbitration come from the
// document; port shapes and one-request-per-direction-per-cycle are this
// design's choices.
module sqmc_top #(
  parameter int unsigned NUM_GROUPS      = sqmc_pkg::NUM_GROUPS,
  parameter int unsigned BANKS_PER_GROUP = sqmc_pkg::BANKS_PER_GROUP,
  parameter int unsigned NUM_CLASSES     = sqmc_pkg::NUM_CLASSES,
  parameter int unsigned FIFO_DEPTH      = sqmc_pkg::FIFO_DEPTH,
  parameter int unsigned BLOCK_ADDR_W    = sqmc_pkg::BLOCK_ADDR_W,
  parameter int unsigned BLOCK_OFF_W     = sqmc_pkg::BLOCK_OFF_W,
  parameter int unsigned DATA_W          = sqmc_pkg::DATA_W,
  parameter int unsigned TIME_W          = sqmc_pkg::TIME_W,
  parameter int unsigned TRC             = sqmc_pkg::TRC,
  parameter int unsigned ISSUE_INTERVAL  = sqmc_pkg::ISSUE_INTERVAL,
  parameter int unsigned UPDATE_INTERVAL = sqmc_pkg::UPDATE_INTERVAL,
  parameter int unsigned NSUB            = sqmc_pkg::NUM_SUBRANGES,
  parameter int unsigned SUB_SHIFT       = sqmc_pkg::SUBRANGE_SHIFT,
  parameter int unsigned INIT_WEIGHT     = sqmc_pkg::INIT_WEIGHT,
  parameter int unsigned W_W             = sqmc_pkg::WEIGHT_W,
  parameter logic [NUM_CLASSES*16-1:0] TARGET_LAT = sqmc_pkg::TARGET_LAT_DEF,
  parameter logic [NUM_CLASSES*32-1:0] VIOL_PPM   = sqmc_pkg::VIOL_PPM_DEF,
  parameter sqmc_pkg::bank_arb_e ARB     = sqmc_pkg::ARB_LQF,
  localparam int unsigned GW    = $clog2(NUM_GROUPS),
  localparam int unsigned GWS   = (GW > 0) ? GW : 1,
  localparam int unsigned BW    = $clog2(BANKS_PER_GROUP),
  localparam int unsigned CW    = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1,
  localparam int unsigned ROW_W = BLOCK_ADDR_W + BLOCK_OFF_W - GW - BW
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // cell write requests
  input  logic                                   wr_valid,
  input  logic [CW-1:0]                          wr_class,
  input  logic [BLOCK_ADDR_W-1:0]                wr_block_addr,
  input  logic [BLOCK_OFF_W-1:0]                 wr_block_offset,
  input  logic [DATA_W-1:0]                      wr_data,
  output logic                                   wr_drop,
  // cell read requests
  input  logic                                   rd_valid,
  input  logic [CW-1:0]                          rd_class,
  input  logic [BLOCK_ADDR_W-1:0]                rd_block_addr,
  input  logic [BLOCK_OFF_W-1:0]                 rd_block_offset,
  output logic                                   rd_ready,
  // DRAM parts, one port per group
  output logic [NUM_GROUPS-1:0]                  cmd_valid,
  output logic [NUM_GROUPS-1:0]                  cmd_write,
  output logic [NUM_GROUPS-1:0][BW-1:0]          cmd_bank,
  output logic [NUM_GROUPS-1:0][ROW_W-1:0]       cmd_row,
  output logic [NUM_GROUPS-1:0][DATA_W-1:0]      cmd_wdata,
  input  logic [NUM_GROUPS-1:0]                  dram_rvalid,
  input  logic [NUM_GROUPS-1:0][DATA_W-1:0]      dram_rdata,
  // read cells, one stream per group
  output logic [NUM_GROUPS-1:0]                  out_valid,
  input  logic [NUM_GROUPS-1:0]                  out_ready,
  output logic [NUM_GROUPS-1:0][CW-1:0]          out_class,
  output logic [NUM_GROUPS-1:0][BW-1:0]          out_bank,
  output logic [NUM_GROUPS-1:0][ROW_W-1:0]       out_row,
  output logic [NUM_GROUPS-1:0][DATA_W-1:0]      out_data,
  // class weights per group
  output logic [NUM_GROUPS-1:0][NUM_CLASSES-1:0][W_W-1:0] wr_weights,
  output logic [NUM_GROUPS-1:0][NUM_CLASSES-1:0][W_W-1:0] rd_weights,
  output logic                                   weight_update
);

  // global cycle counter for enqueue time stamps
  logic [TIME_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // hash logic, one instance per direction
  logic [GWS-1:0]   wr_group, rd_group;
  logic [BW-1:0]    wr_bank, rd_bank;
  logic [ROW_W-1:0] wr_row, rd_row;

  sqmc_hash #(.I(BLOCK_ADDR_W), .J(BLOCK_OFF_W), .M(GW), .N(BW)) u_wr_hash (
    .block_addr(wr_block_addr), .block_offset(wr_block_offset),
    .group(wr_group), .bank(wr_bank), .bank_addr(wr_row)
  );
  sqmc_hash #(.I(BLOCK_ADDR_W), .J(BLOCK_OFF_W), .M(GW), .N(BW)) u_rd_hash (
    .block_addr(rd_block_addr), .block_offset(rd_block_offset),
    .group(rd_group), .bank(rd_bank), .bank_addr(rd_row)
  );

  logic [NUM_GROUPS-1:0] g_drop, g_rd_ready, g_update;

  assign wr_drop       = g_drop[wr_group];
  assign rd_ready      = g_rd_ready[rd_group];
  assign weight_update = g_update[0];

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_grp
    reorder_buffer #(
      .NB(BANKS_PER_GROUP), .NC(NUM_CLASSES), .DEPTH(FIFO_DEPTH), .ROW_W(ROW_W),
      .DATA_W(DATA_W), .TIME_W(TIME_W), .TRC(TRC), .ISSUE_INTERVAL(ISSUE_INTERVAL),
      .UPDATE_INTERVAL(UPDATE_INTERVAL), .NSUB(NSUB), .SUB_SHIFT(SUB_SHIFT),
      .INIT_WEIGHT(INIT_WEIGHT), .W_W(W_W), .TARGET_LAT(TARGET_LAT),
      .VIOL_PPM(VIOL_PPM), .ARB(ARB)
    ) u_rob (
      .clk, .rst_n, .now,
      .wr_valid(wr_valid && wr_group == GWS'(g)), .wr_class, .wr_bank, .wr_row, .wr_data,
      .wr_drop(g_drop[g]),
      .rd_valid(rd_valid && rd_group == GWS'(g)), .rd_class, .rd_bank, .rd_row,
      .rd_ready(g_rd_ready[g]),
      .cmd_valid(cmd_valid[g]), .cmd_write(cmd_write[g]), .cmd_bank(cmd_bank[g]),
      .cmd_row(cmd_row[g]), .cmd_wdata(cmd_wdata[g]),
      .dram_rvalid(dram_rvalid[g]), .dram_rdata(dram_rdata[g]),
      .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_class(out_class[g]),
      .out_bank(out_bank[g]), .out_row(out_row[g]), .out_data(out_data[g]),
      .wr_weights(wr_weights[g]), .rd_weights(rd_weights[g]),
      .weight_update(g_update[g])
    );
  end

endmodule
