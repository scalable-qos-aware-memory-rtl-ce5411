// reorder_buffer: the request reordering engine of one DRAM group.
//
// Requests for this group arrive already hashed to (class, bank, bank
// address). Each direction keeps one bank FIFO per class and logical bank
// (write FIFOs carry the cell payload, read FIFOs only the bank address).
// Once per DRAM issue slot three levels of arbitration pick one request:
//   1. per direction and class, a bank arbiter (LQF by default) picks a bank
//      whose FIFO is non-empty and whose DRAM bank is not busy (tRC);
//   2. per direction, the QoS class scheduler picks a class by weighted round
//      robin; its weights are adapted every update interval from the measured
//      FIFO latencies of dequeued cells;
//   3. the read/write arbiter alternates between the two directions.
// The chosen request is popped and issued through the DRAM interface, so
// requests leave their FIFOs out of arrival order whenever banks conflict.
// Read data returning from DRAM is collected in the read data buffer.
//
// Overflow: a write request whose bank FIFO is full is dropped (wr_drop = 1
// in that cycle; this is the packet loss the FIFO depth is sized against). A
// read request whose bank FIFO is full is held off with rd_ready = 0, which
// stalls the read requester. Both follow the document; the one-request-per-
// direction-per-cycle input ports and the LQF/LLF selection parameter are
// this design's choices. All arbitration is combinational within the cycle;
// the DRAM command appears one clock after the FIFO pop.
module reorder_buffer #(
  parameter int unsigned NB              = sqmc_pkg::BANKS_PER_GROUP,
  parameter int unsigned NC              = sqmc_pkg::NUM_CLASSES,
  parameter int unsigned DEPTH           = sqmc_pkg::FIFO_DEPTH,
  parameter int unsigned ROW_W           = sqmc_pkg::BLOCK_ADDR_W + sqmc_pkg::BLOCK_OFF_W
                                           - $clog2(sqmc_pkg::NUM_GROUPS) - $clog2(sqmc_pkg::BANKS_PER_GROUP),
  parameter int unsigned DATA_W          = sqmc_pkg::DATA_W,
  parameter int unsigned TIME_W          = sqmc_pkg::TIME_W,
  parameter int unsigned TRC             = sqmc_pkg::TRC,
  parameter int unsigned ISSUE_INTERVAL  = sqmc_pkg::ISSUE_INTERVAL,
  parameter int unsigned UPDATE_INTERVAL = sqmc_pkg::UPDATE_INTERVAL,
  parameter int unsigned NSUB            = sqmc_pkg::NUM_SUBRANGES,
  parameter int unsigned SUB_SHIFT       = sqmc_pkg::SUBRANGE_SHIFT,
  parameter int unsigned INIT_WEIGHT     = sqmc_pkg::INIT_WEIGHT,
  parameter int unsigned W_W             = sqmc_pkg::WEIGHT_W,
  parameter logic [NC*16-1:0] TARGET_LAT = sqmc_pkg::TARGET_LAT_DEF,
  parameter logic [NC*32-1:0] VIOL_PPM   = sqmc_pkg::VIOL_PPM_DEF,
  parameter sqmc_pkg::bank_arb_e ARB     = sqmc_pkg::ARB_LQF,
  parameter int unsigned RDB_DEPTH       = NC * NB * DEPTH,
  parameter int unsigned RD_INFLIGHT     = 16,
  localparam int unsigned BW             = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned CW             = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned OCC_W          = $clog2(DEPTH) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [TIME_W-1:0]      now,          // global cycle counter
  // write requests
  input  logic                   wr_valid,
  input  logic [CW-1:0]          wr_class,
  input  logic [BW-1:0]          wr_bank,
  input  logic [ROW_W-1:0]       wr_row,
  input  logic [DATA_W-1:0]      wr_data,
  output logic                   wr_drop,
  // read requests
  input  logic                   rd_valid,
  input  logic [CW-1:0]          rd_class,
  input  logic [BW-1:0]          rd_bank,
  input  logic [ROW_W-1:0]       rd_row,
  output logic                   rd_ready,
  // DRAM side
  output logic                   cmd_valid,
  output logic                   cmd_write,
  output logic [BW-1:0]          cmd_bank,
  output logic [ROW_W-1:0]       cmd_row,
  output logic [DATA_W-1:0]      cmd_wdata,
  input  logic                   dram_rvalid,
  input  logic [DATA_W-1:0]      dram_rdata,
  // read cells out
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [CW-1:0]          out_class,
  output logic [BW-1:0]          out_bank,
  output logic [ROW_W-1:0]       out_row,
  output logic [DATA_W-1:0]      out_data,
  // observation
  output logic [NC-1:0][W_W-1:0] wr_weights,
  output logic [NC-1:0][W_W-1:0] rd_weights,
  output logic                   weight_update
);

  localparam int unsigned WP_W = ROW_W + DATA_W;

  // ---------------------------------------------------------------- FIFOs
  logic [NC-1:0][NB-1:0]              w_empty, w_full, r_empty, r_full;
  logic [NC-1:0][NB-1:0]              w_deq, r_deq;
  logic [NC-1:0][NB-1:0][OCC_W-1:0]   w_occ, r_occ;
  logic [NC-1:0][NB-1:0][TIME_W-1:0]  w_time, r_time, w_lat, r_lat;
  logic [NC-1:0][NB-1:0][WP_W-1:0]    w_head;
  logic [NC-1:0][NB-1:0][ROW_W-1:0]   r_head;
  logic [NB-1:0]                      bank_busy;
  logic                               slot_free, rd_ok;

  assign wr_drop  = wr_valid && w_full[wr_class][wr_bank];
  assign rd_ready = !r_full[rd_class][rd_bank];

  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar b = 0; b < NB; b++) begin : g_b
      bank_fifo #(.WIDTH(WP_W), .DEPTH(DEPTH), .TIME_W(TIME_W)) u_wfifo (
        .clk, .rst_n,
        .enq(wr_valid && !wr_drop && wr_class == CW'(c) && wr_bank == BW'(b)),
        .enq_data({wr_row, wr_data}), .enq_time(now),
        .deq(w_deq[c][b]), .head_data(w_head[c][b]), .head_time(w_time[c][b]),
        .empty(w_empty[c][b]), .full(w_full[c][b]), .occupancy(w_occ[c][b])
      );
      bank_fifo #(.WIDTH(ROW_W), .DEPTH(DEPTH), .TIME_W(TIME_W)) u_rfifo (
        .clk, .rst_n,
        .enq(rd_valid && rd_ready && rd_class == CW'(c) && rd_bank == BW'(b)),
        .enq_data(rd_row), .enq_time(now),
        .deq(r_deq[c][b]), .head_data(r_head[c][b]), .head_time(r_time[c][b]),
        .empty(r_empty[c][b]), .full(r_full[c][b]), .occupancy(r_occ[c][b])
      );
      assign w_lat[c][b] = now - w_time[c][b];
      assign r_lat[c][b] = now - r_time[c][b];
    end
  end

  // ------------------------------------------------------- bank arbiters
  logic [NC-1:0]         w_bvalid, r_bvalid;
  logic [NC-1:0][BW-1:0] w_bsel, r_bsel;

  for (genvar c = 0; c < NC; c++) begin : g_arb
    bank_arbiter #(.NB(NB), .OCC_W(OCC_W), .TIME_W(TIME_W), .MODE(ARB)) u_warb (
      .eligible(~w_empty[c] & ~bank_busy), .occupancy(w_occ[c]), .head_latency(w_lat[c]),
      .valid(w_bvalid[c]), .bank(w_bsel[c])
    );
    bank_arbiter #(.NB(NB), .OCC_W(OCC_W), .TIME_W(TIME_W), .MODE(ARB)) u_rarb (
      .eligible(~r_empty[c] & ~bank_busy & {NB{rd_ok}}), .occupancy(r_occ[c]), .head_latency(r_lat[c]),
      .valid(r_bvalid[c]), .bank(r_bsel[c])
    );
  end

  // ---------------------------------------------------- class schedulers
  logic          w_cvalid, r_cvalid, w_grant, r_grant;
  logic [CW-1:0] w_csel, r_csel;
  // Both schedulers count the same interval from the same reset, so their
  // update pulses coincide; the write side's is brought out and r_update is
  // left unread.
  logic          w_update, r_update;
  logic [BW-1:0] w_bank_g, r_bank_g;

  assign w_bank_g = w_bsel[w_csel];
  assign r_bank_g = r_bsel[r_csel];

  class_scheduler #(
    .NC(NC), .TIME_W(TIME_W), .W_W(W_W), .UPDATE_INTERVAL(UPDATE_INTERVAL),
    .NSUB(NSUB), .SUB_SHIFT(SUB_SHIFT), .INIT_WEIGHT(INIT_WEIGHT),
    .TARGET_LAT(TARGET_LAT), .VIOL_PPM(VIOL_PPM)
  ) u_wcs (
    .clk, .rst_n, .req(w_bvalid), .grant(w_grant), .deq_latency(w_lat[w_csel][w_bank_g]),
    .valid(w_cvalid), .sel(w_csel), .weights(wr_weights), .update(w_update)
  );

  class_scheduler #(
    .NC(NC), .TIME_W(TIME_W), .W_W(W_W), .UPDATE_INTERVAL(UPDATE_INTERVAL),
    .NSUB(NSUB), .SUB_SHIFT(SUB_SHIFT), .INIT_WEIGHT(INIT_WEIGHT),
    .TARGET_LAT(TARGET_LAT), .VIOL_PPM(VIOL_PPM)
  ) u_rcs (
    .clk, .rst_n, .req(r_bvalid), .grant(r_grant), .deq_latency(r_lat[r_csel][r_bank_g]),
    .valid(r_cvalid), .sel(r_csel), .weights(rd_weights), .update(r_update)
  );

  assign weight_update = w_update;

  // --------------------------------------------------- read/write arbiter
  logic rw_valid, sel_read, fire;

  rw_arbiter u_rw (
    .clk, .rst_n, .wr_req(w_cvalid), .rd_req(r_cvalid), .advance(fire),
    .valid(rw_valid), .sel_read
  );

  assign fire    = slot_free && rw_valid;
  assign w_grant = fire && !sel_read;
  assign r_grant = fire && sel_read;

  always_comb begin
    w_deq = '0;
    r_deq = '0;
    if (w_grant) w_deq[w_csel][w_bank_g] = 1'b1;
    if (r_grant) r_deq[r_csel][r_bank_g] = 1'b1;
  end

  // ------------------------------------------------------- DRAM interface
  logic [ROW_W-1:0]  issue_row;
  logic [DATA_W-1:0] issue_wdata;
  logic [15:0]       rdb_free;
  logic              ret_valid;
  logic [CW-1:0]     ret_class;
  logic [BW-1:0]     ret_bank;
  logic [ROW_W-1:0]  ret_row;
  logic [DATA_W-1:0] ret_data;

  always_comb begin
    if (sel_read) begin
      issue_row   = r_head[r_csel][r_bank_g];
      issue_wdata = '0;
    end else begin
      {issue_row, issue_wdata} = w_head[w_csel][w_bank_g];
    end
  end

  dram_if #(
    .NB(NB), .NC(NC), .ROW_W(ROW_W), .DATA_W(DATA_W), .TRC(TRC),
    .ISSUE_INTERVAL(ISSUE_INTERVAL), .RD_INFLIGHT(RD_INFLIGHT), .FREE_W(16)
  ) u_dif (
    .clk, .rst_n,
    .issue(fire), .issue_write(!sel_read),
    .issue_bank(sel_read ? r_bank_g : w_bank_g),
    .issue_class(sel_read ? r_csel : w_csel),
    .issue_row, .issue_wdata,
    .slot_free, .bank_busy, .rd_ok, .rdb_free,
    .cmd_valid, .cmd_write, .cmd_bank, .cmd_row, .cmd_wdata,
    .dram_rvalid, .dram_rdata,
    .ret_valid, .ret_class, .ret_bank, .ret_row, .ret_data
  );

  // ----------------------------------------------------- read data buffer
  localparam int unsigned RB_W = CW + BW + ROW_W + DATA_W;

  read_data_buffer #(.WIDTH(RB_W), .DEPTH(RDB_DEPTH), .FREE_W(16)) u_rdb (
    .clk, .rst_n,
    .in_valid(ret_valid), .in_data({ret_class, ret_bank, ret_row, ret_data}),
    .out_valid, .out_ready, .out_data({out_class, out_bank, out_row, out_data}),
    .free(rdb_free)
  );

endmodule
