// class_scheduler: QoS-aware class scheduler of one group and one direction.
//
// A feedback loop around a weighted round robin. Per class, a qos_accumulator
// counts dequeued cells (X) and latency violations (Y) over a weight update
// interval of UPDATE_INTERVAL cycles and forms the quantized error
// E = Y - ref[r]. In the last cycle of the interval the weight generator
// turns E, the old weight and ref[r] into the new weight, which the WRR
// scheduler loads at the start of its next round. The WRR picks, among the
// classes that have a schedulable bank (req), the class whose cell is issued.
//
// Interface: req/valid/sel are combinational; grant (only with valid)
// commits the choice and reports a dequeue of class sel whose FIFO latency
// is deq_latency. weights shows the current weights, update pulses in the
// last cycle of each interval. Structure and update rule follow the document;
// the initial weight and the free-running interval counter started by reset
// are this design's choices.
module class_scheduler #(
  parameter int unsigned NC              = sqmc_pkg::NUM_CLASSES,
  parameter int unsigned TIME_W          = sqmc_pkg::TIME_W,
  parameter int unsigned W_W             = sqmc_pkg::WEIGHT_W,
  parameter int unsigned CNT_W           = sqmc_pkg::CNT_W,
  parameter int unsigned UPDATE_INTERVAL = sqmc_pkg::UPDATE_INTERVAL,
  parameter int unsigned NSUB            = sqmc_pkg::NUM_SUBRANGES,
  parameter int unsigned SUB_SHIFT       = sqmc_pkg::SUBRANGE_SHIFT,
  parameter int unsigned INIT_WEIGHT     = sqmc_pkg::INIT_WEIGHT,
  parameter logic [NC*16-1:0] TARGET_LAT = sqmc_pkg::TARGET_LAT_DEF,
  parameter logic [NC*32-1:0] VIOL_PPM   = sqmc_pkg::VIOL_PPM_DEF,
  localparam int unsigned CW             = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NC-1:0]          req,
  input  logic                   grant,
  input  logic [TIME_W-1:0]      deq_latency,
  output logic                   valid,
  output logic [CW-1:0]          sel,
  output logic [NC-1:0][W_W-1:0] weights,
  output logic                   update
);

  localparam int unsigned IW = $clog2(UPDATE_INTERVAL);

  logic [IW-1:0]                 interval_cnt;
  logic [NC-1:0][W_W-1:0]        w_next;
  logic                          new_round;

  assign update = (interval_cnt == IW'(UPDATE_INTERVAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) interval_cnt <= '0;
    else        interval_cnt <= update ? '0 : interval_cnt + 1'b1;
  end

  for (genvar c = 0; c < NC; c++) begin : g_class
    logic signed [CNT_W:0] err;
    logic [CNT_W-1:0]      ref_val, x_cnt, y_cnt, alpha;
    logic [(NSUB > 1 ? $clog2(NSUB) : 1)-1:0] r;

    qos_accumulator #(
      .TIME_W(TIME_W), .CNT_W(CNT_W),
      .TARGET_LAT(int'(TARGET_LAT[c*16 +: 16])), .VIOL_PPM(int'(VIOL_PPM[c*32 +: 32])),
      .NSUB(NSUB), .SUB_SHIFT(SUB_SHIFT)
    ) u_acc (
      .clk, .rst_n,
      .deq(grant && valid && sel == CW'(c)), .latency(deq_latency), .update,
      .x_cnt, .y_cnt, .r, .ref_val, .err
    );

    weight_generator #(.W_W(W_W), .CNT_W(CNT_W)) u_f (
      .err, .ref_val, .w_prev(weights[c]), .w_next(w_next[c]), .alpha
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      weights[c] <= W_W'(INIT_WEIGHT);
      else if (update) weights[c] <= w_next[c];
    end
  end

  wrr_scheduler #(.NC(NC), .W_W(W_W)) u_wrr (
    .clk, .rst_n, .req, .weight(weights), .advance(grant), .valid, .sel, .new_round
  );

endmodule
