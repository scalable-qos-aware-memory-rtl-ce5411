// qos_accumulator: per-class feedback measurement of the QoS scheduler.
//
// Two counters run over each weight update interval: X counts the cells of
// this class dequeued from the bank FIFOs, Y counts those whose FIFO latency
// exceeded the class's target latency M. At the end of the interval
// (update = 1) the module reports
//   r   = sub-range of X, taken from the MSBs of X: min(X >> SUB_SHIFT, NSUB-1)
//   ref = ref[r], a constant table holding N x (median of sub-range r), so
//         that X x N needs no multiplier
//   err = Y - ref[r], the quantized error E_i (two's complement)
// and restarts both counters with the cell dequeued in that same cycle.
// The counters saturate at their maximum. The ref table is computed at
// elaboration from VIOL_PPM (N in parts per million). Counting, sub-range
// decoding and the table follow the document; the ppm encoding, the rounding
// of ref and the counter widths are this design's choices.
//
// Timing: deq/latency are sampled at each clock edge; r, ref and err are
// combinational views of the counters and are meaningful while update = 1.
module qos_accumulator #(
  parameter int unsigned TIME_W     = sqmc_pkg::TIME_W,
  parameter int unsigned CNT_W      = sqmc_pkg::CNT_W,
  parameter int unsigned TARGET_LAT = 60,
  parameter int unsigned VIOL_PPM   = 1000,
  parameter int unsigned NSUB       = sqmc_pkg::NUM_SUBRANGES,
  parameter int unsigned SUB_SHIFT  = sqmc_pkg::SUBRANGE_SHIFT,
  localparam int unsigned RW        = (NSUB > 1) ? $clog2(NSUB) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              deq,         // is_cell_deq for this class
  input  logic [TIME_W-1:0] latency,     // FIFO latency of the dequeued cell
  input  logic              update,      // last cycle of the interval
  output logic [CNT_W-1:0]  x_cnt,
  output logic [CNT_W-1:0]  y_cnt,
  output logic [RW-1:0]     r,
  output logic [CNT_W-1:0]  ref_val,
  output logic signed [CNT_W:0] err
);

  typedef logic [CNT_W-1:0] ref_table_t [NSUB];

  function automatic ref_table_t build_table();
    ref_table_t t;
    for (int unsigned k = 0; k < NSUB; k++)
      t[k] = CNT_W'(sqmc_pkg::ref_value(VIOL_PPM, k, SUB_SHIFT));
    return t;
  endfunction

  localparam ref_table_t REF_TABLE = build_table();

  logic viol;
  logic [CNT_W-1:0] x_hi;

  assign viol = deq && (latency > TIME_W'(TARGET_LAT));

  // address decoder: the MSBs of X select the sub-range
  always_comb begin
    x_hi = x_cnt >> SUB_SHIFT;
    r    = (x_hi >= CNT_W'(NSUB - 1)) ? RW'(NSUB - 1) : RW'(x_hi);
    ref_val = REF_TABLE[r];
    err  = $signed({1'b0, y_cnt}) - $signed({1'b0, ref_val});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt <= '0;
      y_cnt <= '0;
    end else if (update) begin
      x_cnt <= CNT_W'(deq);
      y_cnt <= CNT_W'(viol);
    end else begin
      if (deq  && x_cnt != '1) x_cnt <= x_cnt + 1'b1;
      if (viol && y_cnt != '1) y_cnt <= y_cnt + 1'b1;
    end
  end

endmodule
