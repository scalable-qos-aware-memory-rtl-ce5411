// weight_generator: the weight update function f of the QoS scheduler.
//
//   W[n] = W[n-1] + alpha  if E > 0, with alpha = E >> m
//   W[n] = W[n-1] - 1      if E < 0 and W[n-1] > 1
//   W[n] = W[n-1]          otherwise
// m is the bit position of the most significant 1 of ref[r]; the shift
// approximates E / ref[r] without a divider (e.g. E = 55, ref = 20: m = 4,
// alpha = 3). A positive error therefore raises the weight in proportion to
// the normalised error, while a negative one lowers it by one step only, and
// the weight never falls below 1. The update rule is the document's. This
// design's choices: the weight saturates at 2^W_W - 1, and m = 0 when
// ref[r] = 0. Purely combinational.
module weight_generator #(
  parameter int unsigned W_W   = sqmc_pkg::WEIGHT_W,
  parameter int unsigned CNT_W = sqmc_pkg::CNT_W
) (
  input  logic signed [CNT_W:0] err,
  input  logic [CNT_W-1:0]      ref_val,
  input  logic [W_W-1:0]        w_prev,
  output logic [W_W-1:0]        w_next,
  output logic [CNT_W-1:0]      alpha
);

  logic [$clog2(CNT_W)-1:0] m;
  logic [CNT_W:0]           sum;

  always_comb begin
    // leading-one detector on ref
    m = '0;
    for (int unsigned b = 0; b < CNT_W; b++)
      if (ref_val[b]) m = ($clog2(CNT_W))'(b);
    alpha  = CNT_W'(err) >> m;
    sum    = (CNT_W+1)'(w_prev) + (CNT_W+1)'(alpha);
    w_next = w_prev;
    if (err > 0)
      w_next = (sum > (CNT_W+1)'({W_W{1'b1}})) ? '1 : W_W'(sum);
    else if (err < 0 && w_prev > W_W'(1))
      w_next = w_prev - 1'b1;
  end

endmodule
