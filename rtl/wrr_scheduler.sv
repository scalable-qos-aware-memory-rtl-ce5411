// wrr_scheduler: work-conserving weighted round robin among service classes.
//
// Each class has a weight counter. When a round starts, the current weights
// are loaded into the counters; every cell granted to a class decrements its
// counter. Classes whose counter is non-zero and that have a request are
// served in round-robin order, one cell at a time. A class whose counter
// reached zero waits until no other requesting class has credit left (all
// other counters exhausted, or the other classes have nothing to send); then
// the weights are reloaded and a new round starts in that same cycle, so the
// scheduler never idles while a request is pending.
//
// Interface: req is sampled combinationally; valid/sel give the chosen class
// in the same cycle; advance (only with valid) commits the grant at the clock
// edge. New weights take effect at the next round start. The algorithm is the
// document's; the same-cycle reload and the reset state (all counters zero, so
// the first request starts a round) are this design's choices.
module wrr_scheduler #(
  parameter int unsigned NC  = sqmc_pkg::NUM_CLASSES,
  parameter int unsigned W_W = sqmc_pkg::WEIGHT_W,
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NC-1:0]           req,
  input  logic [NC-1:0][W_W-1:0]  weight,
  input  logic                    advance,
  output logic                    valid,
  output logic [CW-1:0]           sel,
  output logic                    new_round
);

  logic [NC-1:0][W_W-1:0] cnt, eff_cnt;
  logic [NC-1:0]          credit;
  logic [CW-1:0]          last;
  int unsigned            idx;

  always_comb begin
    for (int unsigned c = 0; c < NC; c++) credit[c] = req[c] && (cnt[c] != '0);
    new_round = (credit == '0) && (req != '0);
    eff_cnt   = new_round ? weight : cnt;
    for (int unsigned c = 0; c < NC; c++) credit[c] = req[c] && (eff_cnt[c] != '0);
    // round robin: first class with credit after the last one served
    valid = 1'b0;
    sel   = '0;
    for (int unsigned k = 1; k <= NC; k++) begin
      idx = (int'(last) + k) % NC;
      if (!valid && credit[idx]) begin
        valid = 1'b1;
        sel   = CW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      last <= CW'(NC - 1);
    end else if (advance && valid) begin
      cnt      <= eff_cnt;
      cnt[sel] <= eff_cnt[sel] - 1'b1;
      last     <= sel;
    end
  end

  a_adv_valid: assert property (@(posedge clk) disable iff (!rst_n) advance |-> valid);

endmodule
