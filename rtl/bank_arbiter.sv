// bank_arbiter: picks one bank FIFO of a class within a group.
//
// A bank is a candidate when its FIFO holds a request and the DRAM bank is
// not busy (eligible). Two schemes, chosen by MODE:
//   ARB_LQF  longest queue first: the candidate with the largest occupancy.
//   ARB_LLF  longest latency first: the candidate whose head cell has waited
//            longest (head_latency = now - enqueue time).
// The controller uses LQF; LLF is kept as the alternative the document
// compares against. Ties go to the lowest bank number (a design choice). The
// arbiter is combinational: valid/bank follow the inputs in the same cycle.
module bank_arbiter #(
  parameter int unsigned        NB     = sqmc_pkg::BANKS_PER_GROUP,
  parameter int unsigned        OCC_W  = $clog2(sqmc_pkg::FIFO_DEPTH) + 1,
  parameter int unsigned        TIME_W = sqmc_pkg::TIME_W,
  parameter sqmc_pkg::bank_arb_e MODE  = sqmc_pkg::ARB_LQF,
  localparam int unsigned       BW     = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic [NB-1:0]             eligible,
  input  logic [NB-1:0][OCC_W-1:0]  occupancy,
  input  logic [NB-1:0][TIME_W-1:0] head_latency,
  output logic                      valid,
  output logic [BW-1:0]             bank
);

  logic [TIME_W-1:0] best_key, key;

  always_comb begin
    valid    = 1'b0;
    bank     = '0;
    best_key = '0;
    for (int unsigned b = 0; b < NB; b++) begin
      key = (MODE == sqmc_pkg::ARB_LQF) ? TIME_W'(occupancy[b]) : head_latency[b];
      if (eligible[b] && (!valid || key > best_key)) begin
        valid    = 1'b1;
        bank     = BW'(b);
        best_key = key;
      end
    end
  end

endmodule
