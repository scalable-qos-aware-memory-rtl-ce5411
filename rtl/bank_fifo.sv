// bank_fifo: request FIFO of one logical bank (one class, one direction).
//
// A circular buffer with a write and a read pointer that are one bit wider
// than the address, so their difference is the occupancy (6 bits for 32
// entries) used by the longest-queue-first bank arbiter. Next to every entry
// sits an enqueue time register: on enqueue the global cycle counter is saved
// with the request, and the time of the head entry is presented so that the
// cell's FIFO latency (now - enqueue time, modulo 2^TIME_W) can be measured
// for the longest-latency-first arbiter and for the QoS accumulators.
//
// The pointers count modulo 2 x DEPTH, so DEPTH need not be a power of two
// (24-entry FIFOs are one of the evaluated sizes).
//
// Interface: enq/enq_data/enq_time write at the clock edge and must not be
// asserted when full; deq pops the head at the clock edge and must not be
// asserted when empty. head_data/head_time show the oldest entry with zero
// latency (first-word fall-through). Enqueue and dequeue may happen in the
// same cycle. Pointer-based occupancy and the time register follow the
// document; the first-word-fall-through timing is this design's choice.
module bank_fifo #(
  parameter int unsigned WIDTH  = sqmc_pkg::DATA_W,
  parameter int unsigned DEPTH  = sqmc_pkg::FIFO_DEPTH,
  parameter int unsigned TIME_W = sqmc_pkg::TIME_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enq,
  input  logic [WIDTH-1:0]  enq_data,
  input  logic [TIME_W-1:0] enq_time,
  input  logic              deq,
  output logic [WIDTH-1:0]  head_data,
  output logic [TIME_W-1:0] head_time,
  output logic              empty,
  output logic              full,
  output logic [AW:0]       occupancy
);

  localparam int unsigned PW = AW + 1;

  logic [WIDTH-1:0]  data_mem [DEPTH];
  logic [TIME_W-1:0] time_mem [DEPTH];
  logic [PW-1:0]     wr_ptr, rd_ptr;     // 0 .. 2*DEPTH-1
  logic [AW-1:0]     wr_idx, rd_idx;

  // pointer (mod 2*DEPTH) to entry index (mod DEPTH) and next pointer value
  function automatic logic [AW-1:0] to_idx(logic [PW-1:0] p);
    return (p >= PW'(DEPTH)) ? AW'(p - PW'(DEPTH)) : AW'(p);
  endfunction
  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(2 * DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign wr_idx    = to_idx(wr_ptr);
  assign rd_idx    = to_idx(rd_ptr);
  assign occupancy = (wr_ptr >= rd_ptr) ? wr_ptr - rd_ptr
                                        : PW'(wr_ptr + PW'(2 * DEPTH) - rd_ptr);
  assign empty     = (occupancy == '0);
  assign full      = (occupancy == PW'(DEPTH));
  assign head_data = data_mem[rd_idx];
  assign head_time = time_mem[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (enq) wr_ptr <= incr(wr_ptr);
      if (deq) rd_ptr <= incr(rd_ptr);
    end
  end

  always_ff @(posedge clk) begin
    if (enq) begin
      data_mem[wr_idx] <= enq_data;
      time_mem[wr_idx] <= enq_time;
    end
  end

  // Handshake rules: no push into a full FIFO, no pop from an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) enq |-> !full || deq);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) deq |-> !empty);

endmodule
