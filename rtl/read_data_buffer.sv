// read_data_buffer: holds cells read from DRAM until they are taken.
//
// A FIFO of returned cells with their tags (class, bank, bank address).
// Cells leave in the order DRAM returned them, which is the order in which
// the group's schedulers issued the reads, not the order of the requests.
// The depth defaults to one entry per read bank FIFO entry of the group
// (classes x banks x FIFO depth = 512), the size the SRAM area estimate uses
// for this buffer. free reports the number of empty entries, which the DRAM
// interface uses as credit before issuing a read, so the buffer cannot
// overflow. Output is a valid/ready handshake with first-word fall-through.
// The document gives the buffer's role and size; its FIFO organisation and
// handshake are this design's choices.
module read_data_buffer #(
  parameter int unsigned WIDTH  = sqmc_pkg::DATA_W,
  parameter int unsigned DEPTH  = sqmc_pkg::NUM_CLASSES * sqmc_pkg::BANKS_PER_GROUP * sqmc_pkg::FIFO_DEPTH,
  parameter int unsigned FREE_W = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WIDTH-1:0]  in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [WIDTH-1:0]  out_data,
  output logic [FREE_W-1:0] free
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr, count;

  assign count     = wr_ptr - rd_ptr;
  assign free      = FREE_W'(DEPTH) - FREE_W'(count);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (in_valid)              wr_ptr <= wr_ptr + 1'b1;
      if (out_valid && out_ready) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> count != (AW+1)'(DEPTH));

endmodule
