// sqmc_hash: cell address hash of the packet memory controller.
//
// A cell is addressed by the block it lives in and its offset inside the
// block. The hash rotates the offset by the low bits of the (randomly
// allocated) block address, so writes to freshly allocated blocks do not all
// start at offset 0:
//   cell_pos  = (block_offset + block_addr[J-1:0]) mod 2^J
//   mem_addr  = {block_addr, cell_pos}
//   group     = mem_addr[M-1:0]
//   bank      = mem_addr[N+M-1:M]
//   bank_addr = mem_addr[I+J-1:N+M]
// Consecutive cells of one block therefore land in different groups first,
// then in different banks. These equations are the document's; the module
// is purely combinational (zero latency). Only the J-bit addition is logic:
// with the default sizes 3 of the 24 output bits are computed and the other
// 21 are block address bits routed straight through, which is why the hash
// costs next to nothing. It needs at least one
// bank bit (N >= 1). With a single group (M = 0) the group output is one bit
// tied to 0 and all low bits go to the bank.
module sqmc_hash #(
  parameter int unsigned I = sqmc_pkg::BLOCK_ADDR_W,               // block address bits
  parameter int unsigned J = sqmc_pkg::BLOCK_OFF_W,                // block offset bits
  parameter int unsigned M = $clog2(sqmc_pkg::NUM_GROUPS),         // group bits
  parameter int unsigned N = $clog2(sqmc_pkg::BANKS_PER_GROUP),    // bank bits
  localparam int unsigned MW = (M > 0) ? M : 1                      // group port width
) (
  input  logic [I-1:0]       block_addr,
  input  logic [J-1:0]       block_offset,
  output logic [MW-1:0]      group,
  output logic [N-1:0]       bank,
  output logic [I+J-M-N-1:0] bank_addr
);

  logic [J-1:0]   cell_pos;
  logic [I+J-1:0] mem_addr;

  always_comb begin
    cell_pos  = block_offset + block_addr[J-1:0];   // J-bit add wraps mod 2^J
    mem_addr  = {block_addr, cell_pos};
    group     = (M > 0) ? mem_addr[MW-1:0] : '0;
    bank      = mem_addr[N+M-1:M];
    bank_addr = mem_addr[I+J-1:N+M];
  end

endmodule
