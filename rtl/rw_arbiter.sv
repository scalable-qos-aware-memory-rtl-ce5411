// rw_arbiter: alternates between read and write scheduling in a group.
//
// A two-way round robin: when both the write side and the read side have a
// cell ready, the side not served last wins; when only one side is ready it
// is served (work-conserving). The alternation is the document's; serving a
// lone side is this design's choice. Combinational choice, state updated
// when advance commits a grant.
module rw_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_req,
  input  logic rd_req,
  input  logic advance,
  output logic valid,
  output logic sel_read      // 1: read side granted, 0: write side
);

  logic last_read;

  always_comb begin
    valid    = wr_req || rd_req;
    sel_read = rd_req && (!wr_req || !last_read);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 last_read <= 1'b1;
    else if (advance && valid)  last_read <= sel_read;
  end

endmodule
