// tb_rw_arbiter: with both sides requesting the grants must alternate read,
// write, read, ...; a lone requester is always served; a cycle without
// advance leaves the turn unchanged.
module tb_rw_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_req = 0, rd_req = 0, advance = 0, valid, sel_read;

  rw_arbiter dut (.clk, .rst_n, .wr_req, .rd_req, .advance, .valid, .sel_read);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last_read;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_read = 1;
    for (int n = 0; n < 4000; n++) begin
      bit exp_v, exp_r;
      wr_req  = (n < 200) ? 1'b1 : 1'($urandom);
      rd_req  = (n < 200) ? 1'b1 : 1'($urandom);
      advance = (n < 200) ? 1'b1 : 1'($urandom);
      #1;
      exp_v = wr_req || rd_req;
      exp_r = rd_req && !(wr_req && last_read);
      checks++;
      if (valid != exp_v || (exp_v && sel_read != exp_r)) begin
        failures++;
        $display("n=%0d w=%0d r=%0d got %0d/%0d", n, wr_req, rd_req, valid, sel_read);
      end
      @(posedge clk);
      if (advance && exp_v) last_read = exp_r;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
