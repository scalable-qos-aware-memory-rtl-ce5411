// tb_sqmc_hash: checks the cell address hash against an arithmetic model.
// Random block addresses and offsets are hashed at the default sizes
// (21-bit block address, 3-bit offset, 4 groups, 8 banks); the expected
// group, bank and bank address are computed with integer division and modulo
// on the memory address block_addr*8 + (offset + block_addr) mod 8. It also
// checks that the 8 cells of one block cover all 4 groups twice.
module tb_sqmc_hash;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [20:0] ba;
  logic [2:0]  off;
  logic [1:0]  grp;
  logic [2:0]  bnk;
  logic [18:0] row;

  sqmc_hash dut (.block_addr(ba), .block_offset(off), .group(grp), .bank(bnk), .bank_addr(row));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned mem;
    int gcount [4];
    for (int n = 0; n < 2000; n++) begin
      ba  = 21'($urandom);
      off = 3'($urandom);
      @(posedge clk);
      mem = longint'(ba) * 8 + ((longint'(off) + longint'(ba)) % 8);
      checks++;
      if (grp != 2'(mem % 4) || bnk != 3'((mem / 4) % 8) || row != 19'(mem / 32)) begin
        failures++;
        $display("mismatch ba=%h off=%0d got g=%0d b=%0d row=%h", ba, off, grp, bnk, row);
      end
    end
    // the cells of one block spread over all groups
    for (int n = 0; n < 50; n++) begin
      ba = 21'($urandom);
      foreach (gcount[k]) gcount[k] = 0;
      for (int o = 0; o < 8; o++) begin
        off = 3'(o);
        @(posedge clk);
        gcount[grp]++;
      end
      checks++;
      if (gcount[0] != 2 || gcount[1] != 2 || gcount[2] != 2 || gcount[3] != 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
