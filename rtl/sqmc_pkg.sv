// sqmc_pkg: shared constants, types and helper functions of the scalable
// QoS-aware packet memory controller (SQMC).
//
// The default sizes describe the two-class controller for an OC-3072 line
// card: 4 DRAM groups, 8 logical banks per group, 2 service classes and
// 32-entry bank FIFOs, 64-byte (512-bit) cells, a 1 GB packet memory split into
// 2 M blocks of 8 cells. A cell address is a 21-bit block address plus a 3-bit
// block offset; after hashing it becomes a 2-bit group, a 3-bit bank and a
// 19-bit bank address. DRAM timing is that of DDR parts with burst length 4:
// one cell access per group every 2 memory clocks and a row cycle time of
// 8 memory clocks. The weight update interval of 40,000 clocks is 100 us at a
// 400 MHz memory clock. The latency targets (60 and 400 cycles) and violation
// fractions (0.1 % and 1 %) are the two-class requirements used as the main
// example. The controller runs on the memory clock (a design choice).
package sqmc_pkg;

  localparam int unsigned NUM_GROUPS      = 4;
  localparam int unsigned BANKS_PER_GROUP = 8;
  localparam int unsigned NUM_CLASSES     = 2;
  localparam int unsigned FIFO_DEPTH      = 32;
  localparam int unsigned BLOCK_ADDR_W    = 21;
  localparam int unsigned BLOCK_OFF_W     = 3;
  localparam int unsigned DATA_W          = 512;
  localparam int unsigned TIME_W          = 16;   // enqueue time register
  localparam int unsigned TRC             = 8;    // row cycle time, memory clocks
  localparam int unsigned ISSUE_INTERVAL  = 2;    // memory clocks per cell access
  localparam int unsigned UPDATE_INTERVAL = 40000;// weight update interval U
  localparam int unsigned NUM_SUBRANGES   = 10;   // sub-ranges of X_i
  localparam int unsigned SUBRANGE_SHIFT  = 10;   // sub-range width 2^10 cells
  localparam int unsigned WEIGHT_W        = 8;
  localparam int unsigned INIT_WEIGHT     = 8;
  localparam int unsigned CNT_W           = 16;   // X_i / Y_i accumulator width

  // Per-class QoS requirement, packed 16 bits per class, class 0 in the LSBs.
  // Class 0: at most 0.1 % (1000 ppm) of cells above 60 cycles.
  // Class 1: at most 1 %  (10000 ppm) of cells above 400 cycles.
  localparam logic [NUM_CLASSES*16-1:0] TARGET_LAT_DEF = {16'd400, 16'd60};
  localparam logic [NUM_CLASSES*32-1:0] VIOL_PPM_DEF   = {32'd10000, 32'd1000};

  // Bank arbitration scheme.
  typedef enum logic {
    ARB_LQF = 1'b0,   // longest queue first: largest occupancy wins
    ARB_LLF = 1'b1    // longest latency first: oldest head cell wins
  } bank_arb_e;

  // ref_i[r] = N_i x (median of sub-range r), rounded to the nearest integer.
  // N_i is given in parts per million; sub-range r covers
  // [r*2^shift, (r+1)*2^shift) and its median is r*2^shift + 2^(shift-1).
  function automatic int unsigned ref_value(int unsigned n_ppm, int unsigned r,
                                            int unsigned shift);
    longint unsigned med;
    med = (longint'(r) << shift) + (longint'(1) << (shift - 1));
    return int'((med * longint'(n_ppm) + 64'd500000) / 64'd1000000);
  endfunction

endpackage
