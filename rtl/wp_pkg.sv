// wp_pkg: shared sizes and types of the way-predicted cache system.
//
// The defaults describe the main configuration: 32-bit virtual and physical
// addresses with 4 KB pages (2^20 pages), a 128-entry TLB per side with an
// attached way table, 8 KB 2-way L1 caches with 32-byte lines, and a unified
// 512 KB 8-way L2 cache with 128-byte lines that reads out 256 bits (one L1
// line) per access. A 4 KB page then holds 32 L2 lines, so every way table
// entry has 32 fields of one valid bit plus a 3-bit way index.
// The L2 latencies (6 cycles for a normal access of all ways, 4 cycles for an
// access of a single way) are the ones used for the latency study at a 0.5 ns
// cycle. Widths of the CPU word (32 bits) and the line-wide memory bus are
// this design's own choices.
package wp_pkg;

  // Address split
  parameter int unsigned ADDR_W       = 32;   // virtual and physical
  parameter int unsigned PAGE_OFF_W   = 12;   // 4 KB pages
  parameter int unsigned VPN_W        = ADDR_W - PAGE_OFF_W;
  parameter int unsigned PPN_W        = ADDR_W - PAGE_OFF_W;

  // TLB / way table
  parameter int unsigned TLB_ENTRIES  = 128;

  // L1 (per side)
  parameter int unsigned L1_LINE_BYTES = 32;
  parameter int unsigned L1_WAYS       = 2;
  parameter int unsigned L1_SETS       = 128;
  parameter int unsigned L1_LINE_BITS  = L1_LINE_BYTES * 8;   // 256

  // L2 (unified)
  parameter int unsigned L2_LINE_BYTES = 128;
  parameter int unsigned L2_WAYS       = 8;
  parameter int unsigned L2_SETS       = 512;
  parameter int unsigned L2_LINE_BITS  = L2_LINE_BYTES * 8;   // 1024
  parameter int unsigned L2_LAT_SET    = 6;   // normal access, all ways
  parameter int unsigned L2_LAT_WAY    = 4;   // single (predicted) way

  // Way table geometry derived from the above
  parameter int unsigned WT_FIELDS     = (1 << PAGE_OFF_W) / L2_LINE_BYTES;  // 32
  parameter int unsigned WAY_W         = $clog2(L2_WAYS);                    // 3

  // CPU word
  parameter int unsigned WORD_W        = 32;

  // Operation carried from an L1 side to the L2
  typedef enum logic {L2_READ = 1'b0, L2_WRITE = 1'b1} l2_op_e;

endpackage
