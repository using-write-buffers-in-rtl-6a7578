// sa_pkg: types and constants shared by the write-buffered systolic array
// accelerator. Data are IEEE-754 single-precision words; every computed value
// travels with the memory address it is destined for, so that values bound
// for the same address can be summed before they reach memory.
// The 20-bit address width and the all-ones "null" address follow the
// example addresses of the adder-tree description (five hex digits, -1 for
// an empty slot); the rest is this design's own choice.
package sa_pkg;

  localparam int unsigned FP_W   = 32;   // FP32 data word
  localparam int unsigned ADDR_W = 20;   // destination address width

  typedef logic [FP_W-1:0]   fp32_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Address carried by an empty slot (reads as -1).
  localparam addr_t NULL_ADDR = '1;

  // A computed value and the output-map address it belongs to.
  typedef struct packed {
    fp32_t value;
    addr_t addr;
  } entry_t;

  localparam fp32_t FP32_QNAN = 32'h7FC0_0000;

endpackage
