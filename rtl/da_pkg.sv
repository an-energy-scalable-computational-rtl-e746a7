// da_pkg: types and constants shared by the enhanced distributed-arithmetic
// (DA) unit, its sub-blocks and the DA array.
//
// The 12-bit configuration word selects a unit's function, its data I/O
// method, its input bit width (throughput / energy scalability) and whether
// the unit is awake. The four-phase operation (idle, input, processing,
// output) follows the architecture; the field layout and the function codes
// are this design's own choice.
package da_pkg;

  localparam int unsigned DW     = 16;       // data word (one shift-memory row)
  localparam int unsigned AW     = 2 * DW;   // accumulator / channel width
  localparam int unsigned ROWS   = 4;        // DA inputs M (shift-memory rows)
  localparam int unsigned LUT_N  = 1 << ROWS;// 2^M LUT words
  localparam int unsigned CFG_W  = 12;       // configuration word

  // Function codes (cfg_t.func)
  typedef enum logic [3:0] {
    F_DOT  = 4'd0,  // 4-input inner product by distributed arithmetic
    F_MUL  = 4'd1,  // signed 16x16 multiply, serial shift + add
    F_DIV  = 4'd2,  // unsigned 16/16 divide, serial subtract + shift
    F_SQRT = 4'd3,  // unsigned 32-bit square root, non-restoring
    F_ADD  = 4'd4,  // 32-bit parallel addition
    F_CADD = 4'd5,  // complex addition, both 16-bit halves in one cycle
    F_CSUB = 4'd6,  // complex subtraction
    F_CMUL = 4'd7,  // complex (Q1.15) multiplication, four serial products
    F_POLY = 4'd8   // Q1.15 polynomial by Horner's rule, LUT coefficients
  } func_e;

  // 12-bit configuration word
  typedef struct packed {
    logic        en;     // [11] awake; 0 = idle (sleep, state held)
    logic        cst_b;  // [10] second operand from LUT words 0/1, not port b
    logic        blk;    // [9]  DOT: load 4 words per result (else delay line)
    logic        fwd;    // [8]  DOT: send the evicted delay-line word on out b
    logic [3:0]  bw_m1;  // [7:4] input bit width minus one (1..16 bits);
                         //       for F_POLY the polynomial degree
    func_e       func;   // [3:0]
  } cfg_t;

  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_IN   = 2'd1,
    PH_EXEC = 2'd2,
    PH_OUT  = 2'd3
  } phase_e;

  // Accumulator operations
  typedef enum logic [2:0] {
    ACC_HOLD  = 3'd0,
    ACC_LOAD  = 3'd1,
    ACC_SHADD = 3'd2,
    ACC_ADD   = 3'd3,
    ACC_SADD  = 3'd4,
    ACC_SSUB  = 3'd5
  } acc_op_e;

  // Register map of a unit's configuration port
  localparam int unsigned REG_CFG = 16;      // addresses 0..15 are LUT words

endpackage
