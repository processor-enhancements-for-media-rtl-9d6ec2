// Shared types and constants of the media coprocessor system.
//
// The coprocessor is a matrix of 8 rows x 3 processing elements (PEs) on
// 32-bit data, fed by a 256-bit system bus that carries one 32-bit word per
// row in each beat. The row count, the chain length of 3 and the 32/256-bit
// widths are the design's defining numbers; the address map, the layout of
// the per-row configuration word and the bus request/response structs are
// this implementation's own choices.
//
// Bus protocol (all masters and slaves): a master holds read or write,
// addr and wdata stable until it sees waitreq low; for a read, rdata is
// valid in that same cycle. One transfer per master is in flight at a time.
package coproc_pkg;

  localparam int unsigned DATA_W      = 32;              // PE datapath width
  localparam int unsigned LANES       = 8;               // rows = words per bus beat
  localparam int unsigned BUS_W       = DATA_W * LANES;  // 256-bit system bus
  localparam int unsigned PES_PER_ROW = 3;               // maximum chained operations
  localparam int unsigned ADDR_W      = 16;              // bus word (beat) address

  // Bus address map: addr[15:14] selects the slave.
  localparam logic [1:0] SEL_RAM    = 2'd0;
  localparam logic [1:0] SEL_COPROC = 2'd1;
  localparam logic [1:0] SEL_DMA    = 2'd2;

  // Coprocessor address: {region[3:0], index}. Region numbers:
  localparam logic [3:0] REG_OP1  = 4'd0;  // operand memory of PE1 (first operand)
  localparam logic [3:0] REG_OP2  = 4'd1;  // operand memory of PE1 (second operand)
  localparam logic [3:0] REG_OP4  = 4'd2;  // operand memory of PE2
  localparam logic [3:0] REG_OP6  = 4'd3;  // operand memory of PE3
  localparam logic [3:0] REG_RES  = 4'd4;  // result memory
  localparam logic [3:0] REG_CTRL = 4'd8;  // control registers (index below)
  localparam int unsigned CTRL_CFG    = 0; // write: lane r = configuration word of row r
  localparam int unsigned CTRL_COUNT  = 1; // write: lane 0 = number of data to process
  localparam int unsigned CTRL_START  = 2; // write: start; read: status

  // PE operations: y = f(a, b) where a is the chained operand (mem op1 for
  // PE1) and b the PE's own memory operand.
  typedef enum logic [2:0] {
    OP_MUL = 3'd0,  // y = (a * b) >>> frac
    OP_ADD = 3'd1,  // y = a + b
    OP_SUB = 3'd2,  // y = a - b
    OP_ACC = 3'd3,  // acc += a ; y = acc
    OP_MAC = 3'd4   // acc += (a * b) >>> frac ; y = acc
  } pe_op_e;

  // Per-row configuration word (32 bits, one bus lane).
  typedef struct packed {
    logic [15:0] rsvd;
    logic [4:0]  frac;   // fixed-point product right shift
    pe_op_e      op3;    // operation of PE3
    pe_op_e      op2;    // operation of PE2
    pe_op_e      op1;    // operation of PE1
    logic [1:0]  nops;   // chained operations 1..3; 0 = row idle
  } row_cfg_t;

  // Predefined path of a row, read from the control's path table.
  typedef struct packed {
    logic       active;   // row takes part in the instruction
    logic [1:0] res_sel;  // PE whose output feeds the result memory (0..2)
    logic [1:0] depth;    // PE pipeline stages before the result (1..3)
  } row_path_t;

  // Fixed table of predefined interconnect paths, indexed by chain length.
  function automatic row_path_t path_rom(input logic [1:0] nops);
    row_path_t p;
    unique case (nops)
      2'd1:    p = '{active: 1'b1, res_sel: 2'd0, depth: 2'd1};
      2'd2:    p = '{active: 1'b1, res_sel: 2'd1, depth: 2'd2};
      2'd3:    p = '{active: 1'b1, res_sel: 2'd2, depth: 2'd3};
      default: p = '{active: 1'b0, res_sel: 2'd0, depth: 2'd0};
    endcase
    return p;
  endfunction

  typedef struct packed {
    logic              read;
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [BUS_W-1:0]  wdata;
  } bus_req_t;

  typedef struct packed {
    logic             waitreq;
    logic [BUS_W-1:0] rdata;
  } bus_rsp_t;

endpackage
