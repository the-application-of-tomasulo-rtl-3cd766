// Shared widths, encodings and record layouts of the 4-bit Tomasulo core.
//
// The core works on 4-bit data, eight architectural registers and 4-bit
// reservation-station tags, where tag 0 means "no producer". An instruction
// is 15 bits (operation 2:0, destination 6:3, source 1 10:7, source 2 14:11)
// and gains a validity bit (bit 15) when it enters the instruction queue, so
// that the all-zero word "ADD R0,R0,R0" can be told from an empty slot.
// A reservation-station entry is the 26-bit record busy / RS tag / op /
// Qa / Qb / Va / tag-Va / Vb / tag-Vb, laid out from bit 0 upward.
// These numbers and layouts are those of the design; the CDB record and the
// LOAD record are this implementation's own packaging.
package tomasulo_pkg;

  localparam int unsigned DATA_W   = 4;  // width of every data value
  localparam int unsigned TAG_W    = 4;  // width of a reservation-station tag
  localparam int unsigned REGF_W   = 4;  // width of a register field in an instruction
  localparam int unsigned NUM_REGS = 8;  // architectural registers R0..R7
  localparam int unsigned RIDX_W   = $clog2(NUM_REGS);

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [REGF_W-1:0] regf_t;

  // Operation codes (bits 2:0 of an instruction).
  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,
    OP_SUB  = 3'b001,
    OP_MUL  = 3'b010,
    OP_LOAD = 3'b011
  } op_e;

  // 16-bit opcode as it leaves the instruction queue.
  typedef struct packed {
    logic  valid;  // 15
    regf_t src2;   // 14:11
    regf_t src1;   // 10:7
    regf_t dest;   // 6:3
    op_e   op;     // 2:0
  } opcode_t;

  // 26-bit reservation-station entry.
  typedef struct packed {
    logic  tag_vb; // 25
    data_t vb;     // 24:21
    logic  tag_va; // 20
    data_t va;     // 19:16
    tag_t  qb;     // 15:12
    tag_t  qa;     // 11:8
    op_e   op;     // 7:5
    tag_t  rs_tag; // 4:1
    logic  busy;   // 0
  } rs_entry_t;

  // 8-bit destination_select: producing RS tag (7:4), destination register (3:0).
  typedef struct packed {
    tag_t  tag;
    regf_t dest;
  } dest_sel_t;

  // One common-data-bus beat: a tag of 0 means the bus is idle.
  typedef struct packed {
    tag_t  tag;
    data_t data;
  } cdb_t;

  // Register status as one packed word: entry r occupies bits 4r+3:4r.
  typedef tag_t [NUM_REGS-1:0] reg_status_t;

  // Architectural register index of a 4-bit register field (R0..R7 use bits 2:0).
  function automatic logic [RIDX_W-1:0] reg_index(regf_t f);
    return f[RIDX_W-1:0];
  endfunction

endpackage
