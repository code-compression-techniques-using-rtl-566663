// ofr_pkg: types and constants shared by the operand-field-remapping
// decompression engine.
//
// An ARM instruction is rebuilt as {cond[3:0], opcode[7:0], OF2..OF6}, where
// the 8-bit "new opcode" is instruction bits 27:20 (opcode plus fixed bits)
// and OF2..OF6 are the five 4-bit operand fields in bits 19:0. The condition
// is carried once per instruction sequence in the codeword, so each
// instruction has five operand fields and five mapping tags.
//
// Mapping tags are 3 bits: 000 loads the next operand from the operand list
// dictionary, 001..100 take position 1..4 of the mapping queue (oldest
// first), 101..111 take majority register 1..3.
package ofr_pkg;

  localparam int unsigned OPC_W    = 8;   // new opcode width
  localparam int unsigned OF_W     = 4;   // operand field width
  localparam int unsigned NUM_OF   = 5;   // operand fields per instruction
  localparam int unsigned TAG_W    = 3;   // mapping tag width
  localparam int unsigned MQ_DEPTH = 4;   // mapping queue positions
  localparam int unsigned NUM_MR   = 3;   // majority registers
  localparam int unsigned CC_W     = 4;   // condition code width
  localparam int unsigned OPD_ENTRY_W = OPC_W + 1;        // {boundary, opcode}
  localparam int unsigned ORD_ENTRY_W = NUM_OF * TAG_W;   // five tags
  localparam int unsigned OLD_WIN_W   = NUM_OF * OF_W;    // up to five loads

  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [OF_W-1:0]   operand_t;
  typedef logic [OPC_W-1:0]  opcode_t;

  // One OPD entry as stored (boundary bit first in the bit stream).
  typedef struct packed {
    logic    last;     // boundary: this instruction ends the sequence
    opcode_t opcode;
  } opd_entry_t;

  // Codeword fields, in stream order.
  typedef enum logic [1:0] {
    F_CC  = 2'd0,
    F_OPD = 2'd1,
    F_ORD = 2'd2,
    F_OLD = 2'd3
  } field_e;

  // Targets of the table/memory load bus.
  typedef enum logic [2:0] {
    LD_CODE = 3'd0,   // compressed code byte
    LD_OPD  = 3'd1,   // OPD byte
    LD_ORD  = 3'd2,   // ORD byte
    LD_OLD  = 3'd3,   // OLD byte
    LD_MR   = 3'd4,   // majority register (addr = index 0..2)
    LD_HCNT = 3'd5,   // Huffman count: addr = {field, length}
    LD_HSYM = 3'd6    // Huffman symbol: addr = {field, rank}
  } ld_target_e;

  typedef struct packed {
    logic       we;
    ld_target_e target;
    logic [19:0] addr;
    logic [15:0] data;
  } ld_bus_t;

  // Rebuild a 32-bit ARM instruction from its parts.
  function automatic logic [31:0] assemble(input logic [CC_W-1:0] cc,
                                           input opcode_t opc,
                                           input logic [NUM_OF*OF_W-1:0] ops);
    return {cc, opc, ops};
  endfunction

endpackage
